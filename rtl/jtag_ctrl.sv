// jtag_ctrl: user JTAG instruction and data paths of the control FPGA.
//
// The FPGA's boundary-scan primitive offers two user scan chains. Chain 1
// (SEL1) is an 8-bit instruction register; chain 2 (SEL2) is a data register
// whose meaning depends on the instruction. Of the 8-bit instruction only
// the first 36 codes are decoded; any other value acts as NOOP. The strobes
// CAPTURE, SHIFT and UPDATE and the scan input TDI come from the primitive,
// already in step with CLK (one-clock pulses, shift one bit per SHIFT clock).
//
// Data path: on CAPTURE the data register loads CAP_VAL, the value of the
// register that the current opcode OP selects (the selection is made outside,
// from OP). Each SHIFT moves it one bit towards TDO, least significant bit
// first, and takes TDI in at bit 31. On UPDATE, a load opcode (14 "load KILL
// register", 20 bits; 29 "set BX per orbit", 12 bits) gives a one-clock
// LOAD pulse with the last WIDTH bits shifted in, right-justified, on
// LOAD_VAL. Opcode 34 (occupancy counters) also pulses OCC_NEXT on every
// capture so that successive reads walk through the counters.
//
// Instruction side effects: JTAG_RST is high for as long as opcode 1 (FPGA
// reset) is the current instruction, which is why a NOOP must follow it;
// writing opcode 31 toggles CAL_EN (CFEB calibration auto-L1A, enabled after
// reset); writing opcode 33 gives a one-clock VME_L1A pulse. The opcode
// numbers and widths follow the instruction table of the design notes; the
// strobe interface and the right-justification are this design's choices.
module jtag_ctrl
  import ddu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        sel1,
  input  logic        sel2,
  input  logic        capture,
  input  logic        shift,
  input  logic        update,
  input  logic        tdi,
  output logic        tdo,
  output jtag_op_e    op,
  input  logic [31:0] cap_val,
  output logic        load,
  output logic [31:0] load_val,
  output logic        jtag_rst,
  output logic        cal_en,
  output logic        vme_l1a,
  output logic        occ_next
);
  logic [7:0]  ir_sr, ir;
  logic [31:0] dr;
  logic [5:0]  ld_width;

  // decode: first 36 opcodes, everything else is NOOP
  always_comb begin
    if (ir < 8'(NUM_OPS)) op = jtag_op_e'(ir[5:0]);
    else                  op = OP_NOOP;
  end

  always_comb begin
    unique case (op)
      OP_KILL_LD: ld_width = 6'd20;
      OP_BX_SET:  ld_width = 6'd12;
      default:    ld_width = 6'd0;
    endcase
  end

  assign jtag_rst = (op == OP_RESET);
  assign tdo      = sel1 ? ir_sr[0] : dr[0];

  // instruction register
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ir_sr   <= '0;
      ir      <= '0;
      cal_en  <= 1'b1;
      vme_l1a <= 1'b0;
    end else begin
      vme_l1a <= 1'b0;
      if (sel1) begin
        if (capture)    ir_sr <= 8'h01;
        else if (shift) ir_sr <= {tdi, ir_sr[7:1]};
        else if (update) begin
          ir <= ir_sr;
          if (ir_sr == 8'(OP_CAL_TOGGLE)) cal_en  <= ~cal_en;
          if (ir_sr == 8'(OP_VME_L1A))    vme_l1a <= 1'b1;
        end
      end
    end
  end

  // data register
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      dr       <= '0;
      load     <= 1'b0;
      load_val <= '0;
      occ_next <= 1'b0;
    end else begin
      load     <= 1'b0;
      occ_next <= 1'b0;
      if (sel2) begin
        if (capture) begin
          dr       <= cap_val;
          occ_next <= (op == OP_OCC);
        end else if (shift) dr <= {tdi, dr[31:1]};
        else if (update && ld_width != 6'd0) begin
          load     <= 1'b1;
          load_val <= dr >> (6'd32 - ld_width);
        end
      end
    end
  end
endmodule
