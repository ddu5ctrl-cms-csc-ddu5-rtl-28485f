// ddu_pkg: constants and types shared by the DDU control FPGA modules.
//
// Holds the JTAG opcode numbers of the user instruction set, the FMM status
// bit positions, the Gigabit-Ethernet 8b/10b control characters, the DDU
// event-format marker nibbles and the CRC next-state functions used by the
// output and trigger-data CRCs. Opcode numbers, FMM bit meanings, the idle
// and sync characters and the format markers follow the design notes; the
// Ethernet end-of-packet characters are the standard 802.3z /T/R/ codes and
// are this design's choice.
package ddu_pkg;

  // ---------------- JTAG user opcodes (8-bit IR, first 36 decoded) ----------
  typedef enum logic [5:0] {
    OP_NOOP        = 6'd0,
    OP_RESET       = 6'd1,   // FPGA reset while selected (toggle function)
    OP_L1A_NUM     = 6'd2,   // 24-bit L1A number
    OP_STATUS      = 6'd3,   // 32-bit status
    OP_STATUS_LO   = 6'd4,
    OP_STATUS_HI   = 6'd5,
    OP_OUT_STAT    = 6'd6,
    OP_FOK         = 6'd7,
    OP_CRC_ERR     = 6'd10,  // fibers with a trigger-data CRC error, 15 bits
    OP_KILL_RD     = 6'd13,  // check KILL register, 20 bits
    OP_KILL_LD     = 6'd14,  // load KILL register, 20 bits
    OP_TMB_ERR     = 6'd16,  // fibers with a TMB CRC error, 15 bits
    OP_ALCT_ERR    = 6'd17,  // fibers with an ALCT CRC error, 15 bits
    OP_ERR_A       = 6'd22,
    OP_ERR_B       = 6'd23,
    OP_ERR_C       = 6'd24,
    OP_DMB_LIVE    = 6'd25,
    OP_PDMB_LIVE   = 6'd26,
    OP_BX_SET      = 6'd29,  // set BX per orbit, 12 bits
    OP_BX_RD       = 6'd30,
    OP_CAL_TOGGLE  = 6'd31,  // toggle CFEB_Cal auto L1
    OP_SRC_ID      = 6'd32,
    OP_VME_L1A     = 6'd33,
    OP_OCC         = 6'd34,  // occupancy scalers, 60 x 32-bit loop
    OP_ERR_SUM     = 6'd35
  } jtag_op_e;

  localparam int unsigned NUM_OPS = 36;

  // ---------------- FMM status bits -------------------------------------------
  localparam int unsigned FMM_BUSY = 0;  // NotREADY
  localparam int unsigned FMM_WARN = 1;  // Warning / near full
  localparam int unsigned FMM_OOS  = 2;  // lost sync, need SyncReset
  localparam int unsigned FMM_ERR  = 3;  // error, need HardReset

  // ---------------- GbE 8b/10b characters (K flag, byte) ----------------------
  localparam logic [7:0] K28_5 = 8'hBC;
  localparam logic [7:0] D16_2 = 8'h50;
  localparam logic [7:0] D21_5 = 8'hB5;
  localparam logic [7:0] D2_2  = 8'h42;
  localparam logic [7:0] K29_7 = 8'hFD;  // /T/ end of packet
  localparam logic [7:0] K23_7 = 8'hF7;  // /R/ carrier extend
  localparam logic [7:0] PREAMBLE = 8'h55;
  localparam logic [7:0] SFD      = 8'hD5;

  // ---------------- DDU event format ------------------------------------------
  localparam logic [3:0] BOE_MARK = 4'h5;   // first nibble of H1
  localparam logic [3:0] EOE_MARK = 4'hA;   // first nibble of TR
  localparam logic [63:0] H2_CONST_MASK = 64'h8000_0001_8000_0000;
  localparam logic [63:0] T2_WORD       = 64'h8000_FFFF_8000_8000;

  // ---------------- CRC next-state functions ----------------------------------
  // 22-bit CRC, 64 data bits per step, bit 0 of the word first, right-shifting
  // register with feedback into bits 21 and 20 (x^22 + x + 1 in reflected form).
  function automatic logic [21:0] crc22_next(input logic [21:0] c, input logic [63:0] d);
    logic [21:0] r;
    logic fb;
    r = c;
    for (int i = 0; i < 64; i++) begin
      fb = r[0] ^ d[i];
      r  = {fb, r[21:1]};
      r[20] = r[20] ^ fb;
    end
    return r;
  endfunction

  // 16-bit CRC x^16 + x^15 + x^2 + 1, reflected (LSB first) as in USB:
  // right-shifting register, feedback mask 16'hA001.
  function automatic logic [15:0] crc16_next(input logic [15:0] c, input logic [63:0] d);
    logic [15:0] r;
    logic fb;
    r = c;
    for (int i = 0; i < 64; i++) begin
      fb = r[0] ^ d[i];
      r  = {1'b0, r[15:1]};
      if (fb) r = r ^ 16'hA001;
    end
    return r;
  endfunction

  // Ethernet CRC-32, reflected, one byte.
  function automatic logic [31:0] crc32_byte(input logic [31:0] c, input logic [7:0] b);
    logic [31:0] r;
    r = c;
    for (int i = 0; i < 8; i++) begin
      if (r[0] ^ b[i]) r = {1'b0, r[31:1]} ^ 32'hEDB88320;
      else             r = {1'b0, r[31:1]};
    end
    return r;
  endfunction

endpackage
