// tb_jtag_ctrl: scans instructions and data through the user JTAG path.
// Checks the captured instruction pattern, opcode decode (codes above 35 act
// as NOOP), read-back of the selected register through TDO, the load strobes
// of "load KILL register" (20 bits) and "set BX per orbit" (12 bits), the
// reset held while opcode 1 is current, the calibration toggle, the VME L1A
// pulse and the occupancy step on capture.
module tb_jtag_ctrl;
  import ddu_pkg::*;
  logic clk = 0, rst = 1;
  logic sel1 = 0, sel2 = 0, capture = 0, shift = 0, update = 0, tdi = 0, tdo;
  jtag_op_e op;
  logic [31:0] cap_val, load_val;
  logic load, jtag_rst, cal_en, vme_l1a, occ_next;
  int checks = 0, failures = 0;
  int n_load = 0, n_l1a = 0, n_occ = 0;
  logic [31:0] last_load;

  jtag_ctrl dut (.clk(clk), .rst(rst), .sel1(sel1), .sel2(sel2), .capture(capture), .shift(shift),
                 .update(update), .tdi(tdi), .tdo(tdo), .op(op), .cap_val(cap_val), .load(load),
                 .load_val(load_val), .jtag_rst(jtag_rst), .cal_en(cal_en), .vme_l1a(vme_l1a),
                 .occ_next(occ_next));
  always #5 clk = ~clk;

  assign cap_val = {2'b10, 24'hC0FFEE, 6'(op)};

  always @(posedge clk) begin
    if (!rst) begin
      if (load) begin n_load++; last_load = load_val; end
      if (vme_l1a) n_l1a++;
      if (occ_next) n_occ++;
    end
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1; @(negedge clk) s = 0;
  endtask

  task automatic scan_ir(input logic [7:0] v, output logic [7:0] out);
    sel1 = 1;
    pulse(capture);
    for (int i = 0; i < 8; i++) begin
      out[i] = tdo; tdi = v[i];
      pulse(shift);
    end
    pulse(update);
    sel1 = 0;
    @(negedge clk);
  endtask

  task automatic scan_dr(input logic [31:0] v, input int n, output logic [31:0] out);
    out = '0;
    sel2 = 1;
    pulse(capture);
    for (int i = 0; i < n; i++) begin
      out[i] = tdo; tdi = v[i];
      pulse(shift);
    end
    pulse(update);
    sel2 = 0;
    @(negedge clk);
  endtask

  initial begin
    logic [7:0] ir_out;
    logic [31:0] dr_out;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    chk(cal_en == 1'b1, "calibration enabled after reset");
    // read-back of a 32-bit register
    scan_ir(8'd3, ir_out);
    chk(ir_out == 8'h01, "IR capture pattern");
    chk(op == OP_STATUS, "decode opcode 3");
    scan_dr(32'h0, 32, dr_out);
    chk(dr_out == {2'b10, 24'hC0FFEE, 6'd3}, $sformatf("read-back %h", dr_out));
    // undecoded opcode
    scan_ir(8'd200, ir_out);
    chk(op == OP_NOOP, "opcode 200 is NOOP");
    // load kill register (20 bits)
    scan_ir(8'd14, ir_out);
    scan_dr(32'h000A_BCDE, 20, dr_out);
    chk(n_load == 1 && last_load == 32'h000A_BCDE, $sformatf("kill load %h", last_load));
    // set BX per orbit (12 bits)
    scan_ir(8'd29, ir_out);
    scan_dr(32'd923, 12, dr_out);
    chk(n_load == 2 && last_load == 32'd923, $sformatf("BX load %0d n=%0d", last_load, n_load));
    // read-only opcode gives no load
    scan_ir(8'd13, ir_out);
    scan_dr(32'hFFFF_FFFF, 20, dr_out);
    chk(n_load == 2, "no load on read opcode");
    // reset while opcode 1
    scan_ir(8'd1, ir_out);
    chk(jtag_rst, "reset asserted on opcode 1");
    repeat (3) @(negedge clk);
    chk(jtag_rst, "reset held until next instruction");
    scan_ir(8'd0, ir_out);
    chk(!jtag_rst, "NOOP releases reset");
    // toggles
    scan_ir(8'd31, ir_out);
    chk(cal_en == 1'b0, "calibration toggled off");
    scan_ir(8'd31, ir_out);
    chk(cal_en == 1'b1, "calibration toggled on");
    scan_ir(8'd33, ir_out);
    chk(n_l1a == 1, $sformatf("VME L1A pulse %0d", n_l1a));
    // occupancy loop
    scan_ir(8'd34, ir_out);
    scan_dr(32'h0, 32, dr_out);
    scan_dr(32'h0, 32, dr_out);
    chk(n_occ == 2, "occupancy step per capture");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
