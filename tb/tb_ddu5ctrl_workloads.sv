// tb_ddu5ctrl_workloads: event sizes of the DDU data format, run through the
// whole control FPGA at its default parameters.
//
// The DDU word count of an event is 6 + 25*Nts*nCFEB + 4*nDMB 64-bit words
// (Nts time samples per CFEB, each CFEB sample 25 words, each DMB 2 header and
// 2 trailer words), and must stay below 30070. This testbench builds events of
// the sizes the format is quoted for and checks that each leaves the FPGA
// whole and in order, with the right word count, and that the GbE spy path
// sends it in ceil(8*words/8960) packets:
//   - an event with no data (6 words), after the start timeout;
//   - one DMB with one CFEB, 8 samples (210 words);
//   - 15 DMBs with one CFEB each, 8 samples (3066 words, 3 GbE packets);
//   - 15 DMBs with five CFEBs each, 16 samples (30066 words, the largest event
//     below the 30070-word limit, 27 GbE packets).
// The first two run with one fiber live, the last two with all 15. The input
// FPGAs, the output FIFO and the GbE FIFO are modelled as in tb_ddu5ctrl.
module tb_ddu5ctrl_workloads;
  import ddu_pkg::*;

  logic clk = 0, gclk = 0, rst = 1;
  logic l1a_in = 0, bc0 = 0, sync_rst = 0, cal_mode = 0;
  logic [14:0] fiber_present = 15'h7FFF, fiberok = 15'h0001, in_rdy = 0;
  logic [35:0] in_ddr = 0;
  logic in_ren;
  logic jtag_sel1 = 0, jtag_sel2 = 0, jtag_capture = 0, jtag_shift = 0, jtag_update = 0, jtag_tdi = 0;
  logic jtag_tdo;
  logic [63:0] out_d;
  logic out_valid, out_eoe, out_stop = 0, out_full = 0;
  logic [63:0] gbe_fifo_d;
  logic gbe_fifo_empty, gbe_fifo_eoe, gbe_fifo_pae_n = 1, gbe_fifo_ren;
  logic global_run = 0, gbe_fifo_wen;
  logic sw_fake = 0, sw8 = 0, sw_gbe_test = 0;
  logic [15:0] gbe_txd;
  logic [1:0] gbe_txk;
  logic [3:0] fmm;
  logic system_rdy;
  logic [14:0] fok_led, dav_led;

  ddu5ctrl dut (.*);

  always #10 clk = ~clk;
  always #8 gclk = ~gclk;

  int checks = 0, failures = 0;
  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic logic [63:0] rnd_word();
    logic [63:0] w;
    logic [3:0] sp;
    w = {$urandom, $urandom};
    sp = 4'($urandom);
    for (int q = 0; q < 4; q++) w[16*q+12 +: 4] = sp;
    return w;
  endfunction

  // input FPGA model: 72-bit words {fiber, 0, 0, last, valid, data} on the DDR bus
  logic [71:0] src [$];
  initial begin
    logic [71:0] w;
    forever begin
      @(posedge clk); #1;
      w = '0;
      if (in_ren && src.size() > 0) w = src.pop_front();
      in_ddr = w[35:0];
      @(negedge clk); #1;
      in_ddr = w[71:36];
    end
  end

  // ndmb DMBs on fibers 0.., each with ncfeb CFEBs of nts samples
  task automatic make_event(input int ndmb, input int ncfeb, input int nts, output logic [63:0] exp [$]);
    int nw;
    exp = {};
    src = {};
    for (int f = 0; f < ndmb; f++) begin
      nw = 4 + 25 * nts * ncfeb;
      for (int i = 0; i < nw; i++) begin
        logic [63:0] d;
        d = rnd_word();
        exp.push_back(d);
        src.push_back({4'(f), 2'b00, (f == ndmb - 1 && i == nw - 1), 1'b1, d});
      end
    end
  endtask

  // output capture; complete events go to the GbE FIFO
  logic [63:0] cur_evt [$];
  logic [63:0] events [$][$];
  logic [64:0] gbe_fifo [$];
  logic [63:0] gbe_evt [$];
  int n_gbe_evts = 0;
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      cur_evt.push_back(out_d);
      if (out_eoe) begin
        events.push_back(cur_evt);
        cur_evt = {};
      end
    end
    // the GbE FIFO gets the words written to it, a whole event at a time
    if (!rst && gbe_fifo_wen) begin
      gbe_evt.push_back(out_d);
      if (out_eoe) begin
        foreach (gbe_evt[i]) gbe_fifo.push_back({(i == gbe_evt.size() - 1), gbe_evt[i]});
        gbe_evt = {};
        n_gbe_evts++;
      end
    end
  end
  assign gbe_fifo_empty = (gbe_fifo.size() == 0);
  assign gbe_fifo_d     = gbe_fifo_empty ? 64'h0 : gbe_fifo[0][63:0];
  assign gbe_fifo_eoe   = gbe_fifo_empty ? 1'b0 : gbe_fifo[0][64];
  always @(posedge gclk) if (gbe_fifo_ren && !gbe_fifo_empty) void'(gbe_fifo.pop_front());

  // a packet starts where the transmitter leaves control characters (idle)
  // for data: the first preamble word
  int n_gbe = 0;
  logic [1:0] prev_k = 2'b11;
  always @(posedge gclk) begin
    if (prev_k != 2'b00 && gbe_txk == 2'b00 && gbe_txd == {PREAMBLE, PREAMBLE}) n_gbe++;
    prev_k <= gbe_txk;
  end

  task automatic start_up;
    rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    events = {};
    n_gbe = 0;
    repeat (20) @(negedge clk);
    chk(system_rdy, "system ready");
  endtask

  task automatic run_event(input string name, input int ndmb, input int ncfeb, input int nts,
                           input int words, input int packets);
    logic [63:0] exp [$];
    logic [63:0] e [$];
    int n0, g0, t, bad;
    make_event(ndmb, ncfeb, nts, exp);
    n0 = events.size();
    g0 = n_gbe;
    @(negedge clk) l1a_in = 1;
    @(negedge clk) l1a_in = 0;
    t = 0;
    while (events.size() == n0 && t < 200000) begin @(negedge clk); t++; end
    chk(events.size() == n0 + 1, {name, ": event produced"});
    if (events.size() != n0 + 1) return;
    e = events[n0];
    chk(e.size() == words, $sformatf("%s: %0d words, expected %0d", name, e.size(), words));
    chk(e[e.size() - 1][55:32] == 24'(words), $sformatf("%s: trailer word count %0d", name, e[e.size() - 1][55:32]));
    bad = 0;
    if (e.size() == exp.size() + 6)
      foreach (exp[i]) if (e[3 + i] != exp[i]) bad++;
    chk(bad == 0 && e.size() == exp.size() + 6, $sformatf("%s: data words intact (%0d differ)", name, bad));
    t = 0;
    while ((gbe_fifo.size() > 0 || n_gbe - g0 < packets) && t < 400000) begin @(negedge clk); t++; end
    repeat (300) @(negedge clk);
    chk(n_gbe - g0 == packets, $sformatf("%s: %0d GbE packets, expected %0d", name, n_gbe - g0, packets));
    $display("%s: %0d words, %0d bytes, %0d GbE packets", name, e.size(), 8 * e.size(), n_gbe - g0);
  endtask

  initial begin
    // one live fiber
    fiberok = 15'h0001;
    start_up();
    in_rdy = 15'h0000;
    run_event("no data", 0, 0, 0, 6, 1);
    @(negedge clk) sync_rst = 1; @(negedge clk) sync_rst = 0;
    in_rdy = 15'h0001;
    run_event("1 DMB, 1 CFEB, 8 samples", 1, 1, 8, 210, 1);
    // all fifteen fibers live
    fiberok = 15'h7FFF;
    in_rdy = 15'h7FFF;
    start_up();
    run_event("15 DMB, 1 CFEB each, 8 samples", 15, 1, 8, 3066, 3);
    run_event("15 DMB, 5 CFEB each, 16 samples", 15, 5, 16, 30066, 27);
    chk(fmm == 4'b0000, "FMM ready after the workloads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
