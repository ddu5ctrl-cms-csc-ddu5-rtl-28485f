// tb_ddu5ctrl: end-to-end test of the DDU control FPGA at its default
// parameters.
//
// The testbench plays the TTC system (L1A, BC0, resync), the input FPGAs
// (72-bit words over the 36-pin DDR bus, one word per clock while the read
// enable is high), the output FIFO (with stop), the GbE FIFO (fed with the
// complete events the DDU produced) and a JTAG master. It sends a series of
// events and checks each output event word by word against what it sent:
// header fields, forwarded data, word count and trailer. Along the way it
// makes each mechanism of the design happen and counts it: close L1As, a
// start timeout with a missing fiber, output stops, good and bad trigger
// CRCs, a special-word error, stuck data, L1A-queue warning, FMM lost-sync
// and error states and their resets, a resync held back until the DDU is
// empty, an L1A with every fiber killed (read
// out at once as an empty event), JTAG reads and loads (kill register,
// orbit length, occupancy counters), the JTAG reset, GbE packets, and the
// GbE copy leaving out empty events in a global run, and the fake-L1A and
// GbE test-counter switches.
// A mechanism that never happened counts as a failure.
module tb_ddu5ctrl;
  import ddu_pkg::*;

  logic clk = 0, gclk = 0, rst = 1;
  logic l1a_in = 0, bc0 = 0, sync_rst = 0, cal_mode = 0;
  logic [14:0] fiber_present = 15'h001F, fiberok = 15'h000F, in_rdy = 0;
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

  always #10 clk = ~clk;    // read-out clock
  always #8 gclk = ~gclk;   // GbE clock

  int checks = 0, failures = 0;
  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_close = 0, n_start_to = 0, n_stall = 0, n_tcrc_ok = 0, n_tcrc_bad = 0, n_sperr = 0;
  int n_stuck = 0, n_warn = 0, n_oos = 0, n_err = 0, n_jload = 0, n_occ = 0, n_jrst = 0;
  int n_gbe = 0, n_empty = 0, n_events = 0, n_kill = 0, n_sync_held = 0, n_gbe_skip = 0, n_fake = 0;

  // ---------------- CRC-22 reference ----------------
  function automatic logic [21:0] crc22_ref(input logic [21:0] s, input logic [63:0] x);
    for (int i = 0; i < 64; i++) begin
      logic f;
      f = s[0] ^ x[i];
      s = s >> 1;
      if (f) s = s ^ 22'h300000;
    end
    return s;
  endfunction

  function automatic logic [63:0] rnd_word();
    logic [63:0] w;
    logic [3:0] sp;
    w = {$urandom, $urandom};
    sp = 4'($urandom);
    for (int q = 0; q < 4; q++) w[16*q+12 +: 4] = sp;
    return w;
  endfunction

  // ---------------- input FPGA model ----------------
  typedef struct packed { logic [3:0] fib; logic trl, trg, last, valid; logic [63:0] d; } iword_t;
  iword_t src [$];          // words of the event being read
  logic inject_stuck = 0;

  initial begin
    iword_t w;
    forever begin
      @(posedge clk); #1;
      w = '0;
      if (inject_stuck) w = '{fib: 4'd0, trl: 0, trg: 0, last: 0, valid: 1, d: rnd_word()};
      else if (in_ren && src.size() > 0) w = src.pop_front();
      in_ddr = w[35:0];
      @(negedge clk); #1;
      in_ddr = w[71:36];
    end
  end

  // Build the words of one event; return the data words expected in the output.
  // fib_words[f] = number of CFEB words of fiber f (-1: fiber sends nothing);
  // trig: fiber 0 carries ALCT and TMB blocks; bad_crc corrupts the TMB CRC;
  // sp_bad corrupts the special bits of one CFEB word of fiber 0.
  task automatic make_event(input int fib_words [4], input bit trig, input bit bad_crc, input bit sp_bad,
                            output logic [63:0] exp [$]);
    iword_t w;
    int lastf;
    exp = {};
    src = {};
    lastf = -1;
    for (int f = 0; f < 4; f++) if (fib_words[f] >= 0) lastf = f;
    for (int f = 0; f < 4; f++) begin
      if (fib_words[f] < 0) continue;
      for (int i = 0; i < 2; i++) begin          // DMB header
        w = '{fib: 4'(f), trl: 0, trg: 0, last: 0, valid: 1, d: rnd_word()};
        src.push_back(w);
      end
      if (trig && f == 0) begin
        for (int b = 0; b < 2; b++) begin        // ALCT then TMB
          logic [21:0] c;
          c = '0;
          for (int i = 0; i < 3; i++) begin
            w = '{fib: 4'(f), trl: 0, trg: 1, last: 0, valid: 1, d: rnd_word()};
            c = crc22_ref(c, w.d);
            src.push_back(w);
          end
          w = '{fib: 4'(f), trl: 1, trg: 1, last: 0, valid: 1, d: rnd_word()};
          if (bad_crc && b == 1) c = c ^ 22'h1;
          w.d[21:0] = c;
          for (int q = 1; q < 4; q++) w.d[16*q+12 +: 4] = c[15:12];
          src.push_back(w);
        end
      end
      for (int i = 0; i < fib_words[f]; i++) begin
        w = '{fib: 4'(f), trl: 0, trg: 0, last: 0, valid: 1, d: rnd_word()};
        if (sp_bad && f == 0 && i == 1) w.d[60] = ~w.d[60];
        src.push_back(w);
      end
      for (int i = 0; i < 2; i++) begin          // DMB trailer
        w = '{fib: 4'(f), trl: 0, trg: 0, last: (f == lastf && i == 1), valid: 1, d: rnd_word()};
        src.push_back(w);
      end
    end
    foreach (src[i]) exp.push_back(src[i].d);
  endtask

  // ---------------- output capture ----------------
  logic [63:0] cur_evt [$];
  logic [63:0] events [$][$];
  logic [63:0] gbe_q [$];
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
    if (!rst && out_stop && dut.reading) n_stall++;
  end

  // GbE FIFO model (first word fall through), clocked by GCLK
  assign gbe_fifo_empty = (gbe_fifo.size() == 0);
  assign gbe_fifo_d     = gbe_fifo_empty ? 64'h0 : gbe_fifo[0][63:0];
  assign gbe_fifo_eoe   = gbe_fifo_empty ? 1'b0 : gbe_fifo[0][64];
  always @(posedge gclk) if (gbe_fifo_ren && !gbe_fifo_empty) void'(gbe_fifo.pop_front());

  // GbE receiver: count packets and check that each starts with an H1 word
  int g_state = 0;
  bit g_test = 0;
  int n_gtest = 0;
  logic [63:0] g_last;
  byte unsigned g_bytes [$];
  logic [1:0] g_prev_k = 2'b11;
  always @(posedge gclk) begin
    g_prev_k <= gbe_txk;
    if (g_state == 0 && g_prev_k != 2'b00 && gbe_txk == 2'b00) g_state = 2;      // preamble
    else if (g_state == 2 && gbe_txd == {PREAMBLE, SFD}) begin g_state = 1; g_bytes = {}; end
    else if (g_state == 1 && gbe_txk == 2'b11) begin
      n_gbe++;
      g_state = 0;
      if (g_test) begin
        logic [63:0] v;
        v = '0;
        for (int i = 4; i < 12; i++) v = {v[55:0], g_bytes[i]};
        chk(g_bytes.size() == 4 + 64 + 2 + 4, $sformatf("GbE test packet of %0d bytes (FF x4, word and fill, number, CRC)", g_bytes.size()));
        if (n_gtest > 0) chk(v == g_last + 64'd1, $sformatf("GbE test counter %0h after %0h", v, g_last));
        g_last = v;
        n_gtest++;
      end else
        chk(g_bytes.size() >= 12 && g_bytes[4][7:4] == 4'h5, "GbE packet starts with a DDU header");
    end else if (g_state == 1) begin
      g_bytes.push_back(gbe_txd[15:8]);
      g_bytes.push_back(gbe_txd[7:0]);
    end
  end

  // FMM and other watchers
  always @(posedge clk) if (!rst) begin
    if (fmm[FMM_WARN]) n_warn++;
    if (fmm[FMM_OOS])  n_oos++;
    if (fmm[FMM_ERR])  n_err++;
    if (dut.u_close.l1a_out && dut.u_close.sbxn[12]) n_close++;
    if (dut.stuck) n_stuck++;
    if (dut.gold && dut.w_trl && !dut.tcrc_err) n_tcrc_ok++;
    if (dut.tcrc_err) n_tcrc_bad++;
    if (dut.gold && (|dut.sp_err)) n_sperr++;
    if (dut.occ_upd) n_occ++;
  end

  // ---------------- JTAG master ----------------
  task automatic jpulse(ref logic s);
    @(negedge clk) s = 1; @(negedge clk) s = 0;
  endtask
  task automatic jtag_ir(input logic [7:0] v);
    jtag_sel1 = 1;
    jpulse(jtag_capture);
    for (int i = 0; i < 8; i++) begin jtag_tdi = v[i]; jpulse(jtag_shift); end
    jpulse(jtag_update);
    jtag_sel1 = 0;
  endtask
  task automatic jtag_dr(input logic [31:0] v, input int n, output logic [31:0] out);
    out = '0;
    jtag_sel2 = 1;
    jpulse(jtag_capture);
    for (int i = 0; i < n; i++) begin out[i] = jtag_tdo; jtag_tdi = v[i]; jpulse(jtag_shift); end
    jpulse(jtag_update);
    jtag_sel2 = 0;
  endtask
  task automatic jtag_read(input logic [7:0] op, input int n, output logic [31:0] out);
    jtag_ir(op);
    jtag_dr(32'h0, n, out);
  endtask

  // ---------------- event helpers ----------------
  int l1a_count = 0;
  task automatic send_l1a;
    @(negedge clk) l1a_in = 1;
    @(negedge clk) l1a_in = 0;
    l1a_count++;
  endtask

  task automatic wait_events(input int n);
    int t;
    t = 0;
    while (events.size() < n && t < 20000) begin @(negedge clk); t++; end
    chk(events.size() >= n, $sformatf("event %0d produced", n));
  endtask

  task automatic check_event(input int idx, input logic [63:0] exp [$], input logic [14:0] dav,
                             input logic close);
    logic [63:0] e [$];
    e = events[idx];
    n_events++;
    chk(e.size() == exp.size() + 6, $sformatf("event %0d size %0d, expected %0d", idx, e.size(), exp.size() + 6));
    if (e.size() != exp.size() + 6) return;
    chk(e[0][63:56] == 8'h51 && e[0][19:8] == 12'd760, $sformatf("event %0d H1 marker/source %h", idx, e[0]));
    chk(e[0][55:32] == 24'(idx + 1), $sformatf("event %0d L1A number %0d", idx, e[0][55:32]));
    chk(e[0][0] == close, $sformatf("event %0d close flag", idx));
    chk(e[1] == {48'h8000_0001_8000, 1'b0, dav}, $sformatf("event %0d H2 %h", idx, e[1]));
    chk(e[2][62:48] == 15'h000F, $sformatf("event %0d live fibers", idx));
    foreach (exp[i]) chk(e[3 + i] == exp[i], $sformatf("event %0d data word %0d", idx, i));
    chk(e[e.size() - 3] == 64'h8000_FFFF_8000_8000, $sformatf("event %0d T-2", idx));
    chk(e[e.size() - 1][63:60] == 4'hA && e[e.size() - 1][55:32] == 24'(e.size()),
        $sformatf("event %0d TR word count", idx));
    if (exp.size() == 0) n_empty++;
  endtask

  // ---------------- scenario ----------------
  initial begin
    logic [63:0] expA [$], expB [$], expC [$], expD [$], expE [$], expF [$];
    logic [31:0] r;
    int fw [4];
    int t, nev, ng;
    logic [11:0] b;

    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    t = 0;
    while (!system_rdy && t < 100) begin @(negedge clk); t++; end
    chk(system_rdy, "system ready after start-up");
    repeat (3) @(negedge clk);
    chk(fmm == 4'b0000, "FMM ready");

    // JTAG read-back of defaults
    jtag_read(8'd13, 20, r); chk(r[19:0] == 20'hFFFFF, $sformatf("kill register %h", r));
    jtag_read(8'd30, 12, r); chk(r[11:0] == 12'd3563, $sformatf("BX per orbit %0d", r));
    jtag_read(8'd32, 16, r); chk(r[15:0] == 16'd760, $sformatf("source ID %0d", r));
    jtag_read(8'd25, 15, r); chk(r[14:0] == 15'h000F, $sformatf("DMB live %h", r));
    jtag_read(8'd10, 15, r); chk(r[14:0] == 15'h0000, $sformatf("CRC errors %h after reset", r));
    // set the orbit length to the SPS value and back
    jtag_ir(8'd29); jtag_dr(32'd923, 12, r); n_jload++;
    jtag_read(8'd30, 12, r); chk(r[11:0] == 12'd923, "BX per orbit loaded");
    jtag_ir(8'd29); jtag_dr(32'd3563, 12, r); n_jload++;
    @(negedge clk) bc0 = 1; @(negedge clk) bc0 = 0;

    // Event A: four fibers, trigger data on fiber 0, all ready
    in_rdy = 15'h000F;
    fw = '{10, 0, 3, 0};
    make_event(fw, 1, 0, 0, expA);
    send_l1a();
    wait_events(1);
    check_event(0, expA, 15'h000F, 1'b0);

    // Events B and C: two L1As 10 crossings apart
    send_l1a();
    repeat (9) @(negedge clk);
    send_l1a();
    fw = '{12, 1, 0, 2};
    make_event(fw, 0, 0, 0, expB);
    t = 0; while (src.size() > 0 && t < 5000) begin @(negedge clk); t++; end
    wait_events(2);
    fw = '{9, 0, 0, 0};
    make_event(fw, 1, 0, 0, expC);
    wait_events(3);
    check_event(1, expB, 15'h000F, 1'b1);
    check_event(2, expC, 15'h000F, 1'b0);

    // Event D: fiber 2 never ready -> start timeout, event from fibers 0, 1, 3
    in_rdy = 15'h000B;
    fw = '{9, 0, -1, 1};
    make_event(fw, 0, 0, 0, expD);
    send_l1a();
    wait_events(4);
    check_event(3, expD, 15'h000B, 1'b0);
    chk(events[3][2][30:16] == 15'h0004, "start timeout of fiber 2 in H3");
    n_start_to += (events[3][2][30:16] != 0);
    chk(events[3][events[3].size() - 2][31:0] == 32'h0004_0000, "fiber 2 warning, no errors in T-1");
    repeat (3) @(negedge clk);
    chk(fmm[FMM_OOS], "FMM lost sync after the start timeout");
    @(negedge clk) sync_rst = 1; @(negedge clk) sync_rst = 0;
    repeat (3) @(negedge clk);
    chk(!fmm[FMM_OOS], "resync clears lost sync");
    in_rdy = 15'h000F;

    // Event E: output stops while the event is built
    fw = '{30, 5, 5, 5};
    make_event(fw, 1, 0, 0, expE);
    send_l1a();
    fork
      begin
        for (int i = 0; i < 400; i++) begin
          @(negedge clk) out_stop = ($urandom % 3 == 0);
        end
        out_stop = 0;
      end
      wait_events(5);
    join
    out_stop = 0;
    check_event(4, expE, 15'h000F, 1'b0);

    // Event F: bad TMB CRC and a special-word error -> FMM error
    fw = '{10, 0, 0, 0};
    make_event(fw, 1, 1, 1, expF);
    send_l1a();
    wait_events(6);
    check_event(5, expF, 15'h000F, 1'b0);
    chk(events[5][events[5].size() - 2][14:0] == 15'h0001, "fiber 0 error in T-1");
    repeat (3) @(negedge clk);
    chk(fmm[FMM_ERR], "FMM error after bad data");
    jtag_read(8'd22, 16, r);
    chk(r[3] && r[4], $sformatf("error register A %h", r));
    jtag_read(8'd10, 15, r); chk(r[14:0] == 15'h0001, $sformatf("CRC errors %h: fiber 0", r));
    jtag_read(8'd16, 15, r); chk(r[14:0] == 15'h0001, $sformatf("TMB errors %h: fiber 0", r));
    jtag_read(8'd17, 15, r); chk(r[14:0] == 15'h0000, $sformatf("ALCT errors %h: none", r));
    jtag_read(8'd35, 15, r); chk(r[0], $sformatf("error sum %h includes fiber 0", r));

    // stuck data: a word arrives while no event is read
    @(negedge clk) inject_stuck = 1;
    @(posedge clk);
    @(negedge clk) inject_stuck = 0;
    repeat (4) @(negedge clk);
    jtag_read(8'd22, 16, r);
    chk(r[0], "stuck data recorded");

    // occupancy counters of fiber 0: DMB and CFEB in all 6 events with data on fiber 0,
    // ALCT and TMB in events A, C, E and F
    jtag_ir(8'd34);
    jtag_dr(32'h0, 32, r);        // capture shows counter 0, then steps
    chk(r == 32'd6, $sformatf("fiber 0 DMB count %0d", r));
    jtag_dr(32'h0, 32, r);
    chk(r == 32'd4, $sformatf("fiber 0 ALCT count %0d", r));
    jtag_dr(32'h0, 32, r);
    chk(r == 32'd4, $sformatf("fiber 0 TMB count %0d", r));
    jtag_dr(32'h0, 32, r);
    chk(r == 32'd6, $sformatf("fiber 0 CFEB count %0d", r));

    // L1A burst with no data ready: events wait for the start timeout, the
    // L1A queue fills and the FMM warns
    // (a global run: the GbE copy leaves these empty events out)
    in_rdy = 15'h0000;
    global_run = 1;
    nev = events.size();
    ng = n_gbe_evts;
    for (int i = 0; i < 20; i++) begin
      send_l1a();
      repeat (43) @(negedge clk);
    end
    // a resync while L1As are pending is held back until the DDU is empty
    @(negedge clk) sync_rst = 1;
    @(negedge clk) sync_rst = 0;
    chk(dut.sync_pend && fmm[FMM_OOS], "resync held back while L1As are pending");
    n_sync_held += dut.sync_pend;
    wait_events(nev + 20);
    repeat (3) @(negedge clk);
    chk(!dut.sync_pend && !fmm[FMM_OOS], "held resync applied once the DDU is empty");
    chk(n_gbe_evts == ng, "empty events of a global run not written to the GbE FIFO");
    n_gbe_skip += (events.size() - nev) - (n_gbe_evts - ng);
    global_run = 0;
    for (int i = nev; i < nev + 20; i++) begin
      logic [63:0] none [$];
      none = {};
      check_event(i, none, 15'h0000, 1'b0);
    end
    chk(n_warn > 0, "FMM warning during the L1A burst");
    in_rdy = 15'h000F;

    // L1A number over JTAG
    jtag_read(8'd2, 24, r);
    chk(r[23:0] == 24'(l1a_count), $sformatf("L1A number %0d, sent %0d", r, l1a_count));


    // kill every fiber: an L1A is then read out at once as an empty event
    jtag_ir(8'd14); jtag_dr(32'h0, 20, r); n_jload++;
    jtag_read(8'd25, 15, r); chk(r[14:0] == 15'h0000, "no live fibers after kill");
    nev = events.size();
    send_l1a();
    t = 0;
    while (events.size() == nev && t < 100) begin @(negedge clk); t++; end
    chk(events.size() == nev + 1 && t < 100, $sformatf("empty event %0d clocks after the L1A", t));
    if (events.size() == nev + 1) begin
      chk(events[nev].size() == 6 && events[nev][2][62:48] == 0 && events[nev][2][30:16] == 0,
          "event with no live fiber: 6 words, no start timeout");
      n_empty += (events[nev].size() == 6);
      n_kill++;
    end

    // fake-L1A mode (switch 7 on, switch 8 off): TTC L1A and BC0 ignored,
    // a JTAG L1A still makes an event
    sw_fake = 1;
    nev = events.size();
    send_l1a();
    l1a_count--;
    repeat (100) @(negedge clk);
    chk(events.size() == nev, "TTC L1A ignored in fake-L1A mode");
    b = dut.bxn;
    @(negedge clk) bc0 = 1;
    @(negedge clk) bc0 = 0;
    chk(dut.bxn == ((b + 2) % (dut.bx_lim + 1)), "BC0 ignored in fake-L1A mode");
    jtag_ir(8'd33);
    jtag_ir(8'd0);
    l1a_count++;
    t = 0;
    while (events.size() == nev && t < 100) begin @(negedge clk); t++; end
    chk(events.size() == nev + 1, "JTAG L1A read out in fake-L1A mode");
    if (events.size() == nev + 1) n_fake++;
    sw8 = 1;
    send_l1a();
    t = 0;
    while (events.size() == nev + 1 && t < 100) begin @(negedge clk); t++; end
    chk(events.size() == nev + 2, "TTC L1A taken with switch 8 on");
    chk(dav_led == 15'd56, $sformatf("switch 8 shows version %0d on the DAV LEDs", dav_led));
    sw_fake = 0; sw8 = 0;
    jtag_ir(8'd14); jtag_dr(32'hFFFFF, 20, r); n_jload++;
    jtag_read(8'd25, 15, r); chk(r[14:0] == 15'h000F, "fibers live again");

    // let the GbE path send every event
    t = 0;
    while (n_gbe < n_gbe_evts && t < 200000) begin @(negedge clk); t++; end
    chk(n_gbe == n_gbe_evts && n_gbe_evts == events.size() - 20,
        $sformatf("GbE packets %0d for %0d events, %0d written to GbE", n_gbe, events.size(), n_gbe_evts));

    // GbE test switch: packets carry a counter instead of events
    repeat (200) @(negedge gclk);
    g_test = 1;
    sw_gbe_test = 1;
    ng = n_gbe;
    t = 0;
    while (n_gbe < ng + 3 && t < 10000) begin @(negedge gclk); t++; end
    sw_gbe_test = 0;
    chk(n_gtest == 3, $sformatf("GbE test packets %0d", n_gtest));
    repeat (200) @(negedge gclk);
    g_test = 0;

    // JTAG reset: clears the L1A number and the errors, then NOOP
    jtag_ir(8'd1);
    repeat (2) @(negedge clk);
    chk(!system_rdy, "JTAG reset holds the system");
    n_jrst++;
    jtag_ir(8'd0);
    t = 0;
    while (!system_rdy && t < 100) begin @(negedge clk); t++; end
    repeat (3) @(negedge clk);
    chk(fmm == 4'b0000, "FMM ready after JTAG reset");
    jtag_read(8'd2, 24, r);
    chk(r[23:0] == 0, "L1A number cleared by JTAG reset");

    // mechanism coverage
    chk(n_close > 0, "close L1A seen");
    chk(n_start_to > 0, "start timeout seen");
    chk(n_stall > 0, "output stop seen");
    chk(n_tcrc_ok > 0, "good trigger CRC seen");
    chk(n_tcrc_bad > 0, "bad trigger CRC seen");
    chk(n_sperr > 0, "special word error seen");
    chk(n_stuck > 0, "stuck data seen");
    chk(n_warn > 0 && n_oos > 0 && n_err > 0, "FMM warning, lost sync and error seen");
    chk(n_jload > 0, "JTAG load seen");
    chk(n_occ > 0, "occupancy update seen");
    chk(n_jrst > 0, "JTAG reset seen");
    chk(n_gbe > 0, "GbE packet seen");
    chk(n_empty > 0, "event without data seen");
    chk(n_kill > 0, "event with every fiber killed seen");
    chk(n_sync_held > 0, "held-back resync seen");
    chk(n_gbe_skip > 0, "empty events left out of the GbE copy seen");
    chk(n_fake > 0, "JTAG-only L1A in fake-L1A mode seen");
    chk(n_gtest > 1, "GbE test counter packets seen");
    $display("mechanisms: close=%0d start_to=%0d stall=%0d tcrc_ok=%0d tcrc_bad=%0d sperr=%0d stuck=%0d warn=%0d oos=%0d err=%0d occ=%0d gbe=%0d empty=%0d events=%0d",
             n_close, n_start_to, n_stall, n_tcrc_ok, n_tcrc_bad, n_sperr, n_stuck, n_warn, n_oos, n_err,
             n_occ, n_gbe, n_empty, n_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
