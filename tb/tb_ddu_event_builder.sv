// tb_ddu_event_builder: builds events from queued L1As and a model of the
// input FIFOs (words appear two clocks after the read enable). For each
// event the testbench predicts the complete output: the three header words
// with L1A number, BXN, close flag, source ID, DAV and live masks; the data
// words; the two fixed/status trailer words; and TR with the word count
// (6 + data words) and a CRC-16 computed here bit by bit. Covers an event
// with data, an event with no data (6 words), output stops in the header,
// data and trailer, and the L1A queue filling up (almost full, full).
module tb_ddu_event_builder;
  import ddu_pkg::*;
  logic clk = 0, rst = 1;
  logic push = 0;
  logic [23:0] push_l1a = 0;
  logic [12:0] push_sbxn = 0;
  logic l1a_afull, l1a_full, l1a_empty, wait_start, data_ready = 0, din_ren, reading, done;
  logic [14:0] dav_in = 0, live = 15'h7FFF, start_to = 0;
  logic [63:0] din = 0, dout;
  logic din_valid = 0, din_last = 0, out_stop = 0, dout_valid, dout_eoe, dout_empty;
  logic [15:0] out_status = 16'h1234, dmb_warn = 16'h0055, dmb_err = 16'h00AA;
  logic [31:0] status = 32'hDEAD_BEEF;
  logic [3:0] fmm = 4'h2;
  int checks = 0, failures = 0;

  ddu_event_builder dut (
    .clk(clk), .rst(rst), .push(push), .push_l1a(push_l1a), .push_sbxn(push_sbxn),
    .l1a_afull(l1a_afull), .l1a_full(l1a_full), .l1a_empty(l1a_empty),
    .wait_start(wait_start), .data_ready(data_ready), .dav_in(dav_in), .live(live),
    .start_to(start_to), .din_ren(din_ren), .din(din), .din_valid(din_valid), .din_last(din_last),
    .reading(reading), .done(done), .out_status(out_status), .status(status),
    .dmb_warn(dmb_warn), .dmb_err(dmb_err), .fmm(fmm), .out_stop(out_stop),
    .dout(dout), .dout_valid(dout_valid), .dout_eoe(dout_eoe),
    .dout_empty(dout_empty));
  always #5 clk = ~clk;

  function automatic logic [15:0] crc16_ref(input logic [63:0] w [$]);
    logic [15:0] c = 16'h0;
    foreach (w[i]) for (int k = 0; k < 64; k++) begin
      logic f;
      f = c[0] ^ w[i][k];
      c = c >> 1;
      if (f) c = c ^ 16'hA001;
    end
    return c;
  endfunction

  // input FIFO model: words leave two clocks after the read enable
  logic [63:0] src [$];
  logic [2:0] ren_d;
  logic [64:0] pipe1, pipe2;
  always @(posedge clk) begin
    logic [64:0] nw;
    nw = '0;
    if (din_ren && src.size() > 0) nw = {1'b1, src.pop_front()};
    pipe2 <= pipe1;
    pipe1 <= nw;
    din_valid <= pipe2[64];
    din <= pipe2[63:0];
    din_last <= pipe2[64] && (src.size() == 0) && (pipe1[64] == 1'b0) && !nw[64];
  end

  logic [63:0] got [$];
  logic got_empty [$];
  int n_eoe = 0;
  always @(posedge clk) if (!rst && dout_valid) begin
    got.push_back(dout);
    got_empty.push_back(dout_empty);
    if (dout_eoe) n_eoe++;
  end

  // stop the output now and then
  int stop_mode = 0;
  always @(negedge clk) out_stop = (stop_mode != 0) && ($urandom % 3 == 0);

  task automatic run_event(input logic [23:0] l1a, input logic [12:0] sb, input logic [14:0] dav,
                           input int ndata);
    logic [63:0] exp [$];
    logic [63:0] data [$];
    int t;
    for (int i = 0; i < ndata; i++) data.push_back({$urandom, $urandom});
    exp.push_back({4'h5, 4'h1, l1a, sb[11:0], 12'd760, 4'h6, 3'b000, sb[12]});
    exp.push_back({16'h8000, 16'h0001, 16'h8000, 1'b0, dav});
    exp.push_back({1'b0, live, out_status, 1'b0, start_to, 8'h00, 4'($countones(dav)), fmm});
    foreach (data[i]) exp.push_back(data[i]);
    exp.push_back(64'h8000_FFFF_8000_8000);
    exp.push_back({status, dmb_warn, dmb_err});
    exp.push_back({4'hA, 4'h0, 24'(exp.size() + 1), crc16_ref(exp), status[7:0], fmm, 4'h0});
    got = {};
    got_empty = {};
    src = data;
    @(negedge clk) begin push = 1; push_l1a = l1a; push_sbxn = sb; end
    @(negedge clk) push = 0;
    t = 0;
    while (!wait_start && t < 100) begin @(negedge clk); t++; end
    dav_in = dav;
    @(negedge clk) data_ready = 1;
    t = 0;
    while (!done && t < 2000) begin @(negedge clk); t++; end
    data_ready = 0;
    @(negedge clk);
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("FAIL event %0d: %0d words, expected %0d", l1a, got.size(), exp.size());
    end else foreach (exp[i]) begin
      checks++;
      if (got[i] !== exp[i]) begin
        failures++;
        $display("FAIL event %0d word %0d: %h expected %h", l1a, i, got[i], exp[i]);
      end
      checks++;
      if (got_empty[i] !== (dav == 0)) begin
        failures++;
        $display("FAIL event %0d word %0d: empty-event flag %b", l1a, i, got_empty[i]);
      end
    end
  endtask

  initial begin
    int t;
    pipe1 = 0; pipe2 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    run_event(24'd1, 13'h0123, 15'h0005, 5);
    run_event(24'd2, 13'h1DEB, 15'h0000, 0);       // no data, close L1A
    checks++;
    if (got.size() != 6) begin failures++; $display("FAIL empty event is %0d words", got.size()); end
    stop_mode = 1;
    run_event(24'd3, 13'h0ABC, 15'h7001, 40);
    run_event(24'd4, 13'h0000, 15'h0100, 1);
    stop_mode = 0;
    checks++;
    if (n_eoe != 4) begin failures++; $display("FAIL %0d end-of-event flags", n_eoe); end
    // fill the L1A queue while no data is ready
    for (int i = 0; i < 17; i++) begin  // one is taken at once as the current event
      @(negedge clk) begin push = 1; push_l1a = 24'(100 + i); end
    end
    @(negedge clk) push = 0;
    checks++;
    if (!l1a_afull || !l1a_full) begin failures++; $display("FAIL queue flags afull=%b full=%b", l1a_afull, l1a_full); end
    // drain: every event empty
    dav_in = 0;
    data_ready = 1;
    t = 0;
    while (!l1a_empty && t < 2000) begin @(negedge clk); t++; end
    repeat (30) @(negedge clk);
    checks++;
    if (!l1a_empty || l1a_afull || n_eoe != 4 + 17) begin
      failures++; $display("FAIL drain empty=%b eoe=%0d", l1a_empty, n_eoe);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
