// tb_gbe_tx: end-to-end check of the Ethernet framer with a first-word-fall-
// through FIFO model holding three events (3, 20 and 1200 words). The
// receiver in the testbench rebuilds every packet from the two-byte output
// and compares it with the packet it expects: preamble and start byte, four
// 0xFF bytes, the event bytes (most significant first), 0xFF fill up to 64
// data bytes, the packet number, the Ethernet CRC-32 (computed here
// bit-serially) and the /T/R/ trailer. The 1200-word event must be split after
// 8960 data bytes. It also checks SYNC during reset, idles between packets,
// the 1280-clock gap while the FIFO is almost empty, and the short gap when
// the FIFO is not almost empty (~PAE high).
module tb_gbe_tx;
  import ddu_pkg::*;
  logic clk = 0, rst = 1;
  logic [63:0] fifo_d;
  logic fifo_empty, fifo_eoe, fifo_pae_n = 0, fifo_ren;
  logic [15:0] txd;
  logic [1:0] txk;
  int checks = 0, failures = 0;

  gbe_tx dut (.clk(clk), .rst(rst), .fifo_d(fifo_d), .fifo_empty(fifo_empty), .fifo_eoe(fifo_eoe),
              .fifo_pae_n(fifo_pae_n), .fifo_ren(fifo_ren), .txd(txd), .txk(txk));
  always #8 clk = ~clk;

  // ---------------- FIFO model ----------------
  logic [64:0] fifo [$];
  assign fifo_empty = (fifo.size() == 0);
  assign fifo_d     = fifo_empty ? 64'h0 : fifo[0][63:0];
  assign fifo_eoe   = fifo_empty ? 1'b0 : fifo[0][64];
  always @(posedge clk) if (!rst && fifo_ren && !fifo_empty) void'(fifo.pop_front());

  // ---------------- expected packets ----------------
  byte unsigned exp_pkts [$][$];
  int           exp_gap_max [$];

  function automatic logic [31:0] crc32_ref(input byte unsigned b [$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (b[i]) for (int k = 0; k < 8; k++) begin
      logic f;
      f = c[0] ^ b[i][k];
      c = {1'b0, c[31:1]};
      if (f) c = c ^ 32'hEDB8_8320;
    end
    return ~c;
  endfunction

  int pkt_no = 0;
  task automatic add_packet(input logic [63:0] words [$]);
    byte unsigned p [$];
    logic [31:0] c;
    int nd;
    p = {};
    repeat (4) p.push_back(8'hFF);
    foreach (words[i]) for (int k = 7; k >= 0; k--) p.push_back(words[i][8*k +: 8]);
    nd = words.size() * 8;
    while (nd < 64) begin p.push_back(8'hFF); nd++; end
    p.push_back(8'(pkt_no >> 8)); p.push_back(8'(pkt_no));
    pkt_no++;
    c = crc32_ref(p);
    for (int k = 0; k < 4; k++) p.push_back(c[8*k +: 8]);
    exp_pkts.push_back(p);
  endtask

  task automatic add_event(input int nw, input int seed);
    logic [63:0] words [$];
    words = {};
    for (int i = 0; i < nw; i++) begin
      logic [63:0] w;
      w = {32'(seed * 65536 + i), $urandom};
      fifo.push_back({(i == nw - 1), w});
      words.push_back(w);
      if (words.size() == 1120) begin add_packet(words); words = {}; end
    end
    if (words.size() > 0) add_packet(words);
  endtask

  // ---------------- receiver ----------------
  int got = 0, gap = 0, in_pkt = 0, n_split = 0, n_fill = 0, n_short_gap = 0, n_long_gap = 0;
  byte unsigned rx [$];
  int hdr = 0;

  always @(posedge clk) begin
    if (!rst) begin
      if (!in_pkt) begin
        if (txk == 2'b10 && (txd == {K28_5, D16_2} || txd == {K28_5, D21_5} || txd == {K28_5, D2_2})) gap++;
        else if (txk == 2'b00 && txd == {PREAMBLE, PREAMBLE}) begin
          in_pkt = 1; hdr = 1; rx = {};
          checks++;
          if (got < 2 && gap < 1280) begin failures++; $display("FAIL gap %0d before packet %0d", gap, got); end
          if (got >= 2 && gap > 20) begin failures++; $display("FAIL long gap %0d with ~PAE high", gap); end
          if (gap >= 1280) n_long_gap++; else n_short_gap++;
        end else begin
          failures++; checks++;
          $display("FAIL unexpected word %h k=%b between packets", txd, txk);
        end
      end else if (hdr < 4) begin
        checks++;
        if (txk != 2'b00 || txd != ((hdr == 3) ? {PREAMBLE, SFD} : {PREAMBLE, PREAMBLE})) begin
          failures++; $display("FAIL preamble word %0d = %h", hdr, txd);
        end
        hdr++;
      end else if (txk == 2'b11) begin
        checks++;
        if (txd != {K29_7, K23_7}) begin failures++; $display("FAIL trailer %h", txd); end
        checks++;
        if (got >= exp_pkts.size() || rx != exp_pkts[got]) begin
          failures++;
          $display("FAIL packet %0d: %0d bytes received", got, rx.size());
        end
        if (rx.size() == 4 + 8960 + 6) n_split++;
        if (rx.size() == 4 + 64 + 6) n_fill++;
        got++; in_pkt = 0; gap = 0;
      end else begin
        rx.push_back(txd[15:8]);
        rx.push_back(txd[7:0]);
      end
    end
  end

  initial begin
    int n_sync = 0;
    add_event(3, 1);
    add_event(20, 2);
    add_event(1200, 3);
    repeat (6) begin
      @(posedge clk); #1;
      if (txk == 2'b10 && (txd == {K28_5, D21_5} || txd == {K28_5, D2_2})) n_sync++;
    end
    checks++;
    if (n_sync < 4) begin failures++; $display("FAIL sync during reset %0d", n_sync); end
    @(negedge clk) rst = 0;
    while (got < 2) @(posedge clk);
    fifo_pae_n = 1;
    while (got < exp_pkts.size()) @(posedge clk);
    repeat (5) @(posedge clk);
    checks++;
    if (got != 4 || n_split != 1 || n_fill != 1 || n_long_gap != 2 || n_short_gap != 2) begin
      failures++;
      $display("FAIL coverage got=%0d split=%0d fill=%0d long=%0d short=%0d", got, n_split, n_fill,
               n_long_gap, n_short_gap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
