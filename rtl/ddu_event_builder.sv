// ddu_event_builder: builds DDU output events.
//
// For every L1A the DDU sends one event of 64-bit words:
//   H1  = 5 | evt type 1 | L1A number[23:0] | BXN[11:0] | source ID[11:0] |
//         format version[3:0] | flags[3:0] (bit 0: close L1A)
//   H2  = 8000 0001 8000 | {0, DAV[14:0]}         (fibers that sent data)
//   H3  = {0, LIVE[14:0]} | output status[15:0] | {0, START_TO[14:0]} |
//         00 | number of DAV fibers[3:0] | FMM[3:0]
//   ... DMB data words ...
//   T-2 = 8000 FFFF 8000 8000
//   T-1 = status[31:0] | DMB warnings[15:0] | DMB errors[15:0]
//   TR  = A | 0 | word count[23:0] | CRC-16[15:0] | status[7:0] | FMM | 0
// so an event without data is 6 words and one with data is 6 words plus its
// DMB words. The word count covers the whole event including TR; the CRC-16
// covers H1 to T-1.
//
// L1As are queued in an internal FIFO (PUSH with the L1A number and the
// 13-bit {close, BXN}); L1A_AFULL and L1A_FULL feed the FMM warning and busy
// states. For the oldest queued L1A the builder raises WAIT_START and waits
// for DATA_READY, then samples which live fibers have data (DAV_IN). It sends
// the three header words; if any fiber has data it then enables the input
// FIFOs (DIN_REN) and forwards every valid input word (DIN_VALID) until one
// is flagged DIN_LAST; then it sends the three trailer words and pulses DONE.
// OUT_STOP (output FIFO near full) holds the header and trailer sequence and
// drops DIN_REN; input words already on their way are still forwarded, which
// the near-full margin absorbs. DOUT is registered (one clock); DOUT_EMPTY,
// aligned with it, marks the words of an event without DMB data.
// The word layout of the format (markers, the constant words, field
// positions of L1A, BXN, source ID, word count and CRC, DMB live bits in H3,
// DMB warnings and errors in T-1, status copy in TR[15:8]) follows the design
// notes; the remaining field contents, the L1A queue depth and the CRC
// coverage are this design's choices.
module ddu_event_builder
  import ddu_pkg::*;
#(
  parameter logic [11:0] SRC_ID    = 12'd760,
  parameter logic [3:0]  FOV       = 4'h6,
  parameter int unsigned L1A_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst,
  // L1A queue
  input  logic        push,
  input  logic [23:0] push_l1a,
  input  logic [12:0] push_sbxn,
  output logic        l1a_afull,
  output logic        l1a_full,
  output logic        l1a_empty,
  // input side
  output logic        wait_start,
  input  logic        data_ready,
  input  logic [14:0] dav_in,
  input  logic [14:0] live,
  input  logic [14:0] start_to,
  output logic        din_ren,
  input  logic [63:0] din,
  input  logic        din_valid,
  input  logic        din_last,
  output logic        reading,
  output logic        done,
  // status to put in the event
  input  logic [15:0] out_status,
  input  logic [31:0] status,
  input  logic [15:0] dmb_warn,
  input  logic [15:0] dmb_err,
  input  logic [3:0]  fmm,
  // output
  input  logic        out_stop,
  output logic [63:0] dout,
  output logic        dout_valid,
  output logic        dout_eoe,
  output logic        dout_empty
);
  localparam int unsigned QW = $clog2(L1A_DEPTH);

  typedef enum logic [3:0] {
    S_IDLE, S_WAIT, S_H1, S_H2, S_H3, S_DATA, S_T2, S_T1, S_TR, S_DONE
  } state_e;

  typedef struct packed {
    logic [23:0] l1a;
    logic [12:0] sbxn;
  } l1a_entry_t;

  // ---------------- L1A queue -------------------------------------------------
  l1a_entry_t q_mem [L1A_DEPTH];
  logic [QW:0] q_wr, q_rd;
  logic [QW:0] q_cnt;
  logic        q_pop;
  l1a_entry_t  cur;

  assign q_cnt     = q_wr - q_rd;
  assign l1a_empty = (q_cnt == '0);
  assign l1a_full  = (q_cnt == (QW+1)'(L1A_DEPTH));
  assign l1a_afull = (q_cnt >= (QW+1)'(L1A_DEPTH - 4));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      q_wr <= '0;
      q_rd <= '0;
    end else begin
      if (push && !l1a_full) begin
        q_mem[q_wr[QW-1:0]] <= '{l1a: push_l1a, sbxn: push_sbxn};
        q_wr <= q_wr + 1'b1;
      end
      if (q_pop) q_rd <= q_rd + 1'b1;
    end
  end

  // ---------------- event sequencer ------------------------------------------
  state_e      state;
  logic [14:0] dav;
  logic [14:0] sto;
  logic [23:0] wc;
  logic        got_last;
  logic [63:0] word;
  logic        word_en;
  logic        crc_clr, crc_en;
  logic [15:0] crc;
  logic [3:0]  ndav;

  always_comb begin
    ndav = '0;
    for (int i = 0; i < 15; i++) ndav = ndav + 4'(dav[i]);
  end

  assign wait_start = (state == S_WAIT);
  assign reading    = (state == S_DATA);
  assign din_ren    = (state == S_DATA) && !out_stop && !got_last;
  assign q_pop      = (state == S_IDLE) && !l1a_empty;

  always_comb begin
    word    = '0;
    word_en = 1'b0;
    unique case (state)
      S_H1: begin
        word    = {BOE_MARK, 4'h1, cur.l1a, cur.sbxn[11:0], SRC_ID, FOV, 3'b000, cur.sbxn[12]};
        word_en = !out_stop;
      end
      S_H2: begin
        word    = H2_CONST_MASK | {48'h0, 1'b0, dav};
        word_en = !out_stop;
      end
      S_H3: begin
        word    = {1'b0, live, out_status, 1'b0, sto, 8'h00, ndav, fmm};
        word_en = !out_stop;
      end
      S_DATA: begin
        word    = din;
        word_en = din_valid && !got_last;
      end
      S_T2: begin
        word    = T2_WORD;
        word_en = !out_stop;
      end
      S_T1: begin
        word    = {status, dmb_warn, dmb_err};
        word_en = !out_stop;
      end
      S_TR: begin
        word    = {EOE_MARK, 4'h0, wc + 24'd1, crc, status[7:0], fmm, 4'h0};
        word_en = !out_stop;
      end
      default: ;
    endcase
  end

  assign crc_clr = (state == S_IDLE);
  assign crc_en  = word_en && (state != S_TR);

  crc16_64 u_crc (
    .clk (clk), .rst (rst), .clr (crc_clr), .en (crc_en), .d (word), .crc (crc)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state      <= S_IDLE;
      cur        <= '0;
      dav        <= '0;
      sto        <= '0;
      wc         <= '0;
      got_last   <= 1'b0;
      done       <= 1'b0;
      dout       <= '0;
      dout_valid <= 1'b0;
      dout_eoe   <= 1'b0;
      dout_empty <= 1'b0;
    end else begin
      done       <= 1'b0;
      dout_valid <= word_en;
      dout_eoe   <= word_en && (state == S_TR);
      dout_empty <= (dav == '0);
      if (word_en) begin
        dout <= word;
        wc   <= wc + 24'd1;
      end
      unique case (state)
        S_IDLE: if (!l1a_empty) begin
          cur      <= q_mem[q_rd[QW-1:0]];
          wc       <= '0;
          got_last <= 1'b0;
          state    <= S_WAIT;
        end
        S_WAIT: if (data_ready) begin
          dav   <= dav_in;
          sto   <= start_to;
          state <= S_H1;
        end
        S_H1: if (!out_stop) state <= S_H2;
        S_H2: if (!out_stop) state <= S_H3;
        S_H3: if (!out_stop) state <= (dav != '0) ? S_DATA : S_T2;
        S_DATA: begin
          if (din_valid && din_last) got_last <= 1'b1;
          if (got_last) state <= S_T2;
        end
        S_T2: if (!out_stop) state <= S_T1;
        S_T1: if (!out_stop) state <= S_TR;
        S_TR: if (!out_stop) state <= S_DONE;
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // an event ends in exactly one TR word
  property p_eoe_is_tr;
    @(posedge clk) disable iff (rst) dout_eoe |-> dout[63:60] == EOE_MARK;
  endproperty
  a_eoe_is_tr: assert property (p_eoe_is_tr);
endmodule
