// gbe_tx: Gigabit-Ethernet packet framer for the DDU spy output.
//
// Reads 64-bit event words from the external GbE FIFO and sends them as
// Ethernet packets to a 16-bit 8b/10b transmitter (two bytes per clock,
// TXD[15:8] sent first, TXK marks control characters). The sequence is:
//   reset     - SYNC ordered sets, alternating K28.5 D21.5 and K28.5 D2.2;
//   idle      - K28.5 D16.2 idle words. A packet starts when the FIFO is not
//               empty and either WAIT_CYC clocks have passed since the last
//               packet (20.48 us at 62.5 MHz) or the FIFO reports that it is
//               no longer almost empty (FIFO_PAE_N high);
//   header    - 7 preamble bytes 0x55 and the start byte 0xD5, then four
//               0xFF bytes (broadcast destination);
//   data      - FIFO words, most significant byte first, four clocks each;
//               the packet ends after a word flagged FIFO_EOE (so an event
//               always ends a packet), when MAX_DATA data bytes have been
//               sent, or when the FIFO runs empty;
//   fill      - 0xFF bytes up to MIN_DATA data bytes;
//   number    - 16-bit packet number, counting from 0 after reset;
//   CRC       - Ethernet CRC-32 of everything after the start byte, sent in
//               the usual bit-reversed, complemented form;
//   trailer   - /T/R/ end-of-packet (K29.7 K23.7), then at least one idle
//               word (two idle bytes).
// FIFO interface: first-word-fall-through, FIFO_D valid while FIFO_EMPTY is
// low, FIFO_REN pops the word shown. RST is synchronous and must last at least
// one clock; SYNC is sent while it is high. The states, the idle and sync
// codes, the 8-byte header plus four 0xFF bytes, the packet number, the CRC
// and trailer, the 8960-byte limit, the 20.48 us wait and its ~PAE bypass
// follow the design notes; the /T/R/ codes, the preamble values, the byte
// order and the 64-byte minimum as a plain 0xFF fill (the notes give both 56
// and 64) are this design's choices.
module gbe_tx
  import ddu_pkg::*;
#(
  parameter int unsigned MAX_DATA = 8960,
  parameter int unsigned MIN_DATA = 64,
  parameter int unsigned WAIT_CYC = 1280
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [63:0] fifo_d,
  input  logic        fifo_empty,
  input  logic        fifo_eoe,
  input  logic        fifo_pae_n,
  output logic        fifo_ren,
  output logic [15:0] txd,
  output logic [1:0]  txk
);
  typedef enum logic [3:0] {
    S_SYNC, S_IDLE, S_HDR, S_DATA, S_FILL, S_PKTNUM, S_CRC, S_TRL, S_IDLE2
  } state_e;

  state_e      state;
  logic [2:0]  idx;          // word index within header / data word / CRC
  logic [63:0] wreg;
  logic        eoe_q;
  logic [15:0] nbytes;       // data bytes sent in this packet
  logic [15:0] pktnum;
  logic [31:0] crc;
  logic [15:0] wait_cnt;
  logic        sync_ph;

  logic [15:0] w;
  logic [1:0]  k;
  logic        crc_en;
  logic        ren_c;
  logic        end_pkt;
  logic [31:0] crc_out;

  assign crc_out  = ~crc;
  assign end_pkt  = eoe_q || (nbytes + 16'd2 >= 16'(MAX_DATA)) || fifo_empty;
  assign fifo_ren = ren_c;

  // what goes out on this clock
  always_comb begin
    w      = {K28_5, D16_2};
    k      = 2'b10;
    crc_en = 1'b0;
    ren_c  = 1'b0;
    unique case (state)
      S_SYNC: w = sync_ph ? {K28_5, D2_2} : {K28_5, D21_5};
      S_IDLE, S_IDLE2: ;
      S_HDR: begin
        k = 2'b00;
        if (idx < 3'd3)       w = {PREAMBLE, PREAMBLE};
        else if (idx == 3'd3) w = {PREAMBLE, SFD};
        else begin
          w      = 16'hFFFF;
          crc_en = 1'b1;
          ren_c  = (idx == 3'd5);
        end
      end
      S_DATA: begin
        k      = 2'b00;
        w      = wreg[63 - 16*idx[1:0] -: 16];
        crc_en = 1'b1;
        ren_c  = (idx == 3'd3) && !end_pkt;
      end
      S_FILL: begin
        k      = 2'b00;
        w      = 16'hFFFF;
        crc_en = 1'b1;
      end
      S_PKTNUM: begin
        k      = 2'b00;
        w      = pktnum;
        crc_en = 1'b1;
      end
      S_CRC: begin
        k = 2'b00;
        if (idx == 3'd0) w = {crc_out[7:0], crc_out[15:8]};
        else             w = {crc_out[23:16], crc_out[31:24]};
      end
      S_TRL: begin
        w = {K29_7, K23_7};
        k = 2'b11;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_SYNC;
      idx      <= '0;
      wreg     <= '0;
      eoe_q    <= 1'b0;
      nbytes   <= '0;
      pktnum   <= '0;
      crc      <= '1;
      wait_cnt <= '0;
      sync_ph  <= ~sync_ph;
      txd      <= sync_ph ? {K28_5, D2_2} : {K28_5, D21_5};
      txk      <= 2'b10;
    end else begin
      txd     <= w;
      txk     <= k;
      sync_ph <= ~sync_ph;
      if (crc_en) crc <= crc32_byte(crc32_byte(crc, w[15:8]), w[7:0]);
      unique case (state)
        S_SYNC: state <= S_IDLE;
        S_IDLE: begin
          if (wait_cnt != 16'(WAIT_CYC)) wait_cnt <= wait_cnt + 16'd1;
          if (!fifo_empty && (wait_cnt == 16'(WAIT_CYC) || fifo_pae_n)) begin
            state  <= S_HDR;
            idx    <= '0;
            nbytes <= '0;
            crc    <= '1;
          end
        end
        S_HDR: begin
          if (idx == 3'd5) begin
            wreg  <= fifo_d;
            eoe_q <= fifo_eoe;
            idx   <= '0;
            state <= S_DATA;
          end else idx <= idx + 3'd1;
        end
        S_DATA: begin
          nbytes <= nbytes + 16'd2;
          if (idx == 3'd3) begin
            idx <= '0;
            if (end_pkt) begin
              state <= (nbytes + 16'd2 < 16'(MIN_DATA)) ? S_FILL : S_PKTNUM;
            end else begin
              wreg  <= fifo_d;
              eoe_q <= fifo_eoe;
            end
          end else idx <= idx + 3'd1;
        end
        S_FILL: begin
          nbytes <= nbytes + 16'd2;
          if (nbytes + 16'd2 >= 16'(MIN_DATA)) state <= S_PKTNUM;
        end
        S_PKTNUM: begin
          pktnum <= pktnum + 16'd1;
          idx    <= '0;
          state  <= S_CRC;
        end
        S_CRC: begin
          if (idx == 3'd1) state <= S_TRL;
          else idx <= idx + 3'd1;
        end
        S_TRL: state <= S_IDLE2;
        S_IDLE2: begin
          wait_cnt <= '0;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
