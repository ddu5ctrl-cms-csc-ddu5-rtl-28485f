// ddu5ctrl: central control FPGA of a CSC Detector-Dependent Unit (DDU).
//
// The DDU collects, for every Level-1 Accept (L1A), the data that up to 15
// DAQ motherboards (DMBs, one per cathode strip chamber) send over optical
// fibers, checks it, and ships it on as one event. This FPGA runs the
// read-out: it numbers the L1As and their bunch crossings, waits until the
// input FIFOs hold the event, reads the merged 64-bit data stream from the
// input FPGAs, wraps it in the DDU header and trailer, and drives the output
// (DCC/S-Link) and a Gigabit-Ethernet spy path. Along the way it checks the
// data (special-word consistency, trigger-data CRC, start/end timeouts, stuck
// data, fiber status changes), keeps error registers, reports the FMM status
// and offers everything over a user JTAG path.
//
// Clocks: CLK is the 40 MHz LHC clock of all read-out logic; GCLK is the
// 62.5 MHz GbE transmit clock, used only by the Ethernet framer. RST is the
// asynchronous hard reset (push button / VME); the JTAG reset opcode resets
// everything except the JTAG path. SYNC_RST (resync) clears the lost-sync
// state; it is held back until the DDU is empty, that is until every L1A
// received so far has been sent out as an event (as the original does for
// the track-finder DDU, whose source ID 760 this design carries). After reset a short start-up sequence latches the fiber status and
// raises SYSTEM_RDY.
//
// Board switches: SW_FAKE (switch 7, fake-L1A mode) with SW8 off ignores the
// TTC L1A and BC0, so that only L1As sent over JTAG make events, as the
// original's switch 7 does. The original also kills the TTC event-counter
// reset, which this design does not have. SW_GBE_TEST (switch 6, "send
// counter on GBE link") makes the GbE path send packets that each carry one
// 64-bit counter word, stepping by one per packet, instead of events; the
// packet pacing stays the same (one per 1280 GCLK). The counter format is
// this design's choice. SW8 on shows VERSION (56) on the DAV LEDs ("8: FPGA
// version on LEDs").
//
// Input data bus: IN_DDR[35:0] carries 72 bits per clock, captured by the
// DDR input register as RDAT. RDAT[63:0] is a data word; the upper bits are
// sideband control: [64] word valid, [65] last word of the event, [66]
// trigger (ALCT/TMB) data word, [67] trigger trailer (its bits [21:0] carry
// the CRC-22 of the preceding trigger words), [71:68] number of the fiber the
// word comes from. This sideband layout is this design's choice; the 72-bit
// DDR bus and its bit split follow the original design.
//
// Output: OUT_D/OUT_VALID/OUT_EOE towards the output FIFO, stopped by
// OUT_STOP (near full). The GbE path has its own external FIFO: this FPGA
// writes it with the same words (GBE_FIFO_WEN), leaving out events without
// data while GLOBAL_RUN is high, and the Ethernet framer reads it. The T-1
// word of each event lists as errors the fibers whose data failed the
// special-word or trigger-CRC check (both hard errors, as in the original)
// and as warnings the fibers that missed the start timeout (this design's
// choice). Trigger-CRC errors are also kept per fiber for JTAG, split into
// ALCT and TMB errors on the original's rule that the TMB block follows the
// ALCT block, so a fiber's second trigger trailer in an event is the TMB's.
module ddu5ctrl
  import ddu_pkg::*;
#(
  parameter logic [11:0] SRC_ID         = 12'd760,
  parameter logic [11:0] BX_LIM_DEFAULT = 12'd3563,
  parameter int unsigned START_TO       = 128,
  parameter int unsigned CAL_START_TO   = 288,
  parameter int unsigned END_TO         = 38914,
  parameter int unsigned GBE_WAIT       = 1280,
  parameter int unsigned BLINK_BITS     = 23,
  parameter logic [7:0]  VERSION        = 8'd56
) (
  input  logic        clk,
  input  logic        gclk,
  input  logic        rst,
  // TTC
  input  logic        l1a_in,
  input  logic        bc0,
  input  logic        sync_rst,
  input  logic        cal_mode,
  input  logic        sw_fake,
  input  logic        sw8,
  input  logic        sw_gbe_test,
  // fibers and input FIFOs
  input  logic [14:0] fiber_present,
  input  logic [14:0] fiberok,
  input  logic [14:0] in_rdy,
  input  logic [35:0] in_ddr,
  output logic        in_ren,
  // user JTAG (from the boundary-scan primitive)
  input  logic        jtag_sel1,
  input  logic        jtag_sel2,
  input  logic        jtag_capture,
  input  logic        jtag_shift,
  input  logic        jtag_update,
  input  logic        jtag_tdi,
  output logic        jtag_tdo,
  // output to DCC / S-Link FIFO
  output logic [63:0] out_d,
  output logic        out_valid,
  output logic        out_eoe,
  input  logic        out_stop,
  input  logic        out_full,
  // GbE FIFO and transmitter
  input  logic [63:0] gbe_fifo_d,
  input  logic        gbe_fifo_empty,
  input  logic        gbe_fifo_eoe,
  input  logic        gbe_fifo_pae_n,
  output logic        gbe_fifo_ren,
  input  logic        global_run,
  output logic        gbe_fifo_wen,
  output logic [15:0] gbe_txd,
  output logic [1:0]  gbe_txk,
  // status
  output logic [3:0]  fmm,
  output logic        system_rdy,
  output logic [14:0] fok_led,
  output logic [14:0] dav_led
);
  // ---------------- reset and start-up ----------------------------------------
  logic       jtag_rst;
  logic       rst_i;
  logic [3:0] su_cnt;
  logic       end_rst;

  assign rst_i = rst | jtag_rst;

  always_ff @(posedge clk or posedge rst_i) begin
    if (rst_i) begin
      su_cnt     <= '0;
      end_rst    <= 1'b0;
      system_rdy <= 1'b0;
    end else begin
      end_rst <= 1'b0;
      if (!system_rdy) begin
        su_cnt <= su_cnt + 4'd1;
        if (su_cnt == 4'd7) begin
          end_rst    <= 1'b1;
          system_rdy <= 1'b1;
        end
      end
    end
  end

  // ---------------- JTAG ------------------------------------------------------
  jtag_op_e    op;
  logic [31:0] cap_val;
  logic        jload;
  logic [31:0] jload_val;
  logic        cal_en, vme_l1a, occ_next;

  jtag_ctrl u_jtag (
    .clk (clk), .rst (rst), .sel1 (jtag_sel1), .sel2 (jtag_sel2),
    .capture (jtag_capture), .shift (jtag_shift), .update (jtag_update),
    .tdi (jtag_tdi), .tdo (jtag_tdo), .op (op), .cap_val (cap_val),
    .load (jload), .load_val (jload_val), .jtag_rst (jtag_rst),
    .cal_en (cal_en), .vme_l1a (vme_l1a), .occ_next (occ_next)
  );

  // ---------------- kill register / fiber status ------------------------------
  logic [19:0] kill;
  logic [14:0] lfok, live;
  logic        fiber_change;

  kill_ctrl #(.NFIB(15)) u_kill (
    .clk (clk), .rst (rst_i), .load (jload && op == OP_KILL_LD),
    .kill_in (jload_val[19:0]), .end_rst (end_rst), .fiberok (fiberok),
    .kill (kill), .lfok (lfok), .live (live), .fiber_change (fiber_change)
  );

  // ---------------- bunch crossing and L1A ------------------------------------
  logic [11:0] bx_lim, bxn;
  logic        l1a, l1a_d;
  logic [12:0] sbxn;
  logic [23:0] l1a_num;

  logic        ttc_kill;

  // fake-L1A mode: the TTC L1A and BC0 are ignored, JTAG L1As still count
  assign ttc_kill = sw_fake & ~sw8;
  assign l1a = ((l1a_in & ~ttc_kill) | vme_l1a) & system_rdy;

  bx_counter #(.BX_LIM_DEFAULT(BX_LIM_DEFAULT)) u_bx (
    .clk (clk), .rst (rst_i), .bc0 (bc0 & ~ttc_kill), .lim_load (jload && op == OP_BX_SET),
    .lim_in (jload_val[11:0]), .bx_lim (bx_lim), .bxn (bxn)
  );

  close_l1a_monitor #(.DELAY(40)) u_close (
    .clk (clk), .rst (rst_i), .l1a (l1a), .bxn (bxn), .bx_lim (bx_lim),
    .l1a_out (l1a_d), .sbxn (sbxn)
  );

  always_ff @(posedge clk or posedge rst_i) begin
    if (rst_i)      l1a_num <= '0;
    else if (l1a_d) l1a_num <= l1a_num + 24'd1;
  end

  // ---------------- input data ------------------------------------------------
  logic [71:0] rdat;
  logic        w_valid, w_last, w_trg, w_trl;
  logic [3:0]  w_fib;

  ddr_in36 u_ddr (.clk (clk), .clr (rst_i), .din (in_ddr), .q (rdat));

  assign w_valid = rdat[64];
  assign w_last  = rdat[65];
  assign w_trg   = rdat[66];
  assign w_trl   = rdat[67];
  assign w_fib   = rdat[71:68];

  // ---------------- FIFO readiness and timeouts ------------------------------
  logic        wait_start, reading, evt_done;
  logic        one_rdy, all_rdy, data_ready, not_ready, end_timeout;
  logic [14:0] start_timeout;

  fifo_ready #(.N(15), .START_TO(START_TO), .CAL_START_TO(CAL_START_TO), .END_TO(END_TO)) u_rdy (
    .clk (clk), .rst (rst_i), .wait_start (wait_start), .cal (cal_mode & cal_en),
    .active (live), .rdy (in_rdy), .reading (reading), .done (evt_done),
    .one_rdy (one_rdy), .all_rdy (all_rdy), .data_ready (data_ready),
    .not_ready (not_ready), .start_timeout (start_timeout), .end_timeout (end_timeout)
  );

  // ---------------- data checks -----------------------------------------------
  logic        gold;
  logic        first_word;
  logic [3:0]  sp_vote, sp_err;
  logic [21:0] tcrc;
  logic        tcrc_err;
  logic        stuck;

  assign gold = w_valid & reading;
  assign stuck = w_valid & !reading;
  assign tcrc_err = gold && w_trl && (rdat[21:0] != tcrc);

  // first word of each fiber block
  logic [3:0] prev_fib;
  logic       in_blk;
  assign first_word = gold && (!in_blk || w_fib != prev_fib);

  special_word_check u_spw (
    .clk (clk), .rst (rst_i), .dat (rdat[63:0]), .golddat (gold),
    .latch (first_word), .sp_vote (sp_vote), .sp_err (sp_err)
  );

  crc22_64 u_tcrc (
    .clk (clk), .rst (rst_i), .clr ((gold && w_trl) || evt_done),
    .en (gold && w_trg && !w_trl), .d (rdat[63:0]), .crc (tcrc)
  );

  // ---------------- per-fiber block tracking and occupancy -------------------
  // A DMB block carries 4 words of its own (2 header, 2 trailer); more
  // non-trigger words mean CFEB data. The first trigger trailer is the
  // ALCT's, the second the TMB's.
  logic [8:0] blk_words;
  logic [1:0] blk_trl;
  logic       occ_upd, occ_busy;
  logic [3:0] occ_fib, occ_brd;
  logic [31:0] occ_data;
  logic       blk_end;

  assign blk_end = in_blk && ((gold && w_fib != prev_fib) || (!reading));

  always_ff @(posedge clk or posedge rst_i) begin
    if (rst_i) begin
      prev_fib  <= '0;
      in_blk    <= 1'b0;
      blk_words <= '0;
      blk_trl   <= '0;
      occ_upd   <= 1'b0;
      occ_fib   <= '0;
      occ_brd   <= '0;
    end else begin
      occ_upd <= 1'b0;
      if (blk_end) begin
        occ_upd <= 1'b1;
        occ_fib <= prev_fib;
        occ_brd <= {(blk_words > 9'd4), blk_trl[1], (blk_trl != 2'd0), 1'b1};
        in_blk  <= 1'b0;
      end
      if (gold) begin
        if (first_word) begin
          in_blk    <= 1'b1;
          prev_fib  <= w_fib;
          blk_words <= w_trg ? 9'd0 : 9'd1;
          blk_trl   <= w_trl ? 2'd1 : 2'd0;
        end else begin
          if (!w_trg && blk_words != '1) blk_words <= blk_words + 9'd1;
          if (w_trl && blk_trl != 2'd3)  blk_trl   <= blk_trl + 2'd1;
        end
      end
    end
  end

  occupancy_monitor #(.NFIB(15), .NBRD(4), .CW(32)) u_occ (
    .clk (clk), .rst (rst_i), .upd (occ_upd), .fiber (occ_fib), .boards (occ_brd),
    .busy (occ_busy), .rd_next (occ_next), .rd_data (occ_data)
  );

  // ---------------- error registers -------------------------------------------
  // Error register A is kept in three copies and read through a voter.
  logic [15:0] err_a_set, err_a0, err_a1, err_a2, err_a;
  logic [14:0] err_b, err_c, err_crc, err_tmb, err_alct;
  logic [15:0] trl_seen;
  logic [14:0] evt_err_fib, evt_warn_fib;
  logic        l1a_afull, l1a_full, l1a_empty;

  assign err_a_set = {8'h00, occ_busy & occ_upd, (l1a_d & l1a_full), fiber_change,
                      (|sp_err) & gold, tcrc_err, end_timeout, (|start_timeout), stuck};

  sticky_flags #(.W(16)) u_erra0 (.clk (clk), .rst (rst_i), .ce (1'b1), .set (err_a_set), .q (err_a0));
  sticky_flags #(.W(16)) u_erra1 (.clk (clk), .rst (rst_i), .ce (1'b1), .set (err_a_set), .q (err_a1));
  sticky_flags #(.W(16)) u_erra2 (.clk (clk), .rst (rst_i), .ce (1'b1), .set (err_a_set), .q (err_a2));
  vote3 #(.W(16)) u_vote (.a (err_a0), .b (err_a1), .c (err_a2), .andcom (1'b1), .orcom (1'b0), .vote (err_a));

  sticky_flags #(.W(15)) u_errb (.clk (clk), .rst (rst_i), .ce (1'b1), .set (start_timeout), .q (err_b));
  sticky_flags #(.W(15)) u_errc (.clk (clk), .rst (rst_i), .ce (gold && (|sp_err)),
                                 .set (15'(1) << w_fib), .q (err_c));
  sticky_flags #(.W(15)) u_errcrc (.clk (clk), .rst (rst_i), .ce (tcrc_err),
                                   .set (15'(1) << w_fib), .q (err_crc));

  // A fiber's first trigger trailer in an event is the ALCT's, the second the
  // TMB's; TRL_SEEN remembers which fibers have had their ALCT trailer.
  always_ff @(posedge clk or posedge rst_i) begin
    if (rst_i)                trl_seen <= '0;
    else if (evt_done)        trl_seen <= '0;
    else if (gold && w_trl)   trl_seen <= trl_seen | (16'(1) << w_fib);
  end
  sticky_flags #(.W(15)) u_errtmb (.clk (clk), .rst (rst_i), .ce (tcrc_err && trl_seen[w_fib]),
                                   .set (15'(1) << w_fib), .q (err_tmb));
  sticky_flags #(.W(15)) u_erralct (.clk (clk), .rst (rst_i), .ce (tcrc_err && !trl_seen[w_fib]),
                                    .set (15'(1) << w_fib), .q (err_alct));

  always_ff @(posedge clk or posedge rst_i) begin
    if (rst_i) begin
      evt_err_fib  <= '0;
      evt_warn_fib <= '0;
    end else if (evt_done) begin
      evt_err_fib  <= '0;
      evt_warn_fib <= '0;
    end else begin
      if (gold && ((|sp_err) || tcrc_err)) evt_err_fib <= evt_err_fib | (15'(1) << w_fib);
      evt_warn_fib <= evt_warn_fib | start_timeout;
    end
  end

  // ---------------- resync held back until the DDU is empty -------------------
  // IN_FLIGHT counts L1As received but not yet sent out as events (in the
  // 40 BX pipe, in the queue or being built); an L1A lost to a full queue
  // leaves the count too.
  logic [7:0] in_flight;
  logic       ddu_empty, sync_pend, sync_go;

  always_ff @(posedge clk or posedge rst_i) begin
    if (rst_i) in_flight <= '0;
    else       in_flight <= in_flight + 8'(l1a) - 8'(evt_done) - 8'(l1a_d & l1a_full);
  end
  assign ddu_empty = (in_flight == 8'd0);
  assign sync_go   = (sync_rst | sync_pend) & ddu_empty;

  always_ff @(posedge clk or posedge rst_i) begin
    if (rst_i)         sync_pend <= 1'b0;
    else if (sync_go)  sync_pend <= 1'b0;
    else if (sync_rst) sync_pend <= 1'b1;
  end

  // ---------------- FMM -------------------------------------------------------
  fmm_ctrl #(.HYST(16)) u_fmm (
    .clk (clk), .rst (rst_i), .sync_rst (sync_go), .system_rdy (system_rdy),
    .full (l1a_full | out_full), .afull (l1a_afull),
    .sync_err (stuck | (|start_timeout) | end_timeout),
    .hard_err (((|sp_err) & gold) | tcrc_err | fiber_change),
    .fmm (fmm)
  );

  // ---------------- event builder ---------------------------------------------
  // The same words go to the GbE FIFO (GBE_FIFO_WEN, data OUT_D, end-of-event
  // flag OUT_EOE), except the empty events of a global run.
  logic out_empty;
  assign gbe_fifo_wen = out_valid & ~(global_run & out_empty);

  logic [31:0] status;
  logic [15:0] out_status;

  assign status     = {err_a, fmm, 4'h0, l1a_afull, l1a_full, out_stop, system_rdy, 4'h0};
  assign out_status = {sp_vote, not_ready, all_rdy, one_rdy, l1a_empty,
                       4'h0, out_full, out_stop, l1a_afull, l1a_full};

  ddu_event_builder #(.SRC_ID(SRC_ID), .FOV(4'h6), .L1A_DEPTH(16)) u_evb (
    .clk (clk), .rst (rst_i),
    .push (l1a_d), .push_l1a (l1a_num + 24'd1), .push_sbxn (sbxn),
    .l1a_afull (l1a_afull), .l1a_full (l1a_full), .l1a_empty (l1a_empty),
    .wait_start (wait_start), .data_ready (data_ready), .dav_in (in_rdy & live),
    .live (live), .start_to (start_timeout),
    .din_ren (in_ren), .din (rdat[63:0]), .din_valid (w_valid), .din_last (w_last),
    .reading (reading), .done (evt_done),
    .out_status (out_status), .status (status),
    .dmb_warn ({1'b0, evt_warn_fib}), .dmb_err ({1'b0, evt_err_fib}), .fmm (fmm),
    .out_stop (out_stop), .dout (out_d), .dout_valid (out_valid), .dout_eoe (out_eoe),
    .dout_empty (out_empty)
  );

  // ---------------- JTAG read-back mux ----------------------------------------
  always_comb begin
    unique case (op)
      OP_L1A_NUM:   cap_val = {8'h00, l1a_num};
      OP_STATUS:    cap_val = status;
      OP_STATUS_LO: cap_val = {16'h0, status[15:0]};
      OP_STATUS_HI: cap_val = {16'h0, status[31:16]};
      OP_OUT_STAT:  cap_val = {16'h0, out_status};
      OP_FOK:       cap_val = {17'h0, lfok};
      OP_CRC_ERR:   cap_val = {17'h0, err_crc};
      OP_KILL_RD:   cap_val = {12'h0, kill};
      OP_TMB_ERR:   cap_val = {17'h0, err_tmb};
      OP_ALCT_ERR:  cap_val = {17'h0, err_alct};
      OP_ERR_A:     cap_val = {16'h0, err_a};
      OP_ERR_B:     cap_val = {17'h0, err_b};
      OP_ERR_C:     cap_val = {17'h0, err_c};
      OP_DMB_LIVE:  cap_val = {17'h0, live};
      OP_PDMB_LIVE: cap_val = {17'h0, lfok};
      OP_BX_RD:     cap_val = {20'h0, bx_lim};
      OP_SRC_ID:    cap_val = {20'h0, SRC_ID};
      OP_OCC:       cap_val = occ_data;
      OP_ERR_SUM:   cap_val = {17'h0, err_b | err_c | err_crc};
      default:      cap_val = 32'h0;
    endcase
  end

  // ---------------- LEDs ------------------------------------------------------
  logic [14:0] dav_fib;
  assign dav_fib = gold ? (15'(1) << w_fib) : 15'h0;

  logic [14:0] dav_led_f;

  fiber_led #(.NFIB(15), .BLINK_BITS(BLINK_BITS), .HOLD_BITS(20)) u_led (
    .clk (clk), .rst (rst_i), .present (fiber_present), .ready (fiberok & lfok),
    .dav (dav_fib), .fok_led (fok_led), .dav_led (dav_led_f)
  );

  // switch 8: the DAV LEDs show the firmware version
  assign dav_led = sw8 ? 15'(VERSION) : dav_led_f;

  // ---------------- GbE spy path (GCLK domain) --------------------------------
  logic [1:0] gbe_rst_sync;
  always_ff @(posedge gclk or posedge rst_i) begin
    if (rst_i) gbe_rst_sync <= 2'b11;
    else       gbe_rst_sync <= {gbe_rst_sync[0], 1'b0};
  end

  // GbE test (switch 6): each packet carries one word of a counter that
  // steps per packet, in place of the FIFO's events
  logic [1:0]  gtest_sync;
  logic [63:0] gtest_cnt;
  logic        g_ren;
  always_ff @(posedge gclk or posedge rst_i) begin
    if (rst_i) begin
      gtest_sync <= 2'b00;
      gtest_cnt  <= '0;
    end else begin
      gtest_sync <= {gtest_sync[0], sw_gbe_test};
      if (g_ren && gtest_sync[1]) gtest_cnt <= gtest_cnt + 64'd1;
    end
  end
  assign gbe_fifo_ren = g_ren & ~gtest_sync[1];

  gbe_tx #(.MAX_DATA(8960), .MIN_DATA(64), .WAIT_CYC(GBE_WAIT)) u_gbe (
    .clk (gclk), .rst (gbe_rst_sync[1]),
    .fifo_d     (gtest_sync[1] ? gtest_cnt : gbe_fifo_d),
    .fifo_empty (gtest_sync[1] ? 1'b0 : gbe_fifo_empty),
    .fifo_eoe   (gtest_sync[1] ? 1'b1 : gbe_fifo_eoe),
    .fifo_pae_n (gtest_sync[1] ? 1'b0 : gbe_fifo_pae_n),
    .fifo_ren   (g_ren),
    .txd (gbe_txd), .txk (gbe_txk)
  );
endmodule
