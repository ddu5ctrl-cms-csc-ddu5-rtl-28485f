// fmm_ctrl: Fast Merging Module (FMM) status of the DDU.
//
// The 4-bit FMM word reports, one bit each:
//   bit 0 BUSY     - not ready: system not yet ready or the buffers are full;
//   bit 1 WARN     - near full;
//   bit 2 OOS      - synchronisation lost, a sync reset (resync) is needed;
//   bit 3 ERROR    - error, a hard reset is needed.
// SYNC_ERR sets OOS, which holds until SYNC_RST; HARD_ERR sets ERROR, which
// holds until the hard reset RST. BUSY follows FULL and SYSTEM_RDY. WARN
// uses hysteresis: it sets on AFULL and clears only when AFULL is low and a
// further HYST clocks have passed, so that a buffer hovering at its threshold
// does not make the status flicker. While SYSTEM_RDY is low the three upper
// bits are held at zero and BUSY is high. All outputs are registered (one
// clock). Bit meanings and the hold-until-system-ready rule follow the
// design notes; the hysteresis length is this design's choice.
module fmm_ctrl
  import ddu_pkg::*;
#(
  parameter int unsigned HYST = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       sync_rst,
  input  logic       system_rdy,
  input  logic       full,
  input  logic       afull,
  input  logic       sync_err,
  input  logic       hard_err,
  output logic [3:0] fmm
);
  logic [$clog2(HYST+1)-1:0] hcnt;
  logic oos, err, warn;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      oos  <= 1'b0;
      err  <= 1'b0;
      warn <= 1'b0;
      hcnt <= '0;
    end else if (!system_rdy) begin
      oos  <= 1'b0;
      err  <= 1'b0;
      warn <= 1'b0;
      hcnt <= '0;
    end else begin
      if (sync_rst)      oos <= 1'b0;
      else if (sync_err) oos <= 1'b1;
      if (hard_err) err <= 1'b1;
      if (afull) begin
        warn <= 1'b1;
        hcnt <= '0;
      end else if (warn) begin
        if (hcnt == HYST[$bits(hcnt)-1:0]) warn <= 1'b0;
        else hcnt <= hcnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) fmm <= 4'b0001;
    else begin
      fmm[FMM_BUSY] <= !system_rdy || full;
      fmm[FMM_WARN] <= warn;
      fmm[FMM_OOS]  <= oos;
      fmm[FMM_ERR]  <= err;
    end
  end
endmodule
