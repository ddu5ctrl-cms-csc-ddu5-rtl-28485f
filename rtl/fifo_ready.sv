// fifo_ready: decides when an event may be read from the input FIFOs.
//
// While an event is pending (WAIT_START), the block watches the "has data"
// flags RDY of the live inputs ACTIVE:
//   ONE_RDY  - registered OR of the live inputs that have data;
//   ALL_RDY  - registered: every live input has data;
//   NOT_READY = ONE_RDY and not ALL_RDY (some, but not all, have data);
//   DATA_READY = (ONE_RDY and ALL_RDY) or LSTART_TIMEOUT, or at once when
//                no input is live (an empty event is read out on the L1A).
// A start timer counts the clocks an event waits without all live inputs
// ready (NOT_READY, or no input ready at all). When it reaches
// START_TO (128 clocks = 3.2 us) or, in calibration mode, CAL_START_TO
// (288 clocks = 7.2 us), the start timeout is latched: DATA_READY is forced so
// that the event is built from the inputs that did arrive, and START_TIMEOUT
// shows which live inputs were missing. While the event is read (READING) an
// end timer counts; reaching END_TO (38914 clocks, about 972 us) sets
// END_TIMEOUT. DONE (read finished) clears the timers and the latched
// timeouts. The OR/AND ready logic and the latched start timeout that
// overrides it follow the schematics; the timer limits follow the notes. That
// the start timer also runs while no input is ready (so that an L1A whose
// data never arrives still gives an event) is this design's choice.
module fifo_ready #(
  parameter int unsigned N            = 4,
  parameter int unsigned START_TO     = 128,
  parameter int unsigned CAL_START_TO = 288,
  parameter int unsigned END_TO       = 38914
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wait_start,
  input  logic         cal,
  input  logic [N-1:0] active,
  input  logic [N-1:0] rdy,
  input  logic         reading,
  input  logic         done,
  output logic         one_rdy,
  output logic         all_rdy,
  output logic         data_ready,
  output logic         not_ready,
  output logic [N-1:0] start_timeout,
  output logic         end_timeout
);
  logic [15:0] st_cnt;
  logic [15:0] end_cnt;
  logic        lstart_timeout;
  logic [15:0] st_lim;
  logic        no_live;

  assign st_lim     = cal ? 16'(CAL_START_TO) : 16'(START_TO);
  assign not_ready  = one_rdy & ~all_rdy;
  assign data_ready = (one_rdy & all_rdy) | lstart_timeout | no_live;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      one_rdy <= 1'b0;
      all_rdy <= 1'b0;
      no_live <= 1'b0;
    end else if (done || !wait_start) begin
      one_rdy <= 1'b0;
      all_rdy <= 1'b0;
      no_live <= 1'b0;
    end else begin
      one_rdy <= |(rdy & active);
      all_rdy <= (active != '0) && ((rdy & active) == active);
      no_live <= (active == '0);
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st_cnt         <= '0;
      lstart_timeout <= 1'b0;
      start_timeout  <= '0;
    end else if (done) begin
      st_cnt         <= '0;
      lstart_timeout <= 1'b0;
      start_timeout  <= '0;
    end else if (wait_start && !(one_rdy & all_rdy) && !no_live && !lstart_timeout) begin
      if (st_cnt + 16'd1 >= st_lim) begin
        lstart_timeout <= 1'b1;
        start_timeout  <= active & ~rdy;
      end
      st_cnt <= st_cnt + 16'd1;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      end_cnt     <= '0;
      end_timeout <= 1'b0;
    end else if (done) begin
      end_cnt     <= '0;
      end_timeout <= 1'b0;
    end else if (reading && !end_timeout) begin
      if (end_cnt + 16'd1 >= 16'(END_TO)) end_timeout <= 1'b1;
      end_cnt <= end_cnt + 16'd1;
    end
  end
endmodule
