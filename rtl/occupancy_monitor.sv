// occupancy_monitor: CSC board occupancy counters.
//
// For each of NFIB input fibers (one CSC each) and each of NBRD boards that
// may send data for it (DMB, ALCT, TMB, CFEB), a CW-bit counter counts the
// events in which that board sent data: NFIB*NBRD = 60 counters held in one
// memory. An update (UPD with FIBER and the BOARDS-present mask) is taken when
// the block is idle and is then worked through one board at a time, two clocks
// per board: the counter is read on the even clock and written back plus one
// on the odd clock (boards not present are read but not written), so an update
// takes 2*NBRD clocks, during which BUSY is high and further UPD pulses are
// ignored. After reset the block first writes zero to every counter (BUSY is
// high for NFIB*NBRD clocks). Read-out walks through the counters in a loop:
// RD_DATA shows the counter at the read pointer and RD_NEXT advances it,
// wrapping from the last counter to the first; the pointer returns to 0 on
// reset. Counter index = fiber*NBRD + board. The 15x4 organisation, the
// 32-bit counters, the even-read/odd-write cycle and the looping read-out
// follow the design notes; the index order and the zeroing sequence are this
// design's choices.
module occupancy_monitor #(
  parameter int unsigned NFIB = 15,
  parameter int unsigned NBRD = 4,
  parameter int unsigned CW   = 32
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    upd,
  input  logic [3:0]              fiber,
  input  logic [NBRD-1:0]         boards,
  output logic                    busy,
  input  logic                    rd_next,
  output logic [CW-1:0]           rd_data
);
  localparam int unsigned NCNT = NFIB * NBRD;
  localparam int unsigned AW   = $clog2(NCNT);

  typedef enum logic [1:0] {S_ZERO, S_IDLE, S_READ, S_WRITE} state_e;

  logic [CW-1:0]        mem [NCNT];
  state_e               state;
  logic [AW-1:0]        addr;
  logic [$clog2(NBRD+1)-1:0] brd;
  logic [NBRD-1:0]      brd_q;
  logic [CW-1:0]        rd_q;
  logic [AW-1:0]        rd_ptr;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= S_ZERO;
      addr  <= '0;
      brd   <= '0;
      brd_q <= '0;
      rd_q  <= '0;
    end else begin
      unique case (state)
        S_ZERO: begin
          mem[addr] <= '0;
          if (addr == AW'(NCNT - 1)) begin
            state <= S_IDLE;
            addr  <= '0;
          end else addr <= addr + 1'b1;
        end
        S_IDLE: if (upd && fiber < 4'(NFIB)) begin
          brd_q <= boards;
          brd   <= '0;
          addr  <= AW'(fiber * NBRD);
          state <= S_READ;
        end
        S_READ: begin                 // even clock: read the counter
          rd_q  <= mem[addr];
          state <= S_WRITE;
        end
        S_WRITE: begin                // odd clock: add one and write
          if (brd_q[brd[$clog2(NBRD)-1:0]]) mem[addr] <= rd_q + 1'b1;
          if (brd == ($bits(brd))'(NBRD - 1)) state <= S_IDLE;
          else begin
            brd   <= brd + 1'b1;
            addr  <= addr + 1'b1;
            state <= S_READ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)          rd_ptr <= '0;
    else if (rd_next) rd_ptr <= (rd_ptr == AW'(NCNT - 1)) ? '0 : rd_ptr + 1'b1;
  end

  assign rd_data = mem[rd_ptr];
endmodule
