// bx_counter: bunch-crossing number with a programmable orbit length.
//
// BXN counts 40 MHz clocks. It returns to 0 on the clock after it reaches the
// orbit limit BX_LIM ("set to BX=0 one cycle after BX LIM"), and also when the
// BC0 command arrives. BX_LIM is a 12-bit register preset to BX_LIM_DEFAULT
// on reset and loaded from LIM_IN by LIM_LOAD (the JTAG "set BX per orbit"
// function); it is read back on the BX_LIM port. The LHC orbit ends at 3563
// (3564 crossings), the SPS orbit at 923. Timing: BXN is registered; BC0 on
// clock n gives BXN=0 after edge n.
module bx_counter #(
  parameter logic [11:0] BX_LIM_DEFAULT = 12'd3563
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        bc0,
  input  logic        lim_load,
  input  logic [11:0] lim_in,
  output logic [11:0] bx_lim,
  output logic [11:0] bxn
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)           bx_lim <= BX_LIM_DEFAULT;
    else if (lim_load) bx_lim <= lim_in;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                       bxn <= '0;
    else if (bc0 || bxn >= bx_lim) bxn <= '0;
    else                           bxn <= bxn + 12'd1;
  end
endmodule
