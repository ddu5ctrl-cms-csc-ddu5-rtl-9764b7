// bxn_counter: bunch-crossing number counter with a loadable orbit limit.
// The counter runs 0 .. bx_lim and returns to 0 one cycle after reaching
// bx_lim. bx_lim is a 12-bit register (set/read over JTAG), reset to
// DEF_BX_LIM = 3563 for the LHC orbit; 923 gives the SPS orbit. A BC0 command
// returns the counter to 0 on the next cycle (this design's choice for the
// BX0 control). Timing: one count per 25 ns clock.
module bxn_counter
  import ddu_pkg::*;
#(
  parameter logic [11:0] DEF_BX_LIM = BX_LIM_LHC
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        bc0,
  input  logic        lim_load,
  input  logic [11:0] lim_din,
  output logic [11:0] bxn,
  output logic [11:0] bx_lim
);
  always_ff @(posedge clk) begin
    if (rst)           bx_lim <= DEF_BX_LIM;
    else if (lim_load) bx_lim <= lim_din;
  end

  always_ff @(posedge clk) begin
    if (rst || bc0)          bxn <= '0;
    else if (bxn >= bx_lim)  bxn <= '0;
    else                     bxn <= bxn + 1'b1;
  end
endmodule
