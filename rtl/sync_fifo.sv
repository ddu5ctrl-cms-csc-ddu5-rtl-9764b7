// sync_fifo: small single-clock first-word-fall-through FIFO.
// `dout` shows the oldest entry while `empty` is low; `rd` pops it and `wr`
// pushes `din`. Writing when full or reading when empty is ignored; `ovfl`
// pulses on a write that was dropped. `count` is the number of entries.
// DEPTH must be a power of two. Used for the L1A queue and the GbE word
// buffer; sizes are this design's choices.
module sync_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr,
  input  logic [W-1:0]             din,
  input  logic                     rd,
  output logic [W-1:0]             dout,
  output logic                     empty,
  output logic                     full,
  output logic                     ovfl,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign dout  = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0; ovfl <= 1'b0;
    end else begin
      ovfl <= wr && full;
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
endmodule
