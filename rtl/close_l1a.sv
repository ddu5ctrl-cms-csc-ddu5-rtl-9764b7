// close_l1a: L1A proximity tracker and BXN stamping.
// Every L1A is piped for DEPTH bunch crossings (18 x 25 ns = 450 ns). When it
// leaves the pipe, it is marked "close" if another L1A lies fewer than DEPTH
// crossings before or after it: later L1As are still in the pipe, and an
// earlier one is remembered by a counter of cycles since the last L1A left.
// The BXN counter has meanwhile advanced DEPTH counts, so DEPTH is subtracted
// (modulo bx_lim+1) to recover the crossing of the L1A; the close flag becomes
// bit 12 of the stored BXN.
// Timing: `l1a_out` pulses DEPTH+1 cycles after `l1a`, with `bxn_out`.
// The exact count replaces the documented ROM of 3-bin bunch patterns; the
// window is this design's reading of "more than 1 in 450 ns".
module close_l1a
  import ddu_pkg::*;
#(
  parameter int unsigned DEPTH = CLOSE_L1A_BX
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        l1a,
  input  logic [11:0] bxn,       // running BXN counter
  input  logic [11:0] bx_lim,
  output logic        l1a_out,
  output logic [12:0] bxn_out,   // {close, bxn of the L1A}
  output logic        close
);
  localparam int unsigned SW = $clog2(DEPTH + 1);

  logic [DEPTH-1:0] pipe;
  logic [SW-1:0]    since_last;   // saturates at DEPTH
  logic             exiting, close_now;
  logic [12:0]      bxn_corr;

  always_ff @(posedge clk) begin
    if (rst) pipe <= '0;
    else     pipe <= {pipe[DEPTH-2:0], l1a};
  end

  assign exiting   = pipe[DEPTH-1];
  assign close_now = (|pipe[DEPTH-2:0]) || (since_last < SW'(DEPTH));

  always_ff @(posedge clk) begin
    if (rst)                                since_last <= SW'(DEPTH);
    else if (exiting)                       since_last <= SW'(1);
    else if (since_last < SW'(DEPTH))       since_last <= since_last + 1'b1;
  end

  always_comb begin
    if ({1'b0, bxn} >= 13'(DEPTH)) bxn_corr = {1'b0, bxn} - 13'(DEPTH);
    else                           bxn_corr = {1'b0, bxn} + {1'b0, bx_lim} + 13'd1 - 13'(DEPTH);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      l1a_out <= 1'b0;
      bxn_out <= '0;
      close   <= 1'b0;
    end else begin
      l1a_out <= exiting;
      if (exiting) begin
        bxn_out <= {close_now, bxn_corr[11:0]};
        close   <= close_now;
      end
    end
  end
endmodule
