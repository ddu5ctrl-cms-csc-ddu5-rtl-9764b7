// gbe_ordered_set: 8b/10b ordered-set generator for the gigabit Ethernet link.
// Each output is a 9-bit code-group {K flag, byte}. While `sync` is high (link
// reset) it loops over the 4-code sync cycle K28.5, D21.5, K28.5, D2.2
// (1BC, 0B5, 1BC, 042); otherwise over the 2-code idle cycle K28.5, D16.2
// (1BC, 050). The mode is sampled at the clock edge that starts a cycle, so
// a cycle is never cut short and every cycle starts on K28.5. With `oe` low the output is zero.
// Timing: one code-group per clock, registered.
module gbe_ordered_set
  import ddu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       sync,
  input  logic       oe,
  output logic [8:0] code,
  output logic       comma      // this code-group is K28.5
);
  logic [1:0] pos;
  logic       mode_sync;   // mode latched at the start of each cycle
  logic [8:0] nxt;

  always_ff @(posedge clk) begin
    if (rst) begin
      pos <= '0;
      mode_sync <= 1'b1;
    end else begin
      if (pos[0] == 1'b1 && (!mode_sync || pos == 2'd3)) begin
        pos <= '0;
        mode_sync <= sync;
      end else begin
        pos <= pos + 1'b1;
      end
    end
  end

  always_comb begin
    unique case (pos)
      2'd0:    nxt = K28_5;
      2'd1:    nxt = mode_sync ? D21_5 : D16_2;
      2'd2:    nxt = K28_5;
      default: nxt = D2_2;
    endcase
  end

  assign code  = oe ? nxt : 9'h000;
  assign comma = oe && (nxt == K28_5);
endmodule
