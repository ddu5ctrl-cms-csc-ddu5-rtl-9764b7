// ccb_cmd_decode: decodes the CCB (clock and control board) command bus.
// The 6-bit command bus and the L1A line arrive inverted; they are un-inverted
// here, except on a Track-Finder DDU (`tf_mode`), where the crate drives them
// the other way and no inversion is applied. A command is taken on the first
// cycle its code appears after a different code (edge detect), so a code held
// for several cycles gives one pulse. In fake-L1A mode (`kill_ttc`) the TTC
// L1A, sync reset and BC0 are ignored. Codes are in ddu_pkg.
// Timing: inputs are registered once; pulses come two cycles after the code.
// The edge detection and the 2-cycle latency are this design's choices.
module ccb_cmd_decode
  import ddu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       tf_mode,     // Track-Finder DDU: bus not inverted
  input  logic       kill_ttc,    // fake-L1A mode: ignore TTC L1A/sync/BC0
  input  logic [5:0] ccb_cmd_n,   // raw command bus (inverted)
  input  logic       l1a_n,       // raw L1A line (inverted)
  output logic       soft_rst,
  output logic       sync_rst,
  output logic       start_dt,
  output logic       stop_dt,
  output logic       bc0,
  output logic [2:0] cfeb_cal,
  output logic       l1a,
  output logic [5:0] cmd          // un-inverted command code
);
  logic [5:0] cmd_q, cmd_prev;
  logic       l1a_q, l1a_prev;
  logic       new_cmd;

  always_ff @(posedge clk) begin
    if (rst) begin
      cmd_q    <= '0;
      cmd_prev <= '0;
      l1a_q    <= 1'b0;
      l1a_prev <= 1'b0;
    end else begin
      cmd_q    <= tf_mode ? ccb_cmd_n : ~ccb_cmd_n;
      l1a_q    <= tf_mode ? l1a_n : ~l1a_n;
      cmd_prev <= cmd_q;
      l1a_prev <= l1a_q;
    end
  end

  assign new_cmd = (cmd_q != cmd_prev);
  assign cmd     = cmd_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      {soft_rst, sync_rst, start_dt, stop_dt, bc0, cfeb_cal, l1a} <= '0;
    end else begin
      soft_rst    <= new_cmd && cmd_q == CMD_SOFT_RST;
      sync_rst    <= new_cmd && cmd_q == CMD_SYNC_RST && !kill_ttc;
      start_dt    <= new_cmd && cmd_q == CMD_START_DT;
      stop_dt     <= new_cmd && cmd_q == CMD_STOP_DT;
      bc0         <= new_cmd && cmd_q == CMD_BC0 && !kill_ttc;
      cfeb_cal[0] <= new_cmd && cmd_q == CMD_CFEB_CAL0;
      cfeb_cal[1] <= new_cmd && cmd_q == CMD_CFEB_CAL1;
      cfeb_cal[2] <= new_cmd && cmd_q == CMD_CFEB_CAL2;
      l1a         <= l1a_q && !l1a_prev && !kill_ttc;
    end
  end
endmodule
