// fmm_status: the 4-bit FMM (fast merging module) status sent to the TTS.
// Bit 0 BUSY (not ready), bit 1 WARNING (near full), bit 2 LOST SYNC (needs a
// sync reset), bit 3 ERROR (needs a hard reset). The error bit is the OR of
// the six "reset required" conditions of `err_cond`, latched by a flip-flop
// whose enable is its own inverted output, so it stays set until reset. The
// lost-sync flag is likewise sticky but is also cleared by a sync reset.
// Until `system_rdy` the upper three bits are held at zero and BUSY is high.
// err_cond bits: 0 control-word bit error or repeated filler, 1 fiber/live
// status change, 2 InCtrl timeout flag, 3 extra/bad/missing header-trailer,
// 4 CSC trigger/trailer/DAV/timeout error, 5 stuck data.
// Timing: all outputs registered, one cycle after their inputs. Which inputs
// feed the warning and lost-sync bits is this design's choice.
module fmm_status
  import ddu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       system_rdy,
  input  logic       sync_rst,
  input  logic       busy_in,
  input  logic       warn_in,
  input  logic       sync_err_in,
  input  logic [5:0] err_cond,
  output logic [3:0] fmm,
  output logic       hard_err,
  output logic       sync_err
);
  logic ff_err_or;
  assign ff_err_or = |err_cond;

  // sticky error latch (enabled only while not yet set)
  always_ff @(posedge clk) begin
    if (rst)            hard_err <= 1'b0;
    else if (!hard_err) hard_err <= ff_err_or;
  end

  always_ff @(posedge clk) begin
    if (rst || sync_rst) sync_err <= 1'b0;
    else if (sync_err_in) sync_err <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) fmm <= 4'b0001;
    else begin
      fmm[FMM_BUSY]  <= busy_in || !system_rdy;
      fmm[FMM_WARN]  <= system_rdy && warn_in;
      fmm[FMM_SYNC]  <= system_rdy && sync_err;
      fmm[FMM_ERROR] <= system_rdy && hard_err;
    end
  end
endmodule
