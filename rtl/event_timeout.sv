// event_timeout: start and end timeouts of the DMB readout of one event.
// After `l1a` (event start) the counter runs until `begin_data` (first word
// of the event from the DMB FIFOs); if that takes START_TO cycles (3.2 us at
// 40 MHz), or CAL_START_TO (7.2 us) in calibration mode, `start_to` is set.
// From `begin_data` it counts until `done` (last FIFO read); reaching DONE_TO
// (38914 cycles, about 972 us: the worst case for four CSCs) sets `end_to`.
// The flags clear at the next `l1a`. `max_count` keeps the longest
// begin-to-done time seen since reset (the "max timeout count" register).
// Timing: flags rise on the cycle the limit is reached. Counter width and
// saturation are this design's choices.
module event_timeout
  import ddu_pkg::*;
#(
  parameter int unsigned START_TO     = START_TO_CYC,
  parameter int unsigned CAL_START_TO = CAL_START_TO_CYC,
  parameter int unsigned DONE_TO      = DONE_TO_CYC
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        cal_mode,
  input  logic        l1a,
  input  logic        begin_data,
  input  logic        done,
  output logic        start_to,
  output logic        end_to,
  output logic        waiting,      // between l1a and begin_data
  output logic        active,       // between begin_data and done
  output logic [15:0] max_count
);
  logic [15:0] cnt;
  logic [15:0] start_lim;
  assign start_lim = cal_mode ? 16'(CAL_START_TO) : 16'(START_TO);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; waiting <= 1'b0; active <= 1'b0;
      start_to <= 1'b0; end_to <= 1'b0; max_count <= '0;
    end else if (l1a && !waiting && !active) begin
      cnt <= 16'd1; waiting <= 1'b1; start_to <= 1'b0; end_to <= 1'b0;
    end else if (waiting) begin
      if (begin_data) begin
        waiting <= 1'b0; active <= 1'b1; cnt <= 16'd1;
      end else begin
        if (cnt != 16'hFFFF) cnt <= cnt + 1'b1;
        if (cnt >= start_lim - 16'd1) start_to <= 1'b1;
      end
    end else if (active) begin
      if (done) begin
        active <= 1'b0;
        if (cnt > max_count) max_count <= cnt;
      end else begin
        if (cnt != 16'hFFFF) cnt <= cnt + 1'b1;
        if (cnt >= 16'(DONE_TO) - 16'd1) end_to <= 1'b1;
      end
    end
  end
endmodule
