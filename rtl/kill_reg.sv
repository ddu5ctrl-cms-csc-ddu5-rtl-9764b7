// kill_reg: the 20-bit kill register. A zero kills, a one keeps alive:
// bits 14:0 enable the 15 DMB input fibers; bit 15 enables the check-disable
// bits 16..19 (ALCT, TMB, CFEB, DMB checks), each of which, when zero while
// bit 15 is one, disables that family of checks. Loaded as a whole word
// (`load`/`din`) from the JTAG path and read back on `kill`.
// Reset value: all ones (every fiber and every check alive), this design's
// choice. Timing: the new value is visible one cycle after `load`.
module kill_reg
  import ddu_pkg::*;
#(
  parameter logic [19:0] RESET_VAL = 20'hF_FFFF
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic [19:0] din,
  output logic [19:0] kill,
  output logic [14:0] fiber_en,
  output logic        chk_alct_en,
  output logic        chk_tmb_en,
  output logic        chk_cfeb_en,
  output logic        chk_dmb_en
);
  always_ff @(posedge clk) begin
    if (rst)       kill <= RESET_VAL;
    else if (load) kill <= din;
  end

  assign fiber_en    = kill[14:0];
  assign chk_alct_en = !(kill[KILL_CHKDIS_EN] && !kill[KILL_ALCT]);
  assign chk_tmb_en  = !(kill[KILL_CHKDIS_EN] && !kill[KILL_TMB]);
  assign chk_cfeb_en = !(kill[KILL_CHKDIS_EN] && !kill[KILL_CFEB]);
  assign chk_dmb_en  = !(kill[KILL_CHKDIS_EN] && !kill[KILL_DMB]);
endmodule
