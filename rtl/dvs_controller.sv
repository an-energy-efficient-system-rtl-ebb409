// dvs_controller: error-rate driven voltage-level counter.
//
// The controller keeps a voltage level `vlevel` (2**VLEVEL_W levels) and moves
// it from the errors the EDS cells report. The reference error rate is one
// error per window, so the error counter is a single sticky bit and the
// comparison is "did any error occur". Two clock counters mark windows of
// PHI_UP and PHI_DN clocks:
//   * at the end of a PHI_UP window, if an error was seen, the level rises by
//     DV_UP steps (saturating) and both windows restart;
//   * at the end of a PHI_DN window with no error seen, the level falls by
//     DV_DN steps (saturating) and both windows restart.
// The error bit is cleared whenever a decision is taken. Because PHI_DN is
// longer than PHI_UP the loop raises the voltage quickly and lowers it
// cautiously; alpha = (DV_UP/DV_DN)*(PHI_DN/PHI_UP) measures how conservative
// it is (3 with the defaults). PHI_UP times the clock period has to exceed
// the regulator's settling time so that a step has taken effect before the
// next decision.
//
// Interface and timing: `error` is sampled every clock. `step_up`/`step_down`
// pulse for the clock in which `vlevel` changes; `vlevel` is registered.
//
// The counters, 1-bit error counter, comparator, 4-bit level counter, window
// lengths 4096/12288 and one-level steps follow the design. The start level
// (the lowest) follows the recorded start-up behaviour, in which the supply
// climbed from its lowest setting; window handling when a PHI_UP window ends
// without error (keep counting towards PHI_DN) is this implementation's own.
module dvs_controller
  import eds_dvs_pkg::*;
#(
  parameter int unsigned PHI_UP      = 4096,
  parameter int unsigned PHI_DN      = 12288,
  parameter int unsigned DV_UP       = 1,
  parameter int unsigned DV_DN       = 1,
  parameter int unsigned VLEVEL_INIT = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                error,      // final ERROR from the EDS OR tree
  output logic [VLEVEL_W-1:0] vlevel,
  output logic                step_up,
  output logic                step_down
);

  localparam int unsigned UW = $clog2(PHI_UP);
  localparam int unsigned DW = $clog2(PHI_DN);
  localparam int unsigned VMAX = (1 << VLEVEL_W) - 1;

  logic [UW-1:0] cnt_up;
  logic [DW-1:0] cnt_dn;
  logic          err_seen;        // 1-bit error counter
  logic          up_tick, dn_tick, err_now;

  assign up_tick = 32'(cnt_up) == PHI_UP - 1;
  assign dn_tick = 32'(cnt_dn) == PHI_DN - 1;
  assign err_now = err_seen | error;

  // comparator against E_ref = 1
  assign step_up   = (up_tick | dn_tick) & err_now & (32'(vlevel) < VMAX);
  assign step_down = dn_tick & ~err_now & (vlevel != '0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt_up   <= '0;
      cnt_dn   <= '0;
      err_seen <= 1'b0;
      vlevel   <= VLEVEL_W'(VLEVEL_INIT);
    end else begin
      if ((up_tick && err_now) || dn_tick) begin
        cnt_up   <= '0;
        cnt_dn   <= '0;
        err_seen <= 1'b0;
      end else begin
        cnt_up   <= up_tick ? '0 : cnt_up + 1'b1;
        cnt_dn   <= cnt_dn + 1'b1;
        err_seen <= err_now;
      end
      if (step_up)
        vlevel <= (32'(vlevel) + DV_UP > VMAX) ? VLEVEL_W'(VMAX) : vlevel + VLEVEL_W'(DV_UP);
      else if (step_down)
        vlevel <= (32'(vlevel) < DV_DN) ? '0 : vlevel - VLEVEL_W'(DV_DN);
    end

  assert property (@(posedge clk) disable iff (!rst_n) !(step_up && step_down));

endmodule
