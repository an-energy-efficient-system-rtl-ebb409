// dvs: the dynamic-voltage-scaling circuit.
//
// The controller (dvs_controller) turns the final EDS error into a voltage
// level VLevel. A multiplexer driven by switch sw[4] chooses the level sent to
// the decoder: sw[4] = 1 selects VLevel (automatic DVS mode), sw[4] = 0
// selects the manual level on sw[3:0] (sw[3:0] = 4'hF gives the nominal
// 1.20 V). The decoder (vctrl_decoder) turns the chosen level into the
// regulator's five tri-state control pins.
//
// Timing: `vctrl` follows a change of VLevel or of the switches
// combinationally, after the controller's level register.
//
// The structure (counters, comparator, level counter, switch multiplexer,
// decoder) follows the design. Which switch value selects which mode is this
// implementation's reading.
module dvs
  import eds_dvs_pkg::*;
#(
  parameter int unsigned PHI_UP      = 4096,
  parameter int unsigned PHI_DN      = 12288,
  parameter int unsigned VLEVEL_INIT = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                final_error,
  input  logic [4:0]          sw,
  output logic [VLEVEL_W-1:0] vlevel,      // controller level
  output logic [VLEVEL_W-1:0] level_sel,   // level after the multiplexer
  output vctrl_t              vctrl,
  output logic                step_up,
  output logic                step_down
);

  dvs_controller #(.PHI_UP(PHI_UP), .PHI_DN(PHI_DN), .VLEVEL_INIT(VLEVEL_INIT)) u_ctl (
    .clk, .rst_n, .error(final_error), .vlevel, .step_up, .step_down
  );

  assign level_sel = sw[4] ? vlevel : sw[3:0];

  vctrl_decoder u_dec (.level(level_sel), .vctrl);

endmodule
