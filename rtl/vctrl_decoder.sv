// vctrl_decoder: maps the 4-bit supply level onto the five tri-state control
// pins of the LT3070 regulator (Vo2, Vo1, Vo0, MARGSEL, MARGTOL, bit 4 down
// to bit 0).
//
// Each pin is either driven low, driven high or left open (Z); the regulator
// decodes the three-level pattern into its output voltage. Level 0 gives
// 0.950 V and level 15 gives 1.200 V; the full table is in eds_dvs_pkg. A pin
// is represented by an enable (`vctrl.oe`) and a value (`vctrl.val`); the pad
// buffer drives val when oe is 1 and floats otherwise.
//
// Timing: purely combinational. The table follows the design; splitting
// each pin into enable and value is this implementation's choice.
module vctrl_decoder
  import eds_dvs_pkg::*;
(
  input  logic [VLEVEL_W-1:0] level,
  output vctrl_t              vctrl
);

  always_comb vctrl = vctrl_of_level(level);

endmodule
