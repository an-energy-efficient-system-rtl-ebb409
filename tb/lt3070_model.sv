// lt3070_model: behavioural model of the programmable linear regulator that
// supplies the FPGA core (simulation only, not synthesizable).
//
// The regulator reads five three-level pins (Vo2, Vo1, Vo0, MARGSEL, MARGTOL;
// each low, high or open) and sets its output to one of sixteen voltages
// between 0.950 V and 1.200 V. The model decodes the pin pattern with its own
// copy of the table and moves its output `vout_mv` (millivolts) to the new
// value T_REG after the pins change, standing for the regulator's settling
// time (about 12 to 14 us on the bench). A pattern outside the table gives
// `bad_pattern` = 1 and leaves the output unchanged. Pin bit i floats when
// oe[i] = 0.
module lt3070_model #(
  parameter realtime T_REG   = 13000.0,   // settling time in ns
  parameter int      INIT_MV = 1200
) (
  input  logic [4:0] oe,
  input  logic [4:0] val,
  output int         vout_mv,
  output logic       bad_pattern
);

  string pat [16] = '{"0Z0ZZ", "0ZZ0Z", "0ZZ00", "0ZZZZ", "0ZZ10", "0Z10Z", "0ZZ1Z", "0Z100",
                      "0Z1ZZ", "0Z110", "0Z11Z", "01000", "010ZZ", "0101Z", "01ZZZ", "011ZZ"};
  int    mv  [16] = '{950, 970, 990, 1000, 1010, 1019, 1030, 1040,
                      1050, 1061, 1082, 1089, 1100, 1133, 1150, 1200};

  function automatic int lookup(input logic [4:0] e, input logic [4:0] v);
    string s;
    s = "-----";
    for (int i = 0; i < 5; i++)
      s[4 - i] = !e[i] ? "Z" : (v[i] ? "1" : "0");
    for (int l = 0; l < 16; l++)
      if (s == pat[l]) return mv[l];
    return -1;
  endfunction

  initial begin
    vout_mv     = INIT_MV;
    bad_pattern = 1'b0;
  end

  always @(oe or val) begin
    int m;
    m = lookup(oe, val);
    bad_pattern = (m < 0);
    if (m >= 0) vout_mv <= #(T_REG) m;
  end

endmodule
