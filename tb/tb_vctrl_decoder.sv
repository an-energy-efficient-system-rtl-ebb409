// tb_vctrl_decoder: checks the level-to-pin decoding of all 16 levels.
//
// The expected patterns are written here as the regulator's pin strings
// ("0Z0ZZ" = Vo2 low, Vo1 open, Vo0 low, MARGSEL open, MARGTOL open) and
// parsed character by character into enable/value pairs.
module tb_vctrl_decoder;
  import eds_dvs_pkg::*;
  logic [3:0] level;
  vctrl_t     vctrl;
  int checks = 0, failures = 0;

  vctrl_decoder dut (.level, .vctrl);

  string pat [16] = '{"0Z0ZZ", "0ZZ0Z", "0ZZ00", "0ZZZZ", "0ZZ10", "0Z10Z", "0ZZ1Z", "0Z100",
                      "0Z1ZZ", "0Z110", "0Z11Z", "01000", "010ZZ", "0101Z", "01ZZZ", "011ZZ"};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] eoe, eval;
    for (int rep = 0; rep < 3; rep++)
      for (int l = 0; l < 16; l++) begin
        level = (rep == 1) ? 4'(15 - l) : 4'(l);
        for (int i = 0; i < 5; i++) begin
          byte ch;
          ch = pat[level][i];
          eoe[4 - i]  = (ch != "Z");
          eval[4 - i] = (ch == "1");
        end
        #10;
        checks++;
        if (vctrl.oe !== eoe || (vctrl.val & vctrl.oe) !== eval) begin
          failures++;
          $display("level %0d: oe %b val %b, expected pattern %s", level, vctrl.oe, vctrl.val, pat[level]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
