// tb_dvs: checks the DVS circuit as a whole: switch multiplexer, decoder and
// controller together.
//
// With sw[4] = 0 the pins must follow the manual level on sw[3:0] for every
// level, whatever the error input does. With sw[4] = 1 the pins must follow
// the controller: a run of errors must raise the level by one step per
// PHI_UP window and quiet must lower it by one step per PHI_DN window. The
// pin patterns are compared with the regulator table written here as
// strings. Small windows (PHI_UP = 16, PHI_DN = 48) keep the run short.
module tb_dvs;
  import eds_dvs_pkg::*;
  localparam int PU = 16, PD = 48;
  logic clk = 1'b0, rst_n = 1'b0, final_error = 1'b0;
  logic [4:0] sw = 5'b0_1111;
  logic [3:0] vlevel, level_sel;
  vctrl_t     vctrl;
  logic       step_up, step_down;
  int checks = 0, failures = 0, n_manual = 0, n_auto = 0;

  dvs #(.PHI_UP(PU), .PHI_DN(PD)) dut (.clk, .rst_n, .final_error, .sw, .vlevel, .level_sel,
                                       .vctrl, .step_up, .step_down);

  string pat [16] = '{"0Z0ZZ", "0ZZ0Z", "0ZZ00", "0ZZZZ", "0ZZ10", "0Z10Z", "0ZZ1Z", "0Z100",
                      "0Z1ZZ", "0Z110", "0Z11Z", "01000", "010ZZ", "0101Z", "01ZZZ", "011ZZ"};

  always #5 clk = ~clk;

  initial begin
    #(10 * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pins(input int lvl, input string what);
    logic [4:0] eoe, eval;
    for (int i = 0; i < 5; i++) begin
      eoe[4 - i]  = (pat[lvl][i] != "Z");
      eval[4 - i] = (pat[lvl][i] == "1");
    end
    checks++;
    if (vctrl.oe !== eoe || (vctrl.val & vctrl.oe) !== eval) begin
      failures++;
      $display("%s: pins oe %b val %b, expected level %0d = %s", what, vctrl.oe, vctrl.val, lvl, pat[lvl]);
    end
  endtask

  initial begin
    int start;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // manual mode, errors present: pins follow the switches only
    final_error <= 1'b1;
    for (int l = 0; l < 16; l++) begin
      sw <= {1'b0, 4'(l)};
      repeat (5) @(posedge clk);
      #1;
      check_pins(l, "manual");
      n_manual++;
    end
    // automatic mode: the controller has been climbing meanwhile; reset it
    final_error <= 1'b0;
    rst_n <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    sw <= 5'b1_0000;
    @(posedge clk);
    #1;
    check_pins(0, "auto after reset");
    // errors: one step per PHI_UP window
    final_error <= 1'b1;
    for (int s = 1; s <= 10; s++) begin
      repeat (PU) @(posedge clk);
      #1;
      check_pins(s, "auto rising");
      checks++;
      if (int'(vlevel) != s) begin
        failures++;
        $display("rising: level %0d expected %0d", vlevel, s);
      end
      n_auto++;
    end
    // quiet: the window holding the last errors may still raise the level
    // once; after that the level falls one step every PHI_DN clocks
    final_error <= 1'b0;
    repeat (PU + 1) @(posedge clk);
    #1;
    start = int'(vlevel);
    for (int s = 1; s <= 4; s++) begin
      int n;
      n = 0;
      do begin
        @(posedge clk);
        n++;
        #1;
      end while (int'(vlevel) == start - s + 1 && n < 4 * PD);
      check_pins(start - s, "auto falling");
      checks++;
      if (s > 1 && n != PD) begin
        failures++;
        $display("falling: step %0d after %0d clocks, expected %0d", s, n, PD);
      end
      n_auto++;
    end
    checks++;
    if (n_manual == 0 || n_auto == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
