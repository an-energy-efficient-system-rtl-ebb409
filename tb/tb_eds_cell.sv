// tb_eds_cell: checks that an EDS cell flags exactly the transitions of its
// monitored input that arrive after the falling clock edge.
//
// Clock period 5000 time units (5 ns at 1 ps), falling edge at 2500. In each
// cycle the input may toggle once at a random offset after the rising edge.
// The expected `error` after the next rising edge is 1 exactly when the
// toggle came after the falling edge.
module tb_eds_cell;
  localparam int T = 5000;
  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0, error;
  int checks = 0, failures = 0;
  int n_late = 0, n_early = 0;

  eds_cell dut (.clk, .rst_n, .d, .error);

  always #(T/2) clk = ~clk;

  initial begin
    #(200 * T);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit toggle, exp_err;
    int t;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < 150; i++) begin
      toggle = ($urandom_range(0, 3) != 0);
      // avoid the edges themselves: 100..2300 or 2700..4900
      t = ($urandom_range(0, 1) == 1) ? $urandom_range(100, 2300) : $urandom_range(2700, 4900);
      exp_err = toggle && t > T/2;
      if (toggle) begin
        #(t);
        d = ~d;
      end
      @(posedge clk);
      #1;
      checks++;
      if (error !== exp_err) begin
        failures++;
        $display("cycle %0d: toggle=%0b at %0d, error=%0b expected %0b", i, toggle, t, error, exp_err);
      end
      if (exp_err) n_late++;
      else if (toggle) n_early++;
    end
    checks++;
    if (n_late == 0 || n_early == 0) failures++;
    $display("late transitions %0d, early transitions %0d", n_late, n_early);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
