// tb_eds_array: checks per-cell error flags and the ORed final error of a
// bank of eight EDS cells.
//
// Each input bit toggles independently at a random offset in each cycle of a
// 5000-unit clock. A bit's expected error is set when it toggled after the
// falling edge (2500); the final error is the OR of the expected flags.
module tb_eds_array;
  localparam int T = 5000;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] d = '0, errors;
  logic final_error;
  int checks = 0, failures = 0, n_final = 0, n_quiet = 0;

  eds_array #(.N(N)) dut (.clk, .rst_n, .d, .errors, .final_error);

  always #(T/2) clk = ~clk;

  initial begin
    #(1000 * T);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] exp_err;
  int tog [N];

  // one process per bit: toggles at the chosen offset
  for (genvar i = 0; i < N; i++) begin : g_drv
    always @(posedge clk) begin
      if (rst_n && tog[i] > 0) begin
        #(tog[i]);
        d[i] = ~d[i];
      end
    end
  end

  initial begin
    for (int i = 0; i < N; i++) tog[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 200; c++) begin
      // choose this cycle's toggles just before the rising edge
      @(negedge clk);
      #(T/2 - 10);
      exp_err = '0;
      for (int i = 0; i < N; i++) begin
        case ($urandom_range(0, 5))
          0:       tog[i] = $urandom_range(2700, 4800);   // late
          1, 2:    tog[i] = $urandom_range(100, 2300);    // early
          default: tog[i] = 0;                            // no change
        endcase
        if (c < 20) tog[i] = 0;                           // quiet start
        exp_err[i] = tog[i] > T/2;
      end
      @(posedge clk);        // toggles happen during this cycle
      @(posedge clk);        // error for them registered here
      #1;
      checks += 2;
      if (errors !== exp_err) begin
        failures++;
        $display("cycle %0d: errors=%b expected %b", c, errors, exp_err);
      end
      if (final_error !== |exp_err) begin
        failures++;
        $display("cycle %0d: final_error=%0b expected %0b", c, final_error, |exp_err);
      end
      if (|exp_err) n_final++; else n_quiet++;
      for (int i = 0; i < N; i++) tog[i] = 0;
    end
    checks++;
    if (n_final == 0 || n_quiet == 0) failures++;
    $display("cycles with final error %0d, without %0d", n_final, n_quiet);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
