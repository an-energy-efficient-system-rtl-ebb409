// tb_dvs_controller: checks the voltage-level decisions of the DVS
// controller against a cycle-by-cycle reference.
//
// Reference rule: count clocks since the last decision; when that count is a
// multiple of PHI_UP and an error was seen since the last decision, raise the
// level; when it reaches PHI_DN, raise it if an error was seen, otherwise
// lower it. Every decision restarts the count and forgets the errors; the
// level saturates at 0 and 15. A small instance (PHI_UP = 8, PHI_DN = 24)
// runs long error bursts, quiet stretches and sparse random errors. A second
// instance with the default windows (4096 and 12288 clocks) is checked for
// the exact clock counts of one rise and one fall.
module tb_dvs_controller;
  localparam int PU = 8, PD = 24;
  logic clk = 1'b0, rst_n = 1'b0, error = 1'b0;
  logic [3:0] vlevel, vlevel_d;
  logic step_up, step_down, step_up_d, step_down_d;
  int checks = 0, failures = 0, cyc = 0;
  int n_up = 0, n_dn = 0, n_sat_hi = 0, n_sat_lo = 0;

  dvs_controller #(.PHI_UP(PU), .PHI_DN(PD)) dut (
    .clk, .rst_n, .error, .vlevel, .step_up, .step_down);
  dvs_controller dut_d (
    .clk, .rst_n, .error, .vlevel(vlevel_d), .step_up(step_up_d), .step_down(step_down_d));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #(10 * 60000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  int  age = 0, lvl = 0;
  bit  seen = 0;
  bit  ref_on = 1;    // reference follows the small instance until the second reset

  always @(posedge clk) begin
    bit up, dn;
    if (rst_n && ref_on) begin
      // outputs before this edge
      up = 0; dn = 0;
      if (age + 1 == PD) begin
        if (seen || error) up = 1; else dn = 1;
      end else if ((age + 1) % PU == 0 && (seen || error)) up = 1;
      checks++;
      if (step_up !== (up && lvl < 15) || step_down !== (dn && lvl > 0) || int'(vlevel) != lvl) begin
        failures++;
        $display("cyc %0d: level %0d up %0b down %0b, expected %0d %0b %0b", cyc, vlevel,
                 step_up, step_down, lvl, up && lvl < 15, dn && lvl > 0);
      end
      if (up && lvl == 15) n_sat_hi++;
      if (dn && lvl == 0)  n_sat_lo++;
      if (up || dn) begin
        if (up && lvl < 15) begin lvl++; n_up++; end
        if (dn && lvl > 0)  begin lvl--; n_dn++; end
        age  = 0;
        seen = 0;
      end else begin
        age++;
        seen = seen || error;
      end
    end
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // phase 1: quiet at the lowest level (saturation low)
    repeat (60) @(posedge clk);
    // phase 2: continuous errors, climb to the top and saturate
    error <= 1'b1;
    repeat (PU * 20) @(posedge clk);
    // phase 3: quiet, fall
    error <= 1'b0;
    repeat (PD * 6) @(posedge clk);
    // phase 4: sparse random errors
    for (int i = 0; i < 3000; i++) begin
      error <= ($urandom_range(0, 39) == 0);
      @(posedge clk);
    end
    error <= 1'b0;
    repeat (PD * 20) @(posedge clk);
    checks++;
    if (n_up == 0 || n_dn == 0 || n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++;
      $display("not every behaviour happened: up %0d down %0d sat_hi %0d sat_lo %0d",
               n_up, n_dn, n_sat_hi, n_sat_lo);
    end
    $display("rises %0d falls %0d saturated-high %0d saturated-low %0d", n_up, n_dn, n_sat_hi, n_sat_lo);

    // default windows: reset, one error, rise after exactly 4096 clocks
    ref_on = 0;
    rst_n <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    error <= 1'b1;
    @(posedge clk);
    t0 = cyc + 1;               // first edge counted by the controller
    error <= 1'b0;
    while (!step_up_d) @(posedge clk);
    checks++;
    if (cyc + 1 - t0 != 4096 - 1) begin
      failures++;
      $display("default rise after %0d clocks", cyc + 1 - t0 + 1);
    end
    @(posedge clk);
    t0 = cyc + 1;
    while (!step_down_d) @(posedge clk);
    checks++;
    if (cyc + 1 - t0 != 12288 - 1 || vlevel_d != 4'd1) begin
      failures++;
      $display("default fall after %0d clocks, level %0d", cyc + 1 - t0 + 1, vlevel_d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
