// tb_eds_dvs_top: closed-loop run of the whole system at its full size
// (512x32 image block, 4096/12288-clock DVS windows, 5 ns clock).
//
// Around the design the bench provides:
//   * a regulator model (lt3070_model) that turns the control pins into a
//     supply voltage after a 13 us settling time;
//   * a delay model for the monitored adder bits: their transitions reach the
//     EDS cells K(T)/(V - 0.5 V) ns after the rising edge, with
//     K = 1.49 ns*V at 25 C growing by 0.067 %/C. At 25 C the bits miss the
//     falling edge (2.5 ns) below 1.10 V, at 85 C below 1.133 V. This model
//     is the bench's own, chosen so the loop settles where the hardware was
//     reported to. It is applied by forcing the EDS inputs with delayed
//     copies of the adder bits; the datapath registers themselves see no
//     delay (the delay never reaches a full clock), so results stay exact.
//
// Sequence: load a synthetic 512x32 image over the host port; run in manual
// mode at 1.20 V and check every coefficient of one pass against a reference
// 2-D DCT computed here; switch to automatic DVS mode and let the loop climb
// from the lowest level; check it settles between 1.089 and 1.133 V (the
// lowest error-free level 1.100 V, one level below it, and one above, which
// errors seen while the regulator is still settling cause); heat to 85 C and
// check the band and the average level move up by one; cool back; read the
// output store again. Every mechanism (EDS errors, level rises and falls,
// the mode switch, full passes, regulator steps, the rise on heating) is
// counted and must happen at least once.
//
// In parallel, the stand-alone synchronizer pair (0.7 V timing) gets a clean
// sample, a metastable one and a clear: the outputs must settle t_n
// (85 / 126 ps) after the sampling edge, plus tau * ln(T_W / |overlap -
// T_BAL|) when metastable (tau = 147 / 477 ps over 35), the monitored one
// may boost only while undecided, and each of these must happen.
module tb_eds_dvs_top;
  localparam int IMG_W = 512, IMG_H = 32, NPIX = IMG_W * IMG_H, AW = 14;
  localparam realtime TCLK = 5.0;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [4:0]    sw = 5'b0_1111;
  logic          in_we = 1'b0;
  logic [AW-1:0] in_addr = '0, out_addr = '0;
  logic [7:0]    in_wdata = '0;
  logic [11:0]   out_rdata;
  logic [4:0]    vctrl_oe, vctrl_val;
  logic          final_error, step_up, step_down, pass_done;
  logic [7:0]    eds_errors;
  logic [3:0]    vlevel;
  int            vout_mv;
  logic          bad_pattern;
  logic          sync_phi = 1'b0, sync_s = 1'b0, sync_r = 1'b0;
  logic [1:0]    sync_q, sync_meta, sync_boost;

  int checks = 0, failures = 0;

  eds_dvs_top dut (
    .clk, .rst_n, .run, .sw,
    .in_we, .in_addr, .in_wdata, .out_addr, .out_rdata,
    .vctrl_oe, .vctrl_val,
    .final_error, .eds_errors, .vlevel, .step_up, .step_down, .pass_done,
    .sync_phi, .sync_s, .sync_r, .sync_q, .sync_meta, .sync_boost
  );

  lt3070_model #(.T_REG(13000.0)) u_lr (.oe(vctrl_oe), .val(vctrl_val), .vout_mv, .bad_pattern);

  always #(TCLK / 2) clk = ~clk;

  initial begin
    #(3_000_000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- delay model
  real     temp_c = 25.0;
  realtime dly;
  always_comb dly = 1.49 * (1.0 + 0.00067 * (temp_c - 25.0)) / (real'(vout_mv) / 1000.0 - 0.5);

  logic [7:0] raw_d, late_d;
  assign raw_d = {dut.u_dct.col_sum[19 +: 4], dut.u_dct.row_sum[12 +: 4]};
  always @(raw_d) late_d <= #(dly) raw_d;
  initial begin
    late_d = '0;
    force dut.u_dct.u_eds.d = late_d;
  end

  // ---------------------------------------------------------------- synchronizers
  int      n_sync_clean = 0, n_sync_meta = 0, n_sync_boost_m = 0, n_sync_clear = 0;
  realtime t_sq [2];
  always @(posedge sync_q[0]) t_sq[0] = $realtime;
  always @(posedge sync_q[1]) t_sq[1] = $realtime;
  always @(posedge sync_boost[1]) begin
    n_sync_boost_m++;
    checks++;
    if (!sync_meta[1]) begin
      failures++;
      $display("monitored synchronizer boosted while decided");
    end
  end

  task automatic sync_sample(input realtime lead, input realtime exp0, input realtime exp1,
                             input bit exp_q);
    realtime tf;
    sync_r = 1'b1; #1.0; sync_r = 1'b0;
    t_sq[0] = -1.0; t_sq[1] = -1.0;
    sync_phi = 1'b1; #(10.0 - lead); sync_s = 1'b1; #(lead);
    tf = $realtime;
    sync_phi = 1'b0;
    #5.0;
    sync_s = 1'b0;
    checks += 3;
    if (sync_boost[0] !== 1'b1) begin failures++; $display("continuous synchronizer not boosted"); end
    if (sync_q !== {exp_q, exp_q}) begin failures++; $display("synchronizer q %b", sync_q); end
    if (exp_q && ((t_sq[0] - tf - exp0) > 0.002 || (t_sq[0] - tf - exp0) < -0.002 ||
                  (t_sq[1] - tf - exp1) > 0.002 || (t_sq[1] - tf - exp1) < -0.002)) begin
      failures++;
      $display("synchronizer delays %0.4f %0.4f, expected %0.4f %0.4f",
               t_sq[0] - tf, t_sq[1] - tf, exp0, exp1);
    end
  endtask

  initial begin
    #20.0;
    // clean set: 1 ns of overlap
    sync_sample(1.0, 0.085, 0.126, 1'b1);
    n_sync_clean++;
    // metastable set: overlap 3 ps past the 20 ps balance point, window 10 ps
    sync_sample(0.023, 0.085 + 0.147 / 35.0 * $ln(10.0 / 3.0),
                0.126 + 0.477 / 35.0 * $ln(10.0 / 3.0), 1'b1);
    n_sync_meta++;
    // clear
    sync_r = 1'b1; #1.0;
    checks++;
    if (sync_q !== 2'b00) begin failures++; $display("synchronizer clear failed"); end
    else n_sync_clear++;
    sync_r = 1'b0;
  end

  // ---------------------------------------------------------------- counters
  int n_err = 0, n_up = 0, n_dn = 0, n_pass = 0, n_lr = 0, n_mode = 0, n_heat_rise = 0;
  int last_mv = 1200;
  always @(posedge clk) begin
    if (final_error) n_err++;
    if (step_up)     n_up++;
    if (step_down)   n_dn++;
    if (pass_done)   n_pass++;
  end
  always @(vout_mv) if (vout_mv != last_mv) begin n_lr++; last_mv = vout_mv; end
  always @(posedge clk) if (bad_pattern) begin failures++; $display("regulator pattern outside table"); end

  // ---------------------------------------------------------------- image and reference
  logic [7:0] img [NPIX];
  int C [8][8];

  function automatic longint rnd_sat(input longint raw, input int sh, input int w);
    longint s;
    s = (raw + (64'sd1 <<< (sh - 1))) >>> sh;
    if (s > (64'sd1 <<< (w - 1)) - 1) s = (64'sd1 <<< (w - 1)) - 1;
    if (s < -(64'sd1 <<< (w - 1)))    s = -(64'sd1 <<< (w - 1));
    return s;
  endfunction

  // expected coefficient at output word a (tile-major, then 8*u + v)
  function automatic int ref_coef(input int a);
    int t, tx, ty, u, v;
    longint raw, rowc [8];
    t  = a / 64; u = (a % 64) / 8; v = a % 8;
    tx = t % (IMG_W / 8); ty = t / (IMG_W / 8);
    for (int r = 0; r < 8; r++) begin
      raw = 0;
      for (int c = 0; c < 8; c++)
        raw += longint'(C[u][c]) * (int'(img[(8 * ty + r) * IMG_W + 8 * tx + c]) - 128);
      rowc[r] = rnd_sat(raw, 7, 14);
    end
    raw = 0;
    for (int r = 0; r < 8; r++) raw += longint'(C[v][r]) * rowc[r];
    return int'(rnd_sat(raw, 15, 12));
  endfunction

  task automatic check_output(input string what);
    int bad;
    bad = 0;
    for (int a = 0; a < NPIX; a++) begin
      out_addr <= AW'(a);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (int'(signed'(out_rdata)) != ref_coef(a)) begin
        failures++;
        if (bad++ < 5) $display("%s: word %0d = %0d, expected %0d", what, a, signed'(out_rdata), ref_coef(a));
      end
    end
  endtask

  // observe the level over a stretch of clocks
  task automatic observe(input int clocks, output int lo, output int hi, output real avg);
    longint sum;
    lo = 15; hi = 0; sum = 0;
    repeat (clocks) begin
      @(posedge clk);
      if (int'(vlevel) < lo) lo = int'(vlevel);
      if (int'(vlevel) > hi) hi = int'(vlevel);
      sum += longint'(vlevel);
    end
    avg = real'(sum) / real'(clocks);
  endtask

  initial begin
    int lo, hi;
    real avg, avg_cool;
    real pi, ck;
    pi = 3.14159265358979;
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++) begin
        ck = (k == 0) ? 0.70710678118655 : 1.0;
        C[k][n] = int'($floor(ck / 2.0 * $cos((2 * n + 1) * k * pi / 16.0) * 2048.0 + 0.5));
      end
    // synthetic picture: smooth shading, a bright disc, texture and noise
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        int p;
        p = 40 + x / 4 + 2 * y;
        if ((x - 200) * (x - 200) + (y - 16) * (y - 16) * 16 < 4000) p += 60;
        if ((x / 16) % 3 == 0) p += ((x + y) % 4) * 6;
        p += $urandom_range(0, 12);
        img[y * IMG_W + x] = 8'((p > 255) ? 255 : p);
      end

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int a = 0; a < NPIX; a++) begin
      in_we <= 1'b1; in_addr <= AW'(a); in_wdata <= img[a];
      @(posedge clk);
    end
    in_we <= 1'b0;

    // ---- manual mode at 1.20 V: one full pass, exact results, no errors
    run <= 1'b1;
    wait (n_pass == 1);
    @(negedge clk);
    checks++;
    if (vout_mv != 1200 || n_err != 0 || vlevel != 4'd0) begin
      failures++;
      $display("manual mode: %0d mV, %0d error cycles, level %0d", vout_mv, n_err, vlevel);
    end
    check_output("manual pass");

    // ---- automatic mode from the lowest level
    sw <= 5'b1_0000;
    n_mode++;
    observe(20 * 4096, lo, hi, avg);   // climb: 12 rises of one 4096-clock window each
    observe(10 * 12288, lo, hi, avg);
    checks++;
    $display("25 C: level %0d..%0d, mean %0.2f, %0d mV", lo, hi, avg, vout_mv);
    if (lo < 11 || hi > 13) begin
      failures++;
      $display("25 C: level should settle within 11..13 (1.089..1.133 V)");
    end
    avg_cool = avg;

    // ---- heat
    temp_c = 85.0;
    observe(3 * 12288, lo, hi, avg);
    observe(8 * 12288, lo, hi, avg);
    checks++;
    $display("85 C: level %0d..%0d, mean %0.2f, %0d mV", lo, hi, avg, vout_mv);
    if (lo < 12 || hi > 14) begin
      failures++;
      $display("85 C: level should settle within 12..14 (1.100..1.150 V)");
    end
    if (avg > avg_cool + 0.5) n_heat_rise++;

    // ---- cool down again
    temp_c = 25.0;
    observe(3 * 12288, lo, hi, avg);
    observe(8 * 12288, lo, hi, avg);
    checks++;
    $display("25 C again: level %0d..%0d, mean %0.2f, %0d mV", lo, hi, avg, vout_mv);
    if (lo < 11 || hi > 13) begin
      failures++;
      $display("cooled: level should return to 11..13");
    end

    // ---- results written under DVS are still exact
    check_output("dvs passes");

    // ---- every mechanism happened
    $display("error cycles %0d, rises %0d, falls %0d, passes %0d, regulator steps %0d, mode switches %0d, rise on heating %0d",
             n_err, n_up, n_dn, n_pass, n_lr, n_mode, n_heat_rise);
    $display("synchronizers: clean samples %0d, metastable samples %0d, monitored boosts %0d, clears %0d",
             n_sync_clean, n_sync_meta, n_sync_boost_m, n_sync_clear);
    checks += 11;
    if (n_sync_clean == 0)   begin failures++; $display("no clean synchronizer sample"); end
    if (n_sync_meta == 0)    begin failures++; $display("no metastable synchronizer sample"); end
    if (n_sync_boost_m == 0) begin failures++; $display("monitored synchronizer never boosted"); end
    if (n_sync_clear == 0)   begin failures++; $display("synchronizer never cleared"); end
    if (n_err == 0)       begin failures++; $display("no EDS error seen"); end
    if (n_up == 0)        begin failures++; $display("no level rise"); end
    if (n_dn == 0)        begin failures++; $display("no level fall"); end
    if (n_pass < 2)       begin failures++; $display("fewer than two passes"); end
    if (n_lr == 0)        begin failures++; $display("regulator never stepped"); end
    if (n_mode == 0)      begin failures++; $display("no mode switch"); end
    if (n_heat_rise == 0) begin failures++; $display("heating did not raise the supply"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
