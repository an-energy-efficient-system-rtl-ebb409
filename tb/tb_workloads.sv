// tb_workloads: closed-loop runs over three kinds of picture, at the full
// default size, showing how the loop depends on the monitored paths being
// exercised by the data.
//
// The design was evaluated on three 512x512 8-bit test pictures, processed
// as sixteen 512x32 blocks: one of normal entropy, one of fairly low entropy
// (a ruler: sharp black ticks on white) and one of extremely low entropy (a
// plain gray field). The original pictures are not available, so this bench
// generates one 512x32 block of each kind:
//   natural - shading, a bright disc, texture and noise;
//   ruler   - white background with black tick marks of three lengths;
//   gray    - a uniform mid-gray field (level 128).
// Each block is loaded, checked for one pass at 1.20 V against a reference
// DCT (a sample of 512 coefficients), and then run in automatic DVS mode at
// 25 C with the same regulator and delay models as the system bench.
// Expected: with natural and ruler data the monitored adder bits switch and
// the supply settles between 1.089 and 1.133 V; with the gray field they
// never switch, no error is ever reported and the loop lowers the supply to
// 0.950 V, below the level at which the monitored paths fail - the voltage
// over-scaling that the evaluation also observed with its gray picture.
// The bench also measures, per monitored bit, the longest run of clocks
// without a change while the loop runs. With natural and ruler data no bit
// may stay idle for a whole 12288-clock down-window (the event that would
// let the loop lower the supply untested); with gray every bit stays idle.
// After each run the whole output store is read back, inverted in floating
// point and compared with the source block: the PSNR must exceed 40 dB, the
// usual acceptability limit for 8-bit pictures. (The bench's delay model
// never corrupts the datapath registers, so over-scaling shows up only as
// the lowered supply, not as damaged output.)
module tb_workloads;
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

  int checks = 0, failures = 0;

  eds_dvs_top dut (
    .clk, .rst_n, .run, .sw,
    .in_we, .in_addr, .in_wdata, .out_addr, .out_rdata,
    .vctrl_oe, .vctrl_val,
    .final_error, .eds_errors, .vlevel, .step_up, .step_down, .pass_done,
    .sync_phi(1'b0), .sync_s(1'b0), .sync_r(1'b0), .sync_q(), .sync_meta(), .sync_boost()
  );

  lt3070_model #(.T_REG(13000.0)) u_lr (.oe(vctrl_oe), .val(vctrl_val), .vout_mv, .bad_pattern);

  always #(TCLK / 2) clk = ~clk;

  initial begin
    #(6_000_000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // delay of the monitored bits: 1.49 ns*V / (V - 0.5 V) at 25 C
  realtime dly;
  always_comb dly = 1.49 / (real'(vout_mv) / 1000.0 - 0.5);
  logic [7:0] raw_d, late_d;
  assign raw_d = {dut.u_dct.col_sum[19 +: 4], dut.u_dct.row_sum[12 +: 4]};
  always @(raw_d) late_d <= #(dly) raw_d;
  initial begin
    late_d = '0;
    force dut.u_dct.u_eds.d = late_d;
  end

  int n_err = 0, n_pass = 0, n_toggle = 0;
  logic [7:0] raw_prev = '0;
  // Longest run of clocks in which a monitored bit did not change, per bit,
  // measured while `gap_on` is set. A run of a whole down-window (12288
  // clocks) is the inactivation event that lets the loop lower the supply
  // without the bit having been tested.
  bit gap_on = 1'b0;
  int gap [8], max_gap [8];
  always @(posedge clk) begin
    if (final_error) n_err++;
    if (pass_done)   n_pass++;
    if (raw_d != raw_prev) n_toggle++;
    for (int b = 0; b < 8; b++) begin
      if (!gap_on || raw_d[b] != raw_prev[b]) gap[b] = 0;
      else                                    gap[b] = gap[b] + 1;
      if (!gap_on)                  max_gap[b] = 0;
      else if (gap[b] > max_gap[b]) max_gap[b] = gap[b];
    end
    raw_prev <= raw_d;
  end

  logic [7:0] img [NPIX];
  int C [8][8];

  function automatic longint rnd_sat(input longint raw, input int sh, input int w);
    longint s;
    s = (raw + (64'sd1 <<< (sh - 1))) >>> sh;
    if (s > (64'sd1 <<< (w - 1)) - 1) s = (64'sd1 <<< (w - 1)) - 1;
    if (s < -(64'sd1 <<< (w - 1)))    s = -(64'sd1 <<< (w - 1));
    return s;
  endfunction

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

  task automatic make_image(input int kind);
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        int p;
        case (kind)
          0: begin
            p = 40 + x / 4 + 2 * y;
            if ((x - 200) * (x - 200) + (y - 16) * (y - 16) * 16 < 4000) p += 60;
            if ((x / 16) % 3 == 0) p += ((x + y) % 4) * 6;
            p += $urandom_range(0, 12);
          end
          1: begin
            p = 250;
            if (x % 10 == 0 && y < ((x % 100 == 0) ? 28 : (x % 50 == 0) ? 20 : 12)) p = 10;
          end
          default: p = 128;
        endcase
        img[y * IMG_W + x] = 8'((p > 255) ? 255 : p);
      end
  endtask

  // Read the whole output store, invert the transform in floating point and
  // return the PSNR of the reconstruction against the source block (a block
  // reconstructed exactly gives 99 dB). Coefficient a = 64*tile + 8*u + v
  // holds horizontal frequency u and vertical frequency v of the tile.
  task automatic store_psnr(output real psnr);
    real cf [8][8];
    real se, x, ck, pi;
    int  F [64];
    pi = 3.14159265358979;
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++) begin
        ck = (k == 0) ? 0.70710678118655 : 1.0;
        cf[k][n] = ck / 2.0 * $cos((2 * n + 1) * k * pi / 16.0);
      end
    se = 0.0;
    for (int tile = 0; tile < NPIX / 64; tile++) begin
      int tx, ty;
      tx = tile % (IMG_W / 8); ty = tile / (IMG_W / 8);
      for (int i = 0; i < 64; i++) begin
        out_addr <= AW'(64 * tile + i);
        @(posedge clk);
        @(negedge clk);
        F[i] = int'(signed'(out_rdata));
      end
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          x = 128.0;
          for (int u = 0; u < 8; u++)
            for (int v = 0; v < 8; v++)
              x += cf[u][c] * cf[v][r] * real'(F[8 * u + v]);
          x = $floor(x + 0.5);
          if (x < 0.0)   x = 0.0;
          if (x > 255.0) x = 255.0;
          x -= real'(img[(8 * ty + r) * IMG_W + 8 * tx + c]);
          se += x * x;
        end
    end
    if (se == 0.0) psnr = 99.0;
    else           psnr = 10.0 * $log10(255.0 * 255.0 * real'(NPIX) / se);
  endtask

  task automatic run_workload(input int kind, input string name,
                              output int lo, output int hi, output int errs, output int togg,
                              output int idle, output real psnr);
    int bad, p0;
    make_image(kind);
    run   <= 1'b0;
    sw    <= 5'b0_1111;
    rst_n <= 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int a = 0; a < NPIX; a++) begin
      in_we <= 1'b1; in_addr <= AW'(a); in_wdata <= img[a];
      @(posedge clk);
    end
    in_we <= 1'b0;
    wait (vout_mv == 1200);
    p0 = n_pass;
    run <= 1'b1;
    wait (n_pass == p0 + 1);
    bad = 0;
    for (int i = 0; i < 512; i++) begin
      int a;
      a = (i * 37 + 5) % NPIX;
      out_addr <= AW'(a);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (int'(signed'(out_rdata)) != ref_coef(a)) begin
        failures++;
        if (bad++ < 3) $display("%s: word %0d = %0d, expected %0d", name, a, signed'(out_rdata), ref_coef(a));
      end
    end
    // automatic mode
    sw <= 5'b1_0000;
    repeat (20 * 4096) @(posedge clk);
    errs = n_err;
    togg = n_toggle;
    lo = 15; hi = 0;
    gap_on = 1'b1;
    repeat (10 * 12288) begin
      @(posedge clk);
      if (int'(vlevel) < lo) lo = int'(vlevel);
      if (int'(vlevel) > hi) hi = int'(vlevel);
    end
    gap_on = 1'b0;
    errs = n_err - errs;
    togg = n_toggle - togg;
    idle = 0;
    for (int b = 0; b < 8; b++) if (max_gap[b] > idle) idle = max_gap[b];
    @(posedge clk);
    store_psnr(psnr);
    $display("%-8s: level %0d..%0d (%0d mV at the end), %0d error clocks, %0d monitored-bit changes, longest idle bit %0d clocks, PSNR %0.1f dB",
             name, lo, hi, vout_mv, errs, togg, idle, psnr);
  endtask

  initial begin
    int lo, hi, errs, togg, idle, n_vos;
    real pi, ck, psnr;
    pi = 3.14159265358979;
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++) begin
        ck = (k == 0) ? 0.70710678118655 : 1.0;
        C[k][n] = int'($floor(ck / 2.0 * $cos((2 * n + 1) * k * pi / 16.0) * 2048.0 + 0.5));
      end
    n_vos = 0;

    run_workload(0, "natural", lo, hi, errs, togg, idle, psnr);
    checks++;
    if (psnr < 40.0) begin failures++; $display("natural: PSNR below 40 dB"); end
    checks++;
    if (lo < 11 || hi > 13 || errs == 0) begin failures++; $display("natural: loop did not settle in 11..13"); end
    checks++;
    if (idle >= 12288) begin failures++; $display("natural: a monitored bit was idle for a whole down-window"); end

    run_workload(1, "ruler", lo, hi, errs, togg, idle, psnr);
    checks++;
    if (psnr < 40.0) begin failures++; $display("ruler: PSNR below 40 dB"); end
    checks++;
    if (lo < 11 || hi > 13 || errs == 0) begin failures++; $display("ruler: loop did not settle in 11..13"); end
    checks++;
    if (idle >= 12288) begin failures++; $display("ruler: a monitored bit was idle for a whole down-window"); end

    run_workload(2, "gray", lo, hi, errs, togg, idle, psnr);
    checks++;
    if (psnr < 40.0) begin failures++; $display("gray: PSNR below 40 dB"); end
    checks++;
    if (togg != 0 || errs != 0 || hi != 0 || idle < 10 * 12288 - 1) begin
      failures++;
      $display("gray: expected no activity and the lowest level");
    end else n_vos++;

    checks++;
    if (n_vos == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
