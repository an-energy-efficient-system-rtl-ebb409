// tb_dct2d_eds: checks the 8x8 2-D DCT datapath end to end.
//
// Random and structured 8x8 pixel blocks are streamed one pixel per clock.
// The reference is computed here from the cosine definition: a direct 8x8
// matrix product over each row (rounded to 4 fraction bits, 14-bit
// saturation), then over each column (rounded to integers, 12-bit
// saturation). Every coefficient, its index 8*u+v, and the latency from the
// block's last pixel to its first coefficient (21 clocks) are checked. The
// result is also compared with a floating-point DCT (within +-2). With zero
// path delays no EDS cell may report an error, and every monitored bit must
// toggle at least once (the monitored paths are exercised by real data).
module tb_dct2d_eds;
  localparam int BLOCKS = 24;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0]         pix = '0;
  logic               pix_valid = 1'b0;
  logic signed [11:0] coef;
  logic               coef_valid;
  logic [5:0]         coef_idx;
  logic [7:0]         eds_errors;
  logic               final_error;
  int checks = 0, failures = 0, cyc = 0;

  dct2d_eds dut (.clk, .rst_n, .pix, .pix_valid, .coef, .coef_valid, .coef_idx,
                 .eds_errors, .final_error);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #(10 * 4000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  C [8][8];
  real Cr [8][8];
  initial begin
    real pi, ck;
    pi = 3.14159265358979;
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++) begin
        ck = (k == 0) ? 0.70710678118655 : 1.0;
        Cr[k][n] = ck / 2.0 * $cos((2 * n + 1) * k * pi / 16.0);
        C[k][n] = int'($floor(Cr[k][n] * 2048.0 + 0.5));
      end
  end

  function automatic longint rnd_sat(input longint raw, input int sh, input int w);
    longint s;
    s = (raw + (64'sd1 <<< (sh - 1))) >>> sh;
    if (s > (64'sd1 <<< (w - 1)) - 1) s = (64'sd1 <<< (w - 1)) - 1;
    if (s < -(64'sd1 <<< (w - 1)))    s = -(64'sd1 <<< (w - 1));
    return s;
  endfunction

  int  exp_coef [BLOCKS][64];     // index 8*u + v
  real ref_real [BLOCKS][64];
  int  last_pix_edge [BLOCKS];

  task automatic make_ref(input int b, input int p [8][8]);
    longint rowc [8][8];
    longint raw;
    real    acc;
    for (int r = 0; r < 8; r++)
      for (int u = 0; u < 8; u++) begin
        raw = 0;
        for (int c = 0; c < 8; c++) raw += longint'(C[u][c]) * (p[r][c] - 128);
        rowc[r][u] = rnd_sat(raw, 7, 14);
      end
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        raw = 0;
        for (int r = 0; r < 8; r++) raw += longint'(C[v][r]) * rowc[r][u];
        exp_coef[b][8 * u + v] = int'(rnd_sat(raw, 15, 12));
        acc = 0.0;
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++) acc += Cr[v][r] * Cr[u][c] * (p[r][c] - 128);
        ref_real[b][8 * u + v] = acc;
      end
  endtask

  int out_b = 0, out_i = 0;
  int toggles [8];
  logic [7:0] eds_d_prev;

  initial begin
    int p [8][8];
    for (int i = 0; i < 8; i++) toggles[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < BLOCKS; b++) begin
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          case (b % 6)
            0, 1, 2: p[r][c] = $urandom_range(0, 255);
            3:       p[r][c] = (b % 12 == 3) ? 255 : 0;          // flat extremes
            4:       p[r][c] = ((r + c) % 2 == 1) ? 255 : 0;     // checkerboard
            default: p[r][c] = 16 * r + 2 * c;                   // ramp
          endcase
      make_ref(b, p);
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          if (b == 20 && c == 3) begin        // a gap in the stream
            pix_valid <= 1'b0;
            @(posedge clk);
          end
          pix       <= 8'(p[r][c]);
          pix_valid <= 1'b1;
          @(posedge clk);
        end
      last_pix_edge[b] = cyc + 1;   // edge just taken
    end
    pix_valid <= 1'b0;
    repeat (200) @(posedge clk);
    checks++;
    if (out_b != BLOCKS) begin
      failures++;
      $display("only %0d blocks came out", out_b);
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (toggles[i] == 0) begin
        failures++;
        $display("monitored bit %0d never switched", i);
      end
    end
    $display("monitored-bit toggles: %0d %0d %0d %0d %0d %0d %0d %0d", toggles[0], toggles[1],
             toggles[2], toggles[3], toggles[4], toggles[5], toggles[6], toggles[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (final_error || eds_errors != '0) begin
        failures++;
        $display("cyc %0d: EDS error with zero path delay", cyc);
      end
      for (int i = 0; i < 8; i++)
        if (dut.u_eds.d[i] != eds_d_prev[i]) toggles[i]++;
      eds_d_prev = dut.u_eds.d;
    end
    if (rst_n && coef_valid) begin
      real diff;
      checks++;
      if (out_b >= BLOCKS) begin
        failures++;
      end else begin
        diff = real'(coef) - ref_real[out_b][out_i];
        if (int'(coef) != exp_coef[out_b][out_i] || int'(coef_idx) != out_i
            || diff > 2.0 || diff < -2.0) begin
          failures++;
          $display("block %0d idx %0d: got %0d (idx %0d) expected %0d (real %f)", out_b, out_i,
                   coef, coef_idx, exp_coef[out_b][out_i], ref_real[out_b][out_i]);
        end
        if (out_i == 0) begin
          checks++;
          if (cyc != last_pix_edge[out_b] + 21) begin
            failures++;
            $display("block %0d: first coefficient at edge %0d, last pixel at %0d", out_b, cyc,
                     last_pix_edge[out_b]);
          end
        end
      end
      out_i++;
      if (out_i == 64) begin
        out_i = 0;
        out_b++;
      end
    end
  end
endmodule
