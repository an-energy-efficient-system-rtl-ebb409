// tb_dct_1d: checks the 8-point DCT stage against a direct matrix product.
//
// The reference coefficients are computed here from the cosine definition,
// c(k)/2 * cos((2n+1)k*pi/16) scaled by 2**11 and rounded, and applied to all
// eight samples directly (no butterflies, no distributed arithmetic). The
// raw sum is rounded and shifted by SHIFT and saturated like the stage's
// output. Groups are sent back to back and with gaps; the cycle at which each
// coefficient appears (3 + k clocks after the eighth sample) is checked too.
module tb_dct_1d;
  localparam int IN_W = 8, OUT_W = 14, SHIFT = 7;
  localparam int GROUPS = 60;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [IN_W-1:0]  din = '0;
  logic                    din_valid = 1'b0;
  logic signed [OUT_W-1:0] dout;
  logic                    dout_valid;
  logic [2:0]              dout_k;
  logic signed [IN_W+14:0] sum_d;
  int checks = 0, failures = 0;
  int cyc = 0;

  dct_1d #(.IN_W(IN_W), .OUT_W(OUT_W), .SHIFT(SHIFT)) dut (
    .clk, .rst_n, .din, .din_valid, .dout, .dout_valid, .dout_k, .sum_d);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #(10 * 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int C [8][8];
  initial begin
    real pi, ck;
    pi = 3.14159265358979;
    for (int k = 0; k < 8; k++)
      for (int n = 0; n < 8; n++) begin
        ck = (k == 0) ? 0.70710678118655 : 1.0;
        C[k][n] = int'($floor(ck / 2.0 * $cos((2 * n + 1) * k * pi / 16.0) * 2048.0 + 0.5));
      end
  end

  // expected outputs, queued with the cycle at which they must appear
  int exp_val [$];
  int exp_cyc [$];
  int exp_k   [$];

  function automatic int scale_sat(input longint raw);
    longint s;
    s = (raw + (64'sd1 <<< (SHIFT - 1))) >>> SHIFT;
    if (s > (1 << (OUT_W - 1)) - 1) s = (1 << (OUT_W - 1)) - 1;
    if (s < -(1 << (OUT_W - 1)))    s = -(1 << (OUT_W - 1));
    return int'(s);
  endfunction

  initial begin
    int x [8];
    longint raw;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int g = 0; g < GROUPS; g++) begin
      for (int n = 0; n < 8; n++) begin
        case (g % 4)
          0: x[n] = $urandom_range(0, 255) - 128;
          1: x[n] = (n < 4) ? 127 : -128;            // large odd terms
          2: x[n] = (g % 8 == 2) ? 127 : -128;       // full-scale constant
          default: x[n] = $urandom_range(0, 20) - 10;
        endcase
      end
      for (int n = 0; n < 8; n++) begin
        // gaps between some samples
        if (g % 3 == 2 && n == 4) begin
          din_valid <= 1'b0;
          @(posedge clk);
        end
        din       <= IN_W'(x[n]);
        din_valid <= 1'b1;
        @(posedge clk);
        if (n == 7) begin
          for (int k = 0; k < 8; k++) begin
            raw = 0;
            for (int m = 0; m < 8; m++) raw += longint'(C[k][m]) * x[m];
            exp_val.push_back(scale_sat(raw));
            exp_cyc.push_back((cyc + 1) + 2 + k);   // cyc + 1: number of the edge just taken
            exp_k.push_back(k);
          end
        end
      end
    end
    din_valid <= 1'b0;
    repeat (20) @(posedge clk);
    checks++;
    if (exp_val.size() != 0) begin
      failures++;
      $display("%0d coefficients never appeared", exp_val.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker: `cyc` counts edges; value seen after edge number cyc
  always @(posedge clk) begin
    #1;
    if (rst_n && dout_valid) begin
      checks++;
      if (exp_val.size() == 0) begin
        failures++;
        $display("unexpected output %0d", dout);
      end else begin
        if (int'(dout) != exp_val[0] || int'(dout_k) != exp_k[0] || cyc != exp_cyc[0]) begin
          failures++;
          $display("cyc %0d: X[%0d]=%0d, expected X[%0d]=%0d at cyc %0d",
                   cyc, dout_k, dout, exp_k[0], exp_val[0], exp_cyc[0]);
        end
        void'(exp_val.pop_front());
        void'(exp_cyc.pop_front());
        void'(exp_k.pop_front());
      end
    end
  end
endmodule
