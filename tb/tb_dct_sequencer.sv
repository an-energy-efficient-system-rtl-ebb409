// tb_dct_sequencer: checks the tile read order, the data-valid timing, the
// output addresses and the pass marker of the transform sequencer.
//
// A 32x16 image (four tiles across, two bands) is used. The expected read
// address of pixel number i of a pass is computed from its tile, row and
// column; `pix_valid` must follow `run` by one clock. Coefficient-valid
// pulses are driven with gaps; each must be written to the next output word,
// wrapping after 512, with `pass_done` on the last one. `run` is dropped for
// a while to check that reading pauses and resumes where it stopped.
module tb_dct_sequencer;
  localparam int IMG_W = 32, IMG_H = 16, AW = 9, NPIX = IMG_W * IMG_H;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, coef_valid = 1'b0;
  logic [AW-1:0] in_addr, out_addr;
  logic pix_valid, out_we, pass_done;
  int checks = 0, failures = 0;

  dct_sequencer #(.IMG_W(IMG_W), .IMG_H(IMG_H)) dut (
    .clk, .rst_n, .run, .in_addr, .pix_valid, .coef_valid, .out_we, .out_addr, .pass_done);

  always #5 clk = ~clk;

  initial begin
    #(10 * 6000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_addr(input int i);
    int t, tx, ty, r, c, k;
    k  = i % NPIX;
    t  = k / 64;
    r  = (k % 64) / 8;
    c  = k % 8;
    tx = t % (IMG_W / 8);
    ty = t / (IMG_W / 8);
    return (ty * 8 + r) * IMG_W + tx * 8 + c;
  endfunction

  int n_read = 0, n_out = 0, n_pass = 0;
  logic run_d = 1'b0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run <= 1'b1;
    repeat (700) @(posedge clk);
    run <= 1'b0;
    repeat (17) @(posedge clk);
    run <= 1'b1;
    repeat (800) @(posedge clk);
    run <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (n_read != 1500 || n_pass != n_out / NPIX || n_pass < 1) begin
      failures++;
      $display("reads %0d passes %0d", n_read, n_pass);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // coefficient pulses, two of every three clocks
  always @(posedge clk) coef_valid <= rst_n && ($urandom_range(0, 2) != 0);

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (pix_valid !== run_d) begin
        failures++;
        $display("pix_valid %0b, run one clock earlier %0b", pix_valid, run_d);
      end
      run_d = run;
      if (run) begin
        checks++;
        if (int'(in_addr) != exp_addr(n_read)) begin
          failures++;
          $display("read %0d: addr %0d expected %0d", n_read, in_addr, exp_addr(n_read));
        end
        n_read++;
      end
      if (coef_valid) begin
        checks++;
        if (!out_we || int'(out_addr) != n_out % NPIX || pass_done !== (n_out % NPIX == NPIX - 1)) begin
          failures++;
          $display("write %0d: we %0b addr %0d pass_done %0b", n_out, out_we, out_addr, pass_done);
        end
        if (pass_done) n_pass++;
        n_out++;
      end else begin
        checks++;
        if (out_we || pass_done) failures++;
      end
    end
  end
endmodule
