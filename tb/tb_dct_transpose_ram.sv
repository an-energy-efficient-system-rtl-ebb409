// tb_dct_transpose_ram: checks that blocks written row by row come out
// column by column, one clock after the block's last write, back to back.
//
// Ten 8x8 blocks of random words are written continuously (one per clock),
// then three more with idle clocks between words. For each read word the
// expected value is word (row r, column c) of the matching block in the order
// c-major, r-minor; `rd_first` must mark word 0 of each block.
module tb_dct_transpose_ram;
  localparam int W = 14;
  logic clk = 1'b0, rst_n = 1'b0;
  logic         wr_valid = 1'b0;
  logic [W-1:0] wr_data = '0;
  logic         rd_valid, rd_first;
  logic [W-1:0] rd_data;
  int checks = 0, failures = 0, cyc = 0;

  dct_transpose_ram #(.W(W)) dut (.clk, .rst_n, .wr_valid, .wr_data, .rd_valid, .rd_first, .rd_data);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #(10 * 3000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] blk [13][64];
  int last_wr_cyc [13];
  int rd_blk = 0, rd_i = 0;

  initial begin
    for (int b = 0; b < 13; b++)
      for (int i = 0; i < 64; i++) blk[b][i] = W'($urandom);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < 13; b++) begin
      for (int i = 0; i < 64; i++) begin
        if (b >= 10 && (i % 2) == 1) begin
          wr_valid <= 1'b0;
          @(posedge clk);
        end
        wr_valid <= 1'b1;
        wr_data  <= blk[b][i];
        @(posedge clk);
        if (i == 63) last_wr_cyc[b] = cyc + 1;   // edge just taken (cyc not yet updated)
      end
    end
    wr_valid <= 1'b0;
    repeat (80) @(posedge clk);
    checks++;
    if (rd_blk != 13) begin
      failures++;
      $display("only %0d blocks read out", rd_blk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && rd_valid) begin
      int r, c;
      c = rd_i / 8;
      r = rd_i % 8;
      checks++;
      if (rd_blk >= 13 || rd_data !== blk[rd_blk][r * 8 + c] || rd_first !== (rd_i == 0)) begin
        failures++;
        $display("block %0d word %0d: got %h first=%0b", rd_blk, rd_i, rd_data, rd_first);
      end
      if (rd_i == 0) begin
        checks++;
        if (cyc != last_wr_cyc[rd_blk] + 1) begin
          failures++;
          $display("block %0d: first word at cyc %0d, last write at %0d", rd_blk, cyc, last_wr_cyc[rd_blk]);
        end
      end
      rd_i++;
      if (rd_i == 64) begin
        rd_i = 0;
        rd_blk++;
      end
    end
  end
endmodule
