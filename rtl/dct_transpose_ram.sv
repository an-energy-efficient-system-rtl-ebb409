// dct_transpose_ram: ping-pong transposition memory between the row and the
// column DCT stages.
//
// The row stage writes an 8x8 block row by row: word i of a block (row i/8,
// coefficient i%8) goes to address i of the bank being filled. When the 64th
// word of a bank is written the banks swap: the full bank is read out column
// by column (column c, rows 0..7, then column c+1) while the other bank fills
// with the next block. Reading and writing both run at one word per clock, so
// a read-out always ends before the next bank is full.
//
// Interface and timing: `wr_valid`/`wr_data` take one word per clock.
// `rd_valid`/`rd_data` deliver words in column order; the first word of a
// block is on `rd_data` after the clock edge following the one that wrote the
// block's last word.
// `rd_first` marks the first word of each block read out.
//
// The memory's place between the two 1-D stages follows the design; the
// double-buffered organisation is this implementation's choice.
module dct_transpose_ram #(
  parameter int unsigned W = 14               // word width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_valid,
  input  logic [W-1:0] wr_data,
  output logic         rd_valid,
  output logic         rd_first,
  output logic [W-1:0] rd_data
);

  logic [W-1:0] mem [128];      // {bank, row, column}

  logic       wbank;
  logic [5:0] waddr;
  logic       rbank;
  logic [5:0] ridx;             // {column, row}
  logic       ractive;

  always_ff @(posedge clk)
    if (wr_valid) mem[{wbank, waddr}] <= wr_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wbank   <= 1'b0;
      waddr   <= '0;
      rbank   <= 1'b0;
      ridx    <= '0;
      ractive <= 1'b0;
    end else begin
      if (wr_valid) begin
        waddr <= waddr + 6'd1;
        if (waddr == 6'd63) wbank <= ~wbank;
      end
      if (wr_valid && waddr == 6'd63) begin
        ractive <= 1'b1;
        rbank   <= wbank;
        ridx    <= '0;
      end else if (ractive) begin
        ridx <= ridx + 6'd1;
        if (ridx == 6'd63) ractive <= 1'b0;
      end
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_first <= 1'b0;
      rd_data  <= '0;
    end else begin
      rd_valid <= ractive;
      rd_first <= ractive && ridx == 6'd0;
      rd_data  <= mem[{rbank, ridx[2:0], ridx[5:3]}];
    end

  // The writer must not finish a bank while the other is still being read.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (wr_valid && waddr == 6'd63) |-> (!ractive || ridx == 6'd63))
    else $error("dct_transpose_ram: bank overrun");

endmodule
