// dct2d_eds: 8x8 two-dimensional DCT datapath with error-detection
// sequentials on its adder outputs.
//
// Pixels (8-bit unsigned) enter one per clock, eight 8-pixel rows per block.
// Each pixel is level-shifted to a signed value (p - 128). A row DCT stage
// (dct_1d, 14-bit output with 4 fraction bits) transforms each row, a
// ping-pong transposition memory turns the block around, and a column DCT
// stage (dct_1d, 12-bit output) transforms each column. The result is the
// orthonormal 2-D DCT, rounded to 12-bit signed coefficients.
//
// Output order: column-major. `coef_idx` = 8*u + v where u is the horizontal
// and v the vertical frequency, i.e. the coefficients of block column u come
// out for v = 0..7, then u+1.
//
// Error detection: four EDS cells sit on intermediate-significant bits of the
// row stage's distributed-arithmetic adder output and four on the column
// stage's (8 in all), chosen as bits ROW_EDS_LSB.. and COL_EDS_LSB.. of the
// raw sums, i.e. output bits 5..8 of the 14-bit row result and 4..7 of the
// 12-bit column result. These paths are short compared with the carry into
// the top bits, so they carry a timing margin over the critical path and
// switch on almost every clock. Their errors are ORed into `final_error`.
// Monitoring non-critical intermediate bits of the 14- and 12-bit adders with
// eight cells follows the design; which exact bits is this implementation's
// choice.
//
// Timing: one pixel per clock sustained. The first coefficient of a block is
// on `coef` 21 clocks after the edge that takes the block's last pixel: row
// stage (2 + 7 for its last coefficient), transposition write and read (2),
// eight column samples and the column stage (8 + 2).
module dct2d_eds
  import eds_dvs_pkg::*;
#(
  parameter int unsigned ROW_EDS_LSB = 12,   // row raw-sum bit of first EDS
  parameter int unsigned COL_EDS_LSB = 19,   // column raw-sum bit of first EDS
  parameter int unsigned EDS_PER_STAGE = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         pix,
  input  logic               pix_valid,
  output logic signed [11:0] coef,
  output logic               coef_valid,
  output logic [5:0]         coef_idx,
  output logic [2*EDS_PER_STAGE-1:0] eds_errors,
  output logic               final_error
);

  localparam int unsigned ROW_W    = 14;
  localparam int unsigned ROW_FRAC = 4;                      // fraction bits kept between stages
  localparam int unsigned ROW_SUM  = 8 + COEF_W + 3;
  localparam int unsigned COL_SUM  = ROW_W + COEF_W + 3;

  logic signed [7:0]         x;
  assign x = signed'({~pix[7], pix[6:0]});      // pix - 128

  logic signed [ROW_W-1:0]   row_out;
  logic                      row_valid;
  logic [2:0]                row_k;
  logic signed [ROW_SUM-1:0] row_sum;

  dct_1d #(.IN_W(8), .OUT_W(ROW_W), .SHIFT(COEF_FRAC - ROW_FRAC)) u_row (
    .clk, .rst_n,
    .din(x), .din_valid(pix_valid),
    .dout(row_out), .dout_valid(row_valid), .dout_k(row_k),
    .sum_d(row_sum)
  );

  logic                      tr_valid;
  logic                      tr_first;
  logic [ROW_W-1:0]          tr_data;

  dct_transpose_ram #(.W(ROW_W)) u_tr (
    .clk, .rst_n,
    .wr_valid(row_valid), .wr_data(row_out),
    .rd_valid(tr_valid), .rd_first(tr_first), .rd_data(tr_data)
  );

  logic signed [COL_SUM-1:0] col_sum;
  logic [2:0]                col_k;

  dct_1d #(.IN_W(ROW_W), .OUT_W(12), .SHIFT(COEF_FRAC + ROW_FRAC)) u_col (
    .clk, .rst_n,
    .din(signed'(tr_data)), .din_valid(tr_valid),
    .dout(coef), .dout_valid(coef_valid), .dout_k(col_k),
    .sum_d(col_sum)
  );

  // Column index u of the coefficients leaving the column stage.
  logic [2:0] col_u;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) col_u <= '0;
    else if (coef_valid && col_k == 3'd7) col_u <= col_u + 3'd1;

  assign coef_idx = {col_u, col_k};

  eds_array #(.N(2 * EDS_PER_STAGE)) u_eds (
    .clk, .rst_n,
    .d({col_sum[COL_EDS_LSB +: EDS_PER_STAGE], row_sum[ROW_EDS_LSB +: EDS_PER_STAGE]}),
    .errors(eds_errors),
    .final_error
  );

  logic unused;
  assign unused = ^{row_k, tr_first};

endmodule
