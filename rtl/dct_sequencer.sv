// dct_sequencer: streams a stored image block through the 2-D DCT, again and
// again, and stores the coefficients.
//
// While `run` is high the sequencer reads the input store one pixel per clock
// in 8x8-tile order: tiles left to right, then the next band of eight lines;
// inside a tile eight rows of eight pixels. The pixel address of row r, column
// c of tile (tx, ty) is (8*ty + r)*IMG_W + 8*tx + c. After the last pixel of
// the block it wraps to the first and keeps going, so the same block is
// processed repeatedly. Coefficients coming back from the DCT are written to
// the output store in arrival order: tile t occupies words 64*t .. 64*t+63,
// coefficient (u, v) at 64*t + 8*u + v. `pass_done` pulses when the last
// coefficient of a block pass is written.
//
// Timing: the input store's read takes one clock, so `pix_valid` follows the
// read address by one clock. Dropping `run` stops reads at once; coefficients
// already in flight are still written.
//
// Processing a downloaded 512x32 block repeatedly follows the design; the
// tile order and output layout are this implementation's choice.
module dct_sequencer #(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 32,
  parameter int unsigned AW    = $clog2(IMG_W * IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  // input store, port B
  output logic [AW-1:0] in_addr,
  // DCT input
  output logic          pix_valid,
  // DCT output
  input  logic          coef_valid,
  // output store, port B
  output logic          out_we,
  output logic [AW-1:0] out_addr,
  output logic          pass_done
);

  localparam int unsigned TX_W = $clog2(IMG_W / 8);
  localparam int unsigned TY_W = (IMG_H > 8) ? $clog2(IMG_H / 8) : 1;
  localparam int unsigned NPIX = IMG_W * IMG_H;

  logic [2:0]      c, r;
  logic [TX_W-1:0] tx;
  logic [TY_W-1:0] ty;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      c <= '0; r <= '0; tx <= '0; ty <= '0;
    end else if (run) begin
      c <= c + 3'd1;
      if (c == 3'd7) begin
        r <= r + 3'd1;
        if (r == 3'd7) begin
          if (32'(tx) == IMG_W / 8 - 1) begin
            tx <= '0;
            if (32'(ty) == IMG_H / 8 - 1) ty <= '0;
            else                          ty <= ty + 1'b1;
          end else begin
            tx <= tx + 1'b1;
          end
        end
      end
    end

  assign in_addr = AW'((32'(ty) * 8 + 32'(r)) * IMG_W + 32'(tx) * 8 + 32'(c));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pix_valid <= 1'b0;
    else        pix_valid <= run;

  // Output side
  logic [AW-1:0] ocnt;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ocnt <= '0;
    else if (coef_valid) ocnt <= (32'(ocnt) == NPIX - 1) ? '0 : ocnt + 1'b1;

  assign out_we    = coef_valid;
  assign out_addr  = ocnt;
  assign pass_done = coef_valid && 32'(ocnt) == NPIX - 1;

endmodule
