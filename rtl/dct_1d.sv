// dct_1d: one 8-point 1-D DCT stage using parallel distributed arithmetic.
//
// Samples arrive one per clock on `din`/`din_valid`. After the eighth sample
// of a group the stage forms the even/odd butterflies e[n] = x[n] + x[7-n] and
// o[n] = x[n] - x[7-n] (n = 0..3) and then produces the eight coefficients
// X[0..7], one per clock. Coefficient k is a distributed-arithmetic sum: for
// every bit position b of the butterfly words the four bits {v3[b]..v0[b]}
// address a 16-word ROM holding sums of the coefficients of row k, and the
// ROM words are added with weight 2**b (the sign bit with weight -2**b). All
// bit positions are looked up in parallel, so one coefficient leaves per clock.
// The raw sum is rounded, shifted right by SHIFT and saturated to OUT_W bits.
//
// `sum_d` brings out the combinational distributed-arithmetic adder output,
// the endpoint that the `sum_q` register captures, so that a parent can place
// error-detection cells on chosen bits of it.
//
// Timing: the eighth sample of a group is taken at edge t; X[0] is on `dout`
// after edge t+2 and X[k] after edge t+2+k, with `dout_k` = k. A new group may
// start on the very next clock, so the throughput is one sample per clock.
//
// The DCT being a pipelined distributed-arithmetic design with even/odd ROMs
// and one sample per clock follows the design; widths, rounding and the order
// of the pipeline registers are this implementation's own.
module dct_1d
  import eds_dvs_pkg::*;
#(
  parameter int unsigned IN_W  = 8,   // signed input sample width
  parameter int unsigned OUT_W = 14,  // signed output coefficient width
  parameter int unsigned SHIFT = 7,   // right shift applied to the raw sum
  parameter int unsigned SUM_W = IN_W + COEF_W + 3  // raw sum width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  din,
  input  logic                    din_valid,
  output logic signed [OUT_W-1:0] dout,
  output logic                    dout_valid,
  output logic [2:0]              dout_k,
  output logic signed [SUM_W-1:0] sum_d     // DA adder output (to EDS)
);

  localparam int unsigned BW = IN_W + 1;    // butterfly width

  // ---- input collection
  logic signed [IN_W-1:0] x [7];
  logic [2:0]             n_in;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) n_in <= '0;
    else if (din_valid) n_in <= n_in + 3'd1;

  always_ff @(posedge clk)
    if (din_valid && n_in != 3'd7) x[n_in] <= din;

  // ---- butterflies, latched when the eighth sample arrives
  logic signed [BW-1:0] e [4];
  logic signed [BW-1:0] o [4];
  logic                 run;      // producing coefficients
  logic [2:0]           k;        // coefficient being computed

  always_ff @(posedge clk) begin
    if (din_valid && n_in == 3'd7) begin
      e[0] <= BW'(x[0]) + BW'(din);         // din is x[7]
      o[0] <= BW'(x[0]) - BW'(din);
      for (int n = 1; n < 4; n++) begin
        e[n] <= BW'(x[n]) + BW'(x[7-n]);
        o[n] <= BW'(x[n]) - BW'(x[7-n]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      run <= 1'b0;
      k   <= '0;
    end else if (din_valid && n_in == 3'd7) begin
      run <= 1'b1;
      k   <= '0;
    end else if (run) begin
      k   <= k + 3'd1;
      if (k == 3'd7) run <= 1'b0;
    end

  // ---- distributed arithmetic: all bit positions in parallel
  always_comb begin
    logic [3:0] addr;
    logic signed [SUM_W-1:0] part;
    sum_d = '0;
    for (int b = 0; b < int'(BW); b++) begin
      for (int n = 0; n < 4; n++)
        addr[n] = k[0] ? o[n][b] : e[n][b];
      part = SUM_W'(da_rom(k, addr));
      if (b == int'(BW) - 1) sum_d = sum_d - (part <<< b);
      else                   sum_d = sum_d + (part <<< b);
    end
  end

  logic signed [SUM_W-1:0] sum_q;
  logic                    sum_v;
  logic [2:0]              sum_k;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sum_v <= 1'b0;
      sum_k <= '0;
      sum_q <= '0;
    end else begin
      sum_v <= run;
      sum_k <= k;
      sum_q <= sum_d;
    end

  // ---- rounding, scaling and saturation
  localparam logic signed [SUM_W-1:0] RND = SUM_W'(1) <<< (SHIFT - 1);
  localparam logic signed [SUM_W-1:0] OMAX = SUM_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [SUM_W-1:0] OMIN = -(SUM_W'(1) <<< (OUT_W - 1));

  logic signed [SUM_W-1:0] scaled;
  assign scaled = (sum_q + RND) >>> SHIFT;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dout_valid <= 1'b0;
      dout_k     <= '0;
      dout       <= '0;
    end else begin
      dout_valid <= sum_v;
      dout_k     <= sum_k;
      if (scaled > OMAX)      dout <= OMAX[OUT_W-1:0];
      else if (scaled < OMIN) dout <= OMIN[OUT_W-1:0];
      else                    dout <= scaled[OUT_W-1:0];
    end

  // A new group can only finish after the previous one has been emitted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (din_valid && n_in == 3'd7) |-> (!run || k == 3'd7))
    else $error("dct_1d: new group before previous coefficients were emitted");

endmodule
