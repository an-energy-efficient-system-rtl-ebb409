// Shared constants and tables for the EDS/DVS image-transform system.
//
// Holds the fixed-point 8-point DCT coefficients used by the distributed-
// arithmetic ROMs of the row and column stages, and the table that maps the
// 4-bit supply-voltage level onto the five tri-state control pins of the
// LT3070 linear regulator.
//
// The regulator table (level -> pin pattern, and the voltage each pattern
// produces) is the one the design was specified with. The DCT coefficient
// scaling (11 fractional bits) is this implementation's own choice.
package eds_dvs_pkg;

  // ---------------------------------------------------------------- DCT
  // 1-D orthonormal DCT-II: X[k] = sum_n c(k)/2 * cos((2n+1)k*pi/16) x[n],
  // c(0) = 1/sqrt(2), c(k>0) = 1. Magnitudes scaled by 2**COEF_FRAC and
  // rounded to the nearest integer.
  localparam int COEF_FRAC = 11;
  localparam int COEF_W    = 12;   // signed width of one coefficient
  localparam int CA = 724;         // cos(4pi/16)/2
  localparam int CB = 1004;        // cos(1pi/16)/2
  localparam int CC = 946;         // cos(2pi/16)/2
  localparam int CD = 851;         // cos(3pi/16)/2
  localparam int CE = 569;         // cos(5pi/16)/2
  localparam int CF = 392;         // cos(6pi/16)/2
  localparam int CG = 200;         // cos(7pi/16)/2

  // Coefficient applied to butterfly term n (0..3) for output k (0..7).
  // Even outputs use e[n] = x[n] + x[7-n], odd outputs o[n] = x[n] - x[7-n].
  function automatic int dct_coef(input logic [2:0] k, input logic [1:0] n);
    int t [8][4];
    t[0] = '{ CA,  CA,  CA,  CA};
    t[1] = '{ CB,  CD,  CE,  CG};
    t[2] = '{ CC,  CF, -CF, -CC};
    t[3] = '{ CD, -CG, -CB, -CE};
    t[4] = '{ CA, -CA, -CA,  CA};
    t[5] = '{ CE, -CB,  CG,  CD};
    t[6] = '{ CF, -CC,  CC, -CF};
    t[7] = '{ CG, -CE,  CD, -CB};
    return t[k][n];
  endfunction

  // Distributed-arithmetic ROM word: sum of the coefficients of output k
  // whose butterfly bit is set in the 4-bit address.
  function automatic int da_rom(input logic [2:0] k, input logic [3:0] addr);
    int s;
    s = 0;
    for (int n = 0; n < 4; n++)
      if (addr[n]) s += dct_coef(k, 2'(n));
    return s;
  endfunction

  // ---------------------------------------------------------------- DVS
  localparam int VLEVEL_W = 4;     // X-bit voltage counter, X = 4
  localparam int VCTRL_W  = 5;     // Vo2, Vo1, Vo0, MARGSEL, MARGTOL

  // A tri-state pin pattern: oe = 1 drives val, oe = 0 leaves the pin open (Z).
  typedef struct packed {
    logic [VCTRL_W-1:0] oe;
    logic [VCTRL_W-1:0] val;
  } vctrl_t;

  // Pattern for each voltage level. Bit 4 is Vo2 ... bit 0 is MARGTOL.
  //  lvl pattern  volts   lvl pattern  volts
  //   0  0Z0ZZ    0.950    8  0Z1ZZ    1.050
  //   1  0ZZ0Z    0.970    9  0Z110    1.061
  //   2  0ZZ00    0.990    A  0Z11Z    1.082
  //   3  0ZZZZ    1.000    B  01000    1.089
  //   4  0ZZ10    1.010    C  010ZZ    1.100
  //   5  0Z10Z    1.019    D  0101Z    1.133
  //   6  0ZZ1Z    1.030    E  01ZZZ    1.150
  //   7  0Z100    1.040    F  011ZZ    1.200
  function automatic vctrl_t vctrl_of_level(input logic [VLEVEL_W-1:0] lvl);
    vctrl_t v;
    unique case (lvl)
      4'h0: v = '{oe: 5'b10100, val: 5'b00000};
      4'h1: v = '{oe: 5'b10010, val: 5'b00000};
      4'h2: v = '{oe: 5'b10011, val: 5'b00000};
      4'h3: v = '{oe: 5'b10000, val: 5'b00000};
      4'h4: v = '{oe: 5'b10011, val: 5'b00010};
      4'h5: v = '{oe: 5'b10110, val: 5'b00100};
      4'h6: v = '{oe: 5'b10010, val: 5'b00010};
      4'h7: v = '{oe: 5'b10111, val: 5'b00100};
      4'h8: v = '{oe: 5'b10100, val: 5'b00100};
      4'h9: v = '{oe: 5'b10111, val: 5'b00110};
      4'hA: v = '{oe: 5'b10110, val: 5'b00110};
      4'hB: v = '{oe: 5'b11111, val: 5'b01000};
      4'hC: v = '{oe: 5'b11100, val: 5'b01000};
      4'hD: v = '{oe: 5'b11110, val: 5'b01010};
      4'hE: v = '{oe: 5'b11000, val: 5'b01000};
      default: v = '{oe: 5'b11100, val: 5'b01100};
    endcase
    return v;
  endfunction

endpackage
