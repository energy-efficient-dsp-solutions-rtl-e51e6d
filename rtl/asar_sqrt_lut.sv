// asar_sqrt_lut: square root of an unsigned integer through a lookup table,
// as used by the ASAR statistics unit to turn a variance into a standard
// deviation.
//
// The argument x is normalised by an even shift so that x = 2^(2n) * x_n with
// 256 <= x_n < 1024; n is negative (a left shift) for small arguments, which
// keeps the relative error bounded and gives small neural-signal variances as
// much precision as large ones. The table holds sqrt(x_n) for every integer
// x_n from 256 to 1024 (769 entries) with SQRT_LUT_FRAC fraction bits, and the
// result is sqrt(x) = 2^n * table[x_n - 256]. The normalisation scheme and the
// table range follow the published design; the table's fraction width and the
// output format (STD_FRAC fraction bits, truncated) are choices made here.
// The table is computed at elaboration: entry(j) = floor(sqrt((256+j) * 2^16)).
//
// Interface: x (X_W bits, unsigned) in, y = sqrt(x) in unsigned fixed point
// with STD_FRAC fraction bits out. Purely combinational, no latency.
module asar_sqrt_lut
  import asar_pkg::*;
#(
  parameter int unsigned X_W = 32,
  parameter int unsigned Y_W = X_W / 2 + STD_FRAC + 1
) (
  input  logic [X_W-1:0] x,
  output logic [Y_W-1:0] y
);

  localparam int unsigned E_W = 14;  // holds sqrt(1024) * 2^8 = 8192

  function automatic logic [E_W-1:0] lut_entry(input int unsigned xn);
    longint unsigned v;
    longint unsigned r;
    longint unsigned t;
    v = longint'(xn) << (2 * SQRT_LUT_FRAC);
    r = 0;
    for (int b = 15; b >= 0; b--) begin
      t = r | (64'd1 << b);
      if (t * t <= v) r = t;
    end
    return E_W'(r);
  endfunction

  logic [E_W-1:0] table_q [SQRT_LUT_SIZE];

  for (genvar j = 0; j < SQRT_LUT_SIZE; j++) begin : g_lut
    localparam logic [E_W-1:0] ENTRY = lut_entry(SQRT_LUT_LO + j);
    assign table_q[j] = ENTRY;
  end

  // Position of the leading one of x.
  int msb;
  always_comb begin
    msb = -1;
    for (int b = 0; b < int'(X_W); b++)
      if (x[b]) msb = b;
  end

  // Even shift 2n that brings the leading one to bit 8 or 9.
  int n_sh;          // n, may be negative
  int out_sh;        // n + STD_FRAC - SQRT_LUT_FRAC
  logic [X_W+9:0] x_wide;
  logic [9:0]     x_n;
  logic [E_W-1:0] entry;
  logic [X_W+E_W-1:0] y_wide;

  always_comb begin
    if (msb >= 8) n_sh = (msb - 8) / 2;
    else          n_sh = -((9 - msb) / 2);
    x_wide = (X_W + 10)'(x);
    if (n_sh >= 0) x_wide = x_wide >> (2 * n_sh);
    else           x_wide = x_wide << (-2 * n_sh);
    x_n   = x_wide[9:0];
    entry = table_q[(x_n >= 10'(SQRT_LUT_LO)) ? int'(x_n) - int'(SQRT_LUT_LO) : 0];
    out_sh = n_sh + int'(STD_FRAC) - int'(SQRT_LUT_FRAC);
    y_wide = (X_W + E_W)'(entry);
    if (out_sh >= 0) y_wide = y_wide << out_sh;
    else             y_wide = y_wide >> (-out_sh);
    y = (x == '0) ? '0 : Y_W'(y_wide);
  end

endmodule
