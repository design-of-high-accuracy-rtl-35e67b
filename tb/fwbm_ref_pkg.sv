// fwbm_ref_pkg: behavioural reference for the fixed-width Booth multiplier
// testbenches. It is written from the arithmetic definitions, not from the
// RTL structure. Booth digits come from their value d = -2*y[2i+1] + y[2i] +
// y[2i-1]. Each row is |d|*x, inverted when d < 0. Kept columns are summed as
// integers. The index column is counted. The compensation is added as
// alpha*S + beta at weight 2^(n-h-nf). Operands of up to 64 bits.
package fwbm_ref_pkg;

  // Booth digit i of y (n-bit two's complement).
  function automatic int booth_digit(input logic [63:0] y, input int i);
    int a, b, c;
    a = int'(y[2*i+1]);
    b = int'(y[2*i]);
    c = (i == 0) ? 0 : int'(y[2*i-1]);
    return -2 * a + b + c;
  endfunction

  // Fixed-width product and index-column count.
  function automatic void fw_model(input int n, input int h, input int nf,
                                   input int alpha, input int beta,
                                   input logic [63:0] x, input logic [63:0] y,
                                   output logic [63:0] p, output int s_ic);
    logic [127:0] acc, mask, mag, pp, xs;
    int d, r, cc;
    r    = n / 2;
    cc   = n - h - 1;
    mask = (128'd1 << (2 * n)) - 1;
    xs   = 128'(x) & ((128'd1 << n) - 1);
    if (x[n-1]) xs = xs | (~128'd0 << n);          // sign-extend x
    acc  = '0;
    s_ic = 0;
    for (int i = 0; i < r; i++) begin
      d   = booth_digit(y, i);
      mag = (d == 2 || d == -2) ? (xs << 1) : (d == 0) ? 128'd0 : xs;
      pp  = (d < 0) ? ~mag : mag;
      for (int j = 0; j < n; j++) begin
        if (2 * i + j >= n - h) acc = acc + (128'(pp[j]) << (2 * i + j));
        else if (2 * i + j == cc) s_ic = s_ic + int'(pp[j]);
      end
      acc = acc + (128'(!pp[n]) << (n + 2 * i));      // inverted sign bit
      acc = acc - (128'd1 << (n + 2 * i));            // its constant
      if (d < 0) begin
        if (2 * i >= n - h) acc = acc + (128'd1 << (2 * i));
        else if (2 * i == cc) s_ic = s_ic + 1;
      end
    end
    acc = acc + (128'(alpha * s_ic + beta) << (n - h - nf));
    acc = acc & mask;
    p   = 64'(acc >> n) & ((64'd1 << n) - 1);
    if (n == 64) p = 64'(acc >> n);
  endfunction

  // Signed error of a fixed-width result in output LSBs.
  function automatic real fw_error(input int n, input logic [63:0] x,
                                   input logic [63:0] y, input logic [63:0] p);
    logic signed [127:0] xe, ye, pe, ex, diff;
    xe = 128'(x); ye = 128'(y); pe = 128'(p);
    if (x[n-1]) xe = xe | (~128'd0 << n);
    if (y[n-1]) ye = ye | (~128'd0 << n);
    if (p[n-1]) pe = pe | (~128'd0 << n);
    ex   = xe * ye;
    diff = (pe <<< n) - ex;
    return real'(diff) / (2.0 ** n);
  endfunction

endpackage
