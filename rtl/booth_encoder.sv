// booth_encoder: radix-4 (modified) Booth encoder for one digit.
//
// The multiplier is scanned in overlapping 3-bit groups {y[2i+1], y[2i], y[2i-1]},
// with a 0 appended to the right of y[0]. Each group gives one digit
// d = -2*y[2i+1] + y[2i] + y[2i-1]. The output is the select triple of
// fwbm_pkg::booth_sel_t. The all-ones group (111) gives digit 0 and
// encodes as a positive zero (neg = 0), so a zero digit never produces a
// row of ones. Purely combinational.
//
// Interface: grp = {y[2i+1], y[2i], y[2i-1]}; sel = {neg, one, two}.
// The grouping with an appended 0 follows the published encoder. The select
// code is this design's choice.
module booth_encoder
  import fwbm_pkg::*;
(
  input  logic [2:0]  grp,
  output booth_sel_t  sel
);

  always_comb begin
    sel.one = grp[1] ^ grp[0];
    sel.two = (grp[2] & ~grp[1] & ~grp[0]) | (~grp[2] & grp[1] & grp[0]);
    sel.neg = grp[2] & ~(grp[1] & grp[0]);
  end

endmodule
