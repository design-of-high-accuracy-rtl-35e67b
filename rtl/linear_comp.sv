// linear_comp: the linear truncation-error compensation circuit.
//
// The fixed-width multiplier throws away every partial-product column below
// its kept columns. It keeps one of them, the index column IC, just below the
// kept columns, as an estimate of what was thrown away. This block counts the
// ones in IC (S) and forms the linear compensation word
//     f = ALPHA * S + BETA
// in units of the compensation LSB, which lies NF columns below the kept
// columns. The word is added as one more row of the carry-save tree, so it
// reaches the product only through the carries it causes into the kept
// columns. The design's own defaults are ALPHA = 2 and BETA = 18, for a 32-bit
// multiplier with two kept extra columns and two compensation bits. These are
// the integer pair with the least mean squared output error. It was found by
// a least-squares fit over uniformly random operands, then a search of the
// nearby integers. BETA also carries the half-LSB offset that turns the final
// truncation into rounding. Purely combinational.
module linear_comp #(
  parameter int unsigned NIC   = 17,  // bits in the index column
  parameter int unsigned WF    = 36,  // width of the compensation row
  parameter int unsigned ALPHA = 2,   // slope, in compensation LSBs per IC one
  parameter int unsigned BETA  = 18   // offset, in compensation LSBs
) (
  input  logic [NIC-1:0] ic,
  output logic [WF-1:0]  f
);

  localparam int unsigned SW = $clog2(NIC + 1);

  logic [SW-1:0] cnt;

  always_comb begin
    cnt = '0;
    for (int i = 0; i < NIC; i++) cnt = cnt + SW'(ic[i]);
  end

  assign f = WF'(ALPHA) * WF'(cnt) + WF'(BETA);

endmodule
