// ripple_carry_adder: W-bit ripple-carry adder made of two-bit cells.
//
// The final carry-propagate adder of the multiplier. It adds the two rows
// left by the carry-save tree. ceil(W/2) rca_2bit cells are chained from cin
// to cout. An odd W is padded with one zero bit at the top, and the carry out
// of the top cell is then taken from the pad bit's position.
// s = a + b + cin (mod 2^W); cout is the carry out of bit W-1.
// The chain of two-bit cells follows the published final adder. The odd-width
// padding is this design's own. Purely combinational. The delay grows
// linearly with W.
module ripple_carry_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned NCELL = (W + 1) / 2;
  localparam int unsigned WP    = 2 * NCELL;

  logic [WP-1:0] ap, bp, sp;
  logic [NCELL:0] c;

  assign ap   = WP'(a);
  assign bp   = WP'(b);
  assign c[0] = cin;

  for (genvar k = 0; k < NCELL; k++) begin : g_cell
    rca_2bit u_cell (
      .a   (ap[2*k +: 2]),
      .b   (bp[2*k +: 2]),
      .cin (c[k]),
      .s   (sp[2*k +: 2]),
      .cout(c[k+1])
    );
  end

  assign s = sp[W-1:0];
  if (WP == W) begin : g_even
    assign cout = c[NCELL];
  end else begin : g_odd
    assign cout = sp[W];
  end

endmodule
