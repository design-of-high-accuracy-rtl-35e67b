// csa_3_2: word-wide (3,2) carry-save adder.
//
// W independent full adders reduce three W-bit rows a, b, c to a sum row s and
// a carry row co. The carry row is already shifted into place: co[0] = 0 and
// co[k+1] is the carry of bit k. Then a + b + c == s + co (mod 2^W). The carry
// out of the top bit is dropped, because the multiplier works modulo 2^W
// inside its kept columns. The (3,2) carry-save adder is part of the
// published tree. Dropping the top carry is this design's choice. Purely
// combinational.
module csa_3_2 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] co
);

  logic [W-1:0] cy;

  for (genvar k = 0; k < W; k++) begin : g_bit
    full_adder u_fa (.a(a[k]), .b(b[k]), .cin(c[k]), .s(s[k]), .co(cy[k]));
  end

  assign co = {cy[W-2:0], 1'b0};

endmodule
