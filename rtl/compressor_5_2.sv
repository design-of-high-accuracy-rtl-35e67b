// compressor_5_2: 5-2 compressor, the cell of the carry-save reduction tree.
//
// Seven inputs of equal weight (x1..x5 and the two carries cin1, cin2 from the
// column to the right) are reduced to sum (same weight) and three outputs of
// twice the weight (carry, cout1, cout2):
//     x1 + x2 + x3 + x4 + x5 + cin1 + cin2 = sum + 2 * (carry + cout1 + cout2)
// cout1 depends on x1..x3 only. cout2 depends on x1..x5 and cin1, but not on
// cin2. So when a row of these cells is chained (cout1 -> cin1, cout2 -> cin2
// of the next column), no carry ripples more than one column.
//
// Two realizations, chosen by HIGH_SPEED:
//   0: three chained full adders. FA1(x1,x2,x3) gives cout1. FA2(s1,x4,cin1)
//      gives cout2. FA3(s2,x5,cin2) gives carry and sum.
//   1 (default): the high-speed form built from XOR/XNOR stages and
//      multiplexers. A carry generator gives cout1 = (x1^x2) ? x3 : x1. The
//      right-hand half computes x4^x5^cin1 and cout2 = (x4^x5) ? cin1 : x4.
//      Then sum = s1^s2^cin2 and carry = (s1^s2) ? cin2 : s1.
// Both give the same sum and the same total carry weight. Their carry outputs
// are split differently. The block names and their grouping follow the
// published diagrams of both forms. The wiring of the high-speed form's
// second half, and the use of cin2 in its last two multiplexers, is this
// design's reading of that diagram. Purely combinational.
module compressor_5_2 #(
  parameter bit HIGH_SPEED = 1'b1
) (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic x5,
  input  logic cin1,
  input  logic cin2,
  output logic cout1,
  output logic cout2,
  output logic carry,
  output logic sum
);

  if (HIGH_SPEED) begin : g_hs
    logic t12, s1, t45, s2, u;
    assign t12   = x1 ^ x2;            // XOR/XNOR stage
    assign cout1 = t12 ? x3 : x1;      // carry generator CGEN1
    assign s1    = t12 ? ~x3 : x3;     // Mux*: x1^x2^x3
    assign t45   = x4 ^ x5;            // XOR/XNOR stage
    assign s2    = t45 ? ~cin1 : cin1; // Mux*: x4^x5^cin1
    assign cout2 = t45 ? cin1 : x4;    // Mux
    assign u     = s1 ^ s2;            // Mux*
    assign sum   = u ? ~cin2 : cin2;   // Mux
    assign carry = u ? cin2 : s1;      // Mux
  end else begin : g_fa
    logic s1, s2;
    full_adder u_fa1 (.a(x1), .b(x2),   .cin(x3),   .s(s1),  .co(cout1));
    full_adder u_fa2 (.a(s1), .b(x4),   .cin(cin1), .s(s2),  .co(cout2));
    full_adder u_fa3 (.a(s2), .b(x5),   .cin(cin2), .s(sum), .co(carry));
  end

endmodule
