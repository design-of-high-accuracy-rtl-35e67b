// full_adder: one-bit full adder, the (3,2) counter used in every adder and
// compressor of the multiplier. s = a ^ b ^ cin; co = majority(a, b, cin).
// The published design uses full adders as its (3,2) cells. The XOR/majority
// form here is this design's choice. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic co
);

  assign s  = a ^ b ^ cin;
  assign co = (a & b) | (cin & (a ^ b));

endmodule
