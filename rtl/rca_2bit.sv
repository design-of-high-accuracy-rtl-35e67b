// rca_2bit: two-bit ripple adder cell, the repeated block of the final adder.
// Two full adders in series: s = a + b + cin, cout = carry out of bit 1.
// The two-bit cell follows the published final-adder structure. Purely
// combinational.
module rca_2bit (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  output logic [1:0] s,
  output logic       cout
);

  logic c1;

  full_adder u_fa0 (.a(a[0]), .b(b[0]), .cin(cin), .s(s[0]), .co(c1));
  full_adder u_fa1 (.a(a[1]), .b(b[1]), .cin(c1),  .s(s[1]), .co(cout));

endmodule
