// fwbm_top: the two Booth multipliers of this design, side by side.
//
//   * fixed_width_booth_mult - the N x N -> N fixed-width multiplier with linear
//     truncation-error compensation. It is two-stage, and by default pipelined
//     with a latency of one clock: x, y, in_valid -> p, out_valid.
//   * split_booth_mult16 - a full-width 16 x 16 -> 32 multiplier. Its Booth
//     partial products form four half-size sub-arrays (AL*BL, AH*BL, AL*BH,
//     AH*BH). It is combinational: a16, b16 -> p16.
// Both use the same Booth encoder, partial-product generator, 5-2 compressor
// tree and ripple-carry adder. They share no signals. Each one's ports are
// brought out unchanged.
module fwbm_top #(
  parameter int unsigned N = 32   // fixed-width multiplier operand width
) (
  input  logic          clk,
  input  logic          rst_n,
  // fixed-width multiplier
  input  logic          in_valid,
  input  logic [N-1:0]  x,
  input  logic [N-1:0]  y,
  output logic          out_valid,
  output logic [N-1:0]  p,
  // 16-bit split-array full-width multiplier
  input  logic [15:0]   a16,
  input  logic [15:0]   b16,
  output logic [31:0]   p16
);

  fixed_width_booth_mult #(.N(N)) u_fw (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .x        (x),
    .y        (y),
    .out_valid(out_valid),
    .p        (p)
  );

  split_booth_mult16 u_split (
    .a(a16),
    .b(b16),
    .p(p16)
  );

endmodule
