// split_booth_mult16: N x N two's complement full-width multiplier whose
// radix-4 Booth partial products are organized as four half-size sub-arrays.
//
// Each operand is split into halves: AH = a[N-1:N/2] (signed), AL = a[N/2-1:0]
// (unsigned), and likewise for b. The multiplier b is Booth-encoded into N/2
// digits. The low N/4 digits read only b[N/2-1:0] (the BL digits). The high
// N/4 digits read b[N-1:N/2-1] (the BH digits; b[N/2-1] is their appended bit).
// Each digit drives two partial-product generators, one for AL and one for AH.
// This gives four independent sub-arrays: AL*BL, AH*BL, AL*BH, AH*BH. The AL
// generator works on {0, AL}, so its rows are N/2+2 bits. The AH generator
// works on AH, so its rows are N/2+1 bits, placed N/2 columns higher.
//
// Every row's sign bit is replaced by its inverse. The constant this leaves,
// -sum(2^(sign column)), is computed at elaboration and added as one row.
// The +1 bits of negative rows form two more rows, one per multiplicand half.
// All 2*(N/2)+3 rows go through the same carry-save tree of 5-2 compressors
// and (3,2) adders as the fixed-width multiplier. A ripple-carry adder then
// forms the 2N-bit product p = a * b. Purely combinational.
//
// The halving into AH/AL and BH/BL and the use of radix-4 Booth sub-arrays
// follow the published 16-bit multiplication matrix. The way the BL and BH
// digits share b[N/2-1], the unsigned treatment of the low halves, and the
// constant-row sign handling are this design's choices.
module split_booth_mult16
  import fwbm_pkg::*;
#(
  parameter int unsigned N          = 16,    // operand width (multiple of 4)
  parameter bit          HIGH_SPEED = 1'b1   // 5-2 compressor realization
) (
  input  logic [N-1:0]   a,   // multiplicand, two's complement
  input  logic [N-1:0]   b,   // multiplier, two's complement
  output logic [2*N-1:0] p    // full product a * b
);

  localparam int unsigned HALF = N / 2;
  localparam int unsigned R    = N / 2;        // Booth digits of b
  localparam int unsigned TR   = 2 * R + 3;    // tree rows
  localparam int unsigned W    = 2 * N;

  // -sum of 2^(sign column) over all rows, modulo 2^W.
  function automatic logic [W-1:0] sign_constant();
    logic [W-1:0] k = '0;
    for (int unsigned i = 0; i < R; i++) begin
      k = k - (W'(1) << (2 * i + HALF + 1));   // AL rows: sign at bit HALF+1
      k = k - (W'(1) << (2 * i + N));          // AH rows: sign at bit HALF
    end
    return k;
  endfunction

  localparam logic [W-1:0] KSIGN = sign_constant();

  if (N % 4 != 0 || N < 8) begin : g_bad_params
    $error("split_booth_mult16: N must be a multiple of 4, at least 8");
  end

  logic [HALF-1:0] ah, al;
  logic [N:0]      be;        // be[k+1] = b[k], be[0] = 0
  logic [TR-1:0][W-1:0] trows;
  logic [R-1:0]    neg;

  assign ah = a[N-1:HALF];
  assign al = a[HALF-1:0];
  assign be = {b, 1'b0};

  for (genvar i = 0; i < R; i++) begin : g_digit
    booth_sel_t       sel;
    logic [HALF+1:0]  pp_l;   // |d| * AL, inverted if d < 0
    logic [HALF:0]    pp_h;   // |d| * AH, inverted if d < 0

    booth_encoder u_enc (.grp(be[2*i +: 3]), .sel(sel));

    // AL*BL (i < R/2) and AL*BH (i >= R/2)
    partial_product_gen #(.N(HALF + 1)) u_ppg_l (.x({1'b0, al}), .sel(sel), .pp(pp_l));
    // AH*BL (i < R/2) and AH*BH (i >= R/2)
    partial_product_gen #(.N(HALF))     u_ppg_h (.x(ah), .sel(sel), .pp(pp_h));

    assign neg[i] = sel.neg;

    always_comb begin
      trows[2*i] = '0;
      trows[2*i][2*i +: HALF+1]    = pp_l[HALF:0];
      trows[2*i][2*i + HALF + 1]   = ~pp_l[HALF+1];
      trows[2*i+1] = '0;
      trows[2*i+1][2*i + HALF +: HALF] = pp_h[HALF-1:0];
      trows[2*i+1][2*i + N]            = ~pp_h[HALF];
    end
  end

  // +1 of the negative rows: AL rows at column 2i, AH rows at 2i+HALF.
  always_comb begin
    trows[2*R]   = '0;
    trows[2*R+1] = '0;
    for (int i = 0; i < R; i++) begin
      trows[2*R][2*i]          = neg[i];
      trows[2*R+1][2*i + HALF] = neg[i];
    end
    trows[2*R+2] = KSIGN;
  end

  logic [W-1:0] t_sum, t_carry;
  logic         unused_cout;

  csa_tree #(.ROWS(TR), .W(W), .HIGH_SPEED(HIGH_SPEED)) u_tree (
    .rows     (trows),
    .sum_out  (t_sum),
    .carry_out(t_carry)
  );

  ripple_carry_adder #(.W(W)) u_rca (
    .a   (t_sum),
    .b   (t_carry),
    .cin (1'b0),
    .s   (p),
    .cout(unused_cout)
  );

endmodule
