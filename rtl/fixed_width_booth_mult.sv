// fixed_width_booth_mult: N x N -> N two's complement fixed-width radix-4 Booth
// multiplier with linear truncation-error compensation.
//
// The operands are read as fractions, so the product's N most significant bits
// are the result. Only the partial-product bits in those N columns and in the
// H columns below them (the major part of the least significant half) are
// built into the adder tree. All columns further down are dropped. The first
// dropped column, the index column IC, goes to the linear compensation
// circuit. That circuit adds f = ALPHA * (ones in IC) + BETA as one more
// row, whose least significant bit lies NF columns below the kept columns.
// The carries of this row into the kept columns stand in for the dropped
// part and round the result.
//
// Datapath:
//   stage 1: booth_pp_array (encoders, partial-product generators,
//            sign-extension reduction) -> column selection -> csa_tree of
//            5-2 compressors and (3,2) adders -> two rows of W = N+H+NF bits
//   stage 2: ripple_carry_adder of those two rows; p = bits [W-1 : H+NF]
// With PIPELINE = 1 (default) a register between the stages holds the two
// rows. p and out_valid then follow x, y and in_valid by one clock cycle, and
// a new operand pair can be accepted on every cycle. With PIPELINE = 0 the
// multiplier is purely combinational, and clk, rst_n and in_valid are unused.
// rst_n is asynchronous and active low. It clears out_valid and the
// pipeline register.
//
// The two stages, the Booth encoder, the CSA tree, the compensation circuit,
// the ripple-carry adder and the compressor-based tree follow the published
// architecture. The pipeline register, the valid signal, the IC-popcount form
// of the linear function and the ALPHA/BETA values are this design's own
// choices. The defaults N = 32, H = 2 and NF = 2 are taken from the published
// 32-bit simulations and its truncation example. H is the number of extra kept
// columns, NF the number of compensation bits.
module fixed_width_booth_mult #(
  parameter int unsigned N          = 32,    // operand and product width
  parameter int unsigned H          = 2,     // kept columns below the product LSB
  parameter int unsigned NF         = 2,     // compensation bits below kept columns
  parameter int unsigned ALPHA      = 2,     // compensation slope
  parameter int unsigned BETA       = 18,    // compensation offset
  parameter bit          HIGH_SPEED = 1'b1,  // 5-2 compressor realization
  parameter bit          PIPELINE   = 1'b1   // register between the two stages
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] x,          // multiplicand, two's complement
  input  logic [N-1:0] y,          // multiplier, two's complement
  output logic         out_valid,
  output logic [N-1:0] p           // fixed-width product, two's complement
);

  localparam int unsigned R   = N / 2;          // Booth rows
  localparam int unsigned W   = N + H + NF;     // tree width
  localparam int unsigned B   = N - H - NF;     // column of tree bit 0
  localparam int unsigned KC  = N - H;          // lowest kept column
  localparam int unsigned C   = N - H - 1;      // index column
  localparam int unsigned NIC = R + 1;          // IC bits: R rows + one neg bit
  localparam int unsigned TR  = R + 2;          // tree rows: R + neg row + f row

  if (N < 4 || (N % 2) != 0 || H + NF > N - 1 || NF < 1) begin : g_bad_params
    $error("fixed_width_booth_mult: unsupported N/H/NF");
  end

  // ---------------------------------------------------------------- stage 1
  logic [R-1:0][2*N-1:0] full_rows;
  logic [R-1:0]          neg;
  logic [NIC-1:0]        ic;
  logic [W-1:0]          f;
  logic [TR-1:0][W-1:0]  trows;
  logic [W-1:0]          t_sum, t_carry;

  booth_pp_array #(.N(N)) u_pp (.x(x), .y(y), .rows(full_rows), .neg(neg));

  // Kept columns of each row, the kept negation bits, and the index column.
  always_comb begin
    ic = '0;
    for (int i = 0; i < R; i++) begin
      trows[i] = full_rows[i][2*N-1:B];
      trows[i][NF-1:0] = '0;           // columns below KC are not built
      ic[i] = full_rows[i][C];
    end
    trows[R] = '0;
    for (int i = 0; i < R; i++) begin
      if (2 * i >= KC) trows[R][2*i-B] = neg[i];
      if (2 * i == C)  ic[R] = neg[i];
    end
    trows[R+1] = f;
  end

  linear_comp #(.NIC(NIC), .WF(W), .ALPHA(ALPHA), .BETA(BETA)) u_comp (
    .ic(ic),
    .f (f)
  );

  csa_tree #(.ROWS(TR), .W(W), .HIGH_SPEED(HIGH_SPEED)) u_tree (
    .rows     (trows),
    .sum_out  (t_sum),
    .carry_out(t_carry)
  );

  // ------------------------------------------------------- stage register
  logic [W-1:0] r_sum, r_carry;

  if (PIPELINE) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        r_sum     <= '0;
        r_carry   <= '0;
        out_valid <= 1'b0;
      end else begin
        out_valid <= in_valid;
        if (in_valid) begin
          r_sum   <= t_sum;
          r_carry <= t_carry;
        end
      end
    end
  end else begin : g_comb
    assign r_sum     = t_sum;
    assign r_carry   = t_carry;
    assign out_valid = in_valid;
  end

  // ---------------------------------------------------------------- stage 2
  logic [W-1:0] total;
  logic         unused_cout;

  ripple_carry_adder #(.W(W)) u_rca (
    .a   (r_sum),
    .b   (r_carry),
    .cin (1'b0),
    .s   (total),
    .cout(unused_cout)
  );

  assign p = total[W-1:H+NF];

endmodule
