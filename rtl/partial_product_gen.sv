// partial_product_gen: one row of radix-4 Booth partial products.
//
// Each output bit is a small multiplexer controlled by the encoder's select
// lines. Bit j chooses x[j] (digit +-1), x[j-1] (digit +-2), their complements
// (negative digits) or 0. The row is N+1 bits wide, which is enough to hold 2X.
// For a negative digit the row holds the one's complement of |d|*X. The
// missing +1 is the encoder's `neg` bit, which the array adds at the row's
// least significant column. The multiplicand is two's complement: x[N] is
// taken as x[N-1], and x[-1] as 0. Purely combinational.
// The per-bit multiplexer over x[j], x[j-1] and their complements follows the
// published generator. It is written as logic here, not as the original
// transistor-level cell.
module partial_product_gen
  import fwbm_pkg::*;
#(
  parameter int unsigned N = 32   // multiplicand width
) (
  input  logic [N-1:0] x,
  input  booth_sel_t   sel,
  output logic [N:0]   pp
);

  logic [N+1:0] xe;  // xe[j+1] = x[j]; xe[0] = x[-1] = 0; sign-extended by one bit

  assign xe = {x[N-1], x, 1'b0};

  always_comb begin
    for (int j = 0; j <= N; j++) begin
      unique case ({sel.neg, sel.one, sel.two})
        3'b010:  pp[j] =  xe[j+1];  // +X
        3'b001:  pp[j] =  xe[j];    // +2X
        3'b110:  pp[j] = ~xe[j+1];  // -X (one's complement)
        3'b101:  pp[j] = ~xe[j];    // -2X (one's complement)
        default: pp[j] = 1'b0;      // 0
      endcase
    end
  end

endmodule
