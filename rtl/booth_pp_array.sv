// booth_pp_array: radix-4 Booth encoding and partial-product generation with
// sign-extension reduction for an N x N two's complement multiplication.
//
// The multiplier y, with a 0 appended right of y[0], is cut into N/2
// overlapping 3-bit groups. Each group drives one booth_encoder. That
// encoder's selects drive one partial_product_gen row of N+1 bits, placed at
// column 2i. Rows are not sign-extended to 2N bits. Each sign bit is assumed
// to be 1, and the constants this gives are added ahead of time. What is left
// is the sign-extension reduction pattern:
//   row 0     : bits N+2, N+1, N = ~s0, s0, s0
//   row i >= 1: bits N+2i+1, N+2i = 1, ~si
// so only two bits are added to each row except the first, which gets three.
// The +1 of each negative digit is not merged into its row. It is returned on
// neg[i] and belongs at column 2i, so the caller can decide which of these
// bits to keep.
// Identity: sum(rows) + sum(neg[i] << 2i) == x * y (mod 2^(2N)).
// Purely combinational. N must be even and at least 4.
module booth_pp_array
  import fwbm_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]                  x,     // multiplicand
  input  logic [N-1:0]                  y,     // multiplier
  output logic [N/2-1:0][2*N-1:0]       rows,  // aligned partial-product rows
  output logic [N/2-1:0]                neg    // per-row +1, weight 2^(2i)
);

  localparam int unsigned R = booth_rows(N);

  logic [N:0] ye;  // ye[k+1] = y[k]; ye[0] = appended 0

  assign ye = {y, 1'b0};

  for (genvar i = 0; i < R; i++) begin : g_row
    booth_sel_t sel;
    logic [N:0] pp;

    booth_encoder u_enc (.grp(ye[2*i +: 3]), .sel(sel));
    partial_product_gen #(.N(N)) u_ppg (.x(x), .sel(sel), .pp(pp));

    assign neg[i] = sel.neg;

    always_comb begin
      rows[i] = '0;
      rows[i][2*i +: N] = pp[N-1:0];
      if (i == 0) begin
        rows[i][N]   = pp[N];
        rows[i][N+1] = pp[N];
        rows[i][N+2] = ~pp[N];
      end else begin
        rows[i][N+2*i]   = ~pp[N];
        rows[i][N+2*i+1] = 1'b1;
      end
    end
  end

endmodule
