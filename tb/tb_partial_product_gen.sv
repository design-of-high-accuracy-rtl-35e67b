// tb_partial_product_gen: checks a 32-bit partial-product row for every
// digit value -2..+2 with random and extreme multiplicands. The row plus
// the neg bit must equal d * x as a 33-bit two's complement number.
module tb_partial_product_gen
  import fwbm_pkg::*;
;
  logic [31:0] x;
  booth_sel_t  sel;
  logic [32:0] pp;
  int checks = 0, failures = 0;

  partial_product_gen dut (.x(x), .sel(sel), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [32:0] expect_v;
    for (int k = 0; k < 1000; k++) begin
      x = (k == 0) ? 32'h8000_0000 : (k == 1) ? 32'h7FFF_FFFF : (k == 2) ? 32'h20 : $urandom;
      for (int d = -2; d <= 2; d++) begin
        sel.neg = (d < 0);
        sel.one = (d == 1 || d == -1);
        sel.two = (d == 2 || d == -2);
        #1;
        expect_v = 33'(d) * $signed({x[31], x});
        checks++;
        if (pp + 33'(sel.neg) != expect_v) begin
          failures++;
          $display("FAIL x=%h d=%0d pp=%h expected %h", x, d, pp, expect_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
