// tb_csa_3_2: checks the word-wide carry-save adder. s must be the bitwise
// XOR of the inputs, co must be the shifted majority, and s + co must equal
// a + b + c modulo 2^32.
module tb_csa_3_2;
  logic [31:0] a, b, c, s, co, maj;
  int checks = 0, failures = 0;

  csa_3_2 dut (.a(a), .b(b), .c(c), .s(s), .co(co));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      a = $urandom; b = $urandom; c = $urandom;
      if (k == 0) begin a = '1; b = '1; c = '1; end
      #1;
      checks += 3;
      if (s + co != a + b + c) begin
        failures++;
        $display("FAIL sum %h %h %h -> s=%h co=%h", a, b, c, s, co);
      end
      if (s != (a ^ b ^ c)) failures++;
      maj = (a & b) | (a & c) | (b & c);
      if (co != {maj[30:0], 1'b0}) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
