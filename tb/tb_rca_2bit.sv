// tb_rca_2bit: exhaustive check of the two-bit adder cell against a + b + cin.
module tb_rca_2bit;
  logic [1:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  rca_2bit dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {a, b, cin} = 5'(v);
      #1;
      checks++;
      if ({cout, s} != 3'(a) + 3'(b) + 3'(cin)) begin
        failures++;
        $display("FAIL %0d + %0d + %0d -> %0d", a, b, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
