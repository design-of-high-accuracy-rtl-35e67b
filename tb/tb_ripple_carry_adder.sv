// tb_ripple_carry_adder: checks the ripple-carry adder at 32 bits (default) and
// at an odd width of 9 bits against the + operator. It uses random operands,
// the all-ones carry chain and 0x80 + 0x80 = 0x100.
module tb_ripple_carry_adder;
  logic [31:0] a, b, s;
  logic        cin, cout;
  logic [8:0]  a9, b9, s9;
  logic        cin9, cout9;
  int checks = 0, failures = 0;

  ripple_carry_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  ripple_carry_adder #(.W(9)) dut9 (.a(a9), .b(b9), .cin(cin9), .s(s9), .cout(cout9));

  task automatic check32(input logic [31:0] ta, input logic [31:0] tb_, input logic tc);
    logic [32:0] ref_sum;
    a = ta; b = tb_; cin = tc;
    #1;
    ref_sum = 33'(ta) + 33'(tb_) + 33'(tc);
    checks++;
    if ({cout, s} != ref_sum) begin
      failures++;
      $display("FAIL %h + %h + %0d -> %h (expected %h)", ta, tb_, tc, {cout, s}, ref_sum);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check32(32'h80, 32'h80, 1'b0);
    check32(32'hFFFF_FFFF, 32'h0, 1'b1);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    for (int k = 0; k < 2000; k++) check32($urandom, $urandom, 1'($urandom));
    for (int v = 0; v < 4096; v++) begin
      a9 = 9'($urandom); b9 = 9'($urandom); cin9 = 1'($urandom);
      #1;
      checks++;
      if ({cout9, s9} != 10'(a9) + 10'(b9) + 10'(cin9)) begin
        failures++;
        $display("FAIL(9) %h + %h + %0d -> %h", a9, b9, cin9, {cout9, s9});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
