// tb_split_booth_mult16: checks the split-array multiplier against the *
// operator. The 16-bit default gets extreme operands and 20000 random pairs.
// An 8-bit instance (four 4-bit sub-arrays) is checked over all 65536 operand
// pairs. The operand classes that exercise the signed/unsigned halves are
// counted: negative AH, AL with its top bit set (large as unsigned), and a BH
// digit that takes its appended bit from the BL half. Each class must occur.
module tb_split_booth_mult16;
  logic [15:0] a, b;
  logic [31:0] p;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  int checks = 0, failures = 0;
  int cnt_neg_ah = 0, cnt_big_al = 0, cnt_shared = 0;

  split_booth_mult16 dut (.a(a), .b(b), .p(p));
  split_booth_mult16 #(.N(8), .HIGH_SPEED(1'b0)) dut8 (.a(a8), .b(b8), .p(p8));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] ta, input logic [15:0] tb_);
    logic signed [31:0] expect_v;
    a = ta; b = tb_;
    #1;
    expect_v = $signed(ta) * $signed(tb_);
    checks++;
    if (p != expect_v) begin
      failures++;
      $display("FAIL a=%h b=%h p=%h expected %h", ta, tb_, p, expect_v);
    end
    if (ta[15]) cnt_neg_ah++;
    if (ta[7]) cnt_big_al++;
    if (tb_[7] && !tb_[15]) cnt_shared++;
  endtask

  initial begin
    logic signed [15:0] e8;
    check16(16'h8000, 16'h8000);
    check16(16'h7FFF, 16'h8000);
    check16(16'hFFFF, 16'hFFFF);
    check16(16'h00FF, 16'h00FF);
    check16(16'h0080, 16'hFF80);
    for (int k = 0; k < 20000; k++) check16(16'($urandom), 16'($urandom));
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      e8 = $signed(a8) * $signed(b8);
      checks++;
      if (p8 != e8) begin
        failures++;
        if (failures < 10) $display("FAIL8 a=%h b=%h p=%h expected %h", a8, b8, p8, e8);
      end
    end
    $display("classes: negative AH %0d, AL top bit set %0d, shared Booth bit %0d",
             cnt_neg_ah, cnt_big_al, cnt_shared);
    checks += 3;
    if (cnt_neg_ah == 0) failures++;
    if (cnt_big_al == 0) failures++;
    if (cnt_shared == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
