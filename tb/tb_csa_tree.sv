// tb_csa_tree: checks the carry-save reduction tree. It uses the multiplier's
// configuration (18 rows of 36 bits, high-speed compressors) and a 7-row,
// 12-bit tree with full-adder compressors, which takes the 5-2, 3,2 and
// pass-through paths. The two outputs must add to the sum of all rows
// modulo 2^W.
module tb_csa_tree;
  logic [17:0][35:0] rows;
  logic [35:0]       s, c, ref_sum;
  logic [6:0][11:0]  rows7;
  logic [11:0]       s7, c7, ref7;
  int checks = 0, failures = 0;

  csa_tree dut (.rows(rows), .sum_out(s), .carry_out(c));
  csa_tree #(.ROWS(7), .W(12), .HIGH_SPEED(1'b0)) dut7 (.rows(rows7), .sum_out(s7), .carry_out(c7));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      ref_sum = '0;
      for (int r = 0; r < 18; r++) begin
        rows[r] = (k == 0) ? '1 : {4'($urandom), $urandom};
        ref_sum = ref_sum + rows[r];
      end
      ref7 = '0;
      for (int r = 0; r < 7; r++) begin
        rows7[r] = (k == 0) ? '1 : 12'($urandom);
        ref7 = ref7 + rows7[r];
      end
      #1;
      checks += 2;
      if (s + c != ref_sum) begin
        failures++;
        $display("FAIL 18-row tree: %h + %h != %h", s, c, ref_sum);
      end
      if (s7 + c7 != ref7) begin
        failures++;
        $display("FAIL 7-row tree: %h + %h != %h", s7, c7, ref7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
