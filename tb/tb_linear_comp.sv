// tb_linear_comp: checks the compensation word f = ALPHA * ones(ic) + BETA at
// the default configuration (17 IC bits, alpha 2, beta 18). It also checks a
// second instance with alpha 5 and beta 3. The inputs are random plus all-zero
// and all-ones index columns.
module tb_linear_comp;
  logic [16:0] ic;
  logic [35:0] f;
  logic [11:0] f2;
  int checks = 0, failures = 0;

  linear_comp dut (.ic(ic), .f(f));
  linear_comp #(.NIC(17), .WF(12), .ALPHA(5), .BETA(3)) dut2 (.ic(ic), .f(f2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    for (int k = 0; k < 2000; k++) begin
      ic = (k == 0) ? '0 : (k == 1) ? '1 : 17'($urandom);
      #1;
      n = 0;
      for (int i = 0; i < 17; i++) n += int'(ic[i]);
      checks += 2;
      if (f != 36'(2 * n + 18)) begin
        failures++;
        $display("FAIL ic=%b f=%0d expected %0d", ic, f, 2 * n + 18);
      end
      if (f2 != 12'(5 * n + 3)) begin
        failures++;
        $display("FAIL ic=%b f2=%0d expected %0d", ic, f2, 5 * n + 3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
