// tb_compressor_5_2: exhaustive check of both 5-2 compressor realizations
// (full-adder chain and high-speed multiplexer form) over all 128 input
// combinations. It checks the counting identity
// x1+..+x5+cin1+cin2 = sum + 2*(carry+cout1+cout2), that cout1 is the majority
// of x1..x3, and that neither cout1 nor cout2 depends on cin2.
module tb_compressor_5_2;
  logic [6:0] v;   // {cin2, cin1, x5, x4, x3, x2, x1}
  logic c1_hs, c2_hs, cy_hs, s_hs;
  logic c1_fa, c2_fa, cy_fa, s_fa;
  logic c1_hs0, c2_hs0, c1_fa0, c2_fa0;
  int checks = 0, failures = 0;

  compressor_5_2 dut_hs (.x1(v[0]), .x2(v[1]), .x3(v[2]), .x4(v[3]), .x5(v[4]),
                         .cin1(v[5]), .cin2(v[6]),
                         .cout1(c1_hs), .cout2(c2_hs), .carry(cy_hs), .sum(s_hs));
  compressor_5_2 #(.HIGH_SPEED(1'b0)) dut_fa (
                         .x1(v[0]), .x2(v[1]), .x3(v[2]), .x4(v[3]), .x5(v[4]),
                         .cin1(v[5]), .cin2(v[6]),
                         .cout1(c1_fa), .cout2(c2_fa), .carry(cy_fa), .sum(s_fa));

  function automatic int ones(input logic [6:0] w);
    int n = 0;
    for (int i = 0; i < 7; i++) n += int'(w[i]);
    return n;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 128; k++) begin
      v = 7'(k & 63);            // cin2 = 0
      #1;
      c1_hs0 = c1_hs; c2_hs0 = c2_hs; c1_fa0 = c1_fa; c2_fa0 = c2_fa;
      v = 7'(k);
      #1;
      checks += 4;
      if (int'(s_hs) + 2 * (int'(cy_hs) + int'(c1_hs) + int'(c2_hs)) != ones(v)) begin
        failures++;
        $display("FAIL hs v=%b", v);
      end
      if (int'(s_fa) + 2 * (int'(cy_fa) + int'(c1_fa) + int'(c2_fa)) != ones(v)) begin
        failures++;
        $display("FAIL fa v=%b", v);
      end
      if (c1_hs != ((v[0] & v[1]) | (v[0] & v[2]) | (v[1] & v[2])) ||
          c1_fa != ((v[0] & v[1]) | (v[0] & v[2]) | (v[1] & v[2]))) begin
        failures++;
        $display("FAIL cout1 v=%b", v);
      end
      if (c1_hs != c1_hs0 || c2_hs != c2_hs0 || c1_fa != c1_fa0 || c2_fa != c2_fa0) begin
        failures++;
        $display("FAIL cout depends on cin2 v=%b", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
