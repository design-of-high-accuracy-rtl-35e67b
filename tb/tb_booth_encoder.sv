// tb_booth_encoder: exhaustive check of the radix-4 Booth encoder. For each of
// the 8 groups, the selects must describe the digit -2*g[2] + g[1] + g[0]:
// one-hot magnitude, sign, and no negative zero.
module tb_booth_encoder
  import fwbm_pkg::*;
;
  logic [2:0] grp;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  booth_encoder dut (.grp(grp), .sel(sel));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, got;
    for (int v = 0; v < 8; v++) begin
      grp = 3'(v);
      #1;
      d = -2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
      got = (sel.two ? 2 : 0) + (sel.one ? 1 : 0);
      if (sel.neg) got = -got;
      checks += 3;
      if (got != d) begin
        failures++;
        $display("FAIL grp=%b digit %0d got %0d", grp, d, got);
      end
      if (sel.one && sel.two) failures++;
      if (sel.neg && !sel.one && !sel.two) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
