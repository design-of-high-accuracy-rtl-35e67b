// tb_fwbm_top: end-to-end test of the whole design at its default parameters.
//
// A stream of 5000 operand pairs goes through the 32-bit fixed-width
// multiplier. It includes the extreme operands and about one bubble in
// eight. Each product is compared bit for bit with the behavioural reference
// model, out_valid must follow in_valid by one clock, and the output error
// must stay within 2 LSB. At the same time the 16-bit split-array multiplier
// gets a new random pair each cycle, checked against a * b. Counted
// mechanisms (each must occur): every Booth digit value, a compensation that
// changes the output, a pipeline bubble, back-to-back operations, and a
// negative split-array product.
module tb_fwbm_top;
  import fwbm_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n, in_valid, out_valid;
  logic [31:0] x, y, p;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [31:0] q_x[$], q_y[$];
  logic        prev_valid;
  int checks = 0, failures = 0, done = 0, sent = 0;
  int cnt_digit[5];
  int cnt_comp = 0, cnt_bubble = 0, cnt_b2b = 0, cnt_neg16 = 0;

  always #5 clk = ~clk;

  fwbm_top dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .x(x), .y(y), .out_valid(out_valid), .p(p),
    .a16(a16), .b16(b16), .p16(p16)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== prev_valid) begin
        failures++;
        $display("FAIL latency");
      end
      if (out_valid) begin
        logic [63:0] mp, mp_dt;
        logic [31:0] ex, ey;
        int s_ic;
        real e;
        ex = q_x.pop_front(); ey = q_y.pop_front();
        fw_model(32, 2, 2, 2, 18, 64'(ex), 64'(ey), mp, s_ic);
        fw_model(32, 2, 2, 0, 0, 64'(ex), 64'(ey), mp_dt, s_ic);
        if (mp != mp_dt) cnt_comp++;
        checks += 2;
        done++;
        if (p != mp[31:0]) begin
          failures++;
          $display("FAIL x=%h y=%h p=%h expected %h", ex, ey, p, mp[31:0]);
        end
        e = fw_error(32, 64'(ex), 64'(ey), 64'(p));
        if (e > 2.0 || e < -2.0) begin
          failures++;
          $display("FAIL error %f LSB for x=%h y=%h", e, ex, ey);
        end
      end
      if (in_valid && prev_valid) cnt_b2b++;
      if (!in_valid) cnt_bubble++;
      // split-array multiplier: combinational, inputs settled since negedge
      checks++;
      if ($signed(p16) != $signed(a16) * $signed(b16)) begin
        failures++;
        $display("FAIL split a=%h b=%h p=%h", a16, b16, p16);
      end
      if (p16[31]) cnt_neg16++;
    end
    prev_valid <= rst_n ? in_valid : 1'b0;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; x = '0; y = '0; prev_valid = 1'b0;
    a16 = '0; b16 = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (out_valid !== 1'b0) failures++;
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      in_valid = (k < 4) || (($urandom % 8) != 0);
      case (k)
        0: begin x = 32'h8000_0000; y = 32'h8000_0000; end
        1: begin x = 32'h7FFF_FFFF; y = 32'h8000_0000; end
        2: begin x = 32'hFFFF_FFFF; y = 32'h0000_0001; end
        3: begin x = 32'h0000_0020; y = 32'h0000_0005; end
        default: begin x = $urandom; y = $urandom; end
      endcase
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (in_valid) begin
        q_x.push_back(x); q_y.push_back(y); sent++;
        for (int i = 0; i < 16; i++) cnt_digit[booth_digit(64'(y), i) + 2]++;
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (done != sent) begin
      failures++;
      $display("FAIL %0d of %0d products seen", done, sent);
    end
    $display("mechanisms: digit -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d comp_changed:%0d bubble:%0d back_to_back:%0d split_negative:%0d",
             cnt_digit[0], cnt_digit[1], cnt_digit[2], cnt_digit[3], cnt_digit[4],
             cnt_comp, cnt_bubble, cnt_b2b, cnt_neg16);
    checks += 9;
    for (int i = 0; i < 5; i++) if (cnt_digit[i] == 0) failures++;
    if (cnt_comp == 0)   failures++;
    if (cnt_bubble == 0) failures++;
    if (cnt_b2b == 0)    failures++;
    if (cnt_neg16 == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
