// tb_fixed_width_booth_mult: end-to-end test of the fixed-width Booth multiplier.
//
// Three instances:
//   dut   - default configuration (32 bits, h = 2, two compensation bits,
//           high-speed compressors, pipelined). It gets random operand streams
//           with bubbles and the extreme operands. Every result is compared
//           bit for bit with the reference model, out_valid must follow
//           in_valid by exactly one cycle, and the error statistics must
//           beat plain truncation.
//   dut8  - 8 bits, h = 2, beta = 10, full-adder compressors, combinational;
//           exhaustive over all 65536 operand pairs.
//   dut8b - 8 bits, h = 1, beta = 6; exhaustive. Here the index column holds a
//           Booth negation bit, which takes that path of the compensation.
//   dut8c - 8 bits, h = 0, beta = 4; exhaustive (no extra kept columns).
// The 32-bit error must also be lower than that of both simple alternatives:
// direct truncation (same kept columns, no compensation) and post-truncation
// (exact product, cut to its upper half).
// Mechanisms counted (each must occur): every Booth digit value -2..+2,
// a compensation that changes the output, a negation bit in the index column,
// a pipeline bubble and back-to-back operations.
module tb_fixed_width_booth_mult;
  import fwbm_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid, out_valid;
  logic [31:0] x, y, p;
  logic [7:0]  x8, y8, p8, p8b, p8c;
  logic        v8, v8b, v8c;

  int checks = 0, failures = 0;
  int cnt_digit[5];
  int cnt_comp_changed = 0, cnt_ic_neg = 0, cnt_bubble = 0, cnt_b2b = 0;

  always #5 clk = ~clk;

  fixed_width_booth_mult dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y),
    .out_valid(out_valid), .p(p)
  );

  fixed_width_booth_mult #(.N(8), .H(2), .NF(2), .ALPHA(2), .BETA(10),
                           .HIGH_SPEED(1'b0), .PIPELINE(1'b0)) dut8 (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .x(x8), .y(y8),
    .out_valid(v8), .p(p8)
  );

  fixed_width_booth_mult #(.N(8), .H(1), .NF(2), .ALPHA(2), .BETA(6),
                           .PIPELINE(1'b0)) dut8b (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .x(x8), .y(y8),
    .out_valid(v8b), .p(p8b)
  );

  fixed_width_booth_mult #(.N(8), .H(0), .NF(2), .ALPHA(2), .BETA(4),
                           .PIPELINE(1'b0)) dut8c (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .x(x8), .y(y8),
    .out_valid(v8c), .p(p8c)
  );

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------------- 32-bit pipelined
  logic [31:0] q_x[$], q_y[$];
  logic        prev_valid;
  real         se = 0.0, se_dt = 0.0, se_pt = 0.0, sum_e = 0.0;
  int          n32 = 0;

  task automatic drive(input logic v, input logic [31:0] a, input logic [31:0] b);
    @(negedge clk);
    in_valid = v; x = a; y = b;
    if (v) begin
      q_x.push_back(a); q_y.push_back(b);
      for (int i = 0; i < 16; i++) cnt_digit[booth_digit(64'(b), i) + 2]++;
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== prev_valid) begin
        failures++;
        $display("FAIL latency: out_valid=%0b, in_valid one cycle earlier=%0b", out_valid, prev_valid);
      end
      if (out_valid) begin
        logic [63:0] mp, mp_dt;
        logic [31:0] ex, ey;
        int s_ic;
        real e, e_dt;
        ex = q_x.pop_front(); ey = q_y.pop_front();
        fw_model(32, 2, 2, 2, 18, 64'(ex), 64'(ey), mp, s_ic);
        fw_model(32, 2, 2, 0, 0, 64'(ex), 64'(ey), mp_dt, s_ic);
        checks++;
        if (p != mp[31:0]) begin
          failures++;
          $display("FAIL 32b x=%h y=%h p=%h expected %h", ex, ey, p, mp[31:0]);
        end
        if (mp[31:0] != mp_dt[31:0]) cnt_comp_changed++;
        e    = fw_error(32, 64'(ex), 64'(ey), 64'(p));
        e_dt = fw_error(32, 64'(ex), 64'(ey), mp_dt);
        se += e * e; se_dt += e_dt * e_dt; sum_e += e; n32++;
        // post-truncation: the exact 64-bit product, cut to its upper half
        e = fw_error(32, 64'(ex), 64'(ey),
                     64'(($signed({{32{ex[31]}}, ex}) * $signed({{32{ey[31]}}, ey})) >>> 32));
        se_pt += e * e;
        checks++;
        if (e > 2.0 || e < -2.0) begin
          failures++;
          $display("FAIL 32b error %f LSB for x=%h y=%h", e, ex, ey);
        end
      end
      if (in_valid && prev_valid) cnt_b2b++;
      if (!in_valid) cnt_bubble++;
    end
    prev_valid <= rst_n ? in_valid : 1'b0;
  end

  initial begin
    logic [63:0] m;
    int s_ic, n8;
    real e, se8, se8b, se8c;

    rst_n = 1'b0; in_valid = 1'b0; x = '0; y = '0; prev_valid = 1'b0;
    x8 = '0; y8 = '0;
    repeat (3) @(posedge clk);
    checks++;
    if (out_valid !== 1'b0) begin
      failures++;
      $display("FAIL out_valid not cleared by reset");
    end
    @(negedge clk) rst_n = 1'b1;

    // extreme operands
    drive(1'b1, 32'h8000_0000, 32'h8000_0000);
    drive(1'b1, 32'h8000_0000, 32'h7FFF_FFFF);
    drive(1'b1, 32'h7FFF_FFFF, 32'h7FFF_FFFF);
    drive(1'b1, 32'hFFFF_FFFF, 32'hFFFF_FFFF);
    drive(1'b1, 32'h0000_0020, 32'h0000_0005);
    drive(1'b0, 32'h0, 32'h0);
    drive(1'b1, 32'h0, 32'h1234_5678);
    // random stream with bubbles
    for (int k = 0; k < 20000; k++)
      drive(($urandom % 8) != 0, $urandom, $urandom);
    drive(1'b0, 32'h0, 32'h0);
    drive(1'b0, 32'h0, 32'h0);

    // ------------------------------------------- 8-bit exhaustive, combinational
    se8 = 0.0; se8b = 0.0; se8c = 0.0; n8 = 0;
    for (int v = 0; v < 65536; v++) begin
      {x8, y8} = 16'(v);
      #1;
      fw_model(8, 2, 2, 2, 10, 64'(x8), 64'(y8), m, s_ic);
      checks++;
      if (p8 != m[7:0]) begin
        failures++;
        if (failures < 20) $display("FAIL 8b h2 x=%h y=%h p=%h expected %h", x8, y8, p8, m[7:0]);
      end
      e = fw_error(8, 64'(x8), 64'(y8), 64'(p8)); se8 += e * e;
      fw_model(8, 1, 2, 2, 6, 64'(x8), 64'(y8), m, s_ic);
      checks++;
      if (p8b != m[7:0]) begin
        failures++;
        if (failures < 20) $display("FAIL 8b h1 x=%h y=%h p=%h expected %h", x8, y8, p8b, m[7:0]);
      end
      e = fw_error(8, 64'(x8), 64'(y8), 64'(p8b)); se8b += e * e;
      fw_model(8, 0, 2, 2, 4, 64'(x8), 64'(y8), m, s_ic);
      checks++;
      if (p8c != m[7:0]) begin
        failures++;
        if (failures < 20) $display("FAIL 8b h0 x=%h y=%h p=%h expected %h", x8, y8, p8c, m[7:0]);
      end
      e = fw_error(8, 64'(x8), 64'(y8), 64'(p8c)); se8c += e * e;
      // h = 1: index column is column 6 = 2*3, where row 3's negation bit lies
      if (booth_digit(64'(y8), 3) < 0) cnt_ic_neg++;
      n8++;
    end
    se8 = se8 / n8; se8b = se8b / n8; se8c = se8c / n8;
    $display("8-bit exhaustive: mean squared error h=2 %f, h=1 %f, h=0 %f (LSB^2)", se8, se8b, se8c);
    checks += 3;
    if (se8c > 0.19)  begin failures++; $display("FAIL 8b h=0 mse %f", se8c); end
    if (se8 > 0.095)  begin failures++; $display("FAIL 8b h=2 mse %f", se8); end
    if (se8b > 0.115) begin failures++; $display("FAIL 8b h=1 mse %f", se8b); end

    // ------------------------------------------------------------- summary
    $display("32-bit: %0d products, mean error %f, mse %f LSB^2, direct truncation mse %f, post-truncation mse %f",
             n32, sum_e / n32, se / n32, se_dt / n32, se_pt / n32);
    checks += 3;
    if (se / n32 >= se_pt / n32) begin
      failures++; $display("FAIL 32b mse not below post-truncation");
    end
    if (se / n32 > 0.15 || se / n32 >= se_dt / n32) begin
      failures++; $display("FAIL 32b mse %f", se / n32);
    end
    if (sum_e / n32 > 0.05 || sum_e / n32 < -0.05) begin
      failures++; $display("FAIL 32b mean error %f", sum_e / n32);
    end
    checks++;
    if (q_x.size() != 0) begin failures++; $display("FAIL %0d results missing", q_x.size()); end

    $display("mechanisms: digit -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d comp_changed:%0d ic_neg:%0d bubble:%0d back_to_back:%0d",
             cnt_digit[0], cnt_digit[1], cnt_digit[2], cnt_digit[3], cnt_digit[4],
             cnt_comp_changed, cnt_ic_neg, cnt_bubble, cnt_b2b);
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (cnt_digit[i] == 0) begin failures++; $display("FAIL digit %0d never seen", i - 2); end
    end
    checks += 4;
    if (cnt_comp_changed == 0) begin failures++; $display("FAIL compensation never changed a result"); end
    if (cnt_ic_neg == 0)       begin failures++; $display("FAIL negation bit never in index column"); end
    if (cnt_bubble == 0)       begin failures++; $display("FAIL no pipeline bubble"); end
    if (cnt_b2b == 0)          begin failures++; $display("FAIL no back-to-back operations"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
