// tb_booth_pp_array: checks the Booth partial-product array with its
// sign-extension reduction. The rows plus the neg bits, each at column 2i,
// must add up to the full 2N-bit product x * y. The check runs at 32 bits with
// random and extreme operands, and exhaustively at 8 bits. It also checks the
// reduced sign-extension pattern: the constant 1 above each row after the
// first.
module tb_booth_pp_array;
  logic [31:0] x, y;
  logic [15:0][63:0] rows;
  logic [15:0] neg;
  logic [7:0] x8, y8;
  logic [3:0][15:0] rows8;
  logic [3:0] neg8;
  int checks = 0, failures = 0;

  booth_pp_array dut (.x(x), .y(y), .rows(rows), .neg(neg));
  booth_pp_array #(.N(8)) dut8 (.x(x8), .y(y8), .rows(rows8), .neg(neg8));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] acc, prod;
    logic [15:0] acc8, prod8;
    for (int k = 0; k < 3000; k++) begin
      x = (k < 2) ? 32'h8000_0000 : $urandom;
      y = (k == 0) ? 32'h8000_0000 : (k == 1) ? 32'hFFFF_FFFF : $urandom;
      #1;
      acc = '0;
      for (int i = 0; i < 16; i++) acc = acc + rows[i] + (64'(neg[i]) << (2 * i));
      prod = 64'($signed({{32{x[31]}}, x}) * $signed({{32{y[31]}}, y}));
      checks++;
      if (acc != prod) begin
        failures++;
        $display("FAIL x=%h y=%h sum=%h expected %h", x, y, acc, prod);
      end
      for (int i = 1; i < 16; i++) begin
        checks++;
        if (rows[i][32+2*i+1] !== 1'b1) failures++;
      end
    end
    for (int v = 0; v < 65536; v++) begin
      {x8, y8} = 16'(v);
      #1;
      acc8 = '0;
      for (int i = 0; i < 4; i++) acc8 = acc8 + rows8[i] + (16'(neg8[i]) << (2 * i));
      prod8 = 16'($signed({{8{x8[7]}}, x8}) * $signed({{8{y8[7]}}, y8}));
      checks++;
      if (acc8 != prod8) begin
        failures++;
        if (failures < 10) $display("FAIL8 x=%h y=%h sum=%h expected %h", x8, y8, acc8, prod8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
