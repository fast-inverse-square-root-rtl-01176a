// tb_Multiply: checks the binary32 multiplier bit-exactly against a
// round-to-nearest-even reference, on random normal operands whose product
// stays in range and on zeros, infinities, NaNs, overflow and underflow.
module tb_Multiply;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, b, p;

  Multiply dut (.multiplicand(a), .multiplier(b), .product(p));

  task automatic check(logic [31:0] x, logic [31:0] y, logic [31:0] exp);
    a = x; b = y; #1;
    checks++;
    if (p !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", x, y, p, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    check(32'h3F800000, 32'h3F800000, 32'h3F800000);   // 1 * 1
    check(32'h40400000, 32'hC0000000, 32'hC0C00000);   // 3 * -2 = -6
    check(32'h3F001CB7, 32'h40000000, 32'h3F801CB7);   // c * 2
    check(32'h00000000, 32'h40400000, 32'h00000000);   // 0 * 3
    check(32'h80000000, 32'h40400000, 32'h80000000);   // -0 * 3
    check(32'h00400000, 32'h40400000, 32'h00000000);   // subnormal flushed
    check(32'h7F800000, 32'h40400000, 32'h7F800000);   // inf * 3
    check(32'h7F800000, 32'h00000000, 32'h7FC00000);   // inf * 0 = NaN
    check(32'h7FC00001, 32'h3F800000, 32'h7FC00000);   // NaN
    check(32'h7F000000, 32'h7F000000, 32'h7F800000);   // overflow
    check(32'h00800000, 32'h00800000, 32'h00000000);   // underflow
    check(32'h3F800001, 32'h3F800001, 32'h3F800002);   // rounding (down)
    check(32'h3F800003, 32'h3F800003, 32'h3F800006);
    for (int k = 0; k < 20000; k++) begin
      logic [31:0] x, y;
      x = rand_f32(64, 190);
      y = rand_f32(64, 190);
      check(x, y, fmul(x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
