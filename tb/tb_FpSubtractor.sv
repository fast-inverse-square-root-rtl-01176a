// tb_FpSubtractor: checks the registered binary32 subtractor bit-exactly
// against a round-to-nearest-even reference, one cycle after the operands
// are applied. Covers random operands with exponent gaps up to 29 (exact in
// the binary64 reference), near-cancellation, large gaps, zeros, infinities,
// NaNs and overflow, and checks that reset clears the output.
module tb_FpSubtractor;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] a = '0, b = '0, r;

  FpSubtractor dut (.clk(clk), .rst(rst), .a(a), .b(b), .result(r));

  always #5 clk = ~clk;

  task automatic check(logic [31:0] x, logic [31:0] y, logic [31:0] exp);
    a = x; b = y;
    @(posedge clk); #1;
    checks++;
    if (r !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h - %h = %h, expected %h", x, y, r, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 32'h3F800000; b = 32'h3F000000;
    repeat (2) @(posedge clk);
    #1; checks++;
    if (r !== 32'd0) begin failures++; $display("FAIL reset value %h", r); end
    rst = 1'b0;
    check(32'h3FC02B13, 32'h3F000000, 32'h3F802B13);   // 1.50131454 - 0.5
    check(32'h3F800000, 32'h3F800000, 32'h00000000);   // x - x = +0
    check(32'h3F800000, 32'h40000000, 32'hBF800000);   // 1 - 2 = -1
    check(32'h3F800000, 32'hBF800000, 32'h40000000);   // 1 - -1 = 2
    check(32'h3F800000, 32'h2B800000, 32'h3F800000);   // 1 - 2^-40 -> 1
    check(32'h3F800000, 32'h33000000, 32'h3F800000);   // 1 - 2^-25: tie to even
    check(32'h3F800001, 32'hB3800000, 32'h3F800002);   // tie, rounds to even up
    check(32'h3F800000, 32'h00000000, 32'h3F800000);   // x - 0
    check(32'h00000000, 32'h3F800000, 32'hBF800000);   // 0 - x
    check(32'h7F800000, 32'h7F800000, 32'h7FC00000);   // inf - inf
    check(32'h7F800000, 32'hFF800000, 32'h7F800000);   // inf - -inf
    check(32'h3F800000, 32'h7F800000, 32'hFF800000);   // 1 - inf
    check(32'h7F7FFFFF, 32'hFF7FFFFF, 32'h7F800000);   // overflow
    check(32'h00800001, 32'h00800000, 32'h00000000);   // subnormal result flushed
    for (int k = 0; k < 20000; k++) begin
      logic [31:0] x, y;
      int gap;
      x = rand_f32(40, 215);
      gap = int'($urandom_range(58)) - 29;
      y = $urandom;
      if (k % 4 == 0) begin           // near cancellation
        y[30:0] = x[30:0] ^ 31'($urandom_range(255));
      end else begin
        y[30:23] = 8'(int'(x[30:23]) + gap);
      end
      check(x, y, fsub(x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
