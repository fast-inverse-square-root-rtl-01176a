// tb_IntSubtractor: checks the registered integer subtractor a - b - Bin,
// its one-cycle latency, wrap-around and reset.
module tb_IntSubtractor;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1, bin = 1'b0;
  logic [31:0] a = 32'd5, b = 32'd3, r;

  IntSubtractor dut (.clk(clk), .rst(rst), .Bin(bin), .a(a), .b(b), .result(r));

  always #5 clk = ~clk;

  task automatic check(logic [31:0] x, logic [31:0] y, logic c, logic [31:0] exp);
    logic [31:0] prev;
    prev = r;
    a = x; b = y; bin = c;
    #2;
    checks++;                          // registered: no change prev the edge
    if (r !== prev) failures++;
    @(posedge clk); #1;
    checks++;
    if (r !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h - %h - %b = %h, expected %h", x, y, c, r, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    checks++;
    if (r !== 32'd0) begin failures++; $display("FAIL reset value %h", r); end
    rst = 1'b0;
    check(32'h5F3759DF, 32'h1FC00000, 1'b0, 32'h3F7759DF);  // R - (1.0 >> 1)
    check(32'd0, 32'd1, 1'b0, 32'hFFFF_FFFF);                // wrap-around
    check(32'd10, 32'd3, 1'b1, 32'd6);                       // borrow in
    for (int k = 0; k < 2000; k++) begin
      logic [31:0] x, y;
      logic c;
      x = $urandom; y = $urandom; c = 1'($urandom);
      check(x, y, c, x - y - 32'(c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
