// tb_RightShiftBy1: checks the registered one-place right shift, its
// one-cycle latency and its reset.
module tb_RightShiftBy1;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  logic [31:0] d = 32'hFFFF_FFFF, q;

  RightShiftBy1 dut (.clk(clk), .rst(rst), .data(d), .out(q));

  always #5 clk = ~clk;

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
    if (q !== 32'd0) begin failures++; $display("FAIL reset value %h", q); end
    rst = 1'b0;
    for (int k = 0; k < 1000; k++) begin
      logic [31:0] v;
      v = (k == 0) ? 32'hFFFF_FFFF : (k == 1) ? 32'h8000_0001 : $urandom;
      d = v;
      @(posedge clk); #1;
      checks++;
      if (q !== {1'b0, v[31:1]}) begin
        failures++;
        if (failures < 10) $display("FAIL %h >> 1 = %h", v, q);
      end
      d = ~v;                          // must not show before the next edge
      #2;
      checks++;
      if (q !== {1'b0, v[31:1]}) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
