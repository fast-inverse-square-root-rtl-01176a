// tb_ModifiedBooth: checks the radix-4 Booth multiplier against the plain
// `*` operator: exhaustively at WIDTH = 6 and on corner and random operands
// at the default WIDTH = 24.
module tb_ModifiedBooth;
  int checks = 0, failures = 0;

  logic [23:0] a24, b24;
  logic [47:0] p24;
  logic [5:0]  a6, b6;
  logic [11:0] p6;

  ModifiedBooth dut24 (.multiplicand(a24), .multiplier(b24), .product(p24));
  ModifiedBooth #(.WIDTH(6)) dut6 (.multiplicand(a6), .multiplier(b6), .product(p6));

  task automatic check24(logic [23:0] a, logic [23:0] b);
    logic [47:0] exp;
    a24 = a; b24 = b; #1;
    exp = 48'(a) * 48'(b);
    checks++;
    if (p24 !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL 24b %h * %h = %h, expected %h", a, b, p24, exp);
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
    a24 = '0; b24 = '0; a6 = '0; b6 = '0;
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        a6 = 6'(i); b6 = 6'(j); #1;
        checks++;
        if (p6 !== 12'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL 6b %0d * %0d = %0d", i, j, p6);
        end
      end
    check24(24'hFFFFFF, 24'hFFFFFF);
    check24(24'h800000, 24'h800000);
    check24(24'hAAAAAA, 24'h555555);
    check24(24'h555555, 24'hAAAAAA);
    check24(24'd0, 24'hFFFFFF);
    check24(24'd1, 24'hFFFFFF);
    for (int k = 0; k < 5000; k++) check24(24'($urandom), 24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
