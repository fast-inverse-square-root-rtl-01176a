// tb_InverseSquareRoot: checks the pipelined core against the reference
// algorithm (one binary32 rounding per operation) on known values and on a
// back-to-back stream of random positive normal numbers, and checks that
// every result leaves exactly fisr_pkg::LATENCY cycles after its operand.
module tb_InverseSquareRoot;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid;
  logic [31:0] x = '0, y;
  int cycle = 0;
  logic [31:0] q_x[$];
  int          q_t[$];
  int          outs = 0;

  InverseSquareRoot dut (.clk(clk), .rst(rst), .in_valid(in_valid), .x_int(x),
                         .out_valid(out_valid), .inv_sqrt(y));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Result checker.
  always @(negedge clk) begin
    if (!rst && out_valid) begin
      logic [31:0] xi, exp;
      int t;
      outs++;
      checks++;
      if (q_x.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %h", y);
      end else begin
        xi = q_x.pop_front();
        t  = q_t.pop_front();
        exp = fisr(xi);
        if (y !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL x=%h y=%h expected %h", xi, y, exp);
        end
        checks++;
        if (cycle - t != int'(fisr_pkg::LATENCY)) begin
          failures++;
          $display("FAIL latency %0d", cycle - t);
        end
      end
    end
  end

  task automatic issue(logic [31:0] v);
    x = v; in_valid = 1'b1;
    q_x.push_back(v); q_t.push_back(cycle);
    @(posedge clk); #1;
    in_valid = 1'b0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] gold_x[8] = '{32'h3F800000, 32'h40000000, 32'h40400000, 32'h3E200000,
                               32'h42C80000, 32'h0DA24260, 32'h72BD539D, 32'h3F333333};
    logic [31:0] gold_y[8] = '{32'h3F7FFFF9, 32'h3F3504F3, 32'h3F13CD40, 32'h4021E896,
                               32'h3DCCCA48, 32'h58635F63, 32'h25D27C64, 32'h3F98FD40};
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // The reference itself against values computed independently.
    foreach (gold_x[i]) begin
      checks++;
      if (fisr(gold_x[i]) !== gold_y[i]) begin
        failures++;
        $display("FAIL reference %h -> %h", gold_x[i], fisr(gold_x[i]));
      end
    end
    foreach (gold_x[i]) issue(gold_x[i]);
    for (int k = 0; k < 3000; k++) issue(rand_f32(1, 254, 1'b0));
    repeat (fisr_pkg::LATENCY + 2) @(posedge clk);
    checks++;
    if (outs != 3008 || q_x.size() != 0) begin
      failures++;
      $display("FAIL %0d results for 3008 operands", outs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
