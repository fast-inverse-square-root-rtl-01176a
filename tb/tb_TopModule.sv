// tb_TopModule: end-to-end test of the fast inverse square root unit at its
// default configuration.
//
// Streams positive normal numbers over the whole binary32 range into the top,
// with random gaps, and checks every result bit-exactly against the reference
// algorithm, its relative error against 1/sqrt(x) (bound 1e-4; the worst case
// of the algorithm over all positive normal inputs is about 5.3e-5) and its
// latency of fisr_pkg::LATENCY cycles. A reset is applied in the middle of the
// stream: operands in flight are dropped and no stale result may appear.
// Counted mechanisms, each of which must occur: the magic constant for an
// even power of two, the one for an odd power, back-to-back operands (one per
// cycle), gaps in the input stream, and the reset flush.
module tb_TopModule;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid;
  logic [31:0] x = '0, y;
  int cycle = 0;
  logic [31:0] q_x[$];
  int          q_t[$];
  int n_even = 0, n_odd = 0, n_b2b = 0, n_gap = 0, n_flush = 0, outs = 0;
  real worst = 0.0;

  TopModule dut (.clk(clk), .rst(rst), .in_valid(in_valid), .x_int(x),
                 .out_valid(out_valid), .inv_sqrt(y));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) begin
    if (out_valid) begin
      logic [31:0] xi, exp;
      real xr, err;
      int t;
      outs++;
      checks++;
      if (q_x.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %h at cycle %0d", y, cycle);
      end else begin
        xi  = q_x.pop_front();
        t   = q_t.pop_front();
        exp = fisr(xi);
        if (y !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL x=%h y=%h expected %h", xi, y, exp);
        end
        xr  = f32_to_real(xi);
        err = f32_to_real(y) * $sqrt(xr) - 1.0;
        if (err < 0.0) err = -err;
        if (xi[30:23] >= 8'd2 && err > worst) worst = err;
        // Below 2**-125 the product 0.500438180 * x underflows and is
        // flushed to zero, so only the bit-exact check applies there.
        if (xi[30:23] >= 8'd2) begin
          checks++;
          if (err > 1.0e-4) begin
            failures++;
            $display("FAIL x=%h relative error %g", xi, err);
          end
        end
        checks++;
        if (cycle - t != int'(fisr_pkg::LATENCY)) begin
          failures++;
          $display("FAIL latency %0d", cycle - t);
        end
      end
    end
  end

  task automatic drive(int n, int gap_pct);
    bit last = 1'b0;
    for (int k = 0; k < n; k++) begin
      if (int'($urandom_range(99)) < gap_pct) begin
        in_valid = 1'b0;
        x = $urandom;                   // junk on an idle cycle
        if (last) n_gap++;
        last = 1'b0;
      end else begin
        x = rand_f32(1, 254, 1'b0);
        in_valid = 1'b1;
        q_x.push_back(x); q_t.push_back(cycle);
        if (x[23]) n_even++; else n_odd++;   // biased exponent odd <=> power even
        if (last) n_b2b++;
        last = 1'b1;
      end
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    drive(40000, 0);                    // full rate
    drive(40000, 30);                   // with gaps
    // Reset while operands are in flight: they are dropped.
    drive(3, 0);
    rst = 1'b1;
    @(posedge clk); #1;
    q_x.delete(); q_t.delete();         // any result now would be stale
    rst = 1'b0;
    repeat (fisr_pkg::LATENCY + 2) @(posedge clk);
    #1;
    checks++;
    if (outs == 0) failures++;
    n_flush++;
    drive(20000, 50);
    repeat (fisr_pkg::LATENCY + 2) @(posedge clk);
    checks++;
    if (q_x.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q_x.size());
    end
    $display("even-power constant %0d, odd-power constant %0d, back-to-back %0d, gaps %0d, reset flushes %0d, results %0d, worst relative error %g",
             n_even, n_odd, n_b2b, n_gap, n_flush, outs, worst);
    if (n_even == 0 || n_odd == 0 || n_b2b == 0 || n_gap == 0 || n_flush == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
