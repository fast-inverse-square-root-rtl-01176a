// tb_MagicConstantSelect: checks that the constant follows the parity of the
// power of two of x, for every exponent field value.
module tb_MagicConstantSelect;
  int checks = 0, failures = 0;
  logic        lsb;
  logic [31:0] magic;

  MagicConstantSelect dut (.exp_lsb(lsb), .magic(magic));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lsb = 1'b0;
    for (int e = 1; e < 255; e++) begin
      logic [31:0] x;
      int power;
      x = {1'b0, 8'(e), 23'($urandom)};
      power = e - 127;
      lsb = x[23]; #1;
      checks++;
      if (magic !== ((power % 2 == 0) ? 32'h5F3E34BC : 32'h5F3759DF)) begin
        failures++;
        $display("FAIL exponent %0d gives %h", power, magic);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
