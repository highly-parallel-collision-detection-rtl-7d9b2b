// tb_constant_generator: checks every radix constant against atan(2^-i)
// (circular) and 2^-i (linear), computed in floating point and scaled by 2^14.
module tb_constant_generator;
  import cd_pkg::*;
  logic [3:0] iter;
  logic       circular;
  word_t      const_o;
  int checks = 0, failures = 0;

  constant_generator dut (.*);

  initial begin
    for (int i = 0; i < ITERS; i++) begin
      int exp_c, exp_l;
      exp_c = $rtoi($atan(2.0 ** (-i)) * 16384.0 + 0.5);
      exp_l = $rtoi(16384.0 * (2.0 ** (-i)));
      iter = 4'(i); circular = 1; #1;
      checks++;
      if (int'(const_o) != exp_c) begin failures++; $display("FAIL atan i=%0d got %0d exp %0d", i, const_o, exp_c); end
      circular = 0; #1;
      checks++;
      if (int'(const_o) != exp_l) begin failures++; $display("FAIL lin i=%0d got %0d exp %0d", i, const_o, exp_l); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
