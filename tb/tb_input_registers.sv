// tb_input_registers: loads random points word by word and checks that the
// active stage changes only on `advance`, including a word that arrives in
// the advance cycle itself.
module tb_input_registers;
  import cd_pkg::*;
  logic clk = 0, rst_n = 0, ld_en = 0, advance = 0;
  logic [1:0] ld_idx = 0;
  word_t ld_data = 0, x, y, z;
  word_t ex = 0, ey = 0, ez = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  input_registers dut (.*);

  task automatic chk();
    checks++;
    if (x != ex || y != ey || z != ez) begin
      failures++; $display("FAIL got %0d %0d %0d exp %0d %0d %0d", x, y, z, ex, ey, ez);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      word_t p [3];
      logic  bypass;
      bypass = (n % 3 == 0);
      for (int k = 0; k < 3; k++) begin
        p[k] = 16'($urandom);
        @(negedge clk);
        ld_en = 1; ld_idx = 2'(k); ld_data = p[k];
        advance = bypass && k == 2;
        @(negedge clk);
        ld_en = 0; advance = 0;
        if (bypass && k == 2) begin ex = p[0]; ey = p[1]; ez = p[2]; end
        chk();
      end
      if (!bypass) begin
        @(negedge clk); advance = 1;
        @(negedge clk); advance = 0;
        ex = p[0]; ey = p[1]; ez = p[2];
        chk();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
