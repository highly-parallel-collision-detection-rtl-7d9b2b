// tb_manipulator_memory: loads all 150 words, then reads them back one every
// two cycles and checks each word and that it is valid in the second cycle
// of its access (t_a = 2 cycles).
module tb_manipulator_memory;
  import cd_pkg::*;
  localparam int WORDS = 150, ACC = 2;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, rd_valid;
  logic [7:0] wr_addr = 0, rd_addr = 0;
  word_t wr_data = 0, rd_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  manipulator_memory dut (.*);   // default size: 150 words, t_a = 2

  function automatic word_t pattern(input int a);
    return word_t'(a * 331 - 20000);
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 8'(a); wr_data = pattern(a);
    end
    @(negedge clk); wr_en = 0;
    for (int a = 0; a < WORDS; a++) begin
      rd_en = 1; rd_addr = 8'(a);
      @(negedge clk);
      rd_en = 0; rd_addr = 8'($urandom_range(WORDS - 1));   // address may change after the request
      #1;
      checks++;
      if (!rd_valid || rd_data != pattern(a)) begin
        failures++; $display("FAIL addr %0d valid %0b data %0d", a, rd_valid, rd_data);
      end
      @(negedge clk);
      checks++;
      if (rd_valid) begin failures++; $display("FAIL valid held at addr %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
