// tb_program_memory: writes every word through the host port and reads all
// of them back through the PAC-addressed read port.
module tb_program_memory;
  import cd_pkg::*;
  logic clk = 0;
  pm_wr_t host_wr = '0;
  logic [PM_AW-1:0] pac = 0;
  logic [PM_W-1:0] word_o;
  logic [PM_W-1:0] ref_mem [1 << PM_AW];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  program_memory dut (.*);

  initial begin
    for (int a = 0; a < (1 << PM_AW); a++) begin
      @(negedge clk);
      host_wr = '{we: 1'b1, addr: PM_AW'(a), data: PM_W'((a * 7 + 3) ^ (a >> 3))};
      ref_mem[a] = host_wr.data;
    end
    @(negedge clk); host_wr.we = 0;
    for (int a = (1 << PM_AW) - 1; a >= 0; a--) begin
      pac = PM_AW'(a); #1;
      checks++;
      if (word_o != ref_mem[a]) begin failures++; $display("FAIL pac=%0d got %0d exp %0d", a, word_o, ref_mem[a]); end
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
