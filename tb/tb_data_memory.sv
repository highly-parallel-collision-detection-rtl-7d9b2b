// tb_data_memory: random host and result writes against a reference array;
// checks the three read ports and the Z-over-Y-over-X write priority.
module tb_data_memory;
  import cd_pkg::*;
  logic clk = 0;
  dm_wr_t host_wr = '0;
  dm_addr_t ra_x = 0, ra_y = 0, ra_z = 0, wa_x = 0, wa_y = 0, wa_z = 0;
  word_t rd_x, rd_y, rd_z, wd_x = 0, wd_y = 0, wd_z = 0;
  logic we = 0;
  word_t ref_mem [DM_WORDS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  data_memory dut (.*);

  task automatic chk(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    // fill through the host port
    for (int a = 0; a < DM_WORDS; a++) begin
      @(negedge clk);
      host_wr = '{we: 1'b1, addr: dm_addr_t'(a), data: 16'($urandom)};
      ref_mem[a] = host_wr.data;
    end
    @(negedge clk); host_wr.we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ra_x = dm_addr_t'($urandom); ra_y = dm_addr_t'($urandom); ra_z = dm_addr_t'($urandom);
      #1;
      chk(rd_x, ref_mem[ra_x], "rd_x"); chk(rd_y, ref_mem[ra_y], "rd_y"); chk(rd_z, ref_mem[ra_z], "rd_z");
      we = $urandom_range(1);
      wa_x = dm_addr_t'($urandom_range(7)); wa_y = dm_addr_t'($urandom_range(7)); wa_z = dm_addr_t'($urandom_range(7));
      wd_x = 16'($urandom); wd_y = 16'($urandom); wd_z = 16'($urandom);
      if (we) begin
        ref_mem[wa_x] = wd_x; ref_mem[wa_y] = wd_y; ref_mem[wa_z] = wd_z;
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
