// tb_output_registers: writes random results to random addresses and checks
// that only addresses 29..31 update X, Y, Z, and that the pixel address is
// 4096*floor(X) + 64*floor(Y) + floor(Z) with in_range set only inside 0..63.
module tb_output_registers;
  import cd_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  dm_addr_t wa_x = 0, wa_y = 0, wa_z = 0;
  word_t wd_x = 0, wd_y = 0, wd_z = 0, x, y, z;
  logic [17:0] pix_addr;
  logic in_range;
  word_t ex = 0, ey = 0, ez = 0;
  int checks = 0, failures = 0, n_in = 0, n_out = 0;

  always #5 clk = ~clk;
  output_registers dut (.*);

  function automatic word_t rcoord();
    // mostly inside the workspace, sometimes outside on either side
    return word_t'($urandom_range(80 * 128) - 8 * 128);
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = $urandom_range(3) != 0;
      wa_x = ($urandom_range(1) != 0) ? ADDR_OUT_X : dm_addr_t'($urandom_range(28));
      wa_y = ($urandom_range(1) != 0) ? ADDR_OUT_Y : dm_addr_t'($urandom_range(28));
      wa_z = ($urandom_range(1) != 0) ? ADDR_OUT_Z : dm_addr_t'($urandom_range(28));
      wd_x = rcoord(); wd_y = rcoord(); wd_z = rcoord();
      if (we) begin
        if (wa_x == ADDR_OUT_X) ex = wd_x;
        if (wa_y == ADDR_OUT_Y) ey = wd_y;
        if (wa_z == ADDR_OUT_Z) ez = wd_z;
      end
      @(negedge clk);
      we = 0;
      begin
        int xi, yi, zi;
        logic ir;
        xi = int'(ex) >>> 7; yi = int'(ey) >>> 7; zi = int'(ez) >>> 7;
        ir = xi >= 0 && xi < 64 && yi >= 0 && yi < 64 && zi >= 0 && zi < 64;
        checks++;
        if (x != ex || y != ey || z != ez || in_range != ir ||
            (ir && pix_addr != 18'(4096 * xi + 64 * yi + zi))) begin
          failures++;
          $display("FAIL regs %0d %0d %0d exp %0d %0d %0d range %0b/%0b addr %0d", x, y, z, ex, ey, ez, in_range, ir, pix_addr);
        end
        if (ir) n_in++; else n_out++;
      end
    end
    checks++;
    if (n_in == 0 || n_out == 0) begin failures++; $display("FAIL range cases not both covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
