// tb_obstacle_memory: loads the full 64^3 image with a pattern (pixel
// P(x,y,z) occupied when (x + 2y + 3z) mod 7 == 0), then reads random pixels
// at address 4096x + 64y + z and checks the bit and its timing (t_a = 2).
module tb_obstacle_memory;
  import cd_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, rd_valid, rd_data;
  logic [13:0] wr_addr = 0;
  logic [15:0] wr_data = 0;
  logic [17:0] rd_addr = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  obstacle_memory dut (.*);

  function automatic logic occupied(input int x, input int y, input int z);
    return ((x + 2 * y + 3 * z) % 7) == 0;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < (1 << 14); w++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 14'(w);
      for (int b = 0; b < 16; b++) begin
        int a;
        a = w * 16 + b;
        wr_data[b] = occupied(a / 4096, (a / 64) % 64, a % 64);
      end
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 3000; n++) begin
      int x, y, z;
      x = $urandom_range(63); y = $urandom_range(63); z = $urandom_range(63);
      rd_en = 1; rd_addr = 18'(4096 * x + 64 * y + z);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (!rd_valid || rd_data != occupied(x, y, z)) begin
        failures++; $display("FAIL P(%0d,%0d,%0d) valid %0b bit %0b", x, y, z, rd_valid, rd_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
