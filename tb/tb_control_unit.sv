// tb_control_unit: loads a random 3-instruction program (FIRST, MIDDLE,
// LAST) in the 8 x 5-bit format, runs it for several passes and checks, in
// every cycle, the current instruction's fields, the decoded strobes (load
// in cycle 0, iterations 0..14 in cycles 1..15, result write and FIRST/LAST
// strobes), the 16-cycle function length and the return to instruction 0
// after LAST.  Then repeats with a one-instruction (FML ONLY) program.
module tb_control_unit;
  import cd_pkg::*;
  logic clk = 0, rst_n = 0, go = 0, stop = 0;
  pm_wr_t pm_wr = '0;
  logic ready, running, eu_load, eu_iter_en, res_we, slot_first, slot_last;
  logic [3:0] cycle, eu_iter;
  logic [PM_AW-1:0] pac;
  instr_t cur;
  instr_t prog [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  control_unit dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic write_word(input int a, input logic [4:0] w);
    @(negedge clk);
    pm_wr = '{we: 1'b1, addr: PM_AW'(a), data: w};
  endtask

  task automatic load_program(input int n);
    for (int k = 0; k < n; k++) begin
      write_word(8 * k + 0, prog[k].ax);
      write_word(8 * k + 1, prog[k].ay);
      write_word(8 * k + 2, prog[k].az);
      write_word(8 * k + 3, {prog[k].op, prog[k].xs, prog[k].zs, 1'b0});
      write_word(8 * k + 4, {prog[k].ys, prog[k].fml, 2'b00});
      write_word(8 * k + 5, prog[k].dx);
      write_word(8 * k + 6, prog[k].dy);
      write_word(8 * k + 7, prog[k].dz);
    end
    @(negedge clk); pm_wr.we = 0;
  endtask

  task automatic run_and_check(input int n, input int passes);
    int waited;
    waited = 0;
    while (!ready && waited < 20) begin @(negedge clk); waited++; end
    chk(ready, "ready after fetch of instruction 0");
    chk(waited <= 8, "instruction 0 fetched within 8 cycles");
    go = 1; @(negedge clk); go = 0;
    for (int p = 0; p < passes; p++)
      for (int k = 0; k < n; k++)
        for (int c = 0; c < SLOT_CYCLES; c++) begin
          chk(running && cycle == 4'(c), "cycle count");
          chk(cur == prog[k], "current instruction");
          chk(eu_load == (c == 0), "eu_load");
          chk(eu_iter_en == (c != 0) && (c == 0 || eu_iter == 4'(c - 1)), "iteration strobe and index");
          chk(res_we == (c == SLOT_CYCLES - 1), "result write");
          chk(slot_first == (c == 0 && (prog[k].fml == FML_FIRST || prog[k].fml == FML_ONLY)), "slot_first");
          chk(slot_last == (c == 15 && (prog[k].fml == FML_LAST || prog[k].fml == FML_ONLY)), "slot_last");
          @(negedge clk);
        end
    stop = 1; @(negedge clk); stop = 0;
    chk(!running, "stopped");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      for (int k = 0; k < 3; k++) begin
        prog[k] = instr_t'({$urandom, $urandom});
        prog[k].fml = (k == 0) ? FML_FIRST : (k == 2) ? FML_LAST : FML_MIDDLE;
      end
      load_program(3);
      run_and_check(3, 3);
    end
    prog[0] = instr_t'({$urandom, $urandom});
    prog[0].fml = FML_ONLY;
    load_program(1);
    run_and_check(1, 4);
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
