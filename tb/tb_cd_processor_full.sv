// tb_cd_processor_full: end-to-end test of the collision detection processor
// at its default size: 100 PEs with 50 points each, 5000 manipulator points in
// all, the evaluation case of the design (nine CORDIC functions per point,
// T = 50*16*9 + 4*2 = 7208 cycles = 450.5 us at a 62.5 ns clock).
//
// The host broadcasts the nine-function program, the constants and the joint
// angles, loads each PE's manipulator points and broadcasts an obstacle
// image, then starts the check.  The expected outcome is worked out from a
// floating-point transformation of every point and the TB's own copy of the
// image: each PE reports a collision at its first point whose pixel is
// occupied, the processor's result is the OR, and `done` comes when the
// slowest PE finishes: 50*16*9 + 4*2 cycles when no PE collides, earlier when
// every PE stops at a hit.  Scenarios: empty workspace, one obstacle pixel
// under one PE's point, random boxes, a fully occupied workspace, and
// several angle sets.  The TB counts
// each mechanism of the design and fails if one never happened: collision
// free run, collision run, a PE stopping early at a hit, PEs that disagree
// (OR gate), points outside the workspace, transfer and obstacle access
// overlapped with the transformation, operands kept in the accumulator, and
// FIRST and LAST functions.
module tb_cd_processor_full;
  import cd_pkg::*;
  import tb_cd_model::*;

  localparam int NPE  = 100;
  localparam int M    = 50;
  localparam int RUNS = 2;

  logic clk = 0, rst_n = 0;
  dm_wr_t dm_wr = '0;
  pm_wr_t pm_wr = '0;
  om_wr_t om_wr = '0;
  logic mm_we = 0;
  logic [$clog2(NPE)-1:0] mm_pe_sel = 0;
  logic [7:0] mm_waddr = 0;
  word_t mm_wdata = 0;
  logic [5:0] num_points [NPE];
  logic start = 0, ready, done, collision;
  logic [NPE-1:0] pe_collision;
  int checks = 0, failures = 0;

  vec_t res [NPE][M];
  logic img [1 << 18];
  real  th [3];

  // mechanism counters
  int n_free_runs = 0, n_coll_runs = 0, n_early_stop = 0, n_mixed = 0;
  int n_outside = 0, n_xfer_overlap = 0, n_om_overlap = 0, n_acc_src = 0;
  int n_first = 0, n_last = 0;

  always #5 clk = ~clk;

  cd_processor dut (.*);   // default size: 100 PEs

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic dm_write(input int a, input word_t d);
    @(negedge clk); dm_wr = '{we: 1'b1, addr: dm_addr_t'(a), data: d};
    @(negedge clk); dm_wr.we = 0;
  endtask

  task automatic load_image();
    for (int w = 0; w < (1 << 14); w++) begin
      @(negedge clk);
      om_wr.we = 1; om_wr.addr = 14'(w);
      for (int b = 0; b < 16; b++) om_wr.data[b] = img[16 * w + b];
    end
    @(negedge clk); om_wr.we = 0;
  endtask

  task automatic clear_image();
    for (int a = 0; a < (1 << 18); a++) img[a] = 1'b0;
  endtask

  task automatic add_box(input int x0, y0, z0, sx, sy, sz);
    for (int x = x0; x < x0 + sx && x < 64; x++)
      for (int y = y0; y < y0 + sy && y < 64; y++)
        for (int z = z0; z < z0 + sz && z < 64; z++)
          img[4096 * x + 64 * y + z] = 1'b1;
  endtask

  task automatic make_workload();
    th[0] = 0.2 + ($urandom_range(1000) / 1000.0) * 0.6;
    th[1] = -0.5 + ($urandom_range(1000) / 1000.0) * 0.6;
    th[2] = -0.3 + ($urandom_range(1000) / 1000.0) * 0.6;
    dm_write(5, to_angle(th[0]));
    dm_write(6, to_angle(th[1]));
    dm_write(7, to_angle(th[2]));
    for (int k = 0; k < NPE; k++)
      for (int j = 0; j < M; j++) begin
        vec_t q, r;
        do begin
          q.x = $urandom_range(50 * 128) / 128.0;
          q.y = $urandom_range(40 * 128) / 128.0;
          q.z = ($urandom_range(50 * 128) / 128.0) - 10.0;
          r = transform(q, th[0], th[1], th[2]);
        end while (edge_dist(r.x) < 0.2 || edge_dist(r.y) < 0.2 || edge_dist(r.z) < 0.2);
        res[k][j] = r;
        if (!in_workspace(r)) n_outside++;
        @(negedge clk); mm_we = 1; mm_pe_sel = $bits(mm_pe_sel)'(k); mm_waddr = 8'(3 * j);     mm_wdata = to_coord(q.x);
        @(negedge clk); mm_we = 1; mm_waddr = 8'(3 * j + 1); mm_wdata = to_coord(q.y);
        @(negedge clk); mm_we = 1; mm_waddr = 8'(3 * j + 2); mm_wdata = to_coord(q.z);
      end
    @(negedge clk); mm_we = 0;
  endtask

  // run and compare with the expected per-PE outcome
  task automatic run_and_check(input string name);
    int cyc, w, exp_cyc, n_hit;
    logic [NPE-1:0] exp_pe;
    exp_pe = '0; exp_cyc = 0; n_hit = 0;
    for (int k = 0; k < NPE; k++) begin
      int h;
      h = -1;
      for (int j = 0; j < M && h < 0; j++)
        if (in_workspace(res[k][j]) && img[om_addr(res[k][j])]) h = j;
      exp_pe[k] = h >= 0;
      if (h >= 0) n_hit++;
      if (h >= 0 && h < M - 1) n_early_stop++;
      begin
        int t;
        t = ((h >= 0) ? h + 1 : M) * SLOT_CYCLES * N_FUNCS + 4 * 2;
        if (t > exp_cyc) exp_cyc = t;
      end
    end
    if (n_hit > 0 && n_hit < NPE) n_mixed++;
    if (exp_pe == '0) n_free_runs++; else n_coll_runs++;
    w = 0;
    while (!ready && w < 50) begin @(negedge clk); w++; end
    chk(ready, {name, ": ready"});
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 100000) begin @(negedge clk); cyc++; end
    chk(pe_collision == exp_pe, $sformatf("%s: PE results %b expected %b", name, pe_collision, exp_pe));
    chk(collision == (exp_pe != '0), {name, ": OR of PE results"});
    chk(cyc == exp_cyc, $sformatf("%s: %0d cycles, expected %0d", name, cyc, exp_cyc));
    $display("%s: collision %0b PEs %b, %0d cycles", name, collision, pe_collision, cyc);
  endtask

  always @(posedge clk) begin
    if (dut.g_pe[0].u_pe.mm_rd_en && dut.g_pe[0].u_pe.cu_running) n_xfer_overlap++;
    if (dut.g_pe[0].u_pe.chk_req && dut.g_pe[0].u_pe.cu_running) n_om_overlap++;
    if (dut.g_pe[0].u_pe.eu_load && !dut.g_pe[0].u_pe.cur.xs) n_acc_src++;
    if (dut.g_pe[0].u_pe.slot_first) n_first++;
    if (dut.g_pe[0].u_pe.slot_last) n_last++;
  end

  initial begin
    for (int k = 0; k < NPE; k++) num_points[k] = 6'(M);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < N_FUNCS; k++)
      for (int w = 0; w < INSTR_WORDS; w++) begin
        @(negedge clk);
        pm_wr = '{we: 1'b1, addr: PM_AW'(8 * k + w), data: instr_word(fig4_instr(k), w)};
      end
    @(negedge clk); pm_wr.we = 0;
    dm_write(3, 16'sd0);
    dm_write(4, INV_K);

    for (int r = 0; r < RUNS; r++) begin
      make_workload();
      // empty workspace
      clear_image();
      load_image();
      run_and_check($sformatf("run %0d empty", r));
      // one occupied pixel under a point of one PE
      begin
        int k, j;
        k = (r + 1) % NPE;
        j = -1;
        for (int i = M / 2; i < M && j < 0; i++) if (in_workspace(res[k][i])) j = i;
        if (j >= 0) begin
          img[om_addr(res[k][j])] = 1'b1;
          load_image();
          run_and_check($sformatf("run %0d single pixel", r));
        end
      end
      // random boxes
      clear_image();
      for (int b = 0; b < 12; b++)
        add_box($urandom_range(50), $urandom_range(50), $urandom_range(50),
                6 + $urandom_range(14), 6 + $urandom_range(14), 6 + $urandom_range(14));
      load_image();
      run_and_check($sformatf("run %0d boxes", r));
      // whole workspace occupied: every PE stops at its first point inside
      if (r == 0) begin
        for (int a = 0; a < (1 << 18); a++) img[a] = 1'b1;
        load_image();
        run_and_check($sformatf("run %0d full", r));
      end
    end

    chk(n_free_runs > 0, "collision-free run happened");
    chk(n_coll_runs > 0, "collision run happened");
    chk(n_early_stop > 0, "a PE stopped early at a hit");
    chk(n_mixed > 0, "PEs disagreed and the OR decided");
    chk(n_outside > 0, "points outside the workspace");
    chk(n_xfer_overlap > 0, "transfer overlapped with transformation");
    chk(n_om_overlap > 0, "obstacle access overlapped with transformation");
    chk(n_acc_src > 0, "operand kept in the accumulator");
    chk(n_first > 0 && n_last > 0, "FIRST and LAST functions");
    $display("mechanisms: free %0d, collision %0d, early stop %0d, mixed %0d, outside %0d, xfer overlap %0d, om overlap %0d, acc source %0d, first %0d, last %0d",
             n_free_runs, n_coll_runs, n_early_stop, n_mixed, n_outside, n_xfer_overlap,
             n_om_overlap, n_acc_src, n_first, n_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
