// tb_processing_element: one PE running the nine-function transformation of
// a three-joint manipulator on up to 50 points.
//
// Points are random, on the 1/128-pixel grid, and kept only when their
// transformed coordinates (computed in floating point) lie at least 0.2 pixel
// from a pixel boundary, so the expected pixel is unambiguous.  Checks:
//  - every point's X, Y, Z in the output registers against the reference
//    (0.15 pixel), and that some points fall outside the workspace;
//  - collision-free run: no collision, done after exactly 50*16*9 + 4*2 =
//    7208 cycles (T = M*T_ct + 4 t_a with t_a = 2);
//  - obstacles at the pixels of two points, and at single random points:
//    collision, the earliest point reported, done right after that point's
//    obstacle access;
//  - transfer and obstacle access overlapped with the transformation;
//  - a second angle set, one point, and zero points.
module tb_processing_element;
  import cd_pkg::*;
  import tb_cd_model::*;

  localparam int M_MAX = 50;

  logic clk = 0, rst_n = 0;
  dm_wr_t dm_wr = '0;
  pm_wr_t pm_wr = '0;
  om_wr_t om_wr = '0;
  logic mm_we = 0;
  logic [7:0] mm_waddr = 0;
  word_t mm_wdata = 0;
  logic [5:0] num_points = 0;
  logic start = 0, ready, busy, done, collision;
  logic [5:0] hit_point;
  int checks = 0, failures = 0;

  vec_t pts [M_MAX];
  vec_t res [M_MAX];
  real  th [3];
  int   n_out_of_range = 0, n_xfer_overlap = 0, n_om_overlap = 0, n_results = 0;

  always #5 clk = ~clk;

  processing_element dut (.*);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic dm_write(input int a, input word_t d);
    @(negedge clk);
    dm_wr = '{we: 1'b1, addr: dm_addr_t'(a), data: d};
    @(negedge clk);
    dm_wr.we = 0;
  endtask

  task automatic om_set(input int addr, input logic v);
    // read-modify-write of the TB's view: words are only ever touched here
    @(negedge clk);
    om_wr.we = 1; om_wr.addr = 14'(addr / 16);
    om_wr.data = '0;
    om_wr.data[addr % 16] = v;
    @(negedge clk);
    om_wr.we = 0;
  endtask

  // pick angles and points with unambiguous pixels
  task automatic make_workload(input int m);
    th[0] = 0.2 + ($urandom_range(1000) / 1000.0) * 0.6;   // theta1
    th[1] = -0.5 + ($urandom_range(1000) / 1000.0) * 0.6;  // theta2
    th[2] = -0.3 + ($urandom_range(1000) / 1000.0) * 0.6;  // theta3
    for (int j = 0; j < m; j++) begin
      vec_t q, r;
      do begin
        q.x = $urandom_range(50 * 128) / 128.0;
        q.y = $urandom_range(40 * 128) / 128.0;
        q.z = ($urandom_range(50 * 128) / 128.0) - 10.0;
        r = transform(q, th[0], th[1], th[2]);
      end while (edge_dist(r.x) < 0.2 || edge_dist(r.y) < 0.2 || edge_dist(r.z) < 0.2);
      pts[j] = q;
      res[j] = r;
    end
    dm_write(5, to_angle(th[0]));
    dm_write(6, to_angle(th[1]));
    dm_write(7, to_angle(th[2]));
    for (int j = 0; j < m; j++) begin
      @(negedge clk); mm_we = 1; mm_waddr = 8'(3 * j);     mm_wdata = to_coord(pts[j].x);
      @(negedge clk); mm_we = 1; mm_waddr = 8'(3 * j + 1); mm_wdata = to_coord(pts[j].y);
      @(negedge clk); mm_we = 1; mm_waddr = 8'(3 * j + 2); mm_wdata = to_coord(pts[j].z);
    end
    @(negedge clk); mm_we = 0;
  endtask

  // run one check; returns cycles from start to done
  task automatic run(input int m, output int cycles);
    int w;
    w = 0;
    while (!ready && w < 50) begin @(negedge clk); w++; end
    chk(ready, "PE ready before start");
    num_points = 6'(m);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 20000) begin @(negedge clk); cycles++; end
  endtask

  // compare each point's result when its obstacle access starts
  int pidx = 0;
  always @(posedge clk) begin
    if (dut.chk_req) begin
      vec_t r;
      r = res[pidx];
      n_results++;
      chk((int'(dut.out_x) - $rtoi(r.x * 128.0)) inside {[-19:19]} &&
          (int'(dut.out_y) - $rtoi(r.y * 128.0)) inside {[-19:19]} &&
          (int'(dut.out_z) - $rtoi(r.z * 128.0)) inside {[-19:19]}, "transformed point");
      if (dut.out_x != 0 || dut.out_y != 0 || dut.out_z != 0)
        chk(dut.in_range == in_workspace(r), "workspace range");
      if (!in_workspace(r)) n_out_of_range++;
      pidx++;
    end
    if (dut.mm_rd_en && dut.cu_running) n_xfer_overlap++;
    if (dut.chk_req && dut.cu_running) n_om_overlap++;
  end

  initial begin
    int cyc, h1, h2;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // program and constants
    for (int k = 0; k < N_FUNCS; k++)
      for (int w = 0; w < INSTR_WORDS; w++) begin
        @(negedge clk);
        pm_wr = '{we: 1'b1, addr: PM_AW'(8 * k + w), data: instr_word(fig4_instr(k), w)};
      end
    @(negedge clk); pm_wr.we = 0;
    dm_write(3, 16'sd0);
    dm_write(4, INV_K);
    // empty obstacle image
    for (int w = 0; w < (1 << 14); w++) begin
      @(negedge clk); om_wr = '{we: 1'b1, addr: 14'(w), data: 16'h0000};
    end
    @(negedge clk); om_wr.we = 0;

    // 1: collision free, 50 points
    make_workload(M_MAX);
    pidx = 0;
    run(M_MAX, cyc);
    chk(!collision, "no collision in an empty workspace");
    chk(cyc == M_MAX * SLOT_CYCLES * N_FUNCS + 4 * 2, $sformatf("collision-free time %0d cycles", cyc));
    chk(pidx == M_MAX, "every point checked");

    // 2: obstacles at two in-range points, h1 < h2
    h1 = -1; h2 = -1;
    for (int j = 10; j < M_MAX; j++)
      if (in_workspace(res[j])) begin
        if (h1 < 0) h1 = j; else if (h2 < 0 && j > h1 + 5) h2 = j;
      end
    chk(h1 >= 0 && h2 >= 0, "workload has in-range points to hit");
    if (h1 >= 0 && h2 >= 0) begin
      om_set(om_addr(res[h2]), 1'b1);
      om_set(om_addr(res[h1]), 1'b1);
      pidx = 0;
      run(M_MAX, cyc);
      chk(collision, "collision detected");
      chk(hit_point == 6'(h1), $sformatf("first colliding point %0d reported as %0d", h1, hit_point));
      chk(cyc == (h1 + 1) * SLOT_CYCLES * N_FUNCS + 4 * 2, $sformatf("stop after hit: %0d cycles", cyc));
      om_set(om_addr(res[h1]), 1'b0);
      om_set(om_addr(res[h2]), 1'b0);
    end

    // 2b: one obstacle pixel under a random in-range point, several times
    for (int n = 0; n < 8; n++) begin
      int h;
      do h = $urandom_range(M_MAX - 1); while (!in_workspace(res[h]));
      // the first point sharing that pixel is the one reported
      for (int j = 0; j < h; j++)
        if (in_workspace(res[j]) && om_addr(res[j]) == om_addr(res[h])) h = j;
      om_set(om_addr(res[h]), 1'b1);
      pidx = 0;
      run(M_MAX, cyc);
      chk(collision && hit_point == 6'(h), $sformatf("hit at point %0d reported as %0d", h, hit_point));
      chk(cyc == (h + 1) * SLOT_CYCLES * N_FUNCS + 4 * 2, $sformatf("hit at %0d: %0d cycles", h, cyc));
      om_set(om_addr(res[h]), 1'b0);
    end

    // 3: new angles, 20 points, free
    make_workload(20);
    pidx = 0;
    run(20, cyc);
    chk(!collision, "second angle set free");
    chk(cyc == 20 * SLOT_CYCLES * N_FUNCS + 8, "second run time");

    // 4: one point that collides
    make_workload(1);
    while (!in_workspace(res[0])) make_workload(1);
    om_set(om_addr(res[0]), 1'b1);
    pidx = 0;
    run(1, cyc);
    chk(collision && hit_point == 0, "single point collision");
    chk(cyc == SLOT_CYCLES * N_FUNCS + 8, "single point time");
    om_set(om_addr(res[0]), 1'b0);

    // 5: zero points
    run(0, cyc);
    chk(done && !collision && cyc <= 2, "zero points");

    chk(n_out_of_range > 0, "some points outside the workspace");
    chk(n_xfer_overlap > 0, "manipulator transfer overlapped with transformation");
    chk(n_om_overlap > 0, "obstacle access overlapped with transformation");
    $display("points %0d, outside workspace %0d", n_results, n_out_of_range);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
