// tb_execution_unit: self-checking test of the CORDIC execution unit.
//
// Runs random rotation, vectoring, multiplication and division functions
// through the EU (one load cycle, then 15 iterations) and compares the results
// with the same functions computed in floating point: rotation
// K(x cos z - y sin z), K(x sin z + y cos z); vectoring K*sqrt(x^2+y^2),
// z + atan(y/x); multiplication y + x*z; division z + y/x.  Also checks that
// a path with its source bit at 0 keeps its accumulator, that the results
// appear in the 16th cycle of a function and that the accumulators hold them
// afterwards.
module tb_execution_unit;
  import cd_pkg::*;

  localparam real K     = 1.646760258;
  localparam real CS    = 128.0;     // coordinate scale, 2^7
  localparam real AS    = 16384.0;   // angle scale, 2^14
  localparam int  TOL_C = 12;        // LSBs of a coordinate
  localparam int  TOL_A = 12;        // LSBs of an angle
  localparam int  TOL_V = 32;        // LSBs of a vectoring/division z result

  logic clk = 0, rst_n = 0;
  logic load = 0, iter_en = 0;
  logic [3:0] iter = 0;
  cordic_op_e op = OP_ROT;
  logic xs = 1, ys = 1, zs = 1;
  word_t ox = 0, oy = 0, oz = 0;
  word_t acc_x, acc_y, acc_z, nxt_x, nxt_y, nxt_z;
  int checks = 0, failures = 0;
  int cycles_in_fn;

  always #5 clk = ~clk;

  execution_unit dut (.*, .opnd_x(ox), .opnd_y(oy), .opnd_z(oz));

  task automatic check(input string what, input int got, input int exp, input int tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // one CORDIC function; returns results sampled in its last cycle
  task automatic run_fn(input cordic_op_e o, input logic sx, sy, sz,
                        input word_t x0, y0, z0, output word_t rx, ry, rz);
    @(negedge clk);
    op = o; xs = sx; ys = sy; zs = sz; ox = x0; oy = y0; oz = z0;
    load = 1; iter_en = 0; iter = 0;
    cycles_in_fn = 1;
    for (int i = 0; i < ITERS; i++) begin
      @(negedge clk);
      load = 0; iter_en = 1; iter = 4'(i);
      cycles_in_fn++;
    end
    #1 rx = nxt_x; ry = nxt_y; rz = nxt_z;
    @(negedge clk);
    iter_en = 0;
    check("cycles per function", cycles_in_fn, SLOT_CYCLES, 0);
    check("acc x holds result", acc_x, rx, 0);
    check("acc y holds result", acc_y, ry, 0);
    check("acc z holds result", acc_z, rz, 0);
  endtask

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom_range(hi - lo));
  endfunction

  initial begin
    word_t rx, ry, rz;
    real x, y, z;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int n = 0; n < 200; n++) begin
      // rotation
      x = rnd(-60 * 128, 60 * 128) / CS; y = rnd(-60 * 128, 60 * 128) / CS;
      z = rnd(-25000, 25000) / AS;
      run_fn(OP_ROT, 1, 1, 1, word_t'($rtoi(x * CS)), word_t'($rtoi(y * CS)), word_t'($rtoi(z * AS)), rx, ry, rz);
      x = $rtoi(x * CS) / CS; y = $rtoi(y * CS) / CS; z = $rtoi(z * AS) / AS;
      check("ROT x", rx, $rtoi(K * (x * $cos(z) - y * $sin(z)) * CS), TOL_C);
      check("ROT y", ry, $rtoi(K * (x * $sin(z) + y * $cos(z)) * CS), TOL_C);
      check("ROT z", rz, 0, TOL_A);

      // vectoring
      x = rnd(10 * 128, 70 * 128) / CS; y = rnd(-70 * 128, 70 * 128) / CS;
      z = rnd(-2000, 2000) / AS;
      run_fn(OP_VEC, 1, 1, 1, word_t'($rtoi(x * CS)), word_t'($rtoi(y * CS)), word_t'($rtoi(z * AS)), rx, ry, rz);
      x = $rtoi(x * CS) / CS; y = $rtoi(y * CS) / CS; z = $rtoi(z * AS) / AS;
      check("VEC x", rx, $rtoi(K * $sqrt(x * x + y * y) * CS), TOL_C);
      check("VEC y", ry, 0, TOL_C);
      check("VEC z", rz, $rtoi((z + $atan(y / x)) * AS), TOL_V);

      // multiplication
      x = rnd(-100 * 128, 100 * 128) / CS; y = rnd(-50 * 128, 50 * 128) / CS;
      z = rnd(-16000, 16000) / AS;
      run_fn(OP_MUL, 1, 1, 1, word_t'($rtoi(x * CS)), word_t'($rtoi(y * CS)), word_t'($rtoi(z * AS)), rx, ry, rz);
      x = $rtoi(x * CS) / CS; y = $rtoi(y * CS) / CS; z = $rtoi(z * AS) / AS;
      check("MUL x", rx, $rtoi(x * CS), 0);
      check("MUL y", ry, $rtoi((y + x * z) * CS), TOL_C);
      check("MUL z", rz, 0, TOL_A);

      // division
      x = rnd(20 * 128, 100 * 128) / CS;
      y = rnd(-$rtoi(x * 0.9 * 128), $rtoi(x * 0.9 * 128)) / CS;
      z = rnd(-4000, 4000) / AS;
      run_fn(OP_DIV, 1, 1, 1, word_t'($rtoi(x * CS)), word_t'($rtoi(y * CS)), word_t'($rtoi(z * AS)), rx, ry, rz);
      x = $rtoi(x * CS) / CS; y = $rtoi(y * CS) / CS; z = $rtoi(z * AS) / AS;
      check("DIV x", rx, $rtoi(x * CS), 0);
      check("DIV y", ry, 0, TOL_C);
      check("DIV z", rz, $rtoi((z + y / x) * AS), TOL_V);
    end

    // accumulator chaining: rotate, then multiply the rotated x by 1/K
    // taking X from the accumulator
    x = 30.0; y = 20.0; z = 0.5;
    run_fn(OP_ROT, 1, 1, 1, word_t'($rtoi(x * CS)), word_t'($rtoi(y * CS)), word_t'($rtoi(z * AS)), rx, ry, rz);
    run_fn(OP_MUL, 0, 1, 1, 16'sd12345, 16'sd0, INV_K, rx, ry, rz);
    check("chained x (accumulator source)", ry, $rtoi((x * $cos(z) - y * $sin(z)) * CS), TOL_C);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
