// cd_processor: highly parallel collision detection processor (top level).
//
// N_PE identical processing elements check a robot manipulator, modelled as
// a set of discrete points on its link surfaces, against an obstacle image of
// 64 x 64 x 64 cubic pixels.  Each PE holds its own share of the manipulator
// points and its own full copy of the obstacle image, so the PEs never
// communicate: the joint angles are broadcast to all of them, each transforms
// its points into workspace coordinates with CORDIC rotations and looks the
// resulting pixels up, and the per-PE results are combined by one OR gate.
// Detection time therefore falls linearly with the number of PEs.
//
// Interface: the data memory (joint angles, constants), program memory and
// obstacle memory write buses go to every PE at once; the manipulator memory
// write is steered to one PE by mm_pe_sel.  num_points[k] is the number of
// points PE k holds.  After loading, wait for `ready` (every PE has fetched
// its first instruction), pulse `start`, and wait for `done` (every PE has
// finished: it has checked all its points or found a collision).  `collision`
// is the OR of the PE results; pe_collision shows which PEs found one.
// Timing: done rises M*16N + 4*ACCESS_CYCLES cycles after start for M points
// per PE and an N-function program when no PE collides.
//
// The array, the broadcast and the OR gate follow the document (100 PEs in its
// evaluation); the host interface and the done/ready combination are this
// design's.
module cd_processor
  import cd_pkg::*;
#(
  parameter int N_PE          = 100,
  parameter int MM_WORDS      = 150,
  parameter int ACCESS_CYCLES = 2,
  localparam int MM_AW        = $clog2(MM_WORDS),
  localparam int PT_W         = $clog2(MM_WORDS / 3 + 1),
  localparam int SEL_W        = (N_PE > 1) ? $clog2(N_PE) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  dm_wr_t           dm_wr,
  input  pm_wr_t           pm_wr,
  input  om_wr_t           om_wr,
  input  logic             mm_we,
  input  logic [SEL_W-1:0] mm_pe_sel,
  input  logic [MM_AW-1:0] mm_waddr,
  input  word_t            mm_wdata,
  input  logic [PT_W-1:0]  num_points [N_PE],
  input  logic             start,
  output logic             ready,
  output logic             done,
  output logic             collision,
  output logic [N_PE-1:0]  pe_collision
);
  logic [N_PE-1:0] pe_ready, pe_done;

  for (genvar k = 0; k < N_PE; k++) begin : g_pe
    logic [PT_W-1:0] hit_point;
    logic            busy;

    processing_element #(.MM_WORDS(MM_WORDS), .ACCESS_CYCLES(ACCESS_CYCLES)) u_pe (
      .clk, .rst_n, .dm_wr, .pm_wr, .om_wr,
      .mm_we(mm_we && mm_pe_sel == SEL_W'(k)), .mm_waddr, .mm_wdata,
      .num_points(num_points[k]), .start,
      .ready(pe_ready[k]), .busy(busy), .done(pe_done[k]),
      .collision(pe_collision[k]), .hit_point(hit_point)
    );
  end

  assign collision = |pe_collision;   // the OR gate combining the PE results
  assign ready     = &pe_ready;
  assign done      = &pe_done;
endmodule
