// processing_element: one PE of the collision detection processor.
//
// A PE checks its own share of M manipulator surface points against its own
// copy of the obstacle image, with no communication with other PEs.  For each
// point it reads x, y, z from the manipulator memory into the input
// registers, runs the coordinate transformation program (N CORDIC functions of
// 16 cycles each, using the broadcast joint angles in the data memory), puts
// the transformed X, Y, Z into the output registers and reads the obstacle bit
// at the pixel they fall in.  The three activities overlap as a pipeline:
// while point p is transformed, point p+1 is transferred and point p-1's
// obstacle bit is read.  With memory access time t_a = ACCESS_CYCLES cycles
// the whole check takes
//     T = M * 16N + 4 * t_a  cycles,
// counted from the cycle in which `start` is high (3 t_a for the first
// transfer, t_a for the last obstacle access).  The PE stops at the first
// point that hits an obstacle (collision = 1, hit_point = its index), as the
// document's algorithm does; `done` then stays high until the next start.
//
// Operand address map (5-bit instruction fields): 0..2 read the input
// registers x, y, z; all other addresses read the data memory; results go to
// the data memory and, at 29..31, also to the output registers X, Y, Z.
// Host ports: the data memory, program memory and obstacle memory write buses
// are meant to be broadcast to all PEs; the manipulator memory is loaded per
// PE.  Load them only while the PE is not running.
//
// The document gives the blocks, the pipelined schedule and the timing
// formula; the address map, the host ports, the handshake (start, ready,
// done) and the treatment of points outside the 64^3 workspace (free) are this
// design's choices.
module processing_element
  import cd_pkg::*;
#(
  parameter int MM_WORDS      = 150,   // 50 points of 3 words
  parameter int ACCESS_CYCLES = 2,     // t_a in clock cycles
  localparam int MM_AW        = $clog2(MM_WORDS),
  localparam int PT_W         = $clog2(MM_WORDS / 3 + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host
  input  dm_wr_t           dm_wr,
  input  pm_wr_t           pm_wr,
  input  om_wr_t           om_wr,
  input  logic             mm_we,
  input  logic [MM_AW-1:0] mm_waddr,
  input  word_t            mm_wdata,
  input  logic [PT_W-1:0]  num_points,   // M, points assigned to this PE
  input  logic             start,
  output logic             ready,
  output logic             busy,
  output logic             done,
  output logic             collision,
  output logic [PT_W-1:0]  hit_point
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e state;

  // ---------------------------------------------------------------- control unit
  instr_t     cur;
  logic       cu_ready, cu_running, eu_load, eu_iter_en, res_we, slot_first, slot_last;
  logic [3:0] cu_cycle, eu_iter;
  logic [PM_AW-1:0] pac;
  logic       cu_go, cu_stop;

  control_unit u_cu (
    .clk, .rst_n, .pm_wr, .go(cu_go), .stop(cu_stop), .ready(cu_ready),
    .running(cu_running), .cycle(cu_cycle), .pac(pac), .cur(cur),
    .eu_load, .eu_iter_en, .eu_iter, .res_we, .slot_first, .slot_last
  );

  // ---------------------------------------------------------------- transfer from MM
  logic             start_ok;
  logic             xf_go, xf_act;
  logic [1:0]       xf_word;      // words requested so far in this transfer
  logic [$clog2(ACCESS_CYCLES+1)-1:0] xf_wait;
  logic [MM_AW-1:0] xf_base;      // word address of the point being transferred
  logic [1:0]       ld_cnt;       // words received
  logic             mm_rd_en, mm_rd_valid;
  logic [MM_AW-1:0] mm_raddr;
  word_t            mm_rdata;
  logic [PT_W-1:0]  pt_xfer;      // points transferred (requested) so far
  logic [PT_W-1:0]  pt_cur;       // point being transformed
  logic             advance;
  word_t            in_x, in_y, in_z;

  assign start_ok = start && cu_ready && (state != S_RUN) && (num_points != '0);
  // next transfer: at the start, and at the first function of every point
  // that has a successor
  assign xf_go    = start_ok || (state == S_RUN && slot_first && pt_xfer < num_points);
  assign mm_rd_en = xf_go || (xf_act && xf_wait == '0);
  assign mm_raddr = xf_go ? (start_ok ? '0 : xf_base) : MM_AW'(xf_base + xf_word);

  manipulator_memory #(.WORDS(MM_WORDS), .ACCESS_CYCLES(ACCESS_CYCLES)) u_mm (
    .clk, .rst_n, .wr_en(mm_we), .wr_addr(mm_waddr), .wr_data(mm_wdata),
    .rd_en(mm_rd_en), .rd_addr(mm_raddr), .rd_valid(mm_rd_valid), .rd_data(mm_rdata)
  );

  input_registers u_ir (
    .clk, .rst_n, .ld_en(mm_rd_valid), .ld_idx(ld_cnt), .ld_data(mm_rdata),
    .advance(advance), .x(in_x), .y(in_y), .z(in_z)
  );

  // first point: go when its last word arrives; later points: at the end of
  // the previous point's last function
  logic prolog;
  assign cu_go   = prolog && mm_rd_valid && ld_cnt == 2'd2;
  assign advance = cu_go || (slot_last && pt_cur + 1'b1 < num_points);

  // ---------------------------------------------------------------- EU and memories
  word_t dm_x, dm_y, dm_z, op_x, op_y, op_z;
  word_t acc_x, acc_y, acc_z, nxt_x, nxt_y, nxt_z;

  data_memory u_dm (
    .clk, .host_wr(dm_wr), .ra_x(cur.ax), .ra_y(cur.ay), .ra_z(cur.az),
    .rd_x(dm_x), .rd_y(dm_y), .rd_z(dm_z), .we(res_we),
    .wa_x(cur.dx), .wa_y(cur.dy), .wa_z(cur.dz), .wd_x(nxt_x), .wd_y(nxt_y), .wd_z(nxt_z)
  );

  function automatic word_t operand(input dm_addr_t a, input word_t mem_val,
                                    input word_t ix, input word_t iy, input word_t iz);
    unique case (a)
      ADDR_IN_X: return ix;
      ADDR_IN_Y: return iy;
      ADDR_IN_Z: return iz;
      default:   return mem_val;
    endcase
  endfunction

  assign op_x = operand(cur.ax, dm_x, in_x, in_y, in_z);
  assign op_y = operand(cur.ay, dm_y, in_x, in_y, in_z);
  assign op_z = operand(cur.az, dm_z, in_x, in_y, in_z);

  execution_unit u_eu (
    .clk, .rst_n, .load(eu_load), .iter_en(eu_iter_en), .iter(eu_iter), .op(cur.op),
    .xs(cur.xs), .ys(cur.ys), .zs(cur.zs), .opnd_x(op_x), .opnd_y(op_y), .opnd_z(op_z),
    .acc_x, .acc_y, .acc_z, .nxt_x, .nxt_y, .nxt_z
  );

  word_t            out_x, out_y, out_z;
  logic [OM_AW-1:0] pix_addr;
  logic             in_range;

  output_registers u_or (
    .clk, .rst_n, .we(res_we), .wa_x(cur.dx), .wa_y(cur.dy), .wa_z(cur.dz),
    .wd_x(nxt_x), .wd_y(nxt_y), .wd_z(nxt_z), .x(out_x), .y(out_y), .z(out_z),
    .pix_addr, .in_range
  );

  // ---------------------------------------------------------------- obstacle access
  logic chk_req, om_rd_valid, om_rd_data, range_q, hit;
  logic [PT_W-1:0] pt_chk;        // point whose obstacle bit is being read

  obstacle_memory #(.ACCESS_CYCLES(ACCESS_CYCLES)) u_om (
    .clk, .rst_n, .wr_en(om_wr.we), .wr_addr(om_wr.addr), .wr_data(om_wr.data),
    .rd_en(chk_req), .rd_addr(pix_addr), .rd_valid(om_rd_valid), .rd_data(om_rd_data)
  );

  assign hit     = om_rd_valid && om_rd_data && range_q;
  assign cu_stop = (state == S_RUN) && om_rd_valid && (hit || pt_chk + 1'b1 == num_points);

  // ---------------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      prolog    <= 1'b0;
      xf_act    <= 1'b0;
      xf_word   <= '0;
      xf_wait   <= '0;
      xf_base   <= '0;
      ld_cnt    <= '0;
      pt_xfer   <= '0;
      pt_cur    <= '0;
      pt_chk    <= '0;
      chk_req   <= 1'b0;
      range_q   <= 1'b0;
      collision <= 1'b0;
      hit_point <= '0;
    end else begin
      // transfer sequencer: one word every ACCESS_CYCLES cycles, three words
      if (xf_go) begin
        xf_act  <= 1'b1;
        xf_word <= 2'd1;
        xf_wait <= $bits(xf_wait)'(ACCESS_CYCLES - 1);
        if (start_ok) xf_base <= '0;
        pt_xfer <= start_ok ? PT_W'(1) : pt_xfer + 1'b1;
      end else if (xf_act) begin
        if (xf_wait == '0) begin
          xf_wait <= $bits(xf_wait)'(ACCESS_CYCLES - 1);
          if (xf_word == 2'd2) begin
            xf_act  <= 1'b0;
            xf_base <= MM_AW'(xf_base + 2'd3);
          end
          xf_word <= xf_word + 1'b1;
        end else begin
          xf_wait <= xf_wait - 1'b1;
        end
      end
      if (mm_rd_valid) ld_cnt <= (ld_cnt == 2'd2) ? 2'd0 : ld_cnt + 1'b1;

      // obstacle access of a point, in the cycle after its last function
      chk_req <= (state == S_RUN) && slot_last;
      if (chk_req) range_q <= in_range;
      if (slot_last) pt_cur <= pt_cur + 1'b1;

      unique case (state)
        S_IDLE, S_DONE: begin
          if (start_ok) begin
            state     <= S_RUN;
            prolog    <= 1'b1;
            ld_cnt    <= '0;
            pt_cur    <= '0;
            pt_chk    <= '0;
            collision <= 1'b0;
            hit_point <= '0;
          end else if (start && cu_ready && num_points == '0) begin
            state     <= S_DONE;            // nothing to check
            collision <= 1'b0;
          end
        end
        default: begin  // S_RUN
          if (cu_go) prolog <= 1'b0;
          if (om_rd_valid) begin
            pt_chk <= pt_chk + 1'b1;
            if (hit) begin
              collision <= 1'b1;
              hit_point <= pt_chk;
            end
            if (cu_stop) begin
              state   <= S_DONE;
              xf_act  <= 1'b0;
              chk_req <= 1'b0;
            end
          end
        end
      endcase
    end
  end

  assign ready = cu_ready && state != S_RUN;
  assign busy  = state == S_RUN;
  assign done  = state == S_DONE;

  assert property (@(posedge clk) disable iff (!rst_n)
                   (dm_wr.we || pm_wr.we || om_wr.we || mm_we) |-> state != S_RUN)
    else $error("processing_element: host write while running");
  assert property (@(posedge clk) disable iff (!rst_n) start_ok |-> num_points <= PT_W'(MM_WORDS / 3))
    else $error("processing_element: more points than the manipulator memory holds");
endmodule
