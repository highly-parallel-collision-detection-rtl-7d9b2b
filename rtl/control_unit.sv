// control_unit: instruction sequencing of a processing element (CU).
//
// Parts, as in the document: a 4-bit program counter that counts the 16 clock
// cycles of one CORDIC function (no branches are needed, so 4 bits suffice),
// a hardwired decoder that turns that count into control signals, an 8-bit
// program memory address counter (PAC), the program memory, and the op-code
// registers OPCRI (OP, XS, ZS) and OPCRII (YS, FML).
//
// Timing (this design's choice): the program memory is 5 bits wide, so the
// eight words of an instruction are read one per cycle.  They are read ahead,
// in cycles 0..7 of the previous instruction, into a fetch stage (operand and
// result address registers, OPCRI and OPCRII); at the edge that ends cycle 15
// the fetch stage becomes the current instruction.  The PAC advances by one
// per fetched word and, after word 7 of an instruction whose FML field says
// LAST, returns to 0, so the program of one point repeats for the next.
// While idle the CU fetches instruction 0 and raises `ready`; `go` then starts
// the first function at the next edge.  `stop` (or a program write) returns
// it to idle.
//
// Decoded per cycle while running:
//   cycle 0      eu_load, and slot_first if FML is FIRST/ONLY
//   cycles 1..15 eu_iter_en with eu_iter = cycle - 1
//   cycle 15     res_we (results written), slot_last if FML is LAST/ONLY
module control_unit
  import cd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  pm_wr_t     pm_wr,       // program load (only while idle)
  input  logic       go,          // start executing instruction 0
  input  logic       stop,        // return to idle
  output logic       ready,       // instruction 0 fetched, go accepted
  output logic       running,
  output logic [3:0] cycle,       // 4-bit program counter
  output logic [PM_AW-1:0] pac,
  output instr_t     cur,         // current instruction
  output logic       eu_load,
  output logic       eu_iter_en,
  output logic [3:0] eu_iter,
  output logic       res_we,
  output logic       slot_first,
  output logic       slot_last
);
  logic [PM_W-1:0] pm_word;
  instr_t          nxt;           // fetch stage
  logic            nxt_valid;
  logic            fetch;
  logic [2:0]      widx;

  program_memory u_pm (.clk(clk), .host_wr(pm_wr), .pac(pac), .word_o(pm_word));

  // ---------------------------------------------------------------- decoder
  assign widx       = pac[2:0];
  assign fetch      = running ? (cycle < 4'd8) : !nxt_valid;
  assign eu_load    = running && (cycle == 4'd0);
  assign eu_iter_en = running && (cycle != 4'd0);
  assign eu_iter    = cycle - 4'd1;
  assign res_we     = running && (cycle == 4'(SLOT_CYCLES - 1));
  assign slot_first = eu_load && (cur.fml == FML_FIRST || cur.fml == FML_ONLY);
  assign slot_last  = res_we  && (cur.fml == FML_LAST  || cur.fml == FML_ONLY);
  assign ready      = !running && nxt_valid;

  // ---------------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      cycle     <= '0;
      pac       <= '0;
      nxt       <= '0;
      nxt_valid <= 1'b0;
      cur       <= '0;
    end else if (stop || pm_wr.we) begin
      running   <= 1'b0;
      cycle     <= '0;
      pac       <= '0;
      nxt_valid <= 1'b0;
    end else begin
      // program counter: 16 cycles per function
      if (running) cycle <= cycle + 4'd1;

      // fetch one instruction word per cycle into the fetch stage
      if (fetch) begin
        unique case (widx)
          3'd0: nxt.ax <= pm_word;
          3'd1: nxt.ay <= pm_word;
          3'd2: nxt.az <= pm_word;
          3'd3: {nxt.op, nxt.xs, nxt.zs} <= pm_word[4:1];          // OPCRI
          3'd4: {nxt.ys, nxt.fml}        <= pm_word[4:2];          // OPCRII
          3'd5: nxt.dx <= pm_word;
          3'd6: nxt.dy <= pm_word;
          default: nxt.dz <= pm_word;
        endcase
        if (widx == 3'd7) begin
          pac       <= (nxt.fml == FML_LAST || nxt.fml == FML_ONLY) ? '0 : pac + 1'b1;
          nxt_valid <= 1'b1;
        end else begin
          pac <= pac + 1'b1;
        end
      end

      if (!running && go && nxt_valid) begin
        running   <= 1'b1;
        cycle     <= '0;
        cur       <= nxt;
        nxt_valid <= 1'b0;
      end else if (running && cycle == 4'(SLOT_CYCLES - 1)) begin
        cur       <= nxt;
        nxt_valid <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (running && cycle == 4'(SLOT_CYCLES - 1)) |-> nxt_valid)
    else $error("control_unit: next instruction not fetched in time");
  assert property (@(posedge clk) disable iff (!rst_n) pm_wr.we |-> !running)
    else $error("control_unit: program written while running");
endmodule
