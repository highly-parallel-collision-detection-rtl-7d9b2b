// input_registers: EU input registers for the manipulator point coordinates.
//
// Two stages: a transfer stage that collects x, y, z of the next point as
// they arrive one by one from the manipulator memory (ld_en with index 0/1/2),
// and the active stage read by the execution unit (operand addresses 0, 1, 2).
// `advance` copies the transfer stage into the active stage at the clock edge
// that ends the last instruction of a point, so the next point's transfer
// overlaps the current point's coordinate transformation.  A word that
// arrives in the cycle of an advance is passed to the active stage directly.  The document
// places input registers between the manipulator memory and the EU and shows
// the overlap in its timing diagram; the two-stage form is this design's.
module input_registers
  import cd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ld_en,
  input  logic [1:0] ld_idx,     // 0: x, 1: y, 2: z
  input  word_t      ld_data,
  input  logic       advance,
  output word_t      x, y, z
);
  word_t tx, ty, tz;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {tx, ty, tz} <= '0;
      {x, y, z}    <= '0;
    end else begin
      if (ld_en) begin
        unique case (ld_idx)
          2'd0:    tx <= ld_data;
          2'd1:    ty <= ld_data;
          default: tz <= ld_data;
        endcase
      end
      // a word loaded in the cycle of an advance goes straight through
      if (advance) begin
        x <= (ld_en && ld_idx == 2'd0) ? ld_data : tx;
        y <= (ld_en && ld_idx == 2'd1) ? ld_data : ty;
        z <= (ld_en && ld_idx == 2'd2) ? ld_data : tz;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) ld_en |-> ld_idx != 2'd3)
    else $error("input_registers: index 3 loaded");
endmodule
