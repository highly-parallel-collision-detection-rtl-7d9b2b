// execution_unit: CORDIC execution unit (EU) of a processing element.
//
// Three 16-bit paths X, Y and Z, each a 3-to-1 MUX in front of an accumulator,
// with a barrel shifter and an adder-subtracter.  The X and Y shifters are
// cross-coupled (X is updated with Y >> i and Y with X >> i); the Z path adds
// or subtracts the radix constant from the constant generator.  One function
// (Fig. "CORDIC functions" of the source: rotation, vectoring, multiplication,
// division) takes 16 cycles:
//   cycle 0  (load=1):     each accumulator takes its operand (src=1) or keeps
//                          its value from the previous function (src=0);
//   cycles 1..15 (iter_en): iteration i = 0..14, shift-and-add only.
// nxt_x/y/z are the values the accumulators take at the next clock edge; in
// the last iteration they are the function's results, written to the data
// memory in that same cycle.
// Direction rule d (+1/-1) per function:
//   ROT: d = sign(z);  x -= d*(y>>i), y += d*(x>>i), z -= d*atan(2^-i)
//   VEC: d = -sign(y); same updates      (x > 0 assumed)
//   MUL: d = sign(z);  y += d*(x>>i), z -= d*2^-i
//   DIV: d = -sign(x*y); same updates as MUL
// The structure (MUX, accumulator, barrel shifter, adder-subtracter per path,
// constant generator) follows the document; the iteration count (15), the
// number formats and the shift-then-add order are this design's choices.
// Results have gain K = 1.64676 in the circular functions; no overflow check.
module execution_unit
  import cd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,      // cycle 0 of a function
  input  logic       iter_en,   // cycles 1..15
  input  logic [3:0] iter,      // iteration index i (0..14)
  input  cordic_op_e op,
  input  logic       xs, ys, zs,            // 1: take operand, 0: keep accumulator
  input  word_t      opnd_x, opnd_y, opnd_z,
  output word_t      acc_x, acc_y, acc_z,
  output word_t      nxt_x, nxt_y, nxt_z
);
  word_t sh_x, sh_y, c_i, sum_x, sum_y, sum_z;
  logic  circular, d_pos;

  assign circular = (op == OP_ROT) || (op == OP_VEC);

  constant_generator u_cgen (.iter(iter), .circular(circular), .const_o(c_i));

  // barrel shifters
  assign sh_x = acc_x >>> iter;
  assign sh_y = acc_y >>> iter;

  // direction of this micro-rotation
  always_comb begin
    unique case (op)
      OP_ROT, OP_MUL: d_pos = !acc_z[DATA_W-1];
      OP_VEC:         d_pos = acc_y[DATA_W-1];
      default:        d_pos = acc_y[DATA_W-1] ^ acc_x[DATA_W-1];  // OP_DIV
    endcase
  end

  // adder-subtracters
  always_comb begin
    sum_x = d_pos ? acc_x - sh_y : acc_x + sh_y;
    sum_y = d_pos ? acc_y + sh_x : acc_y - sh_x;
    sum_z = d_pos ? acc_z - c_i  : acc_z + c_i;
  end

  // 3-to-1 MUX in front of each accumulator: operand, adder output, hold
  always_comb begin
    nxt_x = acc_x;
    nxt_y = acc_y;
    nxt_z = acc_z;
    if (load) begin
      if (xs) nxt_x = opnd_x;
      if (ys) nxt_y = opnd_y;
      if (zs) nxt_z = opnd_z;
    end else if (iter_en) begin
      if (circular) nxt_x = sum_x;
      nxt_y = sum_y;
      nxt_z = sum_z;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_x <= '0;
      acc_y <= '0;
      acc_z <= '0;
    end else begin
      acc_x <= nxt_x;
      acc_y <= nxt_y;
      acc_z <= nxt_z;
    end
  end

  initial assert (ITERS == 15) else $error("execution_unit: iteration index is 4 bits");
endmodule
