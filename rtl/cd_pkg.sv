// cd_pkg: types and constants shared by the collision detection processor.
//
// The processor transforms manipulator surface points from link coordinates to
// workspace coordinates with CORDIC 2-D vector rotations and looks each result
// up in a one-bit-per-pixel obstacle image.  This package fixes the data word
// (16-bit fixed point), the four CORDIC functions, the 8 x 5-bit instruction
// format, the 5-bit operand address map of a processing element and the
// per-iteration CORDIC constants.
//
// Taken from the document: 16-bit fixed-point data, 16 clock cycles per CORDIC
// function, the four functions (rotation, vectoring, multiplication,
// division), the instruction of eight 5-bit words with the fields OP, XS, YS,
// ZS, FML and six addresses, an 8-bit program memory address, a 64x64x64
// obstacle image.  Chosen here: the number formats (Q9.7 coordinates in pixel
// units, Q2.14 angles in radians), one load cycle followed by 15 iterations,
// the bit positions of the fields in words 3 and 4, the code values, and the
// operand address map (input registers at 0..2, output registers at 29..31).
package cd_pkg;

  // ---------------------------------------------------------------- data
  localparam int DATA_W      = 16;  // fixed-point word
  localparam int COORD_FRAC  = 7;   // fraction bits of x/y/z coordinates (pixels)
  localparam int ANGLE_FRAC  = 14;  // fraction bits of angles and z-path values
  localparam int SLOT_CYCLES = 16;  // clock cycles per CORDIC function
  localparam int ITERS       = SLOT_CYCLES - 1;  // cycle 0 loads, 1..15 iterate

  typedef logic signed [DATA_W-1:0] word_t;

  // 1/K for 15 circular iterations: K = prod_{i=0}^{14} sqrt(1 + 2^-2i) = 1.64676,
  // round(2^14 / K) = 9949.
  localparam word_t INV_K = 16'sd9949;

  // ---------------------------------------------------------------- CORDIC functions
  typedef enum logic [1:0] {
    OP_ROT = 2'd0,   // circular rotation:  x,y rotated by z, z -> 0
    OP_VEC = 2'd1,   // circular vectoring: x -> K*|(x,y)|, y -> 0, z += atan(y/x)
    OP_MUL = 2'd2,   // linear rotation:    y += x*z, z -> 0
    OP_DIV = 2'd3    // linear vectoring:   z += y/x, y -> 0
  } cordic_op_e;

  // Position of an instruction in the coordinate transformation program.
  typedef enum logic [1:0] {
    FML_MIDDLE = 2'd0,
    FML_FIRST  = 2'd1,   // takes a new point into the input registers
    FML_LAST   = 2'd2,   // results complete: start the obstacle access
    FML_ONLY   = 2'd3    // first and last at once (one-instruction program)
  } fml_e;

  // ---------------------------------------------------------------- instruction
  localparam int PM_W        = 5;   // program memory word width
  localparam int PM_AW       = 8;   // program memory address counter (PAC) width
  localparam int INSTR_WORDS = 8;   // words per instruction
  localparam int DM_AW       = 5;   // operand address width
  localparam int DM_WORDS    = 1 << DM_AW;

  // Word layout in program memory (word index within the instruction):
  //   0: address of x0   1: address of y0   2: address of z0
  //   3: {OP[1:0], XS, ZS, 1'b0}
  //   4: {YS, FML[1:0], 2'b00}
  //   5: address of xn   6: address of yn   7: address of zn
  // XS/YS/ZS = 1 takes the operand from the addressed word, 0 keeps the
  // value already in that path's accumulator.
  typedef logic [DM_AW-1:0] dm_addr_t;

  typedef struct packed {
    dm_addr_t   ax, ay, az;   // operand addresses
    cordic_op_e op;
    logic       xs, ys, zs;   // operand source: 1 = memory, 0 = accumulator
    fml_e       fml;
    dm_addr_t   dx, dy, dz;   // result addresses
  } instr_t;

  // ---------------------------------------------------------------- operand address map
  localparam dm_addr_t ADDR_IN_X  = 5'd0;   // input registers (read only)
  localparam dm_addr_t ADDR_IN_Y  = 5'd1;
  localparam dm_addr_t ADDR_IN_Z  = 5'd2;
  localparam dm_addr_t ADDR_OUT_X = 5'd29;  // output registers (written by results)
  localparam dm_addr_t ADDR_OUT_Y = 5'd30;
  localparam dm_addr_t ADDR_OUT_Z = 5'd31;

  // ---------------------------------------------------------------- obstacle image
  localparam int OM_DIM_BITS = 6;                  // 64 pixels per axis
  localparam int OM_AW       = 3 * OM_DIM_BITS;    // 18-bit pixel address
  localparam int OM_WORD_W   = 16;                 // host load word
  localparam int OM_WAW      = OM_AW - $clog2(OM_WORD_W);

  // ---------------------------------------------------------------- host write buses
  typedef struct packed {
    logic                we;
    dm_addr_t            addr;
    logic [DATA_W-1:0]   data;
  } dm_wr_t;

  typedef struct packed {
    logic                we;
    logic [PM_AW-1:0]    addr;
    logic [PM_W-1:0]     data;
  } pm_wr_t;

  typedef struct packed {
    logic                we;
    logic [OM_WAW-1:0]   addr;
    logic [OM_WORD_W-1:0] data;
  } om_wr_t;

  // ---------------------------------------------------------------- constants
  // Circular radix constant atan(2^-i) in Q2.14: round(atan(2^-i) * 2^14).
  function automatic word_t atan_const(input logic [3:0] i);
    case (i)
      4'd0:  return 16'sd12868;
      4'd1:  return 16'sd7596;
      4'd2:  return 16'sd4014;
      4'd3:  return 16'sd2037;
      4'd4:  return 16'sd1023;
      4'd5:  return 16'sd512;
      4'd6:  return 16'sd256;
      4'd7:  return 16'sd128;
      4'd8:  return 16'sd64;
      4'd9:  return 16'sd32;
      4'd10: return 16'sd16;
      4'd11: return 16'sd8;
      4'd12: return 16'sd4;
      4'd13: return 16'sd2;
      4'd14: return 16'sd1;
      default: return 16'sd0;
    endcase
  endfunction

endpackage
