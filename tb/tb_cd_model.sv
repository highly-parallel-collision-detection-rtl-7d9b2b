// tb_cd_model: reference model and program shared by the PE and top-level
// testbenches.
//
// fig4_instr(k) is the nine-function coordinate transformation of a three
// joint manipulator: rotate (x, z) by theta3, (x2, z2) by theta2 and (x1, y)
// by theta1, each rotation followed by two multiplications by 1/K to remove
// the CORDIC gain.  Data memory layout used with it: 3 = 0, 4 = 1/K,
// 5 = theta1, 6 = theta2, 7 = theta3, 8..17 intermediates, 26..27 unused
// results; the point comes from the input registers 0..2 and the result goes
// to the output registers 29 (X), 30 (Y), 31 (Z).  Three multiplications take
// X from the accumulator instead of the memory.
// transform() computes the same transformation in floating point.
package tb_cd_model;
  import cd_pkg::*;

  localparam int N_FUNCS = 9;

  function automatic instr_t mk(input cordic_op_e op, input int ax, ay, az,
                                input logic xs, ys, zs, input fml_e fml,
                                input int dx, dy, dz);
    instr_t i;
    i.ax = dm_addr_t'(ax); i.ay = dm_addr_t'(ay); i.az = dm_addr_t'(az);
    i.op = op; i.xs = xs; i.ys = ys; i.zs = zs; i.fml = fml;
    i.dx = dm_addr_t'(dx); i.dy = dm_addr_t'(dy); i.dz = dm_addr_t'(dz);
    return i;
  endfunction

  function automatic instr_t fig4_instr(input int k);
    case (k)
      0: return mk(OP_ROT, 0, 2, 7,  1, 1, 1, FML_FIRST,  8, 9, 26);   // K(x2, z2)
      1: return mk(OP_MUL, 0, 3, 4,  0, 1, 1, FML_MIDDLE, 26, 11, 27); // x2
      2: return mk(OP_MUL, 9, 3, 4,  1, 1, 1, FML_MIDDLE, 26, 12, 27); // z2
      3: return mk(OP_ROT, 11, 12, 6, 1, 1, 1, FML_MIDDLE, 13, 14, 27); // K(x1, Z)
      4: return mk(OP_MUL, 0, 3, 4,  0, 1, 1, FML_MIDDLE, 26, 15, 27); // x1
      5: return mk(OP_MUL, 14, 3, 4, 1, 1, 1, FML_MIDDLE, 26, 31, 27); // Z
      6: return mk(OP_ROT, 15, 1, 5, 1, 1, 1, FML_MIDDLE, 16, 17, 27); // K(X, Y)
      7: return mk(OP_MUL, 0, 3, 4,  0, 1, 1, FML_MIDDLE, 26, 29, 27); // X
      default: return mk(OP_MUL, 17, 3, 4, 1, 1, 1, FML_LAST, 26, 30, 27); // Y
    endcase
  endfunction

  // word w (0..7) of an instruction in program memory
  function automatic logic [PM_W-1:0] instr_word(input instr_t i, input int w);
    case (w)
      0: return i.ax;
      1: return i.ay;
      2: return i.az;
      3: return {i.op, i.xs, i.zs, 1'b0};
      4: return {i.ys, i.fml, 2'b00};
      5: return i.dx;
      6: return i.dy;
      default: return i.dz;
    endcase
  endfunction

  typedef struct {
    real x, y, z;
  } vec_t;

  function automatic vec_t transform(input vec_t q, input real t1, t2, t3);
    real x2, z2, x1, zr;
    vec_t r;
    x2 = q.x * $cos(t3) - q.z * $sin(t3);
    z2 = q.x * $sin(t3) + q.z * $cos(t3);
    x1 = x2 * $cos(t2) - z2 * $sin(t2);
    zr = x2 * $sin(t2) + z2 * $cos(t2);
    r.x = x1 * $cos(t1) - q.y * $sin(t1);
    r.y = x1 * $sin(t1) + q.y * $cos(t1);
    r.z = zr;
    return r;
  endfunction

  // distance of a coordinate from the nearest pixel boundary
  function automatic real edge_dist(input real v);
    real f;
    f = v - $floor(v);
    return (f < 0.5) ? f : 1.0 - f;
  endfunction

  // pixel index of a coordinate (floor), and whether a point is in 0..63^3
  function automatic int pix(input real v);
    return $rtoi($floor(v));
  endfunction

  function automatic logic in_workspace(input vec_t r);
    return pix(r.x) >= 0 && pix(r.x) < 64 && pix(r.y) >= 0 && pix(r.y) < 64 &&
           pix(r.z) >= 0 && pix(r.z) < 64;
  endfunction

  function automatic int om_addr(input vec_t r);
    return 4096 * pix(r.x) + 64 * pix(r.y) + pix(r.z);
  endfunction

  function automatic word_t to_coord(input real v);
    return word_t'($rtoi(v * 128.0));
  endfunction

  function automatic word_t to_angle(input real v);
    return word_t'($rtoi(v * 16384.0));
  endfunction
endpackage
