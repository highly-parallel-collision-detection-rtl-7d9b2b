// output_registers: EU output registers and obstacle address formation.
//
// Three 16-bit registers X, Y, Z take the EU results written to the operand
// addresses 29, 30, 31.  Their integer parts (floor of a Q9.7 coordinate, in
// pixels) give the pixel P(xe, ye, ze) and the obstacle memory bit address
// 4096*xe + 64*ye + ze.  A point whose pixel lies outside 0..63 on any axis is
// outside the stored workspace: in_range is 0 and the PE treats it as free.
// Combinational from the registers, so the address is ready in the cycle after
// the last result is written.  The document gives the output registers and
// the address mapping; the address map position, the floor rounding and the
// out-of-workspace rule are this design's.
module output_registers
  import cd_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            we,
  input  dm_addr_t        wa_x, wa_y, wa_z,
  input  word_t           wd_x, wd_y, wd_z,
  output word_t           x, y, z,
  output logic [OM_AW-1:0] pix_addr,
  output logic            in_range
);
  localparam int IW = DATA_W - COORD_FRAC;   // integer bits incl. sign

  logic signed [IW-1:0] xi, yi, zi;

  // Later ports win on a shared address, as in the data memory.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {x, y, z} <= '0;
    end else if (we) begin
      if (wa_x == ADDR_OUT_X) x <= wd_x;
      if (wa_y == ADDR_OUT_X) x <= wd_y;
      if (wa_z == ADDR_OUT_X) x <= wd_z;
      if (wa_x == ADDR_OUT_Y) y <= wd_x;
      if (wa_y == ADDR_OUT_Y) y <= wd_y;
      if (wa_z == ADDR_OUT_Y) y <= wd_z;
      if (wa_x == ADDR_OUT_Z) z <= wd_x;
      if (wa_y == ADDR_OUT_Z) z <= wd_y;
      if (wa_z == ADDR_OUT_Z) z <= wd_z;
    end
  end

  assign xi = x[DATA_W-1:COORD_FRAC];
  assign yi = y[DATA_W-1:COORD_FRAC];
  assign zi = z[DATA_W-1:COORD_FRAC];

  // in range when the integer part is 0 .. 2^OM_DIM_BITS - 1
  assign in_range = (xi[IW-1:OM_DIM_BITS] == '0) &&
                    (yi[IW-1:OM_DIM_BITS] == '0) &&
                    (zi[IW-1:OM_DIM_BITS] == '0);
  assign pix_addr = {xi[OM_DIM_BITS-1:0], yi[OM_DIM_BITS-1:0], zi[OM_DIM_BITS-1:0]};
endmodule
