// data_memory: operand store of a processing element (DM).
//
// 32 words of 16 bits holding the broadcast joint angles, constants such as
// 0 and 1/K, and the intermediate results of the coordinate transformation.
// The execution unit reads its three operands in the load cycle of a CORDIC
// function and writes its three results in the last iteration cycle, so the
// memory has three asynchronous read ports and three write ports; when two
// result ports hit one address the Z port wins over Y, and Y over X.  A fourth
// write port loads words from the host (joint angle broadcast) and has the
// lowest priority.  The document names the data memory and its role; the
// size (5-bit addresses from the instruction fields), the port count and the
// priority are this design's choices.  The PE maps addresses 0..2 to the input
// registers, so those three words are never read from here.
module data_memory
  import cd_pkg::*;
(
  input  logic     clk,
  input  dm_wr_t   host_wr,
  input  dm_addr_t ra_x, ra_y, ra_z,
  output word_t    rd_x, rd_y, rd_z,
  input  logic     we,            // write all three results
  input  dm_addr_t wa_x, wa_y, wa_z,
  input  word_t    wd_x, wd_y, wd_z
);
  word_t mem [DM_WORDS];

  assign rd_x = mem[ra_x];
  assign rd_y = mem[ra_y];
  assign rd_z = mem[ra_z];

  always_ff @(posedge clk) begin
    if (host_wr.we) mem[host_wr.addr] <= host_wr.data;
    if (we) begin
      mem[wa_x] <= wd_x;
      mem[wa_y] <= wd_y;
      mem[wa_z] <= wd_z;
    end
  end
endmodule
