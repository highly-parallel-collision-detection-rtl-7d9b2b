// program_memory: microprogram store of the control unit (PM).
//
// 256 words of 5 bits, addressed by the 8-bit program memory address counter
// (PAC); one instruction is eight consecutive words (see cd_pkg for the
// layout), so 32 instructions fit.  Read is asynchronous: the word addressed
// by the PAC is available in the same cycle and is captured by the control
// unit's registers at the next edge.  Words are loaded from the host through
// a synchronous write port.  Width and address counter width follow the
// document; the host write port and asynchronous read are this design's.
module program_memory
  import cd_pkg::*;
(
  input  logic             clk,
  input  pm_wr_t           host_wr,
  input  logic [PM_AW-1:0] pac,
  output logic [PM_W-1:0]  word_o
);
  logic [PM_W-1:0] mem [1 << PM_AW];

  assign word_o = mem[pac];

  always_ff @(posedge clk) begin
    if (host_wr.we) mem[host_wr.addr] <= host_wr.data;
  end
endmodule
