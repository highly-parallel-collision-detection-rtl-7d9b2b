// manipulator_memory: store of the manipulator surface points of one PE (MM).
//
// The coordinates of point j are kept serially as x, y, z in words 3j, 3j+1,
// 3j+2 (16-bit fixed point, pixel units).  A read is requested with rd_en and
// its data are valid (rd_valid) in the ACCESS_CYCLES-th cycle of the access,
// counting the request cycle as the first, and are captured by the reader at
// the end of that cycle; this models
// the memory access time t_a (125 ns = 2 cycles of the 62.5 ns clock in the
// document).  The host loads words through the write port while the PE is
// idle.  The serial x, y, z layout and the access time follow the document;
// the depth of 150 words holds the "about 50 discrete points" the document
// gives per PE (its stated 1-kb capacity would hold only 21 three-word
// points), and the host port is this design's.
module manipulator_memory
  import cd_pkg::*;
#(
  parameter int WORDS         = 150,
  parameter int ACCESS_CYCLES = 2,
  localparam int AW           = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  word_t             wr_data,
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_addr,
  output logic              rd_valid,
  output word_t             rd_data
);
  word_t mem [WORDS];
  logic [AW-1:0] apipe [ACCESS_CYCLES-1];
  logic [ACCESS_CYCLES-2:0] vpipe;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  // The address is registered when the read is requested; the word is read
  // from the array in the last cycle of the access and captured by the reader
  // at the end of that cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpipe <= '0;
      for (int k = 0; k < ACCESS_CYCLES-1; k++) apipe[k] <= '0;
    end else begin
      vpipe[0] <= rd_en;
      apipe[0] <= rd_addr;
      for (int k = 1; k < ACCESS_CYCLES-1; k++) begin
        vpipe[k] <= vpipe[k-1];
        apipe[k] <= apipe[k-1];
      end
    end
  end

  assign rd_valid = vpipe[ACCESS_CYCLES-2];
  assign rd_data  = mem[apipe[ACCESS_CYCLES-2]];

  initial assert (ACCESS_CYCLES >= 2) else $error("manipulator_memory: ACCESS_CYCLES < 2");
endmodule
