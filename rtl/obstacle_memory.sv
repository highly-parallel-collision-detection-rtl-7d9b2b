// obstacle_memory: one-bit-per-pixel obstacle image of one PE (OM).
//
// The workspace is divided into 64 x 64 x 64 cubic pixels; pixel
// P(xe, ye, ze) is 1 when an obstacle occupies it and lives at bit address
// 4096*xe + 64*ye + ze (the linear mapping m*l*xe + m*ye + ze of the document
// with k = l = m = 64), 256 kbit in all.  A read is requested with rd_en and
// its bit is valid (rd_valid) in the ACCESS_CYCLES-th cycle of the access,
// the request cycle being the first (memory access time t_a).  The host
// loads the image sixteen pixels at a time: word w holds bit
// addresses 16w .. 16w+15, bit b of the word being address 16w+b.
// The document's part is a 256-kb DRAM macro; here it is an array with the
// same organisation, and refresh and the DRAM's own timing are not modelled.
module obstacle_memory
  import cd_pkg::*;
#(
  parameter int DIM_BITS      = OM_DIM_BITS,   // log2 of pixels per axis
  parameter int ACCESS_CYCLES = 2,
  localparam int AW           = 3 * DIM_BITS,
  localparam int WAW          = AW - 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           wr_en,
  input  logic [WAW-1:0] wr_addr,
  input  logic [15:0]    wr_data,
  input  logic           rd_en,
  input  logic [AW-1:0]  rd_addr,
  output logic           rd_valid,
  output logic           rd_data
);
  logic [15:0] mem [1 << WAW];
  logic [AW-1:0] apipe [ACCESS_CYCLES-1];
  logic [ACCESS_CYCLES-2:0] vpipe;
  logic [15:0] rword;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  // Address registered at the request; array read in the last access cycle.
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

  assign rword    = mem[apipe[ACCESS_CYCLES-2][AW-1:4]];
  assign rd_valid = vpipe[ACCESS_CYCLES-2];
  assign rd_data  = rword[apipe[ACCESS_CYCLES-2][3:0]];

  initial assert (ACCESS_CYCLES >= 2) else $error("obstacle_memory: ACCESS_CYCLES < 2");
endmodule
