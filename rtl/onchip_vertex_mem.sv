// onchip_vertex_mem: on-chip SRAM vertex memory of HyVE.
//
// Vertex data are read and written at random, which an SRAM serves without
// penalty. The memory holds one source interval and one destination interval
// of the graph in two separate sections, each DEPTH vertices of VTX_W bits:
// 2 x 2^20 x 32 bits = 8 MB, the SRAM size the document settles on. Each
// section has one read port and one write port; reads are synchronous with
// one cycle of latency and rdata holds its value until the next read. A read
// and a write to the same word in one cycle return the old value.
//
// The SRAM, its 8 MB size and the source/destination split follow the
// document; the even split, the word width and the port structure are this
// design's choices.
module onchip_vertex_mem
  import hyve_pkg::*;
#(
  parameter int DEPTH = 1 << 20,          // vertices per section
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  // source section
  input  logic             src_re,
  input  logic [AW-1:0]    src_raddr,
  output logic [VTX_W-1:0] src_rdata,
  input  logic             src_we,
  input  logic [AW-1:0]    src_waddr,
  input  logic [VTX_W-1:0] src_wdata,
  // destination section
  input  logic             dst_re,
  input  logic [AW-1:0]    dst_raddr,
  output logic [VTX_W-1:0] dst_rdata,
  input  logic             dst_we,
  input  logic [AW-1:0]    dst_waddr,
  input  logic [VTX_W-1:0] dst_wdata
);

  logic [VTX_W-1:0] src_mem [DEPTH];
  logic [VTX_W-1:0] dst_mem [DEPTH];

  always_ff @(posedge clk) begin
    if (src_re) src_rdata <= src_mem[src_raddr];
    if (src_we) src_mem[src_waddr] <= src_wdata;
  end

  always_ff @(posedge clk) begin
    if (dst_re) dst_rdata <= dst_mem[dst_raddr];
    if (dst_we) dst_mem[dst_waddr] <= dst_wdata;
  end

endmodule
