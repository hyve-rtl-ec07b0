// hyve_top: HyVE, a hybrid vertex-edge memory hierarchy for graph processing.
//
// Edge data (large, read sequentially, never written during processing) live
// in a ReRAM edge-memory chip with bank-level power gating; vertex data
// (small, read and written at random) live in DRAM off chip and, one source
// and one destination interval at a time, in an on-chip SRAM. The HyVE
// controller streams edges to the accelerator, checks every edge against the
// intervals on chip, and swaps intervals between DRAM and SRAM when the edge
// stream moves on to another block of the graph.
//
// Instantiated here: hyve_controller (with its edge_buffer), onchip_vertex_mem
// and reram_chip (banks, mats, bank enable logic, power-gating controllers and
// power gates). The off-chip DRAM and the accelerator are outside and reach
// the design through the dv_* and ae_*/sr_*/dr_*/dw_* ports.
//
// Use: while done or idle, write the edge list into the edge memory through
// the host_* port (512-bit words, eight edges each, source in the low 32 bits
// of each edge). Then pulse start with the word address of the first edge,
// the number of edges and the number of vertices; done rises when every edge
// has been processed and the modified vertex data are back in DRAM. The host
// port is ignored (host_ready low) while the controller is busy.
//
// The memory roles, the controller's duties and the power gating follow the
// document; sizes marked as assumptions in the sub-modules are this design's.
module hyve_top
  import hyve_pkg::*;
#(
  parameter int NUM_BANKS    = 8,
  parameter int N_BLOCKS     = 8,
  parameter int M_MATS       = 8,
  parameter int ROWS         = 512,
  parameter int COLS         = 512,
  parameter int READ_CYCLES  = 2,
  parameter int WRITE_CYCLES = 20,
  parameter bit PG_EN        = 1'b1,
  parameter int IDLE_CYCLES  = 64,
  parameter int WAKE_CYCLES  = 4,
  parameter int INT_BITS     = 20,
  parameter int EBUF_DEPTH   = 8,
  localparam int EADDR_W = $clog2(NUM_BANKS) + $clog2(N_BLOCKS)
                         + $clog2(COLS / (IO_BITS / M_MATS)) + $clog2(ROWS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration
  input  logic                 start,
  input  logic [EADDR_W-1:0]   edge_base,
  input  logic [31:0]          num_edges,
  input  logic [VID_W-1:0]     num_vertices,
  output logic                 busy,
  output logic                 done,
  // host port for loading the edge memory
  input  logic                 host_valid,
  output logic                 host_ready,
  input  logic [EADDR_W-1:0]   host_addr,
  input  logic [IO_BITS-1:0]   host_wdata,
  input  logic [IO_BITS/8-1:0] host_wmask,
  // off-chip vertex memory (DRAM) channel
  output logic                 dv_req_valid,
  input  logic                 dv_req_ready,
  output logic                 dv_req_we,
  output logic [VID_W-1:0]     dv_req_addr,
  output logic [VTX_W-1:0]     dv_req_wdata,
  input  logic                 dv_rsp_valid,
  input  logic [VTX_W-1:0]     dv_rsp_data,
  // accelerator
  output logic                 ae_valid,
  input  logic                 ae_ready,
  output edge_t                ae_edge,
  input  logic                 ae_done,
  input  logic                 sr_valid,
  output logic                 sr_ready,
  input  logic [VID_W-1:0]     sr_addr,
  output logic                 sr_rvalid,
  output logic [VTX_W-1:0]     sr_rdata,
  input  logic                 dr_valid,
  output logic                 dr_ready,
  input  logic [VID_W-1:0]     dr_addr,
  output logic                 dr_rvalid,
  output logic [VTX_W-1:0]     dr_rdata,
  input  logic                 dw_valid,
  output logic                 dw_ready,
  input  logic [VID_W-1:0]     dw_addr,
  input  logic [VTX_W-1:0]     dw_data,
  // status
  output logic [NUM_BANKS-1:0] bank_powered,
  output logic                 vertex_stall,
  output logic                 ebuf_full,
  output logic [31:0]          n_sched,
  output logic [31:0]          n_writeback,
  output logic [31:0]          n_load_src,
  output logic [31:0]          n_load_dst
);

  // edge memory channel, shared by the controller (reads) and the host (writes)
  logic               em_req_valid, em_req_ready, em_rsp_valid;
  logic [EADDR_W-1:0] em_req_addr;
  logic [IO_BITS-1:0] em_rsp_data;
  logic               chip_valid, chip_ready;

  assign chip_valid = busy ? em_req_valid : host_valid;
  assign host_ready   = !busy && chip_ready;
  assign em_req_ready = busy && chip_ready;

  // vertex SRAM ports
  logic                src_re, src_we, dst_re, dst_we;
  logic [INT_BITS-1:0] src_raddr, src_waddr, dst_raddr, dst_waddr;
  logic [VTX_W-1:0]    src_rdata, src_wdata, dst_rdata, dst_wdata;

  hyve_controller #(
    .INT_BITS(INT_BITS), .EADDR_W(EADDR_W), .EBUF_DEPTH(EBUF_DEPTH)
  ) u_ctrl (
    .clk, .rst_n,
    .start, .edge_base, .num_edges, .num_vertices, .busy, .done,
    .em_req_valid, .em_req_ready, .em_req_addr,
    .em_rsp_valid, .em_rsp_data,
    .dv_req_valid, .dv_req_ready, .dv_req_we, .dv_req_addr, .dv_req_wdata,
    .dv_rsp_valid, .dv_rsp_data,
    .ae_valid, .ae_ready, .ae_edge, .ae_done,
    .sr_valid, .sr_ready, .sr_addr, .sr_rvalid, .sr_rdata,
    .dr_valid, .dr_ready, .dr_addr, .dr_rvalid, .dr_rdata,
    .dw_valid, .dw_ready, .dw_addr, .dw_data,
    .src_re, .src_raddr, .src_rdata, .src_we, .src_waddr, .src_wdata,
    .dst_re, .dst_raddr, .dst_rdata, .dst_we, .dst_waddr, .dst_wdata,
    .vertex_stall, .ebuf_full, .n_sched, .n_writeback, .n_load_src, .n_load_dst
  );

  onchip_vertex_mem #(.DEPTH(1 << INT_BITS)) u_vmem (
    .clk,
    .src_re, .src_raddr, .src_rdata, .src_we, .src_waddr, .src_wdata,
    .dst_re, .dst_raddr, .dst_rdata, .dst_we, .dst_waddr, .dst_wdata
  );

  reram_chip #(
    .NUM_BANKS(NUM_BANKS), .N_BLOCKS(N_BLOCKS), .M_MATS(M_MATS),
    .ROWS(ROWS), .COLS(COLS), .READ_CYCLES(READ_CYCLES),
    .WRITE_CYCLES(WRITE_CYCLES), .PG_EN(PG_EN),
    .IDLE_CYCLES(IDLE_CYCLES), .WAKE_CYCLES(WAKE_CYCLES)
  ) u_edge_mem (
    .clk, .rst_n,
    .req_valid    (chip_valid),
    .req_ready    (chip_ready),
    .req_we       (!busy),
    .req_addr     (busy ? em_req_addr : host_addr),
    .req_wdata    (host_wdata),
    .req_wmask    (host_wmask),
    .rsp_valid    (em_rsp_valid),
    .rsp_data     (em_rsp_data),
    .bank_powered (bank_powered)
  );

endmodule
