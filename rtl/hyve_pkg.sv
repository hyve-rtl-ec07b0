// hyve_pkg: types and constants shared by the HyVE memory hierarchy.
//
// An edge is a (source, destination) pair of 32-bit vertex indices, 64 bits in
// all, so one 512-bit word read from the ReRAM edge memory carries eight edges.
// The 512-bit output width is the energy-optimised ReRAM configuration chosen
// for the edge memory; the 32-bit index and property widths are choices of this
// design. Edges carry no weight here (the design could carry one in a wider
// edge record).
package hyve_pkg;

  localparam int VID_W     = 32;           // vertex index width
  localparam int VTX_W     = 32;           // vertex property width
  localparam int EDGE_W    = 2 * VID_W;    // one edge record
  localparam int IO_BITS   = 512;          // ReRAM read word (output bits)
  localparam int EDGES_PER_WORD = IO_BITS / EDGE_W;

  // Edge record as stored in the edge memory: source in the low half.
  typedef struct packed {
    logic [VID_W-1:0] dst;
    logic [VID_W-1:0] src;
  } edge_t;

  // States of the vertex-data scheduler in the HyVE controller.
  typedef enum logic [3:0] {
    S_IDLE,     // waiting for start
    S_RUN,      // streaming edges to the accelerator
    S_DRAIN,    // waiting for edges handed out to finish their vertex work
    S_WB_RD,    // write-back: read one destination vertex from SRAM
    S_WB_WR,    // write-back: write it to the off-chip vertex memory
    S_LD_SRC,   // load the next source interval
    S_LD_DST,   // load the next destination interval
    S_DONE      // all edges processed, results written back
  } sched_state_t;

endpackage
