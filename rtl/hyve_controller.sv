// hyve_controller: the HyVE hybrid memory controller.
//
// The controller sits between the graph accelerator and three memories: the
// ReRAM edge memory (read as a sequential stream), the DRAM off-chip vertex
// memory (complete vertex array, read and written sequentially) and the
// on-chip SRAM vertex memory (one source and one destination interval). It
// does address mapping, edge buffering and vertex-data scheduling.
//
// Graph layout (interval-block partitioning): interval I_k holds vertices
// k*2^INT_BITS .. (k+1)*2^INT_BITS-1; the edges are stored in the edge memory
// grouped by block B_ij (source in I_i, destination in I_j), but the
// controller needs no block table: it checks every edge that comes out of the
// edge buffer against the intervals that are on chip.
//
//  * edge matches both on-chip intervals: the edge is handed to the
//    accelerator (ae_valid/ae_ready);
//  * otherwise vertex scheduling starts: the controller stops handing out
//    edges, waits until the accelerator reports every edge already handed out
//    as finished (ae_done pulses), writes the destination interval back to
//    DRAM if the accelerator modified it and it is being replaced (or the new
//    source interval is that same interval), then loads the new source and/or
//    destination interval from DRAM. During write-back and load the vertex
//    ports are stalled (ready low).
//  * after the last edge the modified destination interval is written back
//    and done is raised.
//
// Edge words are prefetched from edge_base onward for the whole run, also
// during scheduling, as far as the edge buffer has room.
//
// Vertex ports: the accelerator addresses vertices by global index; the
// controller maps the index to the SRAM offset (low INT_BITS bits). Source
// reads (sr_*) and destination reads (dr_*) return data one cycle after the
// accepted request (sr_rvalid/dr_rvalid); destination writes (dw_*) take
// effect at once. The DRAM channel is a valid/ready request port with
// in-order read responses (dv_rsp_valid) and no response back-pressure.
//
// The partition check, stall during scheduling, write-back of modified
// vertices and sequential off-chip access follow the document; the exact
// write-back rule, prefetching, handshakes and widths are this design's own.
module hyve_controller
  import hyve_pkg::*;
#(
  parameter int INT_BITS   = 20,   // log2(vertices per interval) = SRAM section depth
  parameter int EADDR_W    = 18,   // edge memory word address width
  parameter int EBUF_DEPTH = 8,
  localparam int IW = VID_W - INT_BITS,   // interval index width
  localparam int AW = INT_BITS
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration
  input  logic               start,
  input  logic [EADDR_W-1:0] edge_base,
  input  logic [31:0]        num_edges,
  input  logic [VID_W-1:0]   num_vertices,
  output logic               busy,
  output logic               done,
  // edge memory channel (read stream)
  output logic               em_req_valid,
  input  logic               em_req_ready,
  output logic [EADDR_W-1:0] em_req_addr,
  input  logic               em_rsp_valid,
  input  logic [IO_BITS-1:0] em_rsp_data,
  // off-chip vertex memory channel (DRAM)
  output logic               dv_req_valid,
  input  logic               dv_req_ready,
  output logic               dv_req_we,
  output logic [VID_W-1:0]   dv_req_addr,
  output logic [VTX_W-1:0]   dv_req_wdata,
  input  logic               dv_rsp_valid,
  input  logic [VTX_W-1:0]   dv_rsp_data,
  // accelerator: edge stream
  output logic               ae_valid,
  input  logic               ae_ready,
  output edge_t              ae_edge,
  input  logic               ae_done,
  // accelerator: vertex ports
  input  logic               sr_valid,
  output logic               sr_ready,
  input  logic [VID_W-1:0]   sr_addr,
  output logic               sr_rvalid,
  output logic [VTX_W-1:0]   sr_rdata,
  input  logic               dr_valid,
  output logic               dr_ready,
  input  logic [VID_W-1:0]   dr_addr,
  output logic               dr_rvalid,
  output logic [VTX_W-1:0]   dr_rdata,
  input  logic               dw_valid,
  output logic               dw_ready,
  input  logic [VID_W-1:0]   dw_addr,
  input  logic [VTX_W-1:0]   dw_data,
  // on-chip vertex memory
  output logic               src_re,
  output logic [AW-1:0]      src_raddr,
  input  logic [VTX_W-1:0]   src_rdata,
  output logic               src_we,
  output logic [AW-1:0]      src_waddr,
  output logic [VTX_W-1:0]   src_wdata,
  output logic               dst_re,
  output logic [AW-1:0]      dst_raddr,
  input  logic [VTX_W-1:0]   dst_rdata,
  output logic               dst_we,
  output logic [AW-1:0]      dst_waddr,
  output logic [VTX_W-1:0]   dst_wdata,
  // status
  output logic               vertex_stall,  // scheduling in progress
  output logic               ebuf_full,     // edge buffer has no free slot
  output logic [31:0]        n_sched,       // scheduling events
  output logic [31:0]        n_writeback,   // destination intervals written back
  output logic [31:0]        n_load_src,    // source intervals loaded
  output logic [31:0]        n_load_dst     // destination intervals loaded
);

  sched_state_t state;

  // run configuration
  logic [EADDR_W-1:0] base_q;
  logic [31:0]        nedges_q, words_q, fptr, given, outstanding;
  logic [VID_W-1:0]   nv_q;

  // on-chip intervals
  logic               src_loaded, dst_loaded, dirty;
  logic [IW-1:0]      cur_src, cur_dst;
  logic [AW:0]        dst_cnt;

  // pending schedule
  logic               need_src, need_dst, final_q;
  logic [IW-1:0]      new_src, new_dst;
  logic [AW:0]        ld_cnt, ld_req, ld_rsp;
  logic [AW-1:0]      wb_idx;

  // ---------------- edge fetch and buffer ----------------
  logic  eb_can_issue, eb_valid, eb_pop, eb_clear;
  edge_t eb_edge;

  assign em_req_valid = busy && (fptr < words_q) && eb_can_issue;
  assign em_req_addr  = base_q + fptr[EADDR_W-1:0];

  edge_buffer #(.DEPTH(EBUF_DEPTH)) u_ebuf (
    .clk, .rst_n,
    .clear     (eb_clear),
    .issue     (em_req_valid && em_req_ready),
    .can_issue (eb_can_issue),
    .in_valid  (em_rsp_valid),
    .in_data   (em_rsp_data),
    .out_valid (eb_valid),
    .out_ready (eb_pop),
    .out_edge  (eb_edge),
    .full      (ebuf_full)
  );

  wire [IW-1:0] h_src = eb_edge.src[VID_W-1:INT_BITS];
  wire [IW-1:0] h_dst = eb_edge.dst[VID_W-1:INT_BITS];
  wire head   = (state == S_RUN) && eb_valid && (given < nedges_q);
  wire match  = src_loaded && dst_loaded && (h_src == cur_src) && (h_dst == cur_dst);

  assign ae_valid = head && match;
  assign ae_edge  = eb_edge;
  assign eb_pop   = ae_valid && ae_ready;

  // vertices in interval k: min(2^INT_BITS, num_vertices - k*2^INT_BITS)
  function automatic logic [AW:0] int_count(input logic [IW-1:0] k);
    logic [VID_W:0] first, left;
    first = {1'b0, k, {INT_BITS{1'b0}}};
    left  = {1'b0, nv_q} - first;
    if (nv_q <= first[VID_W-1:0]) return (AW+1)'(1);
    if (left >= (VID_W+1)'(1 << INT_BITS)) return (AW+1)'(1 << INT_BITS);
    return left[AW:0];
  endfunction

  wire wb_needed = dirty && dst_loaded && (final_q || need_dst || (new_src == cur_dst));

  // ---------------- vertex ports ----------------
  wire vport_open = (state == S_RUN) || (state == S_DRAIN);
  assign vertex_stall = busy && !vport_open;

  assign sr_ready = vport_open;
  assign dr_ready = vport_open;
  assign dw_ready = vport_open;

  assign src_re    = sr_valid && sr_ready;
  assign src_raddr = sr_addr[AW-1:0];
  assign sr_rdata  = src_rdata;
  assign src_we    = (state == S_LD_SRC) && dv_rsp_valid;
  assign src_waddr = ld_rsp[AW-1:0];
  assign src_wdata = dv_rsp_data;

  assign dst_re    = (dr_valid && dr_ready) || (state == S_WB_RD);
  assign dst_raddr = (state == S_WB_RD) ? wb_idx : dr_addr[AW-1:0];
  assign dr_rdata  = dst_rdata;
  assign dst_we    = (dw_valid && dw_ready) || ((state == S_LD_DST) && dv_rsp_valid);
  assign dst_waddr = (state == S_LD_DST) ? ld_rsp[AW-1:0] : dw_addr[AW-1:0];
  assign dst_wdata = (state == S_LD_DST) ? dv_rsp_data : dw_data;

  // ---------------- DRAM channel ----------------
  always_comb begin
    dv_req_valid = 1'b0;
    dv_req_we    = 1'b0;
    dv_req_addr  = '0;
    dv_req_wdata = dst_rdata;
    unique case (state)
      S_WB_WR: begin
        dv_req_valid = 1'b1;
        dv_req_we    = 1'b1;
        dv_req_addr  = {cur_dst, wb_idx};
      end
      S_LD_SRC: begin
        dv_req_valid = (ld_req < ld_cnt);
        dv_req_addr  = {new_src, {INT_BITS{1'b0}}} + VID_W'(ld_req);
      end
      S_LD_DST: begin
        dv_req_valid = (ld_req < ld_cnt);
        dv_req_addr  = {new_dst, {INT_BITS{1'b0}}} + VID_W'(ld_req);
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE) && (state != S_DONE);
  assign done = (state == S_DONE);
  assign eb_clear = (start && !busy) || ((state == S_DRAIN) && final_q && (outstanding == '0));

  // ---------------- scheduler ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      base_q <= '0; nedges_q <= '0; words_q <= '0; nv_q <= '0;
      fptr <= '0; given <= '0; outstanding <= '0;
      src_loaded <= 1'b0; dst_loaded <= 1'b0; dirty <= 1'b0;
      cur_src <= '0; cur_dst <= '0; dst_cnt <= '0;
      need_src <= 1'b0; need_dst <= 1'b0; final_q <= 1'b0;
      new_src <= '0; new_dst <= '0;
      ld_cnt <= '0; ld_req <= '0; ld_rsp <= '0; wb_idx <= '0;
      sr_rvalid <= 1'b0; dr_rvalid <= 1'b0;
      n_sched <= '0; n_writeback <= '0; n_load_src <= '0; n_load_dst <= '0;
    end else begin
      sr_rvalid <= src_re;
      dr_rvalid <= dr_valid && dr_ready;

      if (em_req_valid && em_req_ready) fptr <= fptr + 1;
      if (dw_valid && dw_ready) dirty <= 1'b1;
      outstanding <= outstanding + 32'(eb_pop) - 32'(ae_done);
      if (eb_pop) given <= given + 1;

      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          state      <= S_RUN;
          base_q     <= edge_base;
          nedges_q   <= num_edges;
          words_q    <= (num_edges + 32'(EDGES_PER_WORD - 1)) / 32'(EDGES_PER_WORD);
          nv_q       <= num_vertices;
          fptr <= '0; given <= '0; outstanding <= '0;
          src_loaded <= 1'b0; dst_loaded <= 1'b0; dirty <= 1'b0;
          final_q    <= 1'b0;
        end

        S_RUN: begin
          if (given == nedges_q) begin
            state   <= S_DRAIN;
            final_q <= 1'b1;
          end else if (head && !match) begin
            state    <= S_DRAIN;
            final_q  <= 1'b0;
            need_src <= !src_loaded || (h_src != cur_src);
            need_dst <= !dst_loaded || (h_dst != cur_dst);
            new_src  <= h_src;
            new_dst  <= h_dst;
            n_sched  <= n_sched + 1;
          end
        end

        S_DRAIN: if (outstanding == '0 && !ae_done) begin
          if (wb_needed) begin
            state  <= S_WB_RD;
            wb_idx <= '0;
          end else if (final_q) begin
            state <= S_DONE;
          end else if (need_src) begin
            state  <= S_LD_SRC;
            ld_cnt <= int_count(new_src);
            ld_req <= '0; ld_rsp <= '0;
          end else begin
            state  <= S_LD_DST;
            ld_cnt <= int_count(new_dst);
            ld_req <= '0; ld_rsp <= '0;
          end
        end

        S_WB_RD: state <= S_WB_WR;

        S_WB_WR: if (dv_req_ready) begin
          if ((AW+1)'(wb_idx) == dst_cnt - 1'b1) begin
            dirty       <= 1'b0;
            n_writeback <= n_writeback + 1;
            if (final_q) begin
              state <= S_DONE;
            end else if (need_src) begin
              state  <= S_LD_SRC;
              ld_cnt <= int_count(new_src);
              ld_req <= '0; ld_rsp <= '0;
            end else begin
              state  <= S_LD_DST;
              ld_cnt <= int_count(new_dst);
              ld_req <= '0; ld_rsp <= '0;
            end
          end else begin
            wb_idx <= wb_idx + 1'b1;
            state  <= S_WB_RD;
          end
        end

        S_LD_SRC: begin
          if (dv_req_valid && dv_req_ready) ld_req <= ld_req + 1'b1;
          if (dv_rsp_valid) begin
            ld_rsp <= ld_rsp + 1'b1;
            if (ld_rsp == ld_cnt - 1'b1) begin
              src_loaded <= 1'b1;
              cur_src    <= new_src;
              n_load_src <= n_load_src + 1;
              if (need_dst) begin
                state  <= S_LD_DST;
                ld_cnt <= int_count(new_dst);
                ld_req <= '0; ld_rsp <= '0;
              end else begin
                state <= S_RUN;
              end
            end
          end
        end

        S_LD_DST: begin
          if (dv_req_valid && dv_req_ready) ld_req <= ld_req + 1'b1;
          if (dv_rsp_valid) begin
            ld_rsp <= ld_rsp + 1'b1;
            if (ld_rsp == ld_cnt - 1'b1) begin
              dst_loaded <= 1'b1;
              cur_dst    <= new_dst;
              dst_cnt    <= ld_cnt;
              dirty      <= 1'b0;
              n_load_dst <= n_load_dst + 1;
              state      <= S_RUN;
            end
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // The accelerator may only touch vertices of the intervals on chip.
  a_src_in_interval: assert property (@(posedge clk) disable iff (!rst_n)
    src_re |-> sr_addr[VID_W-1:INT_BITS] == cur_src);
  a_dst_rd_in_interval: assert property (@(posedge clk) disable iff (!rst_n)
    (dr_valid && dr_ready) |-> dr_addr[VID_W-1:INT_BITS] == cur_dst);
  a_dst_wr_in_interval: assert property (@(posedge clk) disable iff (!rst_n)
    (dw_valid && dw_ready) |-> dw_addr[VID_W-1:INT_BITS] == cur_dst);
  a_done_has_edge: assert property (@(posedge clk) disable iff (!rst_n)
    ae_done |-> (outstanding != '0) || eb_pop);

endmodule
