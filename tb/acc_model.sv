// acc_model: behavioural model of a graph accelerator for the testbenches.
// Per edge it reads the source and destination properties and may write the
// destination, as selected by alg:
//   0, breadth-first search: levels, INF = not reached;
//      if src + 1 < dst then dst = src + 1.
//   1, connected components: labels; if src < dst then dst = src.
//   2, PageRank gather: each vertex word holds two 16-bit halves, the
//      vertex's outgoing contribution (low) and the sum being gathered
//      (high); always dst.high += src.low. Keeping both in one word lets one
//      vertex array serve; the per-vertex apply step is left to the host.
// Requests are held until the vertex
// port is ready; a random pause (up to MAX_GAP cycles) precedes taking each
// edge. done pulses once per finished edge.
module acc_model #(
  parameter int MAX_GAP = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  alg,
  input  logic        ae_valid,
  output logic        ae_ready,
  input  logic [63:0] ae_edge,
  output logic        ae_done,
  output logic        sr_valid,
  input  logic        sr_ready,
  output logic [31:0] sr_addr,
  input  logic        sr_rvalid,
  input  logic [31:0] sr_rdata,
  output logic        dr_valid,
  input  logic        dr_ready,
  output logic [31:0] dr_addr,
  input  logic        dr_rvalid,
  input  logic [31:0] dr_rdata,
  output logic        dw_valid,
  input  logic        dw_ready,
  output logic [31:0] dw_addr,
  output logic [31:0] dw_data
);
  localparam logic [31:0] INF = 32'hFFFF_FFFF;
  typedef enum logic [2:0] {A_GAP, A_TAKE, A_REQ, A_WAIT, A_WR, A_DONE} a_state_t;
  a_state_t st;
  logic [31:0] s_id, d_id, s_val, d_val;
  logic        s_got, d_got, s_sent, d_sent;
  int          gap;
  int unsigned edges = 0, updates = 0;

  assign ae_ready = (st == A_TAKE);
  assign sr_valid = (st == A_REQ) && !s_sent;
  assign dr_valid = (st == A_REQ) && !d_sent;
  assign sr_addr  = s_id;
  assign dr_addr  = d_id;
  assign dw_valid = (st == A_WR);
  assign dw_addr  = d_id;
  always_comb
    unique case (alg)
      2'd1:    dw_data = s_val;
      2'd2:    dw_data = {d_val[31:16] + s_val[15:0], d_val[15:0]};
      default: dw_data = s_val + 1;
    endcase
  assign ae_done  = (st == A_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_GAP; gap <= 0;
      s_got <= 0; d_got <= 0; s_sent <= 0; d_sent <= 0;
    end else begin
      unique case (st)
        A_GAP:  if (gap == 0) st <= A_TAKE; else gap <= gap - 1;
        A_TAKE: if (ae_valid) begin
          s_id <= ae_edge[31:0]; d_id <= ae_edge[63:32];
          s_got <= 0; d_got <= 0; s_sent <= 0; d_sent <= 0;
          st <= A_REQ;
          edges++;
        end
        A_REQ, A_WAIT: begin
          if (sr_valid && sr_ready) s_sent <= 1;
          if (dr_valid && dr_ready) d_sent <= 1;
          if (sr_rvalid) begin s_val <= sr_rdata; s_got <= 1; end
          if (dr_rvalid) begin d_val <= dr_rdata; d_got <= 1; end
          if ((s_sent || (sr_valid && sr_ready)) && (d_sent || (dr_valid && dr_ready))) st <= A_WAIT;
          if (st == A_WAIT && s_got && d_got)
            st <= (alg == 2'd2 || (alg == 2'd1 ? (s_val < d_val) : (s_val != INF && s_val + 1 < d_val))) ? A_WR : A_DONE;
        end
        A_WR: if (dw_ready) begin st <= A_DONE; updates++; end
        A_DONE: begin st <= A_GAP; gap <= $urandom_range(0, MAX_GAP); end
        default: st <= A_GAP;
      endcase
    end
  end
endmodule
