// edge_buffer: edge buffering between the ReRAM edge memory and the
// accelerator.
//
// The edge memory delivers 512-bit words, each holding EDGES_PER_WORD edges;
// the accelerator takes one edge at a time. The buffer is a FIFO of DEPTH
// words with a read pointer inside the head word. Space is reserved when a
// read is issued to the edge memory (credit), so responses, which cannot be
// back-pressured, always find room: can_issue is high only while the words
// held plus the reads in flight are fewer than DEPTH.
//
// Interface: issue (a word read was sent), in_valid/in_data (the word
// arrives), out_valid/out_ready/out_edge (one edge per handshake, edge 0 of a
// word first, i.e. bits [63:0]). clear empties the buffer and forgets the
// reads in flight; it is used once a stream is complete, to drop the unused
// tail of the last word. An edge enters and can leave one cycle later.
//
// That the controller buffers edges is the document's; the depth, the credit
// scheme and the word layout are this design's.
module edge_buffer
  import hyve_pkg::*;
#(
  parameter int DEPTH = 8,
  localparam int PW = $clog2(DEPTH),
  localparam int CW = $clog2(DEPTH + 1),
  localparam int EW = $clog2(EDGES_PER_WORD)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               issue,
  output logic               can_issue,
  input  logic               in_valid,
  input  logic [IO_BITS-1:0] in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output edge_t              out_edge,
  output logic               full       // every slot held or reserved
);

  logic [IO_BITS-1:0] mem [DEPTH];
  logic [PW-1:0]      wp, rp;
  logic [CW-1:0]      held;       // words in the FIFO
  logic [CW-1:0]      reserved;   // words held plus reads in flight
  logic [EW-1:0]      sub;        // next edge inside the head word

  wire pop_word = out_valid && out_ready && (sub == EW'(EDGES_PER_WORD - 1));

  assign out_valid = (held != '0);
  assign out_edge  = edge_t'(mem[rp][sub*EDGE_W +: EDGE_W]);
  assign can_issue = (reserved < CW'(DEPTH));
  assign full      = !can_issue;

  always_ff @(posedge clk) begin
    if (in_valid) mem[wp] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; held <= '0; reserved <= '0; sub <= '0;
    end else if (clear) begin
      wp <= '0; rp <= '0; held <= '0; reserved <= '0; sub <= '0;
    end else begin
      if (in_valid) wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (out_valid && out_ready) sub <= sub + 1'b1;
      if (pop_word) rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      held     <= held + CW'(in_valid) - CW'(pop_word);
      reserved <= reserved + CW'(issue && can_issue) - CW'(pop_word);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> held < CW'(DEPTH));
  a_issue_ok:    assert property (@(posedge clk) disable iff (!rst_n) issue |-> can_issue);

endmodule
