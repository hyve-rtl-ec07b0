// tb_edge_buffer: self-checking test of the edge buffer. A producer issues
// word reads whenever can_issue allows and delivers each word a random number
// of cycles later (in order); a consumer takes edges with random stalls. The
// edges must come out in order, edge 0 of each word first; the number of words
// held plus in flight must never exceed DEPTH; the buffer must fill up at
// least once; clear must empty it.
module tb_edge_buffer;
  import hyve_pkg::*;
  localparam int DEPTH = 4, NWORDS = 200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, issue, can_issue, in_valid, out_valid, out_ready, full;
  logic [IO_BITS-1:0] in_data;
  edge_t out_edge;

  edge_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .clear, .issue, .can_issue, .in_valid,
    .in_data, .out_valid, .out_ready, .out_edge, .full);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // word w, edge k carries src = w*8+k, dst = ~(w*8+k)
  function automatic logic [IO_BITS-1:0] word_of(input int w);
    for (int k = 0; k < EDGES_PER_WORD; k++)
      word_of[k*EDGE_W +: EDGE_W] = {~32'(w * 8 + k), 32'(w * 8 + k)};
  endfunction

  bit auto_drive = 1;
  int issued = 0, delivered = 0, taken = 0, inflight = 0, held_words = 0, full_seen = 0;
  int due [$];
  int cyc = 0;

  always @(negedge clk) begin
    cyc++;
    if (rst_n && !clear && auto_drive) begin
      // outputs of the previous posedge
      if (full) full_seen++;
      // decide this cycle's inputs
      issue = can_issue && (issued < NWORDS) && ($urandom_range(0, 3) != 0);
      if (issue) begin due.push_back(cyc + $urandom_range(1, 4)); issued++; end
      in_valid = 0;
      if (due.size() > 0 && due[0] <= cyc) begin
        void'(due.pop_front());
        in_valid = 1; in_data = word_of(delivered); delivered++;
      end
      out_ready = ($urandom_range(0, 2) != 0);
    end
  end

  always @(posedge clk) if (rst_n && auto_drive && !clear && out_valid && out_ready) begin
    check(out_edge.src == 32'(taken) && out_edge.dst == ~32'(taken),
          $sformatf("edge %0d: got src %0d", taken, out_edge.src));
    taken++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; issue = 0; in_valid = 0; in_data = '0; out_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (taken < NWORDS * EDGES_PER_WORD) @(negedge clk);
    check(full_seen > 0, "buffer filled up");
    check(!out_valid, "empty at the end");
    // partly consumed word, then clear
    auto_drive = 0; out_ready = 0; issue = 0; in_valid = 0;
    @(negedge clk);
    clear = 1; @(negedge clk); clear = 0;
    issue = 1; @(negedge clk); issue = 0;
    in_valid = 1; in_data = word_of(0); @(negedge clk); in_valid = 0;
    check(out_valid, "edge available one cycle after the word arrives");
    out_ready = 1; @(negedge clk); out_ready = 0;
    check(out_valid, "rest of the word still there");
    clear = 1; @(negedge clk); clear = 0;
    check(!out_valid && can_issue, "clear empties the buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
