// tb_hyve_workloads: runs the evaluated algorithms to convergence on HyVE.
// Two synthetic graphs keep the edge-to-vertex ratios of a small and a large
// social-network dataset (about 2.6 and 14 edges per vertex, as com-youtube
// and live-journal) at a size that simulates quickly: 96 vertices in three
// 32-vertex intervals. On each graph, breadth-first search (from vertex 0)
// and connected components (on the symmetrised graph, label = smallest vertex
// index in the component) are iterated pass by pass until a pass changes
// nothing. The converged vertex values in DRAM are compared with results
// computed here by a queue-based BFS and a union-find, which do not depend on
// the order in which HyVE processes edges. PageRank runs ITER_PR iterations of
// one pass each in 16-bit fixed point (total rank 2^14, damping 85/100): HyVE
// gathers the contributions of all in-edges into each vertex, the testbench
// checks every gathered sum exactly against a direct sum over the edge list,
// then applies rank = 15/100 / N + 85/100 * sum and sets the next
// contributions rank / out-degree.
module tb_hyve_workloads;
  import hyve_pkg::*;
  localparam int NBK = 4, NB = 4, MM = 4, ROWS = 32, COLS = 256;
  localparam int INT_BITS = 5, ISZ = 1 << INT_BITS;
  localparam int NV = 96, NI = NV / ISZ;
  localparam int EAW = $clog2(NBK) + $clog2(NB) + $clog2(COLS / (IO_BITS / MM)) + $clog2(ROWS);
  localparam int MAX_PASSES = 40, ITER_PR = 10, ONE = 1 << 14;
  localparam logic [31:0] INF = 32'hFFFF_FFFF;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [1:0] alg;
  logic [EAW-1:0] edge_base;
  logic [31:0] num_edges;
  logic host_valid, host_ready;
  logic [EAW-1:0] host_addr;
  logic [IO_BITS-1:0] host_wdata;
  logic [IO_BITS/8-1:0] host_wmask;
  logic dv_req_valid, dv_req_ready, dv_req_we, dv_rsp_valid;
  logic [31:0] dv_req_addr, dv_req_wdata, dv_rsp_data;
  logic ae_valid, ae_ready, ae_done;
  edge_t ae_edge;
  logic sr_valid, sr_ready, sr_rvalid, dr_valid, dr_ready, dr_rvalid, dw_valid, dw_ready;
  logic [31:0] sr_addr, sr_rdata, dr_addr, dr_rdata, dw_addr, dw_data;
  logic [NBK-1:0] bank_powered;
  logic vertex_stall, ebuf_full;
  logic [31:0] n_sched, n_writeback, n_load_src, n_load_dst;

  hyve_top #(
    .NUM_BANKS(NBK), .N_BLOCKS(NB), .M_MATS(MM), .ROWS(ROWS), .COLS(COLS), .INT_BITS(INT_BITS)
  ) dut (
    .clk, .rst_n, .start, .edge_base, .num_edges, .num_vertices(32'(NV)), .busy, .done,
    .host_valid, .host_ready, .host_addr, .host_wdata, .host_wmask,
    .dv_req_valid, .dv_req_ready, .dv_req_we, .dv_req_addr, .dv_req_wdata, .dv_rsp_valid, .dv_rsp_data,
    .ae_valid, .ae_ready, .ae_edge, .ae_done,
    .sr_valid, .sr_ready, .sr_addr, .sr_rvalid, .sr_rdata,
    .dr_valid, .dr_ready, .dr_addr, .dr_rvalid, .dr_rdata,
    .dw_valid, .dw_ready, .dw_addr, .dw_data,
    .bank_powered, .vertex_stall, .ebuf_full, .n_sched, .n_writeback, .n_load_src, .n_load_dst);

  dram_model #(.DEPTH(NV), .LAT(3), .STALL_PCT(10)) u_dram (
    .clk, .rst_n, .req_valid(dv_req_valid), .req_ready(dv_req_ready), .req_we(dv_req_we),
    .req_addr(dv_req_addr), .req_wdata(dv_req_wdata), .rsp_valid(dv_rsp_valid), .rsp_data(dv_rsp_data));

  acc_model #(.MAX_GAP(1)) u_acc (
    .clk, .rst_n, .alg, .ae_valid, .ae_ready, .ae_edge, .ae_done,
    .sr_valid, .sr_ready, .sr_addr, .sr_rvalid, .sr_rdata,
    .dr_valid, .dr_ready, .dr_addr, .dr_rvalid, .dr_rdata,
    .dw_valid, .dw_ready, .dw_addr, .dw_data);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // edge lists in interval-block order
  logic [31:0] es [$], ed [$];
  logic [31:0] bs [NI*NI][$], bd [NI*NI][$];
  logic [31:0] expv [NV];
  int parent [NV];

  function automatic int find(int v);
    while (parent[v] != v) v = parent[v];
    return v;
  endfunction

  task automatic make_graph(input int ne, input bit symmetric);
    int s, d, b;
    es.delete(); ed.delete();
    for (int i = 0; i < NI * NI; i++) begin bs[i].delete(); bd[i].delete(); end
    for (int e = 0; e < ne; e++) begin
      s = $urandom_range(0, NV - 1);
      d = $urandom_range(0, NV - 1);
      b = (s / ISZ) * NI + d / ISZ;
      bs[b].push_back(32'(s)); bd[b].push_back(32'(d));
      if (symmetric) begin
        b = (d / ISZ) * NI + s / ISZ;
        bs[b].push_back(32'(d)); bd[b].push_back(32'(s));
      end
    end
    for (int i = 0; i < NI * NI; i++)
      foreach (bs[i][k]) begin es.push_back(bs[i][k]); ed.push_back(bd[i][k]); end
  endtask

  task automatic host_write(input int a, input logic [IO_BITS-1:0] d);
    bit ok;
    host_valid = 1; host_addr = EAW'(a); host_wdata = d; host_wmask = '1;
    do begin #1 ok = host_ready; @(negedge clk); end while (!ok);
    host_valid = 0;
  endtask

  task automatic load_edges(input int base);
    logic [IO_BITS-1:0] w;
    int nw;
    nw = (es.size() + EDGES_PER_WORD - 1) / EDGES_PER_WORD;
    check(base + nw <= (1 << EAW), "edge list fits the edge memory");
    for (int x = 0; x < nw * EDGES_PER_WORD; x++) begin
      if (x % EDGES_PER_WORD == 0) w = '0;
      if (x < es.size()) w[(x % EDGES_PER_WORD) * EDGE_W +: EDGE_W] = {ed[x], es[x]};
      if (x % EDGES_PER_WORD == EDGES_PER_WORD - 1) host_write(base + x / EDGES_PER_WORD, w);
    end
  endtask

  // reference results
  task automatic ref_bfs();
    int q [$];
    int v;
    for (int i = 0; i < NV; i++) expv[i] = INF;
    expv[0] = 0; q.push_back(0);
    while (q.size() > 0) begin
      v = q.pop_front();
      foreach (es[k]) if (es[k] == 32'(v) && expv[ed[k]] == INF) begin
        expv[ed[k]] = expv[v] + 1; q.push_back(int'(ed[k]));
      end
    end
  endtask

  task automatic ref_cc();
    int a, b, m [NV];
    for (int i = 0; i < NV; i++) parent[i] = i;
    foreach (es[k]) begin
      a = find(int'(es[k])); b = find(int'(ed[k]));
      if (a != b) parent[(a > b) ? a : b] = (a > b) ? b : a;
    end
    for (int i = 0; i < NV; i++) m[i] = NV;
    for (int i = 0; i < NV; i++) if (i < m[find(i)]) m[find(i)] = i;
    for (int i = 0; i < NV; i++) expv[i] = 32'(m[find(i)]);
  endtask

  task automatic run_to_convergence(input string name, input bit cc, input int base);
    int passes, prev_upd;
    alg = cc ? 2'd1 : 2'd0;
    for (int v = 0; v < NV; v++) u_dram.mem[v] = cc ? 32'(v) : ((v == 0) ? 32'd0 : INF);
    passes = 0;
    do begin
      prev_upd = u_acc.updates;
      edge_base = EAW'(base); num_edges = es.size();
      start = 1; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      passes++;
    end while (u_acc.updates != prev_upd && passes < MAX_PASSES);
    check(passes < MAX_PASSES, $sformatf("%s converged in %0d passes", name, passes));
    check(passes > 1, $sformatf("%s needed more than one pass (%0d)", name, passes));
    if (cc) ref_cc(); else ref_bfs();
    for (int v = 0; v < NV; v++)
      check(u_dram.mem[v] == expv[v], $sformatf("%s vertex %0d: %0d expected %0d", name, v, u_dram.mem[v], expv[v]));
    $display("%s: %0d edges, %0d passes, %0d scheduling events so far", name, es.size(), passes, n_sched);
  endtask

  task automatic run_pagerank(input string name, input int base);
    int rank [NV], outdeg [NV], contrib [NV], sum [NV];
    for (int v = 0; v < NV; v++) begin rank[v] = ONE / NV; outdeg[v] = 0; end
    foreach (es[k]) outdeg[es[k]]++;
    alg = 2'd2;
    for (int it = 0; it < ITER_PR; it++) begin
      for (int v = 0; v < NV; v++) begin
        contrib[v] = (outdeg[v] > 0) ? rank[v] / outdeg[v] : 0;
        sum[v] = 0;
        u_dram.mem[v] = {16'd0, 16'(contrib[v])};
      end
      foreach (es[k]) sum[ed[k]] += contrib[es[k]];
      edge_base = EAW'(base); num_edges = es.size();
      start = 1; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      for (int v = 0; v < NV; v++) begin
        check(u_dram.mem[v] == {16'(sum[v]), 16'(contrib[v])},
              $sformatf("%s iteration %0d vertex %0d: %h expected %h", name, it, v,
                        u_dram.mem[v], {16'(sum[v]), 16'(contrib[v])}));
        rank[v] = (ONE * 15 / 100) / NV + 85 * int'(u_dram.mem[v][31:16]) / 100;
      end
    end
    $display("%s: %0d edges, %0d iterations, rank of vertex 0 = %0d / %0d", name, es.size(),
             ITER_PR, rank[0], ONE);
  endtask

  int ratios [2] = '{26, 142};   // edges per vertex x 10
  string names [2] = '{"YT-like", "LJ-like"};
  initial begin
    start = 0; edge_base = 0; num_edges = 0; alg = 0;
    host_valid = 0; host_addr = 0; host_wdata = 0; host_wmask = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int g = 0; g < 2; g++) begin
      make_graph(NV * ratios[g] / 10, 0);
      load_edges(0);
      run_to_convergence({names[g], " BFS"}, 0, 0);
      run_pagerank({names[g], " PR"}, 0);
      make_graph(NV * ratios[g] / 20, 1);     // symmetrised: same edge count
      load_edges(0);
      run_to_convergence({names[g], " CC"}, 1, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
