// tb_hyve_controller: end-to-end test of the HyVE controller with its edge
// buffer, the on-chip vertex SRAM, and behavioural models of the edge memory,
// the DRAM and a BFS accelerator. Edges are generated block by block
// (interval-block order, source interval major) and several BFS passes are
// run. After every pass the DRAM contents and the controller's counts of
// scheduling events, write-backs and interval loads are compared with a
// reference model of the scheduling rules written independently in this
// testbench. Also checks that the vertex ports are never ready while the
// controller is scheduling, and that scheduling, stalls, write-backs and a
// full edge buffer all happen.
module tb_hyve_controller;
  import hyve_pkg::*;
  localparam int INT_BITS = 3, ISZ = 1 << INT_BITS;
  localparam int NV = 29, NI = (NV + ISZ - 1) / ISZ;
  localparam int EAW = 8, MAXW = 256;
  localparam logic [31:0] INF = 32'hFFFF_FFFF;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [EAW-1:0] edge_base;
  logic [31:0] num_edges;
  logic em_req_valid, em_req_ready, em_rsp_valid;
  logic [EAW-1:0] em_req_addr;
  logic [511:0] em_rsp_data;
  logic dv_req_valid, dv_req_ready, dv_req_we, dv_rsp_valid;
  logic [31:0] dv_req_addr, dv_req_wdata, dv_rsp_data;
  logic ae_valid, ae_ready, ae_done;
  edge_t ae_edge;
  logic sr_valid, sr_ready, sr_rvalid, dr_valid, dr_ready, dr_rvalid, dw_valid, dw_ready;
  logic [31:0] sr_addr, sr_rdata, dr_addr, dr_rdata, dw_addr, dw_data;
  logic src_re, src_we, dst_re, dst_we;
  logic [INT_BITS-1:0] src_raddr, src_waddr, dst_raddr, dst_waddr;
  logic [31:0] src_rdata, src_wdata, dst_rdata, dst_wdata;
  logic vertex_stall, ebuf_full;
  logic [31:0] n_sched, n_writeback, n_load_src, n_load_dst;

  hyve_controller #(.INT_BITS(INT_BITS), .EADDR_W(EAW), .EBUF_DEPTH(4)) dut (
    .clk, .rst_n, .start, .edge_base, .num_edges, .num_vertices(32'(NV)), .busy, .done,
    .em_req_valid, .em_req_ready, .em_req_addr, .em_rsp_valid, .em_rsp_data,
    .dv_req_valid, .dv_req_ready, .dv_req_we, .dv_req_addr, .dv_req_wdata, .dv_rsp_valid, .dv_rsp_data,
    .ae_valid, .ae_ready, .ae_edge, .ae_done,
    .sr_valid, .sr_ready, .sr_addr, .sr_rvalid, .sr_rdata,
    .dr_valid, .dr_ready, .dr_addr, .dr_rvalid, .dr_rdata,
    .dw_valid, .dw_ready, .dw_addr, .dw_data,
    .src_re, .src_raddr, .src_rdata, .src_we, .src_waddr, .src_wdata,
    .dst_re, .dst_raddr, .dst_rdata, .dst_we, .dst_waddr, .dst_wdata,
    .vertex_stall, .ebuf_full, .n_sched, .n_writeback, .n_load_src, .n_load_dst);

  onchip_vertex_mem #(.DEPTH(ISZ)) u_vmem (
    .clk, .src_re, .src_raddr, .src_rdata, .src_we, .src_waddr, .src_wdata,
    .dst_re, .dst_raddr, .dst_rdata, .dst_we, .dst_waddr, .dst_wdata);

  edge_mem_model #(.DEPTH(MAXW), .AW(EAW), .LAT(3), .STALL_PCT(10)) u_em (
    .clk, .rst_n, .req_valid(em_req_valid), .req_ready(em_req_ready), .req_addr(em_req_addr),
    .rsp_valid(em_rsp_valid), .rsp_data(em_rsp_data));

  dram_model #(.DEPTH(64), .LAT(3), .STALL_PCT(25)) u_dram (
    .clk, .rst_n, .req_valid(dv_req_valid), .req_ready(dv_req_ready), .req_we(dv_req_we),
    .req_addr(dv_req_addr), .req_wdata(dv_req_wdata), .rsp_valid(dv_rsp_valid), .rsp_data(dv_rsp_data));

  acc_model #(.MAX_GAP(2)) u_acc (
    .clk, .rst_n, .alg(2'd0), .ae_valid, .ae_ready, .ae_edge, .ae_done,
    .sr_valid, .sr_ready, .sr_addr, .sr_rvalid, .sr_rdata,
    .dr_valid, .dr_ready, .dr_addr, .dr_rvalid, .dr_rdata,
    .dw_valid, .dw_ready, .dw_addr, .dw_data);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- reference model ----------------
  logic [31:0] es [$], ed [$];
  logic [31:0] rdram [NV];
  int r_sched, r_wb, r_lsrc, r_ldst;

  function automatic void ref_pass();
    logic [31:0] sv [ISZ], dv [ISZ];
    bit sl = 0, dl = 0, dirty = 0, ns, nd;
    int cs = 0, cd = 0, hs, hd;
    logic [31:0] s, d;
    for (int k = 0; k < es.size(); k++) begin
      hs = int'(es[k] >> INT_BITS); hd = int'(ed[k] >> INT_BITS);
      if (!(sl && dl && hs == cs && hd == cd)) begin
        r_sched++;
        ns = !sl || hs != cs; nd = !dl || hd != cd;
        if (dirty && dl && (nd || hs == cd)) begin
          for (int i = 0; i < ISZ; i++) if (cd * ISZ + i < NV) rdram[cd * ISZ + i] = dv[i];
          dirty = 0; r_wb++;
        end
        if (ns) begin
          for (int i = 0; i < ISZ; i++) if (hs * ISZ + i < NV) sv[i] = rdram[hs * ISZ + i];
          cs = hs; sl = 1; r_lsrc++;
        end
        if (nd) begin
          for (int i = 0; i < ISZ; i++) if (hd * ISZ + i < NV) dv[i] = rdram[hd * ISZ + i];
          cd = hd; dl = 1; dirty = 0; r_ldst++;
        end
      end
      s = sv[es[k] % ISZ]; d = dv[ed[k] % ISZ];
      if (s != INF && s + 1 < d) begin dv[ed[k] % ISZ] = s + 1; dirty = 1; end
    end
    if (dirty && dl) begin
      for (int i = 0; i < ISZ; i++) if (cd * ISZ + i < NV) rdram[cd * ISZ + i] = dv[i];
      r_wb++;
    end
  endfunction

  // ---------------- mechanism counters ----------------
  int stall_cycles = 0, full_cycles = 0, em_backpressure = 0, bad_ready = 0;
  always @(negedge clk) if (rst_n) begin
    if (vertex_stall && (sr_ready || dr_ready || dw_ready)) bad_ready++;
    if (vertex_stall) stall_cycles++;
    if (ebuf_full && busy) full_cycles++;
    if (em_req_valid && !em_req_ready) em_backpressure++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nw, base;
  logic [511:0] w;
  initial begin
    start = 0; edge_base = 0; num_edges = 0;
    // graph: random edges, block by block, source interval major
    for (int i = 0; i < NI; i++)
      for (int j = 0; j < NI; j++) begin
        int k, s, d;
        k = (($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, 6));
        for (int e = 0; e < k; e++) begin
          s = i * ISZ + $urandom_range(0, ISZ - 1);
          d = j * ISZ + $urandom_range(0, ISZ - 1);
          if (s >= NV) s = NV - 1;
          if (d >= NV) d = NV - 1;
          es.push_back(32'(s)); ed.push_back(32'(d));
        end
      end
    check(es.size() > 20, "graph has edges");
    base = 5;
    nw = (es.size() + 7) / 8;
    for (int k = 0; k < nw * 8; k++) begin
      if (k % 8 == 0) w = '0;
      if (k < es.size()) w[(k % 8) * 64 +: 64] = {ed[k], es[k]};
      else w[(k % 8) * 64 +: 64] = {$urandom, $urandom};   // junk tail
      if (k % 8 == 7) u_em.mem[base + k / 8] = w;
    end
    for (int v = 0; v < NV; v++) begin
      rdram[v] = (v == 0) ? 0 : INF;
      u_dram.mem[v] = rdram[v];
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int pass = 0; pass < 4; pass++) begin
      r_sched = 0; r_wb = 0; r_lsrc = 0; r_ldst = 0;
      ref_pass();
      edge_base = EAW'(base); num_edges = es.size();
      start = 1; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      for (int v = 0; v < NV; v++)
        check(u_dram.mem[v] == rdram[v], $sformatf("pass %0d vertex %0d: %0d expected %0d", pass, v, u_dram.mem[v], rdram[v]));
      check(n_sched == r_sched, $sformatf("pass %0d scheduling events %0d expected %0d", pass, n_sched, r_sched));
      check(n_writeback == r_wb, $sformatf("pass %0d write-backs %0d expected %0d", pass, n_writeback, r_wb));
      check(n_load_src == r_lsrc, $sformatf("pass %0d source loads %0d expected %0d", pass, n_load_src, r_lsrc));
      check(n_load_dst == r_ldst, $sformatf("pass %0d destination loads %0d expected %0d", pass, n_load_dst, r_ldst));
      check(u_acc.edges == (pass + 1) * es.size(), $sformatf("edges processed %0d", u_acc.edges));
      // controller counters are cumulative: reset the reference by subtraction
      r_sched = n_sched; r_wb = n_writeback; r_lsrc = n_load_src; r_ldst = n_load_dst;
      rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
    end
    check(u_acc.updates > 0, "accelerator updated vertices");
    check(bad_ready == 0, $sformatf("vertex port ready during scheduling %0d times", bad_ready));
    check(stall_cycles > 0, "vertex ports stalled during scheduling");
    check(full_cycles > 0, "edge buffer full at least once");
    check(em_backpressure > 0, "edge memory back-pressure seen");
    $display("edges=%0d sched=%0d stall=%0d full=%0d", es.size(), n_sched, stall_cycles, full_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
