// tb_hyve_top: end-to-end test of the whole HyVE hierarchy at reduced sizes.
// The edge list is written into the ReRAM edge memory through the host port,
// starting at a word address chosen so the stream crosses from one bank into
// the next; BFS passes then run with a behavioural DRAM and a behavioural BFS
// accelerator. After every pass the DRAM contents and the controller's counts
// (scheduling events, write-backs, interval loads) are compared with a
// reference model of the scheduling rules. Every mechanism of the design must
// occur at least once: interval scheduling, write-back, source and destination
// loads, vertex-port stall, full edge buffer, bank wake-up, bank gate-off,
// a bank switch inside one stream, and sub-bank (block) interleaving.
module tb_hyve_top;
  import hyve_pkg::*;
  localparam int NBK = 4, NB = 4, MM = 4, ROWS = 2, COLS = 256;
  localparam int IDLE = 64, WAKE = 4;
  localparam int INT_BITS = 3, ISZ = 1 << INT_BITS;
  localparam int NV = 29, NI = (NV + ISZ - 1) / ISZ;
  localparam int EAW = $clog2(NBK) + $clog2(NB) + $clog2(COLS / (IO_BITS / MM)) + $clog2(ROWS);
  localparam int WORDS = 1 << EAW, PER_BANK = WORDS / NBK;
  localparam int BASE = PER_BANK - 5;
  localparam int MAX_PER_BLOCK = 16;
  localparam logic [31:0] INF = 32'hFFFF_FFFF;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
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
    .NUM_BANKS(NBK), .N_BLOCKS(NB), .M_MATS(MM), .ROWS(ROWS), .COLS(COLS),
    .IDLE_CYCLES(IDLE), .WAKE_CYCLES(WAKE), .INT_BITS(INT_BITS), .EBUF_DEPTH(4)
  ) dut (
    .clk, .rst_n, .start, .edge_base, .num_edges, .num_vertices(32'(NV)), .busy, .done,
    .host_valid, .host_ready, .host_addr, .host_wdata, .host_wmask,
    .dv_req_valid, .dv_req_ready, .dv_req_we, .dv_req_addr, .dv_req_wdata, .dv_rsp_valid, .dv_rsp_data,
    .ae_valid, .ae_ready, .ae_edge, .ae_done,
    .sr_valid, .sr_ready, .sr_addr, .sr_rvalid, .sr_rdata,
    .dr_valid, .dr_ready, .dr_addr, .dr_rvalid, .dr_rdata,
    .dw_valid, .dw_ready, .dw_addr, .dw_data,
    .bank_powered, .vertex_stall, .ebuf_full, .n_sched, .n_writeback, .n_load_src, .n_load_dst);

  dram_model #(.DEPTH(NV), .LAT(3), .STALL_PCT(25)) u_dram (
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

  // ---------------- reference model of one pass ----------------
  logic [31:0] es [$], ed [$];
  logic [31:0] rdram [NV];
  logic [31:0] rsv [ISZ], rdv [ISZ];
  int r_sched, r_wb, r_lsrc, r_ldst;

  function automatic void ref_pass();
    bit sl = 0, dl = 0, dirty = 0, ns, nd;
    int cs = 0, cd = 0, hs, hd;
    logic [31:0] s, d;
    for (int k = 0; k < es.size(); k++) begin
      hs = int'(es[k] >> INT_BITS); hd = int'(ed[k] >> INT_BITS);
      if (!(sl && dl && hs == cs && hd == cd)) begin
        r_sched++;
        ns = !sl || hs != cs; nd = !dl || hd != cd;
        if (dirty && dl && (nd || hs == cd)) begin
          for (int i = 0; i < ISZ; i++) if (cd * ISZ + i < NV) rdram[cd * ISZ + i] = rdv[i];
          dirty = 0; r_wb++;
        end
        if (ns) begin
          for (int i = 0; i < ISZ; i++) if (hs * ISZ + i < NV) rsv[i] = rdram[hs * ISZ + i];
          cs = hs; sl = 1; r_lsrc++;
        end
        if (nd) begin
          for (int i = 0; i < ISZ; i++) if (hd * ISZ + i < NV) rdv[i] = rdram[hd * ISZ + i];
          cd = hd; dl = 1; dirty = 0; r_ldst++;
        end
      end
      s = rsv[es[k] % ISZ]; d = rdv[ed[k] % ISZ];
      if (s != INF && s + 1 < d) begin rdv[ed[k] % ISZ] = s + 1; dirty = 1; end
    end
    if (dirty && dl) begin
      for (int i = 0; i < ISZ; i++) if (cd * ISZ + i < NV) rdram[cd * ISZ + i] = rdv[i];
      r_wb++;
    end
  endfunction

  // ---------------- mechanism counters ----------------
  int stall_cycles = 0, full_cycles = 0, wakeups = 0, gate_offs = 0, interleave_cycles = 0;
  int host_waits = 0, bad_ready = 0;
  int banks_used [$];
  logic [NBK-1:0] prev_pw = '0;
  always @(negedge clk) if (rst_n) begin
    if (vertex_stall && (sr_ready || dr_ready || dw_ready)) bad_ready++;
    if (vertex_stall && dut.u_ctrl.eb_valid) stall_cycles++;
    if (ebuf_full && busy) full_cycles++;
    if (host_valid && !host_ready) host_waits++;
    for (int k = 0; k < NBK; k++) begin
      if (bank_powered[k] && !prev_pw[k]) begin
        wakeups++;
        if (busy) banks_used.push_back(k);
      end
      if (!bank_powered[k] && prev_pw[k]) gate_offs++;
    end
    prev_pw = bank_powered;
    if ($countones(dut.u_edge_mem.g_bank[0].u_bank.blk_busy) > 1 ||
        $countones(dut.u_edge_mem.g_bank[1].u_bank.blk_busy) > 1) interleave_cycles++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(input int a, input logic [IO_BITS-1:0] d);
    bit ok;
    host_valid = 1; host_addr = EAW'(a); host_wdata = d; host_wmask = '1;
    do begin #1 ok = host_ready; @(negedge clk); end while (!ok);
    host_valid = 0;
  endtask

  int nw, k, s, d, passes_done;
  logic [IO_BITS-1:0] w;
  initial begin
    start = 0; edge_base = 0; num_edges = 0;
    host_valid = 0; host_addr = 0; host_wdata = 0; host_wmask = 0;
    for (int i = 0; i < NI; i++)
      for (int j = 0; j < NI; j++) begin
        k = (($urandom_range(0, 4) == 0) ? 0 : $urandom_range(1, MAX_PER_BLOCK));
        for (int e = 0; e < k; e++) begin
          s = i * ISZ + $urandom_range(0, ISZ - 1);
          d = j * ISZ + $urandom_range(0, ISZ - 1);
          if (s >= NV) s = NV - 1;
          if (d >= NV) d = NV - 1;
          es.push_back(32'(s)); ed.push_back(32'(d));
        end
      end
    nw = (es.size() + EDGES_PER_WORD - 1) / EDGES_PER_WORD;
    check(BASE + nw > PER_BANK && BASE + nw <= WORDS, $sformatf("%0d edge words from %0d cross a bank", nw, BASE));
    for (int v = 0; v < NV; v++) begin
      rdram[v] = (v == 0) ? 0 : INF;
      u_dram.mem[v] = rdram[v];
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    // load the edge memory through the host port
    for (int x = 0; x < nw * EDGES_PER_WORD; x++) begin
      if (x % EDGES_PER_WORD == 0) w = '0;
      if (x < es.size()) w[(x % EDGES_PER_WORD) * EDGE_W +: EDGE_W] = {ed[x], es[x]};
      else w[(x % EDGES_PER_WORD) * EDGE_W +: EDGE_W] = {$urandom, $urandom};
      if (x % EDGES_PER_WORD == EDGES_PER_WORD - 1) host_write(BASE + x / EDGES_PER_WORD, w);
    end
    for (int pass = 0; pass < 3; pass++) begin
      repeat (IDLE + WAKE + 20) @(negedge clk);      // every bank gated off again
      check(bank_powered == '0, "banks gated off between passes");
      r_sched = n_sched; r_wb = n_writeback; r_lsrc = n_load_src; r_ldst = n_load_dst;
      ref_pass();
      edge_base = EAW'(BASE); num_edges = es.size();
      start = 1; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      for (int v = 0; v < NV; v++)
        check(u_dram.mem[v] == rdram[v], $sformatf("pass %0d vertex %0d: %0d expected %0d", pass, v, u_dram.mem[v], rdram[v]));
      check(n_sched == r_sched, $sformatf("pass %0d scheduling events %0d expected %0d", pass, n_sched, r_sched));
      check(n_writeback == r_wb, $sformatf("pass %0d write-backs %0d expected %0d", pass, n_writeback, r_wb));
      check(n_load_src == r_lsrc, $sformatf("pass %0d source loads %0d expected %0d", pass, n_load_src, r_lsrc));
      check(n_load_dst == r_ldst, $sformatf("pass %0d destination loads %0d expected %0d", pass, n_load_dst, r_ldst));
      passes_done++;
    end
    check(u_acc.edges == passes_done * es.size(), $sformatf("edges processed %0d", u_acc.edges));
    check(u_acc.updates > 0, "accelerator updated vertices");
    check(bad_ready == 0, "vertex ports never ready while scheduling");
    // every mechanism must have happened
    check(n_sched > 0, "interval scheduling");
    check(n_writeback > 0, "destination write-back");
    check(n_load_src > 0 && n_load_dst > 0, "interval loads");
    check(stall_cycles > 0, "edge stream and vertex ports stalled by scheduling");
    check(full_cycles > 0, "edge buffer full");
    check(wakeups > 0, "bank wake-up");
    check(gate_offs > 0, "bank gate-off");
    check(banks_used.size() >= 2 * passes_done, "bank switch within a stream");
    check(interleave_cycles > 0, "sub-bank interleaving");
    $display("edges=%0d words=%0d sched=%0d wb=%0d lsrc=%0d ldst=%0d stall=%0d full=%0d wake=%0d off=%0d interleave=%0d hostwait=%0d",
             es.size(), nw, n_sched, n_writeback, n_load_src, n_load_dst, stall_cycles, full_cycles,
             wakeups, gate_offs, interleave_cycles, host_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
