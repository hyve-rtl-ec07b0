// tb_reram_bank: self-checking test of one ReRAM bank.
// Fills the bank through random masked writes, then streams sequential reads
// and checks every word against a reference copy, that responses come back in
// order READ_CYCLES after their command, and that sub-bank interleaving lets a
// sequential stream issue one read per cycle (N_BLOCKS >= READ_CYCLES).
// Also checks that a second read to a busy block is held off (cmd_ready low).
module tb_reram_bank;
  import hyve_pkg::*;
  localparam int NB = 4, MM = 4, ROWS = 4, COLS = 256, RD = 2, WR = 6;
  localparam int AW = $clog2(NB) + $clog2(COLS / (IO_BITS / MM)) + $clog2(ROWS);
  localparam int N = 1 << AW;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, cmd_we, busy, rvalid;
  logic [AW-1:0] cmd_addr;
  logic [IO_BITS-1:0] cmd_wdata, rdata;
  logic [IO_BITS/8-1:0] cmd_wmask;

  reram_bank #(.N_BLOCKS(NB), .M_MATS(MM), .ROWS(ROWS), .COLS(COLS), .IO_BITS(IO_BITS),
               .READ_CYCLES(RD), .WRITE_CYCLES(WR)) dut (
    .clk, .rst_n, .pwr_ok(1'b1), .cmd_valid, .cmd_ready, .cmd_we, .cmd_addr,
    .cmd_wdata, .cmd_wmask, .busy, .rvalid, .rdata);

  int checks = 0, failures = 0;
  logic [IO_BITS-1:0] ref_mem [N];
  int issue_cyc [$];
  int exp_idx [$];
  int cyc = 0;
  always @(negedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [IO_BITS-1:0] rnd512();
    for (int i = 0; i < IO_BITS / 32; i++) rnd512[i*32 +: 32] = $urandom;
  endfunction

  // response checker
  always @(posedge clk) if (rst_n && rvalid) begin
    int idx, ic;
    if (exp_idx.size() == 0) check(0, "unexpected response");
    else begin
      idx = exp_idx.pop_front(); ic = issue_cyc.pop_front();
      check(rdata == ref_mem[idx], $sformatf("word %0d data mismatch", idx));
      check(cyc - ic == RD, $sformatf("word %0d latency %0d", idx, cyc - ic));
    end
  end

  task automatic send(input logic we, input int a, input logic [IO_BITS-1:0] d, input logic [IO_BITS/8-1:0] m);
    cmd_valid = 1; cmd_we = we; cmd_addr = AW'(a); cmd_wdata = d; cmd_wmask = m;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    if (!we) begin exp_idx.push_back(a); issue_cyc.push_back(cyc); end
    #1 cmd_valid = 0;
  endtask

  int t0, stalled;
  logic [IO_BITS-1:0] d;
  logic [IO_BITS/8-1:0] m;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd_valid = 0; cmd_we = 0; cmd_addr = 0; cmd_wdata = 0; cmd_wmask = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < N; i++) begin
      d = rnd512(); ref_mem[i] = d; send(1, i, d, '1);
    end
    for (int i = 0; i < N; i++) begin
      d = rnd512(); m = {$urandom, $urandom};
      for (int b = 0; b < IO_BITS / 8; b++) if (m[b]) ref_mem[i][b*8 +: 8] = d[b*8 +: 8];
      send(1, i, d, m);
    end
    while (busy) @(posedge clk);
    // sequential stream: one read issued per cycle thanks to block interleaving
    @(negedge clk);
    t0 = cyc;
    cmd_valid = 1; cmd_we = 0;
    for (int i = 0; i < N; i++) begin
      cmd_addr = AW'(i);
      @(posedge clk);
      while (!cmd_ready) @(posedge clk);
      exp_idx.push_back(i); issue_cyc.push_back(cyc);
      #1;
    end
    cmd_valid = 0;
    check(cyc - t0 == N, $sformatf("sequential stream of %0d words took %0d cycles", N, cyc - t0));
    repeat (RD + 2) @(posedge clk);
    // same block twice in a row: second command must wait
    #1 cmd_valid = 1; cmd_addr = AW'(0);
    @(posedge clk); exp_idx.push_back(0); issue_cyc.push_back(cyc);
    #1 cmd_addr = AW'(NB);   // same block, next column group
    stalled = 0;
    @(posedge clk);
    while (!cmd_ready) begin stalled++; @(posedge clk); end
    exp_idx.push_back(NB); issue_cyc.push_back(cyc);
    #1 cmd_valid = 0;
    check(stalled == RD - 1, $sformatf("busy block held off %0d cycles", stalled));
    repeat (RD + 3) @(posedge clk);
    check(exp_idx.size() == 0, "all reads answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
