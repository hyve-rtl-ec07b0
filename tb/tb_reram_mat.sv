// tb_reram_mat: self-checking test of the ReRAM mat model.
// Writes random words with random byte masks, reads every word back and
// compares with a reference copy; checks the read latency (READ_CYCLES),
// the busy time of a write (WRITE_CYCLES), and that data survive a period
// without power.
module tb_reram_mat;
  localparam int ROWS = 8, COLS = 64, IO_W = 16, RD = 2, WR = 5;
  localparam int GROUPS = COLS / IO_W, N = ROWS * GROUPS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pwr_ok, sel, we, busy, rvalid;
  logic [2:0] row;
  logic [1:0] grp;
  logic [IO_W-1:0] wdata, rdata;
  logic [IO_W/8-1:0] wmask;

  reram_mat #(.ROWS(ROWS), .COLS(COLS), .IO_W(IO_W), .READ_CYCLES(RD), .WRITE_CYCLES(WR)) dut (
    .clk, .rst_n, .pwr_ok, .sel, .we, .row, .col_grp(grp), .wdata, .wmask, .busy, .rvalid, .rdata);

  int checks = 0, failures = 0;
  logic [IO_W-1:0] ref_mem [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_write(input int idx, input logic [IO_W-1:0] d, input logic [IO_W/8-1:0] m);
    int n;
    @(negedge clk);
    sel = 1; we = 1; row = 3'(idx / GROUPS); grp = 2'(idx % GROUPS); wdata = d; wmask = m;
    @(negedge clk);
    sel = 0;
    n = 0;
    while (busy) begin n++; @(negedge clk); end
    check(n + 1 == WR, $sformatf("write occupied %0d cycles, expected %0d", n + 1, WR));
    for (int b = 0; b < IO_W / 8; b++) if (m[b]) ref_mem[idx][b*8 +: 8] = d[b*8 +: 8];
  endtask

  task automatic do_read(input int idx);
    int n;
    @(negedge clk);
    sel = 1; we = 0; row = 3'(idx / GROUPS); grp = 2'(idx % GROUPS);
    @(negedge clk);
    sel = 0;
    n = 1;
    while (!rvalid) begin n++; @(negedge clk); end
    check(n == RD, $sformatf("read latency %0d, expected %0d", n, RD));
    check(rdata == ref_mem[idx], $sformatf("word %0d: got %h expected %h", idx, rdata, ref_mem[idx]));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pwr_ok = 1; sel = 0; we = 0; row = 0; grp = 0; wdata = 0; wmask = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // full writes first so every word is known
    for (int i = 0; i < N; i++) do_write(i, IO_W'($urandom), '1);
    // masked overwrites
    for (int i = 0; i < N; i++) do_write(i, IO_W'($urandom), (IO_W/8)'($urandom));
    for (int i = 0; i < N; i++) do_read(i);
    // power off and on: non-volatile cells keep their data
    @(negedge clk); pwr_ok = 0;
    repeat (50) @(negedge clk);
    pwr_ok = 1;
    for (int i = 0; i < N; i++) do_read(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
