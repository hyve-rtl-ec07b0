// tb_onchip_vertex_mem: random read/write test of both sections of the
// on-chip vertex memory against a reference copy, with one-cycle read
// latency, read data held between reads, old data returned on a same-cycle
// read and write, and the two sections independent of each other.
module tb_onchip_vertex_mem;
  localparam int DEPTH = 64, AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;

  logic src_re, src_we, dst_re, dst_we;
  logic [AW-1:0] src_raddr, src_waddr, dst_raddr, dst_waddr;
  logic [31:0] src_rdata, src_wdata, dst_rdata, dst_wdata;

  onchip_vertex_mem #(.DEPTH(DEPTH)) dut (.clk,
    .src_re, .src_raddr, .src_rdata, .src_we, .src_waddr, .src_wdata,
    .dst_re, .dst_raddr, .dst_rdata, .dst_we, .dst_waddr, .dst_wdata);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] rs [DEPTH], rd [DEPTH];
  logic [31:0] exp_s, exp_d;
  bit pend_s, pend_d, held_s, held_d;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    src_re = 0; src_we = 0; dst_re = 0; dst_we = 0;
    src_raddr = 0; src_waddr = 0; dst_raddr = 0; dst_waddr = 0; src_wdata = 0; dst_wdata = 0;
    // fill both sections with different data
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      src_we = 1; src_waddr = AW'(i); src_wdata = $urandom; rs[i] = src_wdata;
      dst_we = 1; dst_waddr = AW'(i); dst_wdata = $urandom; rd[i] = dst_wdata;
    end
    @(negedge clk); src_we = 0; dst_we = 0;
    pend_s = 0; pend_d = 0; held_s = 0; held_d = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (pend_s || held_s) check(src_rdata == exp_s, $sformatf("src read: %h expected %h", src_rdata, exp_s));
      if (pend_d || held_d) check(dst_rdata == exp_d, $sformatf("dst read: %h expected %h", dst_rdata, exp_d));
      held_s = held_s | pend_s; held_d = held_d | pend_d;
      src_re = 1'($urandom_range(0, 1)); src_raddr = AW'($urandom);
      dst_re = 1'($urandom_range(0, 1)); dst_raddr = AW'($urandom);
      src_we = 1'($urandom_range(0, 1)); src_waddr = ($urandom_range(0, 3) == 0) ? src_raddr : AW'($urandom);
      dst_we = 1'($urandom_range(0, 1)); dst_waddr = ($urandom_range(0, 3) == 0) ? dst_raddr : AW'($urandom);
      src_wdata = $urandom; dst_wdata = $urandom;
      pend_s = src_re; pend_d = dst_re;
      if (src_re) exp_s = rs[src_raddr];
      if (dst_re) exp_d = rd[dst_raddr];
      if (src_we) rs[src_waddr] = src_wdata;
      if (dst_we) rd[dst_waddr] = dst_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
