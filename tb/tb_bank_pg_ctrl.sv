// tb_bank_pg_ctrl: checks the bank power-gating controller together with a
// power gate: a gated bank wakes on bank_en and is ready after the wake-up
// time; commands or work in flight keep it on; after IDLE cycles without a
// command it is gated off; with ENABLE = 0 the bank never turns off.
module tb_bank_pg_ctrl;
  localparam int IDLE = 10, WAKE = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bank_en, cmd, busy;
  logic vdd_ok, sleep, ready, vdd_ok2, sleep2, ready2;

  bank_pg_ctrl #(.ENABLE(1'b1), .IDLE_CYCLES(IDLE)) dut (
    .clk, .rst_n, .bank_en, .cmd, .busy, .vdd_ok, .sleep, .ready);
  power_gate #(.WAKE_CYCLES(WAKE)) u_pg (.clk, .rst_n, .sleep, .vdd_ok);

  bank_pg_ctrl #(.ENABLE(1'b0), .IDLE_CYCLES(IDLE)) dut_nopg (
    .clk, .rst_n, .bank_en(1'b0), .cmd(1'b0), .busy(1'b0), .vdd_ok(vdd_ok2), .sleep(sleep2), .ready(ready2));
  power_gate #(.WAKE_CYCLES(WAKE)) u_pg2 (.clk, .rst_n, .sleep(sleep2), .vdd_ok(vdd_ok2));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n, gap;
  initial begin
    bank_en = 0; cmd = 0; busy = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(sleep && !ready, "gated after reset");
    for (int k = 0; k < 10; k++) begin
      // wake on demand
      bank_en = 1;
      n = 0;
      while (!ready && n < 100) begin @(negedge clk); n++; end
      check(n == WAKE + 1, $sformatf("wake-up to ready took %0d cycles", n));
      // issue a command, then keep it busy for a while
      cmd = 1; @(negedge clk); cmd = 0; bank_en = 0;
      busy = 1; repeat (IDLE + 5) begin @(negedge clk); check(ready, "busy bank stays on"); end
      busy = 0;
      // commands with gaps shorter than IDLE keep it on
      repeat (3) begin
        gap = $urandom_range(1, IDLE - 2);
        repeat (gap) @(negedge clk);
        check(ready, "on within idle period");
        bank_en = 1; cmd = 1; @(negedge clk); cmd = 0; bank_en = 0;
      end
      // then silence: off after exactly IDLE idle cycles
      n = 0;
      while (ready && n < 100) begin @(negedge clk); n++; end
      check(n == IDLE, $sformatf("gated off after %0d idle cycles", n));
      check(sleep, "sleep asserted");
      repeat ($urandom_range(1, 5)) @(negedge clk);
    end
    check(ready2 && !sleep2, "bank without power gating stays on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
