// tb_power_gate: checks the power-gate model's timing: vdd_ok rises exactly
// WAKE_CYCLES cycles after sleep is released and falls one cycle after sleep
// is asserted, for several on/off periods of random length.
module tb_power_gate;
  localparam int WAKE = 5;
  logic clk = 0, rst_n = 0, sleep, vdd_ok;
  always #5 clk = ~clk;

  power_gate #(.WAKE_CYCLES(WAKE)) dut (.clk, .rst_n, .sleep, .vdd_ok);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n, on_len;
  initial begin
    sleep = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check(!vdd_ok, "off after reset");
    for (int k = 0; k < 20; k++) begin
      sleep = 0;
      n = 0;
      @(negedge clk);
      n = 1;
      while (!vdd_ok && n < 100) begin @(negedge clk); n++; end
      check(n == WAKE, $sformatf("wake-up took %0d cycles", n));
      on_len = 1 + $urandom_range(0, 10);
      repeat (on_len) begin @(negedge clk); check(vdd_ok, "stays on"); end
      sleep = 1;
      @(negedge clk);
      check(!vdd_ok, "off one cycle after sleep");
      repeat ($urandom_range(0, 6)) begin @(negedge clk); check(!vdd_ok, "stays off"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
