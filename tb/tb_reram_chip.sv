// tb_reram_chip: self-checking test of the ReRAM edge-memory chip.
// Loads every word with random masked writes, then reads the whole chip as
// one sequential stream and checks: data and order of every response; the
// read latency of READ_CYCLES + 2 into a powered bank; a stream rate of one
// word per cycle inside a bank; that a gated bank is woken on demand; that
// banks are gated off after the idle period so that at most one bank is
// powered while streaming, and none after a long pause; and that the data
// survive power gating.
module tb_reram_chip;
  import hyve_pkg::*;
  localparam int NBK = 4, NB = 4, MM = 4, ROWS = 4, COLS = 256, RD = 2, WR = 6;
  localparam int IDLE = 16, WAKE = 3;
  localparam int AW = $clog2(NBK) + $clog2(NB) + $clog2(COLS / (IO_BITS / MM)) + $clog2(ROWS);
  localparam int N = 1 << AW, PER_BANK = N / NBK;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, req_we, rsp_valid;
  logic [AW-1:0] req_addr;
  logic [IO_BITS-1:0] req_wdata, rsp_data;
  logic [IO_BITS/8-1:0] req_wmask;
  logic [NBK-1:0] bank_powered;

  reram_chip #(.NUM_BANKS(NBK), .N_BLOCKS(NB), .M_MATS(MM), .ROWS(ROWS), .COLS(COLS),
               .READ_CYCLES(RD), .WRITE_CYCLES(WR), .PG_EN(1'b1),
               .IDLE_CYCLES(IDLE), .WAKE_CYCLES(WAKE)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_wmask,
    .rsp_valid, .rsp_data, .bank_powered);

  int checks = 0, failures = 0;
  logic [IO_BITS-1:0] ref_mem [N];
  int exp_idx [$], acc_cyc [$];
  int cyc = 0, wakeups = 0, gate_offs = 0, max_on = 0;
  logic [NBK-1:0] prev_pw = '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [IO_BITS-1:0] rnd512();
    for (int i = 0; i < IO_BITS / 32; i++) rnd512[i*32 +: 32] = $urandom;
  endfunction

  int lat_checked = 0;
  // Everything is driven and sampled at the falling edge.
  always @(negedge clk) begin
    cyc++;
    if (rst_n) begin
    for (int k = 0; k < NBK; k++) begin
      if (bank_powered[k] && !prev_pw[k]) wakeups++;
      if (!bank_powered[k] && prev_pw[k]) gate_offs++;
    end
    prev_pw = bank_powered;
    if ($countones(bank_powered) > max_on) max_on = $countones(bank_powered);
    if (rsp_valid) begin
      int idx, ac;
      if (exp_idx.size() == 0) check(0, "unexpected response");
      else begin
        idx = exp_idx.pop_front(); ac = acc_cyc.pop_front();
        check(rsp_data == ref_mem[idx], $sformatf("word %0d mismatch", idx));
        if (ac >= 0) begin
          check(cyc - ac == RD + 2, $sformatf("latency %0d into a powered bank", cyc - ac));
          lat_checked++;
        end
      end
    end
    end
  end

  task automatic send(input logic we, input int a, input logic [IO_BITS-1:0] d,
                      input logic [IO_BITS/8-1:0] m, input bit time_it);
    bit ok;
    req_valid = 1; req_we = we; req_addr = AW'(a); req_wdata = d; req_wmask = m;
    do begin
      #1 ok = req_ready;
      if (ok && !we) begin exp_idx.push_back(a); acc_cyc.push_back(time_it ? cyc : -1); end
      @(negedge clk);
    end while (!ok);
    req_valid = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [IO_BITS-1:0] d;
  logic [IO_BITS/8-1:0] m;
  int t0;
  initial begin
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_wmask = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(bank_powered == '0, "all banks gated after reset");
    for (int i = 0; i < N; i++) begin d = rnd512(); ref_mem[i] = d; send(1, i, d, '1, 0); end
    for (int i = 0; i < N; i++) begin
      d = rnd512(); m = {$urandom, $urandom};
      for (int b = 0; b < IO_BITS / 8; b++) if (m[b]) ref_mem[i][b*8 +: 8] = d[b*8 +: 8];
      send(1, i, d, m, 0);
    end
    // long pause: every bank gated off, data retained
    repeat (IDLE + WAKE + 40) @(negedge clk);
    check(bank_powered == '0, "all banks gated after a pause");
    wakeups = 0; gate_offs = 0; max_on = 0;
    // sequential stream over the whole chip
    for (int bk = 0; bk < NBK; bk++) begin
      send(0, bk * PER_BANK, '0, '0, 0);      // wakes the bank
      send(0, bk * PER_BANK + 1, '0, '0, 1);  // waits for the wake-up
      t0 = cyc;
      for (int i = 2; i < PER_BANK; i++) send(0, bk * PER_BANK + i, '0, '0, 1);
      check(cyc - t0 == PER_BANK - 2, $sformatf("bank %0d streamed %0d words in %0d cycles", bk, PER_BANK - 2, cyc - t0));
      repeat (IDLE / 2) @(negedge clk);     // gap shorter than the idle period
    end
    repeat (IDLE + RD + 10) @(negedge clk);
    check(exp_idx.size() == 0, "all reads answered");
    check(bank_powered == '0, "all banks gated at the end");
    check(wakeups == NBK, $sformatf("%0d bank wake-ups during the stream, expected %0d", wakeups, NBK));
    check(gate_offs == NBK, $sformatf("%0d bank gate-offs, expected %0d", gate_offs, NBK));
    check(max_on <= 2, $sformatf("at most %0d banks powered at once", max_on));
    check(lat_checked > 0, "latency measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
