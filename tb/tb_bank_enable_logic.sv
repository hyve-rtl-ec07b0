// tb_bank_enable_logic: exhaustive check of the bank-enable decoder: exactly
// the addressed bank is enabled while valid is high, none otherwise.
module tb_bank_enable_logic;
  localparam int NB = 8;
  logic valid;
  logic [2:0] bank;
  logic [NB-1:0] bank_en;

  bank_enable_logic #(.NUM_BANKS(NB)) dut (.valid, .bank, .bank_en);

  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 2; v++)
      for (int b = 0; b < NB; b++) begin
        valid = v[0]; bank = 3'(b);
        #1;
        for (int k = 0; k < NB; k++) begin
          checks++;
          if (bank_en[k] !== (v == 1 && k == b)) begin
            failures++;
            $display("FAIL: valid=%0d bank=%0d en[%0d]=%b", v, b, k, bank_en[k]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
