// bank_enable_logic: decodes the bank field of the chip's address register
// into one bank-enable line per bank. Only the addressed bank is enabled, and
// only while the address register holds a valid request; the enable is what
// wakes a power-gated bank. Purely combinational.
//
// The block and its place between address register and banks are the
// document's; a plain one-hot decode is this design's reading of it.
module bank_enable_logic #(
  parameter int NUM_BANKS = 8,
  localparam int BANK_W = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1
) (
  input  logic                 valid,
  input  logic [BANK_W-1:0]    bank,
  output logic [NUM_BANKS-1:0] bank_en
);

  always_comb begin
    bank_en = '0;
    if (valid) bank_en[bank] = 1'b1;
  end

endmodule
