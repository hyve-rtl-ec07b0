// power_gate: behavioural model of a bank's power gate (header or footer).
//
// The real part is a large sleep transistor between VDD and a bank's virtual
// VDD (header) or between its virtual ground and ground (footer); it has no
// logic function of its own. This model gives its timing as seen by the bank
// power-gating controller: when sleep is released the virtual rail needs
// WAKE_CYCLES clock cycles to settle before vdd_ok rises; when sleep is
// asserted the rail collapses and vdd_ok falls on the next clock edge.
//
// One gate per bank, header or footer, is what the document places; the
// wake-up time is this design's assumption (the document gives none).
module power_gate #(
  parameter int WAKE_CYCLES = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sleep,     // 1: gate open, bank unpowered
  output logic vdd_ok     // virtual supply settled
);

  localparam int CNT_W = $clog2(WAKE_CYCLES + 1);
  logic [CNT_W-1:0] ramp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ramp   <= '0;
      vdd_ok <= 1'b0;
    end else if (sleep) begin
      ramp   <= '0;
      vdd_ok <= 1'b0;
    end else if (ramp != CNT_W'(WAKE_CYCLES)) begin
      ramp   <= ramp + 1'b1;
      vdd_ok <= (ramp == CNT_W'(WAKE_CYCLES - 1));
    end
  end

endmodule
