// bank_pg_ctrl: bank power-gating controller of one ReRAM edge-memory bank.
//
// Edges are read sequentially and banks are not interleaved, so usually only
// one bank per chip is in use. This controller keeps its bank powered down
// until a request addresses it (bank_en), then releases the power gate and
// reports the bank ready once the virtual supply is settled (vdd_ok). While
// powered it counts cycles without a command; after IDLE_CYCLES such cycles,
// with nothing in flight and nothing waiting, it gates the bank off again.
// ReRAM keeps its data without power, so nothing is saved or restored.
//
// With ENABLE = 0 the bank is held powered at all times (HyVE without power
// gating).
//
// Timing: from bank_en in the OFF state to ready is the gate's wake-up time
// plus one cycle. The power-down rule follows the document; the idle period
// length and the power-up-on-demand policy are this design's choices.
module bank_pg_ctrl #(
  parameter bit ENABLE      = 1'b1,
  parameter int IDLE_CYCLES = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bank_en,   // a request is waiting for this bank
  input  logic cmd,       // a command was issued to this bank this cycle
  input  logic busy,      // the bank still has work in flight
  input  logic vdd_ok,    // from the power gate
  output logic sleep,     // to the power gate
  output logic ready      // bank powered and usable
);

  typedef enum logic [1:0] {PG_OFF, PG_WAKE, PG_ON} pg_state_t;
  localparam int CNT_W = $clog2(IDLE_CYCLES + 1);

  pg_state_t        state;
  logic [CNT_W-1:0] idle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ENABLE ? PG_OFF : PG_WAKE;
      idle  <= '0;
    end else begin
      unique case (state)
        PG_OFF:  if (bank_en) state <= PG_WAKE;
        PG_WAKE: begin
          idle <= '0;
          if (vdd_ok) state <= PG_ON;
        end
        PG_ON: begin
          if (cmd || busy || bank_en) begin
            idle <= '0;
          end else if (ENABLE && idle == CNT_W'(IDLE_CYCLES - 1)) begin
            state <= PG_OFF;
            idle  <= '0;
          end else begin
            idle <= idle + 1'b1;
          end
        end
        default: state <= PG_OFF;
      endcase
    end
  end

  assign sleep = (state == PG_OFF);
  assign ready = (state != PG_OFF) && vdd_ok;

endmodule
