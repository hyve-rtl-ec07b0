// reram_mat: behavioural model of one ReRAM crossbar mat (single-level cells).
//
// A mat is an analog crossbar of resistive cells; this model stands in for it
// with its digital behaviour only. It holds ROWS x COLS bits. The local
// wordline decoder selects one row; the local bitline mux selects one group of
// IO_W adjacent columns of that row, so an access moves IO_W bits. The cells
// are non-volatile: the contents survive while the mat is powered down
// (pwr_ok low), but the mat may only be accessed while it is powered.
//
// Interface: a command is taken when sel is high and busy is low. A read
// returns rdata with rvalid READ_CYCLES cycles after the command (rvalid is
// high in the READ_CYCLES-th cycle after the command cycle); a
// write (per-byte mask wmask) keeps the mat busy for WRITE_CYCLES cycles.
// The mat accepts one command per READ_CYCLES (read) or WRITE_CYCLES (write).
//
// The crossbar organisation and SLC cells follow the document; the mat size,
// the write latency and the byte-mask write are this design's choices. The
// read period of 2 cycles is the 1983 ps energy-optimised read period taken
// at a 1 GHz controller clock.
module reram_mat #(
  parameter int ROWS         = 512,
  parameter int COLS         = 512,
  parameter int IO_W         = 64,
  parameter int READ_CYCLES  = 2,
  parameter int WRITE_CYCLES = 20,
  localparam int GROUPS = COLS / IO_W,
  localparam int ROW_W  = $clog2(ROWS),
  localparam int GRP_W  = (GROUPS > 1) ? $clog2(GROUPS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pwr_ok,     // virtual supply present
  input  logic              sel,        // mat selector: command valid
  input  logic              we,
  input  logic [ROW_W-1:0]  row,        // to the local wordline decoder
  input  logic [GRP_W-1:0]  col_grp,    // to the local bitline mux
  input  logic [IO_W-1:0]   wdata,
  input  logic [IO_W/8-1:0] wmask,
  output logic              busy,
  output logic              rvalid,
  output logic [IO_W-1:0]   rdata
);

  localparam int CNT_W = $clog2(((READ_CYCLES > WRITE_CYCLES) ? READ_CYCLES : WRITE_CYCLES) + 1);

  logic [IO_W-1:0]  cells [ROWS*GROUPS];
  logic [CNT_W-1:0] cnt;
  logic [READ_CYCLES-1:0] rd_pipe;   // read in flight, one bit per cycle
  logic [IO_W-1:0]  sense_q;

  wire [ROW_W+GRP_W-1:0] widx = {row, col_grp};

  assign busy = (cnt != '0);

  always_ff @(posedge clk) begin
    if (sel && !busy) begin
      if (we) begin
        for (int b = 0; b < IO_W/8; b++)
          if (wmask[b]) cells[widx][b*8 +: 8] <= wdata[b*8 +: 8];
      end else begin
        sense_q <= cells[widx];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      rd_pipe <= '0;
    end else begin
      rd_pipe <= READ_CYCLES'({rd_pipe, sel && !busy && !we});
      if (sel && !busy) cnt <= we ? CNT_W'(WRITE_CYCLES - 1) : CNT_W'(READ_CYCLES - 1);
      else if (busy)    cnt <= cnt - 1'b1;
    end
  end

  assign rvalid = rd_pipe[READ_CYCLES-1];

  assign rdata = sense_q;

  // A mat may only be used while its bank is powered, and only when idle.
  a_powered: assert property (@(posedge clk) disable iff (!rst_n) sel |-> pwr_ok);
  a_idle:    assert property (@(posedge clk) disable iff (!rst_n) sel |-> !busy);

endmodule
