// reram_chip: ReRAM edge-memory chip with bank-level power gating.
//
// Edge memory is a read-only streaming device during graph processing: edges
// are written once at initialisation and then read in address order. The chip
// is organised like a commodity DRAM chip: an address register, NUM_BANKS
// banks of mats, I/O gating with a per-byte data mask for writes, and an
// output multiplexer. Banks are not interleaved (the bank field is the top of
// the address), so a sequential stream stays in one bank for a long time,
// while inside the bank consecutive words go to different blocks (sub-bank
// interleaving, see reram_bank).
//
// Bank-level power gating: the bank enable logic decodes the address register
// into one enable per bank; each bank has its own power-gating controller and
// power gate. A request to a gated bank waits in the address register until
// that bank has woken up; banks left without commands for IDLE_CYCLES are
// gated off again. PG_EN = 0 keeps every bank powered.
//
// Interface: req_valid/req_ready handshake into the address register, then
// the request is issued to its bank when the bank is powered and the addressed
// block is idle. Read data returns on rsp_valid/rsp_data, in request order,
// READ_CYCLES + 2 cycles after acceptance when the bank is already powered
// (one cycle in the address register, one in the output register). There is
// no back-pressure on responses.
//
// Organisation, output width (512 bits), no bank interleaving and the
// power-gating rule follow the document; the number of banks, the mat grid,
// the latencies and the address layout are this design's choices.
module reram_chip
  import hyve_pkg::*;
#(
  parameter int NUM_BANKS    = 8,
  parameter int N_BLOCKS     = 8,
  parameter int M_MATS       = 8,
  parameter int ROWS         = 512,
  parameter int COLS         = 512,
  parameter int READ_CYCLES  = 2,
  parameter int WRITE_CYCLES = 20,
  parameter bit PG_EN        = 1'b1,
  parameter int IDLE_CYCLES  = 64,
  parameter int WAKE_CYCLES  = 4,
  localparam int MAT_IO  = IO_BITS / M_MATS,
  localparam int BADDR_W = $clog2(N_BLOCKS) + $clog2(COLS / MAT_IO) + $clog2(ROWS),
  localparam int BANK_W  = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  localparam int ADDR_W  = BADDR_W + $clog2(NUM_BANKS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req_valid,
  output logic                 req_ready,
  input  logic                 req_we,
  input  logic [ADDR_W-1:0]    req_addr,
  input  logic [IO_BITS-1:0]   req_wdata,
  input  logic [IO_BITS/8-1:0] req_wmask,    // DM mask, one bit per byte
  output logic                 rsp_valid,
  output logic [IO_BITS-1:0]   rsp_data,
  output logic [NUM_BANKS-1:0] bank_powered  // per-bank power state
);

  // ---------------- address register ----------------
  logic                 ar_valid, ar_we;
  logic [ADDR_W-1:0]    ar_addr;
  logic [IO_BITS-1:0]   ar_wdata;
  logic [IO_BITS/8-1:0] ar_wmask;
  logic                 issue;

  assign req_ready = !ar_valid || issue;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ar_valid <= 1'b0;
    else if (req_ready) ar_valid <= req_valid;
  end

  always_ff @(posedge clk) begin
    if (req_ready && req_valid) begin
      ar_we    <= req_we;
      ar_addr  <= req_addr;
      ar_wdata <= req_wdata;
      ar_wmask <= req_wmask;
    end
  end

  logic [BANK_W-1:0]  ar_bank;
  logic [BADDR_W-1:0] ar_baddr;
  if (NUM_BANKS > 1) begin : g_bank_field
    assign ar_bank = ar_addr[ADDR_W-1 -: $clog2(NUM_BANKS)];
  end else begin : g_single_bank
    assign ar_bank = '0;
  end
  assign ar_baddr = ar_addr[BADDR_W-1:0];

  // ---------------- bank enable logic ----------------
  logic [NUM_BANKS-1:0] bank_en;
  bank_enable_logic #(.NUM_BANKS(NUM_BANKS)) u_bank_en (
    .valid (ar_valid), .bank (ar_bank), .bank_en (bank_en)
  );

  // ---------------- banks with power gating ----------------
  logic [NUM_BANKS-1:0]               bk_ready, bk_cmd_ready, bk_busy, bk_rvalid, bk_cmd;
  logic [NUM_BANKS-1:0][IO_BITS-1:0]  bk_rdata;

  for (genvar k = 0; k < NUM_BANKS; k++) begin : g_bank
    logic sleep, vdd_ok;

    assign bk_cmd[k] = issue && bank_en[k];

    bank_pg_ctrl #(.ENABLE(PG_EN), .IDLE_CYCLES(IDLE_CYCLES)) u_pgc (
      .clk, .rst_n,
      .bank_en (bank_en[k]),
      .cmd     (bk_cmd[k]),
      .busy    (bk_busy[k]),
      .vdd_ok  (vdd_ok),
      .sleep   (sleep),
      .ready   (bk_ready[k])
    );

    power_gate #(.WAKE_CYCLES(WAKE_CYCLES)) u_pg (
      .clk, .rst_n, .sleep (sleep), .vdd_ok (vdd_ok)
    );

    reram_bank #(
      .N_BLOCKS(N_BLOCKS), .M_MATS(M_MATS), .ROWS(ROWS), .COLS(COLS),
      .IO_BITS(IO_BITS), .READ_CYCLES(READ_CYCLES), .WRITE_CYCLES(WRITE_CYCLES)
    ) u_bank (
      .clk, .rst_n,
      .pwr_ok    (vdd_ok),
      .cmd_valid (bk_cmd[k]),
      .cmd_ready (bk_cmd_ready[k]),
      .cmd_we    (ar_we),
      .cmd_addr  (ar_baddr),
      .cmd_wdata (ar_wdata),      // I/O gating: only the enabled bank takes it
      .cmd_wmask (ar_wmask),
      .busy      (bk_busy[k]),
      .rvalid    (bk_rvalid[k]),
      .rdata     (bk_rdata[k])
    );

    assign bank_powered[k] = vdd_ok;
  end

  assign issue = ar_valid && bk_ready[ar_bank] && bk_cmd_ready[ar_bank];

  // ---------------- multiplexer and output register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsp_valid <= 1'b0;
    else        rsp_valid <= |bk_rvalid;
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < NUM_BANKS; k++)
      if (bk_rvalid[k]) rsp_data <= bk_rdata[k];
  end

  a_one_bank_rsp: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(bk_rvalid));

endmodule
