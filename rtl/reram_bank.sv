// reram_bank: one ReRAM bank built from N_BLOCKS blocks of M_MATS mats.
//
// The bank is a grid of mats rather than one large array. The global wordline
// decoder picks one block from the low address bits; inside that block the mat
// selector enables all M_MATS mats, and each mat's local wordline decoder and
// local bitline mux deliver IO_BITS/M_MATS bits, so one read yields IO_BITS
// bits. The global bitline mux returns the data of the block that finishes.
//
// Sub-bank interleaving: consecutive word addresses fall in consecutive blocks
// (block index = low address bits), and every block works on its own. A
// sequential stream therefore overlaps the read period of one block with the
// next, and with N_BLOCKS >= READ_CYCLES the bank streams one word per cycle.
//
// Address within the bank: {row, column group, block}.
// Interface: a command is accepted when cmd_valid and cmd_ready are high
// (cmd_ready is low while the addressed block is busy). Read data comes back
// with rvalid READ_CYCLES cycles later, in command order.
//
// The mat grid, block/mat selection and sub-bank interleaving follow the
// document; the grid size and the address bit order are this design's own.
module reram_bank #(
  parameter int N_BLOCKS     = 8,
  parameter int M_MATS       = 8,
  parameter int ROWS         = 512,
  parameter int COLS         = 512,
  parameter int IO_BITS      = 512,
  parameter int READ_CYCLES  = 2,
  parameter int WRITE_CYCLES = 20,
  localparam int MAT_IO  = IO_BITS / M_MATS,
  localparam int GROUPS  = COLS / MAT_IO,
  localparam int BLK_W   = $clog2(N_BLOCKS),
  localparam int GRP_W   = (GROUPS > 1) ? $clog2(GROUPS) : 1,
  localparam int ROW_W   = $clog2(ROWS),
  localparam int ADDR_W  = BLK_W + $clog2(GROUPS) + ROW_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                pwr_ok,
  input  logic                cmd_valid,
  output logic                cmd_ready,
  input  logic                cmd_we,
  input  logic [ADDR_W-1:0]   cmd_addr,
  input  logic [IO_BITS-1:0]  cmd_wdata,
  input  logic [IO_BITS/8-1:0] cmd_wmask,
  output logic                busy,       // some block still working
  output logic                rvalid,
  output logic [IO_BITS-1:0]  rdata
);

  logic [BLK_W-1:0] blk;
  logic [GRP_W-1:0] grp;
  logic [ROW_W-1:0] row;

  assign blk = cmd_addr[BLK_W-1:0];
  assign row = cmd_addr[ADDR_W-1 -: ROW_W];
  if (GROUPS > 1) begin : g_grp
    assign grp = cmd_addr[BLK_W +: $clog2(GROUPS)];
  end else begin : g_nogrp
    assign grp = '0;
  end

  // Global wordline decoder: one-hot block select.
  logic [N_BLOCKS-1:0] blk_sel;
  always_comb begin
    blk_sel = '0;
    blk_sel[blk] = cmd_valid && cmd_ready;
  end

  logic [N_BLOCKS-1:0]               blk_busy;
  logic [N_BLOCKS-1:0]               blk_rvalid;
  logic [N_BLOCKS-1:0][IO_BITS-1:0]  blk_rdata;

  for (genvar b = 0; b < N_BLOCKS; b++) begin : g_blk
    logic [M_MATS-1:0] mat_busy, mat_rvalid;
    for (genvar m = 0; m < M_MATS; m++) begin : g_mat
      reram_mat #(
        .ROWS(ROWS), .COLS(COLS), .IO_W(MAT_IO),
        .READ_CYCLES(READ_CYCLES), .WRITE_CYCLES(WRITE_CYCLES)
      ) u_mat (
        .clk, .rst_n, .pwr_ok,
        .sel     (blk_sel[b]),          // mat selector: all mats of the block
        .we      (cmd_we),
        .row     (row),
        .col_grp (grp),
        .wdata   (cmd_wdata[m*MAT_IO +: MAT_IO]),
        .wmask   (cmd_wmask[m*(MAT_IO/8) +: MAT_IO/8]),
        .busy    (mat_busy[m]),
        .rvalid  (mat_rvalid[m]),
        .rdata   (blk_rdata[b][m*MAT_IO +: MAT_IO])
      );
    end
    assign blk_busy[b]   = |mat_busy;
    assign blk_rvalid[b] = &mat_rvalid;   // the mats of a block work in lockstep
  end

  assign cmd_ready = !blk_busy[blk];
  assign busy      = |blk_busy;

  // Global bitline mux: at most one block finishes a read per cycle.
  always_comb begin
    rvalid = 1'b0;
    rdata  = '0;
    for (int b = 0; b < N_BLOCKS; b++)
      if (blk_rvalid[b]) begin
        rvalid = 1'b1;
        rdata  = blk_rdata[b];
      end
  end

  a_one_rsp: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(blk_rvalid));

endmodule
