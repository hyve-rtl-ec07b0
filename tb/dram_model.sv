// dram_model: behavioural model of the off-chip vertex memory (DRAM) for the
// testbenches. One VTX_W-bit word per request; requests are taken with a
// valid/ready handshake (ready is withheld at random, STALL_PCT percent of the
// cycles); reads answer in order exactly LAT cycles after acceptance. The
// array `mem` is read and written directly by the testbenches.
module dram_model #(
  parameter int DEPTH     = 1024,
  parameter int LAT       = 4,
  parameter int STALL_PCT = 20,
  parameter int VTX_W     = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  output logic             req_ready,
  input  logic             req_we,
  input  logic [31:0]      req_addr,
  input  logic [VTX_W-1:0] req_wdata,
  output logic             rsp_valid,
  output logic [VTX_W-1:0] rsp_data
);
  logic [VTX_W-1:0] mem [DEPTH];
  logic [LAT-1:0]   vpipe;
  logic [VTX_W-1:0] dpipe [LAT];
  int unsigned      reads = 0, writes = 0;

  always @(negedge clk) req_ready <= ($urandom_range(0, 99) >= STALL_PCT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LAT-2:0], req_valid && req_ready && !req_we};
  end

  always_ff @(posedge clk) begin
    if (req_valid && req_ready) begin
      if (req_addr >= DEPTH) $error("DRAM address %0d out of range", req_addr);
      else if (req_we) begin mem[req_addr] <= req_wdata; writes++; end
      else reads++;
    end
    dpipe[0] <= mem[req_addr % DEPTH];
    for (int i = 1; i < LAT; i++) dpipe[i] <= dpipe[i-1];
  end

  assign rsp_valid = vpipe[LAT-1];
  assign rsp_data  = dpipe[LAT-1];
endmodule
