// edge_mem_model: simple behavioural edge memory for the controller test: an
// array of 512-bit words, requests taken with valid/ready (ready withheld at
// random, STALL_PCT percent), reads answered in order LAT cycles later.
module edge_mem_model #(
  parameter int DEPTH     = 256,
  parameter int AW        = 8,
  parameter int LAT       = 4,
  parameter int STALL_PCT = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  output logic          req_ready,
  input  logic [AW-1:0] req_addr,
  output logic          rsp_valid,
  output logic [511:0]  rsp_data
);
  logic [511:0]   mem [DEPTH];
  logic [LAT-1:0] vpipe;
  logic [511:0]   dpipe [LAT];

  always @(negedge clk) req_ready <= ($urandom_range(0, 99) >= STALL_PCT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LAT-2:0], req_valid && req_ready};
  end
  always_ff @(posedge clk) begin
    dpipe[0] <= mem[req_addr];
    for (int i = 1; i < LAT; i++) dpipe[i] <= dpipe[i-1];
  end
  assign rsp_valid = vpipe[LAT-1];
  assign rsp_data  = dpipe[LAT-1];
endmodule
