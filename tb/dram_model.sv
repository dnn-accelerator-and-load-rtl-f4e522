// dram_model: behavioural model of the off-chip DRAM for the testbenches.
//
// An array of 512-bit words behind the request/grant port of the main-memory
// controller. A request is granted with probability GNT_PCT percent in each
// cycle; read data returns in order LAT cycles after the grant. Not
// synthesizable in intent: it stands for an external LPDDR4 device.
module dram_model #(
  parameter int unsigned WIDTH   = 512,
  parameter int unsigned WORDS   = 4096,
  parameter int unsigned LAT     = 6,
  parameter int unsigned GNT_PCT = 60
) (
  input  logic              clk,
  input  logic              req,
  input  logic              we,
  input  logic [23:0]       addr,
  input  logic [WIDTH-1:0]  wdata,
  output logic              gnt,
  output logic              rvalid,
  output logic [WIDTH-1:0]  rdata
);
  logic [WIDTH-1:0] mem [WORDS];
  logic [LAT-1:0]   vpipe = '0;
  logic [WIDTH-1:0] dpipe [LAT];

  always @(negedge clk) gnt = req && (($urandom % 100) < GNT_PCT);

  always_ff @(posedge clk) begin
    vpipe <= {vpipe[LAT-2:0], req && gnt && !we};
    dpipe[0] <= mem[addr % WORDS];
    for (int i = 1; i < LAT; i++) dpipe[i] <= dpipe[i-1];
    if (req && gnt && we) mem[addr % WORDS] <= wdata;
  end
  assign rvalid = vpipe[LAT-1];
  assign rdata  = dpipe[LAT-1];
endmodule
