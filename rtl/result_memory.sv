// result_memory: the memory block holding the cumulative BIST results
// (success-rate sums, entropy levels, sensor counts, stability sums,
// calibrated tune levels) for later read-out. One synchronous write port
// for the controller, one registered read port for the user. Contents are
// cleared only by writing.
module result_memory #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned DW    = 16
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DW-1:0]            wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [DW-1:0]            rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
