// output_ram: trace-data memory of the fault-injection debugger.
//
// The debugger core writes one record per clock at OADDR (messages received
// from the on-chip debug unit, read results and trigger records); the host
// PC reads the records back after the campaign. Writes are synchronous;
// the host read port returns data one cycle after raddr (registered).
// Record width and depth are this design's choices.
module output_ram #(
  parameter int DEPTH  = 4096,
  parameter int DATA_W = 32,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  // debugger core write port (OADDR)
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  // host (PC) read port
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
