// input_ram: campaign-data memory of the fault-injection debugger.
//
// The host PC loads a fault campaign (a byte stream of debugger commands)
// through the write port; the debugger core reads it sequentially through
// the read port, driving IADDR. Both ports are synchronous to clk: a write
// takes effect at the clock edge, and read data appears on rdata one cycle
// after raddr is presented with re high (rdata holds otherwise).
// Byte width follows from the command encoding of this design; the depth is
// a design choice, since the source gives no memory size.
module input_ram #(
  parameter int DEPTH  = 4096,
  parameter int DATA_W = 8,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  // host (PC) write port
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  // debugger core read port (IADDR)
  input  logic              re,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
