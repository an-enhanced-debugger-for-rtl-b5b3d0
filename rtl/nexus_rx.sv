// nexus_rx: message deserializer for one NEXUS-style message data bus.
//
// Collects W bits per clock from md while mse_n is low, least significant
// beat first. When mse_n is seen high after at least one beat the message
// is complete: msg_valid is high for that one clock (combinationally, in
// the idle clock that follows the last beat), with the collected bits on
// msg_bits (unused upper bits zero) and the number of bits received on
// msg_nbits. Bits beyond MAX_BITS are dropped and flagged by msg_trunc.
// The receiver cannot stall the sender; its user must take msg_valid in
// the clock it is offered. Framing as in nexus_tx (this design's choice).
module nexus_rx #(
  parameter int W        = 4,
  parameter int MAX_BITS = 30,
  localparam int NB_W    = $clog2(MAX_BITS + W + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [W-1:0]        md,
  input  logic                mse_n,
  output logic                msg_valid,
  output logic [MAX_BITS-1:0] msg_bits,
  output logic [NB_W-1:0]     msg_nbits,
  output logic                msg_trunc
);
  localparam int BEATS = (MAX_BITS + W - 1) / W;
  localparam int BUF_W = BEATS * W;

  logic [BUF_W-1:0] buf_q;
  logic [NB_W-1:0]  nbits;
  logic             trunc;

  assign msg_valid = mse_n && (nbits != '0);
  assign msg_bits  = buf_q[MAX_BITS-1:0];
  assign msg_nbits = nbits;
  assign msg_trunc = trunc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      nbits <= '0;
      trunc <= 1'b0;
    end else if (!mse_n) begin
      if (int'(nbits) < BUF_W) begin
        buf_q[int'(nbits) +: W] <= md;
        nbits <= nbits + NB_W'(W);
      end else begin
        trunc <= 1'b1;
      end
    end else if (nbits != '0) begin
      buf_q <= '0;
      nbits <= '0;
      trunc <= 1'b0;
    end
  end
endmodule
