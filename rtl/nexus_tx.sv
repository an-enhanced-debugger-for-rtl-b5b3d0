// nexus_tx: message serializer for one NEXUS-style message data bus.
//
// A message of up to MAX_BITS bits (transfer code in the low bits) is sent
// least significant bit first, W bits per clock, over md. mse_n is low for
// every clock that carries message data and high when the bus is idle; a
// message therefore ends at the first clock mse_n is high again, and the
// serializer always leaves at least one idle clock between two messages.
// Handshake: a message is taken when valid and ready are both high; the
// first beat appears on md the following clock, and the message occupies
// ceil(len/W) clocks. ready is high exactly when the bus is idle.
// The framing (active-low message-enable, one idle clock as end marker)
// is this design's simplification of the NEXUS MSEI/MSEO signalling.
module nexus_tx #(
  parameter int W        = 2,
  parameter int MAX_BITS = 30,
  localparam int LEN_W   = $clog2(MAX_BITS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid,
  output logic                ready,
  input  logic [MAX_BITS-1:0] bits,
  input  logic [LEN_W-1:0]    len,
  output logic [W-1:0]        md,
  output logic                mse_n
);
  localparam int SH_W = ((MAX_BITS + W - 1) / W) * W;

  logic [SH_W-1:0]  sh;
  logic [LEN_W-1:0] beats;  // beats still to send, including the one on md
  logic             busy;

  assign ready = !busy;
  assign md    = sh[W-1:0];
  assign mse_n = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh    <= '0;
      beats <= '0;
      busy  <= 1'b0;
    end else if (!busy) begin
      if (valid && len != '0) begin
        sh    <= SH_W'(bits);
        beats <= LEN_W'((int'(len) + W - 1) / W);
        busy  <= 1'b1;
      end
    end else begin
      sh    <= sh >> W;
      beats <= beats - 1'b1;
      if (beats == LEN_W'(1)) busy <= 1'b0;
    end
  end

  property p_stable_while_busy;
    @(posedge clk) disable iff (!rst_n) busy |-> !ready;
  endproperty
  assert property (p_stable_while_busy);
endmodule
