// nexus_comm_ctrl: communication controller between the debugger core and
// the NEXUS AUX port of the target's on-chip debug unit (OCD).
//
// Transmit side: translates a debugger command (RUN, RESET, READRAM,
// WRITERAM, READREG, WRITEREG) into a message -- a 6-bit transfer code and
// its fields, see fi_dbg_pkg -- and sends it over the message-data-in bus
// MDI, MDI_W bits per clock (nexus_tx). cmd_ready is high when MDI is idle;
// a command taken at clock t puts its first beat on MDI at t+1 and the
// message lasts ceil(bits/MDI_W) clocks, so the bus widths set the time each
// message takes, as the source describes.
// Receive side: collects messages from the message-data-out bus MDO,
// MDO_W bits per clock (nexus_rx), and offers each one for a single clock
// on rx_valid, split into transfer code and payload (the idle clock after
// its last beat). Message layouts and framing are this design's choices.
module nexus_comm_ctrl
  import fi_dbg_pkg::*;
#(
  parameter int ADDR_W = 16,
  parameter int MDI_W  = 2,
  parameter int MDO_W  = 4,
  localparam int MSG_MAX = TCODE_W + ADDR_W + 8,
  localparam int PAY_W   = ADDR_W + 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // command from the debugger core
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  opcode_e           cmd_op,
  input  logic [ADDR_W-1:0] cmd_addr,
  input  logic [7:0]        cmd_data,
  // messages received from the OCD
  output logic              rx_valid,
  output logic [5:0]        rx_tcode,
  output logic [PAY_W-1:0]  rx_payload,
  // NEXUS AUX port
  output logic [MDI_W-1:0]  mdi,
  output logic              msei_n,
  input  logic [MDO_W-1:0]  mdo,
  input  logic              mseo_n
);
  localparam int LEN_W = $clog2(MSG_MAX + 1);

  logic [MSG_MAX-1:0] tx_bits;
  logic [LEN_W-1:0]   tx_len;

  // command -> message translation
  always_comb begin
    tx_bits = '0;
    tx_len  = '0;
    unique case (cmd_op)
      OP_RUN: begin
        tx_bits = MSG_MAX'({RC_RUN, TC_RUN_CTRL});
        tx_len  = LEN_W'(TCODE_W + 2);
      end
      OP_RESET: begin
        tx_bits = MSG_MAX'({RC_RESET, TC_RUN_CTRL});
        tx_len  = LEN_W'(TCODE_W + 2);
      end
      OP_READRAM: begin
        tx_bits = MSG_MAX'({cmd_addr, TC_MEM_READ});
        tx_len  = LEN_W'(TCODE_W + ADDR_W);
      end
      OP_WRITERAM: begin
        tx_bits = {cmd_data, cmd_addr, TC_MEM_WRITE};
        tx_len  = LEN_W'(MSG_MAX);
      end
      OP_READREG: begin
        tx_bits = MSG_MAX'({cmd_addr[7:0], TC_REG_READ});
        tx_len  = LEN_W'(TCODE_W + 8);
      end
      OP_WRITEREG: begin
        tx_bits = MSG_MAX'({cmd_data, cmd_addr[7:0], TC_REG_WRITE});
        tx_len  = LEN_W'(TCODE_W + 16);
      end
      default: ;
    endcase
  end

  nexus_tx #(.W(MDI_W), .MAX_BITS(MSG_MAX)) u_tx (
    .clk, .rst_n,
    .valid (cmd_valid),
    .ready (cmd_ready),
    .bits  (tx_bits),
    .len   (tx_len),
    .md    (mdi),
    .mse_n (msei_n)
  );

  logic [MSG_MAX-1:0] rx_bits;
  logic               rx_trunc;

  nexus_rx #(.W(MDO_W), .MAX_BITS(MSG_MAX)) u_rx (
    .clk, .rst_n,
    .md        (mdo),
    .mse_n     (mseo_n),
    .msg_valid (rx_valid),
    .msg_bits  (rx_bits),
    .msg_nbits (),
    .msg_trunc (rx_trunc)
  );

  assign rx_tcode   = rx_bits[TCODE_W-1:0];
  assign rx_payload = rx_bits[MSG_MAX-1:TCODE_W];

  // Only message-producing commands may be handed to the controller.
  assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid |-> (cmd_op inside {OP_RUN, OP_RESET, OP_READRAM, OP_WRITERAM,
                                  OP_READREG, OP_WRITEREG}));
endmodule
