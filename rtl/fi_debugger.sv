// fi_debugger: debugger for real-time fault injection through a NEXUS
// on-chip debug (OCD) port.
//
// The host PC loads a fault campaign -- a sequence of debugger commands --
// into the input RAM, starts the debugger, and later reads the recorded
// trace from the output RAM. In between the debugger runs the campaign on
// its own: it resets and runs the target, waits for a trigger (a watchpoint
// hit on EVTO or a chosen message), and writes the faulty value into target
// memory through the OCD's real-time memory access, without halting the
// target. Messages sent by the OCD (program/data trace, read data, errors)
// are recorded in the output RAM for later analysis.
//
// Blocks (as in the debugger block diagram): debugger_core (command fetch
// and execution, IADDR/OADDR), input_ram (campaign data), output_ram (trace
// data) and nexus_comm_ctrl (message encoding and the AUX port). The DLINK
// signals give the host direct control and can stand in for either memory.
// All blocks run on one clock, shared with the OCD's message ports; the
// source does not give the port clocking, so this is this design's choice.
// Default sizes: MDI 2 bits and MDO 4 bits (the recommended 8-bit target
// configuration); address width, time width and memory depths are choices
// of this design.
module fi_debugger
  import fi_dbg_pkg::*;
#(
  parameter int ADDR_W     = 16,
  parameter int TIME_W     = 16,
  parameter int MDI_W      = 2,
  parameter int MDO_W      = 4,
  parameter int IMEM_DEPTH = 4096,
  parameter int OMEM_DEPTH = 4096,
  localparam int IAW   = $clog2(IMEM_DEPTH),
  localparam int OAW   = $clog2(OMEM_DEPTH),
  localparam int REC_W = 2 + TCODE_W + ADDR_W + 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // host: campaign loading and control
  input  logic             host_we,
  input  logic [IAW-1:0]   host_waddr,
  input  logic [7:0]       host_wdata,
  input  logic             start,
  input  logic [IAW:0]     prog_len,
  output logic             running,
  output logic             done,
  // host: trace read-back
  input  logic [OAW-1:0]   host_raddr,
  output logic [REC_W-1:0] host_rdata,
  output logic [OAW:0]     out_count,
  output logic             out_overflow,
  output logic             err_timeout,
  output logic             trig,
  output logic             timeout,
  // DLINK direct control
  input  logic             dl_cmd_sel,
  input  logic             dl_cmd_valid,
  input  logic [7:0]       dl_cmd_data,
  output logic             dl_cmd_ready,
  input  logic             dl_out_sel,
  output logic             dl_out_valid,
  output logic [REC_W-1:0] dl_out_data,
  // NEXUS AUX port to the target OCD
  output logic [MDI_W-1:0] mdi,
  output logic             msei_n,
  input  logic [MDO_W-1:0] mdo,
  input  logic             mseo_n,
  output logic             evti,
  input  logic             evto
);
  localparam int PAY_W = ADDR_W + 8;

  logic             imem_re;
  logic [IAW-1:0]   imem_raddr;
  logic [7:0]       imem_rdata;
  logic             omem_we;
  logic [OAW-1:0]   omem_waddr;
  logic [REC_W-1:0] omem_wdata;
  logic             cc_valid, cc_ready;
  opcode_e          cc_op;
  logic [ADDR_W-1:0] cc_addr;
  logic [7:0]       cc_data;
  logic             rx_valid;
  logic [5:0]       rx_tcode;
  logic [PAY_W-1:0] rx_payload;

  input_ram #(.DEPTH(IMEM_DEPTH), .DATA_W(8)) u_iram (
    .clk,
    .we    (host_we),
    .waddr (host_waddr),
    .wdata (host_wdata),
    .re    (imem_re),
    .raddr (imem_raddr),
    .rdata (imem_rdata)
  );

  output_ram #(.DEPTH(OMEM_DEPTH), .DATA_W(REC_W)) u_oram (
    .clk,
    .we    (omem_we),
    .waddr (omem_waddr),
    .wdata (omem_wdata),
    .raddr (host_raddr),
    .rdata (host_rdata)
  );

  debugger_core #(
    .ADDR_W(ADDR_W), .TIME_W(TIME_W),
    .IMEM_DEPTH(IMEM_DEPTH), .OMEM_DEPTH(OMEM_DEPTH)
  ) u_core (
    .clk, .rst_n,
    .start, .prog_len, .running, .done,
    .imem_re, .imem_raddr, .imem_rdata,
    .omem_we, .omem_waddr, .omem_wdata, .out_count, .out_overflow,
    .dl_cmd_sel, .dl_cmd_valid, .dl_cmd_data, .dl_cmd_ready,
    .dl_out_sel, .dl_out_valid, .dl_out_data,
    .cc_valid, .cc_ready, .cc_op, .cc_addr, .cc_data,
    .rx_valid, .rx_tcode, .rx_payload,
    .evti, .evto,
    .trig, .timeout, .err_timeout
  );

  nexus_comm_ctrl #(.ADDR_W(ADDR_W), .MDI_W(MDI_W), .MDO_W(MDO_W)) u_cc (
    .clk, .rst_n,
    .cmd_valid (cc_valid),
    .cmd_ready (cc_ready),
    .cmd_op    (cc_op),
    .cmd_addr  (cc_addr),
    .cmd_data  (cc_data),
    .rx_valid, .rx_tcode, .rx_payload,
    .mdi, .msei_n, .mdo, .mseo_n
  );
endmodule
