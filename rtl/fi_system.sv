// fi_system: the fault-injection set-up of debugger and target-side OCD,
// joined by the NEXUS AUX port.
//
// fi_debugger runs a fault campaign from its input RAM and drives the
// message-data-in bus (MDI, MSEI), EVTI and reads the message-data-out bus
// (MDO, MSEO) and EVTO of nexus_ocd, the on-chip debug unit of the target
// processor. The processor and its memories are not part of this design:
// the OCD's processor-side signals (run control, fetch and data-write
// activity, register access and the real-time memory access port) are this
// module's ports, for the processor to connect to. The host ports are those
// of fi_debugger.
// Timing: one clock for debugger, AUX port and OCD (this design's choice;
// the source gives no port clocking). Default sizes are the recommended
// 8-bit target configuration, MDI 2 bits and MDO 4 bits; the OCD message
// FIFO depth, address, time widths and memory depths are this design's.
module fi_system
  import fi_dbg_pkg::*;
#(
  parameter int ADDR_W     = 16,
  parameter int TIME_W     = 16,
  parameter int MDI_W      = 2,
  parameter int MDO_W      = 4,
  parameter int IMEM_DEPTH = 4096,
  parameter int OMEM_DEPTH = 4096,
  parameter int OCD_FIFO   = 4,
  localparam int IAW   = $clog2(IMEM_DEPTH),
  localparam int OAW   = $clog2(OMEM_DEPTH),
  localparam int REC_W = 2 + TCODE_W + ADDR_W + 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // host: campaign loading and control
  input  logic              host_we,
  input  logic [IAW-1:0]    host_waddr,
  input  logic [7:0]        host_wdata,
  input  logic              start,
  input  logic [IAW:0]      prog_len,
  output logic              running,
  output logic              done,
  // host: trace read-back
  input  logic [OAW-1:0]    host_raddr,
  output logic [REC_W-1:0]  host_rdata,
  output logic [OAW:0]      out_count,
  output logic              out_overflow,
  output logic              err_timeout,
  output logic              trig,
  output logic              timeout,
  // DLINK direct control
  input  logic              dl_cmd_sel,
  input  logic              dl_cmd_valid,
  input  logic [7:0]        dl_cmd_data,
  output logic              dl_cmd_ready,
  input  logic              dl_out_sel,
  output logic              dl_out_valid,
  output logic [REC_W-1:0]  dl_out_data,
  // target processor side of the OCD
  output logic              cpu_halt,
  output logic              cpu_reset,
  input  logic              cpu_fetch,
  input  logic [ADDR_W-1:0] cpu_pc,
  input  logic              cpu_wr,
  input  logic [ADDR_W-1:0] cpu_waddr,
  input  logic [7:0]        cpu_wdata,
  output logic              cpu_reg_we,
  output logic [6:0]        cpu_reg_addr,
  output logic [7:0]        cpu_reg_wdata,
  input  logic [7:0]        cpu_reg_rdata,
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [7:0]        mem_wdata,
  input  logic              mem_gnt,
  input  logic [7:0]        mem_rdata
);
  logic [MDI_W-1:0] mdi;
  logic             msei_n;
  logic [MDO_W-1:0] mdo;
  logic             mseo_n, evti, evto;

  fi_debugger #(
    .ADDR_W(ADDR_W), .TIME_W(TIME_W), .MDI_W(MDI_W), .MDO_W(MDO_W),
    .IMEM_DEPTH(IMEM_DEPTH), .OMEM_DEPTH(OMEM_DEPTH)
  ) u_dbg (
    .clk, .rst_n,
    .host_we, .host_waddr, .host_wdata, .start, .prog_len, .running, .done,
    .host_raddr, .host_rdata, .out_count, .out_overflow, .err_timeout, .trig, .timeout,
    .dl_cmd_sel, .dl_cmd_valid, .dl_cmd_data, .dl_cmd_ready,
    .dl_out_sel, .dl_out_valid, .dl_out_data,
    .mdi, .msei_n, .mdo, .mseo_n, .evti, .evto);

  nexus_ocd #(
    .ADDR_W(ADDR_W), .MDI_W(MDI_W), .MDO_W(MDO_W), .FIFO_DEPTH(OCD_FIFO)
  ) u_ocd (
    .clk, .rst_n,
    .mdi, .msei_n, .mdo, .mseo_n, .evti, .evto,
    .cpu_halt, .cpu_reset, .cpu_fetch, .cpu_pc, .cpu_wr, .cpu_waddr, .cpu_wdata,
    .cpu_reg_we, .cpu_reg_addr, .cpu_reg_wdata, .cpu_reg_rdata,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rdata);
endmodule
