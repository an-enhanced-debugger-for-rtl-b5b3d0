// nexus_ocd: NEXUS-style on-chip debug unit for the target processor, the
// counterpart of the debugger on the other end of the AUX port.
//
// Features (the set the source lists for its Class 2 OCD: run control,
// watchpoints, real-time memory access, register access, program trace,
// configurable message-bus widths and an internal message FIFO):
//   * Run control: a RESET message pulses cpu_reset and holds the CPU
//     halted; RUN releases it; the EVTI pin halts it.
//   * Real-time memory access: memory read/write messages become one
//     access on the mem_* port (request held until mem_gnt; read data is
//     taken one clock after the grant) while the CPU keeps running. A read
//     returns a read-data message.
//   * Registers (8-bit numbers, all readable with a register-read message):
//       0 .. ADDR_W/8-1  watchpoint address, least significant byte first
//       8  watchpoint control: bit0 pulse EVTO, bit1 send a watchpoint
//          message, bit2 halt the CPU on a hit (breakpoint), bit3 also
//          match CPU data writes to the watchpoint address
//       9  trace control: bit0 program trace, bit1 data-write trace
//       10 status (read only): bit0 CPU halted, bit1 a message was lost
//       0x80 .. 0xFF processor registers 0 .. 127, through the cpu_reg_*
//          port: a write strobes cpu_reg_we for one clock in the clock the
//          message completes; a read samples cpu_reg_rdata, which must
//          follow cpu_reg_addr combinationally, in that same clock
//   * Watchpoint: a fetch of the watchpoint address (or, if enabled, a
//     data write to it) raises EVTO for one clock in the next clock,
//     and/or queues a watchpoint message.
//   * Program trace: a fetch that does not follow the previous one
//     sequentially (a branch, or the first fetch after RUN) queues a
//     program-trace message with its address. Data trace: each CPU data
//     write queues a data-write message.
// Messages from all sources pass through one-entry holding registers and
// a FIFO of FIFO_DEPTH messages (one enters per clock, fixed priority:
// register read data, memory read data, watchpoint, error, program trace,
// data trace) to the MDO
// serializer. A message whose holding register is still occupied is lost,
// and an error message is queued once room allows, so a slow MDO shows up
// as trace-overflow errors.
// The feature set follows the source; register map, priorities, FIFO
// depth, the memory port handshake and message formats (fi_dbg_pkg) are
// this design's choices.
module nexus_ocd
  import fi_dbg_pkg::*;
#(
  parameter int ADDR_W     = 16,
  parameter int MDI_W      = 2,
  parameter int MDO_W      = 4,
  parameter int FIFO_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // AUX port
  input  logic [MDI_W-1:0]  mdi,
  input  logic              msei_n,
  output logic [MDO_W-1:0]  mdo,
  output logic              mseo_n,
  input  logic              evti,
  output logic              evto,
  // CPU run control
  output logic              cpu_halt,
  output logic              cpu_reset,
  // CPU activity (trace and watchpoint)
  input  logic              cpu_fetch,
  input  logic [ADDR_W-1:0] cpu_pc,
  input  logic              cpu_wr,
  input  logic [ADDR_W-1:0] cpu_waddr,
  input  logic [7:0]        cpu_wdata,
  // processor register access
  output logic              cpu_reg_we,
  output logic [6:0]        cpu_reg_addr,
  output logic [7:0]        cpu_reg_wdata,
  input  logic [7:0]        cpu_reg_rdata,
  // real-time memory access port
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [7:0]        mem_wdata,
  input  logic              mem_gnt,
  input  logic [7:0]        mem_rdata
);
  localparam int MSG_MAX = TCODE_W + ADDR_W + 8;
  localparam int LEN_W   = $clog2(MSG_MAX + 1);
  localparam int AB      = ADDR_W / 8;
  localparam int FAW     = (FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1;

  typedef struct packed {
    logic [MSG_MAX-1:0] bits;
    logic [LEN_W-1:0]   len;
  } msg_t;

  typedef enum logic [2:0] {S_RD, S_MD, S_WP, S_ER, S_PT, S_DT} src_e;
  localparam int NSRC = 6;

  // ------------------------------------------------------------ MDI side
  logic               rx_valid;
  logic [MSG_MAX-1:0] rx_bits;
  logic [5:0]         rx_tc;
  logic [ADDR_W-1:0]  rx_addr;
  logic [7:0]         rx_data, rx_reg, rx_rdata;

  nexus_rx #(.W(MDI_W), .MAX_BITS(MSG_MAX)) u_rx (
    .clk, .rst_n, .md(mdi), .mse_n(msei_n),
    .msg_valid(rx_valid), .msg_bits(rx_bits), .msg_nbits(), .msg_trunc());

  assign rx_tc    = rx_bits[5:0];
  assign rx_addr  = rx_bits[6 +: ADDR_W];
  assign rx_data  = rx_bits[6 + ADDR_W +: 8];
  assign rx_reg   = rx_bits[13:6];
  assign rx_rdata = rx_bits[21:14];

  // ------------------------------------------------------------ registers
  logic [ADDR_W-1:0] wp_addr;
  logic [7:0]        wp_ctl, tr_ctl;
  logic              lost;
  logic [7:0]        reg_rd;

  always_comb begin
    reg_rd = '0;
    if (rx_reg[7])                reg_rd = cpu_reg_rdata;
    else if (int'(rx_reg) < AB)        reg_rd = wp_addr[8 * rx_reg[$clog2(AB+1)-1:0] +: 8];
    else if (rx_reg == 8'd8)      reg_rd = wp_ctl;
    else if (rx_reg == 8'd9)      reg_rd = tr_ctl;
    else if (rx_reg == 8'd10)     reg_rd = {6'd0, lost, cpu_halt};
  end

  assign cpu_reg_addr  = rx_reg[6:0];
  assign cpu_reg_wdata = rx_rdata;
  assign cpu_reg_we    = rx_valid && rx_tc == TC_REG_WRITE && rx_reg[7];

  // --------------------------------------------------- message sources
  logic [NSRC-1:0] hold_v;
  msg_t            hold   [NSRC];
  logic [NSRC-1:0] ev_v;
  msg_t            ev_msg [NSRC];
  logic [NSRC-1:0] take;

  logic              acc_busy, acc_rd_wait;
  logic [ADDR_W-1:0] last_pc;
  logic              seq_valid;
  logic              wp_hit;

  assign wp_hit = !cpu_halt && ((cpu_fetch && cpu_pc == wp_addr) ||
                                (wp_ctl[3] && cpu_wr && cpu_waddr == wp_addr));

  always_comb begin
    ev_v = '0;
    for (int s = 0; s < NSRC; s++) ev_msg[s] = '0;
    // read data: register read now, memory read when the data returns
    if (rx_valid && rx_tc == TC_REG_READ) begin
      ev_v[S_RD] = 1'b1;
      ev_msg[S_RD] = '{MSG_MAX'({reg_rd, TC_READ_DATA}), LEN_W'(TCODE_W + 8)};
    end
    if (acc_rd_wait) begin
      ev_v[S_MD] = 1'b1;
      ev_msg[S_MD] = '{MSG_MAX'({mem_rdata, TC_READ_DATA}), LEN_W'(TCODE_W + 8)};
    end
    if (wp_hit && wp_ctl[1]) begin
      ev_v[S_WP] = 1'b1;
      ev_msg[S_WP] = '{MSG_MAX'({8'd1, TC_WATCHPOINT}), LEN_W'(TCODE_W + 8)};
    end
    if (lost && !hold_v[S_ER]) begin
      ev_v[S_ER] = 1'b1;
      ev_msg[S_ER] = '{MSG_MAX'({8'd1, TC_ERROR}), LEN_W'(TCODE_W + 8)};
    end
    if (cpu_fetch && !cpu_halt && tr_ctl[0] &&
        !(seq_valid && cpu_pc == last_pc + 1'b1)) begin
      ev_v[S_PT] = 1'b1;
      ev_msg[S_PT] = '{MSG_MAX'({cpu_pc, TC_PROG_TRACE}), LEN_W'(TCODE_W + ADDR_W)};
    end
    if (cpu_wr && tr_ctl[1]) begin
      ev_v[S_DT] = 1'b1;
      ev_msg[S_DT] = '{{cpu_wdata, cpu_waddr, TC_DATA_WRITE}, LEN_W'(MSG_MAX)};
    end
  end

  // ------------------------------------------------------------ FIFO
  msg_t            fifo [FIFO_DEPTH];
  logic [FAW-1:0]  f_wp, f_rp;
  logic [FAW:0]    f_cnt;
  logic            f_push, f_pop;
  msg_t            f_in;
  logic            tx_ready;

  // one holding register enters the FIFO per clock, by fixed priority
  always_comb begin
    take   = '0;
    f_push = 1'b0;
    f_in   = '0;
    if (f_cnt < (FAW+1)'(FIFO_DEPTH)) begin
      for (int s = 0; s < NSRC; s++) begin
        if (hold_v[s] && !f_push) begin
          take[s] = 1'b1;
          f_push  = 1'b1;
          f_in    = hold[s];
        end
      end
    end
  end

  assign f_pop = (f_cnt != '0) && tx_ready;

  nexus_tx #(.W(MDO_W), .MAX_BITS(MSG_MAX)) u_tx (
    .clk, .rst_n,
    .valid (f_cnt != '0),
    .ready (tx_ready),
    .bits  (fifo[f_rp].bits),
    .len   (fifo[f_rp].len),
    .md    (mdo),
    .mse_n (mseo_n));

  always_ff @(posedge clk) begin
    if (f_push) fifo[f_wp] <= f_in;
  end

  // ------------------------------------------------------------ control
  logic any_lost;
  always_comb begin
    any_lost = 1'b0;
    for (int s = 0; s < NSRC; s++)
      if (ev_v[s] && hold_v[s] && !take[s]) any_lost = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_v      <= '0;
      for (int s = 0; s < NSRC; s++) hold[s] <= '0;
      f_wp        <= '0;
      f_rp        <= '0;
      f_cnt       <= '0;
      wp_addr     <= '0;
      wp_ctl      <= '0;
      tr_ctl      <= 8'h01;
      lost        <= 1'b0;
      cpu_halt    <= 1'b1;
      cpu_reset   <= 1'b0;
      evto        <= 1'b0;
      acc_busy    <= 1'b0;
      acc_rd_wait <= 1'b0;
      mem_we      <= 1'b0;
      mem_addr    <= '0;
      mem_wdata   <= '0;
      last_pc     <= '0;
      seq_valid   <= 1'b0;
    end else begin
      // message holding registers
      for (int s = 0; s < NSRC; s++) begin
        if (take[s]) hold_v[s] <= 1'b0;
        if (ev_v[s] && (!hold_v[s] || take[s])) begin
          hold_v[s] <= 1'b1;
          hold[s]   <= ev_msg[s];
        end
      end
      if (any_lost) lost <= 1'b1;
      else if (ev_v[S_ER] && (!hold_v[S_ER] || take[S_ER])) lost <= 1'b0;
      if (f_push) f_wp <= (int'(f_wp) == FIFO_DEPTH - 1) ? '0 : f_wp + 1'b1;
      if (f_pop)  f_rp <= (int'(f_rp) == FIFO_DEPTH - 1) ? '0 : f_rp + 1'b1;
      f_cnt <= f_cnt + (FAW+1)'(f_push) - (FAW+1)'(f_pop);

      // run control and watchpoint
      cpu_reset <= 1'b0;
      evto      <= wp_hit && wp_ctl[0];
      if (wp_hit && wp_ctl[2]) cpu_halt <= 1'b1;
      if (evti) cpu_halt <= 1'b1;
      if (cpu_fetch && !cpu_halt) begin
        last_pc   <= cpu_pc;
        seq_valid <= 1'b1;
      end

      // real-time memory access
      acc_rd_wait <= 1'b0;
      if (acc_busy && mem_gnt) begin
        acc_busy    <= 1'b0;
        acc_rd_wait <= !mem_we;
      end

      if (rx_valid) begin
        unique case (rx_tc)
          TC_RUN_CTRL: begin
            if (rx_bits[7:6] == RC_RESET) begin
              cpu_reset <= 1'b1;
              cpu_halt  <= 1'b1;
            end else if (rx_bits[7:6] == RC_RUN) begin
              cpu_halt  <= 1'b0;
            end
            seq_valid <= 1'b0;
          end
          TC_MEM_READ, TC_MEM_WRITE: if (!acc_busy) begin
            acc_busy  <= 1'b1;
            mem_we    <= (rx_tc == TC_MEM_WRITE);
            mem_addr  <= rx_addr;
            mem_wdata <= rx_data;
          end
          TC_REG_WRITE: begin
            if (int'(rx_reg) < AB) wp_addr[8 * rx_reg[$clog2(AB+1)-1:0] +: 8] <= rx_rdata;
            else if (rx_reg == 8'd8) wp_ctl <= rx_rdata;
            else if (rx_reg == 8'd9) tr_ctl <= rx_rdata;
          end
          default: ;
        endcase
      end
    end
  end

  assign mem_req = acc_busy;

  assert property (@(posedge clk) disable iff (!rst_n) f_cnt <= (FAW+1)'(FIFO_DEPTH));
  assert property (@(posedge clk) disable iff (!rst_n) mem_req && !mem_gnt |=> mem_req);
endmodule
