// debugger_core: the command processor of the fault-injection debugger.
//
// A small processor-like unit that fetches debugger commands sequentially
// from the input (campaign) memory, executes them, and stores the
// information selected by DCONFIG in the output (trace) memory. It reacts
// to the target's watchpoint-hit pin (EVTO) or to a chosen message without
// host involvement, which is what lets a fault be written into the target
// within a few clocks of its trigger.
//
// Structure (this design's own): a fetch front end and an execute stage.
//   * Fetch: one byte per clock from the input memory (IADDR, synchronous
//     read, one clock latency) or from the DLINK command stream, through a
//     two-entry byte queue, into a command assembler. The assembler holds
//     one complete command (opcode and parameters) ready for execution, so
//     the command that follows a WAITFOR is already decoded when the
//     trigger arrives.
//   * Execute: HALT pulses the event-in pin EVTI for one clock; RUN, RESET,
//     READRAM, WRITERAM, READREG and WRITEREG are handed to the
//     communication controller as soon as the message-data-in bus is idle;
//     WAIT <time> stalls execution for <time> clocks; WAITFOR <event>
//     <time> stalls until the event or until <time> clocks have passed
//     (time 0: no limit); DCONFIG <code> selects what is recorded; DRESET
//     restarts fetching at input address 0 with the default configuration.
//   * Recording: each message from the OCD that the configuration selects
//     becomes one output record {kind, tcode, payload} written at OADDR in
//     the clock the message completes (the receive side cannot stall);
//     WAITFOR outcomes (hit or timeout, with the clocks waited) become
//     records as well. When the output memory is full, further records are
//     dropped and out_overflow is set.
// DLINK: with dl_cmd_sel high, commands come from dl_cmd_* instead of the
// input memory; with dl_out_sel high, records leave on dl_out_* (one per
// clock, no back-pressure) instead of being written to the output memory.
// Control: start (one clock) resets OADDR, the configuration and the fetch
// address, and runs the campaign of prog_len bytes; done rises when all of
// it has been executed. The command set is the source's; its encoding,
// the record format and all timing are this design's choices
// (see fi_dbg_pkg).
module debugger_core
  import fi_dbg_pkg::*;
#(
  parameter int ADDR_W     = 16,
  parameter int TIME_W     = 16,
  parameter int IMEM_DEPTH = 4096,
  parameter int OMEM_DEPTH = 4096,
  localparam int IAW   = $clog2(IMEM_DEPTH),
  localparam int OAW   = $clog2(OMEM_DEPTH),
  localparam int PAY_W = ADDR_W + 8,
  localparam int REC_W = 2 + TCODE_W + PAY_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // campaign control
  input  logic              start,
  input  logic [IAW:0]      prog_len,
  output logic              running,
  output logic              done,
  // input memory read port
  output logic              imem_re,
  output logic [IAW-1:0]    imem_raddr,
  input  logic [7:0]        imem_rdata,
  // output memory write port
  output logic              omem_we,
  output logic [OAW-1:0]    omem_waddr,
  output logic [REC_W-1:0]  omem_wdata,
  output logic [OAW:0]      out_count,
  output logic              out_overflow,
  // DLINK direct control
  input  logic              dl_cmd_sel,
  input  logic              dl_cmd_valid,
  input  logic [7:0]        dl_cmd_data,
  output logic              dl_cmd_ready,
  input  logic              dl_out_sel,
  output logic              dl_out_valid,
  output logic [REC_W-1:0]  dl_out_data,
  // communication controller
  output logic              cc_valid,
  input  logic              cc_ready,
  output opcode_e           cc_op,
  output logic [ADDR_W-1:0] cc_addr,
  output logic [7:0]        cc_data,
  input  logic              rx_valid,
  input  logic [5:0]        rx_tcode,
  input  logic [PAY_W-1:0]  rx_payload,
  // NEXUS event pins
  output logic              evti,
  input  logic              evto,
  // status
  output logic              trig,       // one clock: a WAITFOR was satisfied
  output logic              timeout,    // one clock: a WAITFOR timed out
  output logic              err_timeout // sticky until start
);
  localparam int AB   = ADDR_W / 8;
  localparam int TB   = TIME_W / 8;
  localparam int PB_W = (ADDR_W + 8 > TIME_W + 8) ? ADDR_W + 8 : TIME_W + 8;

  typedef enum logic [1:0] {EX_IDLE, EX_WAIT, EX_WAITFOR} ex_state_e;

  // ---------------------------------------------------------------- fetch
  logic [IAW:0] iaddr;
  logic         inflight;      // a read of the input memory is returning
  logic [7:0]   q_mem [2];
  logic         q_wp, q_rp;
  logic [1:0]   q_cnt;
  logic         q_push, q_pop, flush;
  logic [7:0]   q_in;

  logic [1:0] credit_used;
  assign credit_used = q_cnt + {1'b0, inflight};

  assign imem_re      = running && !dl_cmd_sel && (iaddr < prog_len) &&
                        (credit_used < 2'd2) && !flush;
  assign imem_raddr   = iaddr[IAW-1:0];
  assign dl_cmd_ready = dl_cmd_sel && !inflight && (q_cnt < 2'd2) && !flush;

  always_comb begin
    q_push = 1'b0;
    q_in   = imem_rdata;
    if (inflight) begin
      q_push = 1'b1;
    end else if (dl_cmd_valid && dl_cmd_ready) begin
      q_push = 1'b1;
      q_in   = dl_cmd_data;
    end
  end

  // ------------------------------------------------------------ assembler
  logic               asm_done;   // a complete command is waiting
  logic [3:0]         asm_op;
  logic [3:0]         asm_idx;    // parameter bytes received
  logic [3:0]         asm_need;   // parameter bytes expected
  logic [PB_W-1:0]    pbuf;
  logic               take;       // executor consumes the command

  function automatic logic [3:0] n_params(input logic [3:0] op);
    unique case (op)
      OP_DCONFIG:              return 4'd1;
      OP_WAIT:                 return 4'(TB);
      OP_WAITFOR:              return 4'(1 + TB);
      OP_READRAM:              return 4'(AB);
      OP_WRITERAM:             return 4'(AB + 1);
      OP_READREG:              return 4'd1;
      OP_WRITEREG:             return 4'd2;
      default:                 return 4'd0;
    endcase
  endfunction

  function automatic logic known_op(input logic [3:0] op);
    return op inside {OP_HALT, OP_RUN, OP_RESET, OP_DRESET, OP_DCONFIG,
                      OP_WAIT, OP_WAITFOR, OP_READRAM, OP_WRITERAM,
                      OP_READREG, OP_WRITEREG};
  endfunction

  assign q_pop = (q_cnt != 2'd0) && !asm_done && !flush;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iaddr    <= '0;
      inflight <= 1'b0;
      q_wp     <= 1'b0;
      q_rp     <= 1'b0;
      q_cnt    <= '0;
      asm_done <= 1'b0;
      asm_op   <= '0;
      asm_idx  <= '0;
      asm_need <= '0;
      pbuf     <= '0;
    end else if (flush || start) begin
      iaddr    <= '0;
      inflight <= 1'b0;        // a read still returning is discarded
      q_wp     <= 1'b0;
      q_rp     <= 1'b0;
      q_cnt    <= '0;
      asm_done <= 1'b0;
      asm_idx  <= '0;
    end else begin
      inflight <= imem_re;
      if (imem_re) iaddr <= iaddr + 1'b1;
      if (q_push) begin
        q_mem[q_wp] <= q_in;
        q_wp        <= ~q_wp;
      end
      if (q_pop) q_rp <= ~q_rp;
      q_cnt <= q_cnt + {1'b0, q_push} - {1'b0, q_pop};

      if (take) asm_done <= 1'b0;
      if (q_pop) begin
        if (asm_idx == '0) begin
          asm_op   <= q_mem[q_rp][3:0];
          asm_need <= n_params(q_mem[q_rp][3:0]);
          pbuf     <= '0;
          if (n_params(q_mem[q_rp][3:0]) == '0)
            asm_done <= known_op(q_mem[q_rp][3:0]);
          else
            asm_idx <= 4'd1;
        end else begin
          pbuf[(int'(asm_idx) - 1) * 8 +: 8] <= q_mem[q_rp];
          if (asm_idx == asm_need) begin
            asm_done <= 1'b1;
            asm_idx  <= '0;
          end else begin
            asm_idx <= asm_idx + 1'b1;
          end
        end
      end
    end
  end

  // -------------------------------------------------------------- execute
  ex_state_e            state;
  logic [7:0]           cfg;
  logic [TIME_W-1:0]    wcnt, tlim;
  logic [7:0]           ev;
  logic                 evti_q;
  opcode_e              op;
  logic                 hit, tmo, msg_match;

  assign op      = opcode_e'(asm_op);
  assign cc_op   = op;
  assign cc_addr = (op == OP_READREG || op == OP_WRITEREG) ? ADDR_W'(pbuf[7:0])
                                                           : pbuf[ADDR_W-1:0];
  assign cc_data = (op == OP_READREG || op == OP_WRITEREG) ? pbuf[15:8]
                                                           : pbuf[ADDR_W +: 8];
  assign cc_valid = (state == EX_IDLE) && asm_done &&
                    (op inside {OP_RUN, OP_RESET, OP_READRAM, OP_WRITERAM,
                                OP_READREG, OP_WRITEREG});

  always_comb begin
    take = 1'b0;
    if (state == EX_IDLE && asm_done) take = cc_valid ? cc_ready : 1'b1;
  end
  assign flush = take && (op == OP_DRESET);
  assign evti  = evti_q;

  assign msg_match = rx_valid && ((ev[5:0] == TC_ANY) || (rx_tcode == ev[5:0]));
  assign hit = (state == EX_WAITFOR) && ((ev[7] && evto) || (ev[6] && msg_match));
  assign tmo = (state == EX_WAITFOR) && !hit && (tlim != '0) &&
               (wcnt + 1'b1 == tlim);
  assign trig    = hit;
  assign timeout = tmo;

  // end of campaign: everything fetched and executed
  logic fetch_empty;
  assign fetch_empty = (iaddr == prog_len) && (q_cnt == '0) && !inflight &&
                       !asm_done && (asm_idx == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= EX_IDLE;
      cfg         <= CFG_DEFAULT;
      wcnt        <= '0;
      tlim        <= '0;
      ev          <= '0;
      evti_q      <= 1'b0;
      running     <= 1'b0;
      done        <= 1'b0;
      err_timeout <= 1'b0;
    end else if (start) begin
      state       <= EX_IDLE;
      cfg         <= CFG_DEFAULT;
      evti_q      <= 1'b0;
      running     <= 1'b1;
      done        <= 1'b0;
      err_timeout <= 1'b0;
    end else begin
      evti_q <= 1'b0;
      if (running && !dl_cmd_sel && fetch_empty && state == EX_IDLE) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
      unique case (state)
        EX_IDLE: if (take) begin
          unique case (op)
            OP_HALT:    evti_q <= 1'b1;
            OP_DRESET:  cfg    <= CFG_DEFAULT;
            OP_DCONFIG: cfg    <= pbuf[7:0];
            OP_WAIT: if (pbuf[TIME_W-1:0] > TIME_W'(1)) begin
              state <= EX_WAIT;
              wcnt  <= pbuf[TIME_W-1:0] - 1'b1;
            end
            OP_WAITFOR: begin
              state <= EX_WAITFOR;
              ev    <= pbuf[7:0];
              tlim  <= pbuf[8 +: TIME_W];
              wcnt  <= '0;
            end
            default: ;
          endcase
        end
        EX_WAIT: begin
          wcnt <= wcnt - 1'b1;
          if (wcnt == TIME_W'(1)) state <= EX_IDLE;
        end
        EX_WAITFOR: begin
          wcnt <= wcnt + 1'b1;
          if (hit || tmo) state <= EX_IDLE;
          if (tmo) err_timeout <= 1'b1;
        end
        default: state <= EX_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------ recording
  logic             msg_rec, ev_pend, wr;
  logic [REC_W-1:0] ev_rec, rec;
  logic [OAW:0]     oaddr;
  logic             full;

  assign msg_rec = rx_valid && ((rx_tcode == TC_READ_DATA) ? cfg[CFG_STORE_RESP]
                                                           : cfg[CFG_STORE_TRACE]);
  assign wr   = msg_rec || ev_pend;
  assign rec  = msg_rec ? {REC_MSG, rx_tcode, rx_payload} : ev_rec;
  assign full = (oaddr == (OAW+1)'(OMEM_DEPTH));

  assign omem_we      = wr && !dl_out_sel && !full;
  assign omem_waddr   = oaddr[OAW-1:0];
  assign omem_wdata   = rec;
  assign dl_out_valid = wr && dl_out_sel;
  assign dl_out_data  = rec;
  assign out_count    = oaddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_pend      <= 1'b0;
      ev_rec       <= '0;
      oaddr        <= '0;
      out_overflow <= 1'b0;
    end else if (start) begin
      ev_pend      <= 1'b0;
      oaddr        <= '0;
      out_overflow <= 1'b0;
    end else begin
      if (ev_pend && !msg_rec) ev_pend <= 1'b0;
      if ((hit || tmo) && cfg[CFG_STORE_EVENT]) begin
        ev_pend <= 1'b1;
        ev_rec  <= {hit ? REC_HIT : REC_TIMEOUT, 6'd0, PAY_W'(wcnt + 1'b1)};
      end
      if (wr && !dl_out_sel) begin
        if (full) out_overflow <= 1'b1;
        else      oaddr <= oaddr + 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ checks
  assert property (@(posedge clk) disable iff (!rst_n) q_cnt <= 2'd2);
  assert property (@(posedge clk) disable iff (!rst_n)
    cc_valid && !cc_ready |=> cc_valid && $stable(cc_op));
endmodule
