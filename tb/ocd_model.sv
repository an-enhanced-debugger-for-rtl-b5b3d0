// ocd_model: behavioural model of a target system (CPU, data RAM and a
// NEXUS-style on-chip debug unit) for the debugger testbenches. Not
// synthesizable design content: it stands in for the target processor and
// its OCD, whose internals are outside this design.
//
// Target CPU: runs a fault-tolerant matrix-add loop over N elements, one
// instruction every CPU_DIV clocks. Iteration i, at instruction addresses
// 0x100+4i .. 0x103+4i: r1 = A[i]; r2 = B[i]; s2 = A[i] + B[i] (the
// duplicated operation, re-reading memory); C[i] = r1 + r2, and a mismatch
// s2 != r1 + r2 increments the error-detection counter. A at 0x00, B at
// 0x40, C at 0x80; RESET reloads A[i] = 3i+1, B[i] = 5i+2 and clears C.
// OCD: decodes run-control (RUN, RESET), memory read/write (real-time,
// without halting the CPU) and register read/write messages arriving on
// MDI; EVTI halts the CPU. Registers: 0/1 watchpoint address low/high,
// 2 watchpoint control (bit 0 pulse EVTO, bit 1 send a watchpoint message),
// 3 error-detection counter (read only), 4 CPU state (bit 0 running,
// bit 1 finished). Sends on MDO: a program-trace message at the start of
// each iteration, a data-trace message for each C[i] write, read data and
// watchpoint messages, through a queue of QDEPTH messages; when the queue
// overflows the message is lost and an error message is sent later.
// Message formats are those of fi_dbg_pkg.
module ocd_model
  import fi_dbg_pkg::*;
#(
  parameter int ADDR_W  = 16,
  parameter int MDI_W   = 2,
  parameter int MDO_W   = 4,
  parameter int N       = 8,
  parameter int CPU_DIV = 8,
  parameter int QDEPTH  = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [MDI_W-1:0] mdi,
  input  logic             msei_n,
  output logic [MDO_W-1:0] mdo,
  output logic             mseo_n,
  input  logic             evti,
  output logic             evto
);
  localparam int MSG_MAX = TCODE_W + ADDR_W + 8;
  localparam int LEN_W   = $clog2(MSG_MAX + 1);

  typedef struct { logic [MSG_MAX-1:0] bits; int len; } msg_t;

  // observable state for testbenches
  logic [7:0]  ram [256];
  logic        cpu_run, cpu_fin;
  logic [15:0] pc;
  int          det_count;
  int          ovf_count;
  msg_t        sent[$];       // every message put on MDO, in order
  logic [15:0] wr_addr[$];    // every debugger memory write, in order
  logic [7:0]  wr_data[$];
  longint      wr_time[$];    // clock edge count at which it took effect
  longint      evto_time[$];
  int          halts;
  longint      edges;

  logic [7:0]  wp_lo, wp_hi, wp_ctl;
  int          i_el, step, div;
  logic [7:0]  r1, r2;
  msg_t        q[$];
  bit          ovf_pend;

  // MDI receive
  logic               rx_valid;
  logic [MSG_MAX-1:0] rx_bits;
  nexus_rx #(.W(MDI_W), .MAX_BITS(MSG_MAX)) u_rx (
    .clk, .rst_n, .md(mdi), .mse_n(msei_n),
    .msg_valid(rx_valid), .msg_bits(rx_bits), .msg_nbits(), .msg_trunc());

  // MDO transmit
  logic               tx_valid, tx_ready;
  logic [MSG_MAX-1:0] tx_bits;
  logic [LEN_W-1:0]   tx_len;
  nexus_tx #(.W(MDO_W), .MAX_BITS(MSG_MAX)) u_tx (
    .clk, .rst_n, .valid(tx_valid), .ready(tx_ready), .bits(tx_bits),
    .len(tx_len), .md(mdo), .mse_n(mseo_n));

  always_comb begin
    tx_valid = q.size() > 0;
    tx_bits  = tx_valid ? q[0].bits : '0;
    tx_len   = tx_valid ? LEN_W'(q[0].len) : '0;
  end

  function automatic void push(input logic [5:0] tc, input logic [MSG_MAX-1:0] pay,
                               input int plen);
    msg_t m;
    m.bits = MSG_MAX'(tc) | (pay << TCODE_W);
    m.len  = TCODE_W + plen;
    if (q.size() >= QDEPTH) begin
      ovf_pend = 1;
      ovf_count++;
    end else begin
      q.push_back(m);
    end
  endfunction

  task automatic reload();
    for (int k = 0; k < 256; k++) ram[k] = 8'h00;
    for (int k = 0; k < N; k++) begin
      ram[k]        = 8'(3 * k + 1);
      ram[8'h40 + k] = 8'(5 * k + 2);
    end
    i_el = 0; step = 0; div = 0; pc = 16'h100;
    cpu_fin = 0; det_count = 0;
  endtask

  initial begin
    cpu_run = 0; wp_lo = 0; wp_hi = 0; wp_ctl = 0; evto = 0;
    ovf_pend = 0; ovf_count = 0; halts = 0; edges = 0;
    reload();
  end

  always @(posedge clk) begin
    edges++;
    evto <= 1'b0;
    if (rst_n) begin
      // message transmit handshake
      if (tx_valid && tx_ready) begin
        sent.push_back(q[0]);
        void'(q.pop_front());
      end
      if (ovf_pend && q.size() < QDEPTH) begin
        ovf_pend = 0;
        push(TC_ERROR, MSG_MAX'(1), 8);
      end
      // OCD command decode
      if (rx_valid) begin
        automatic logic [5:0] tc = rx_bits[5:0];
        automatic logic [ADDR_W-1:0] a = rx_bits[6 +: ADDR_W];
        automatic logic [7:0] d = rx_bits[6 + ADDR_W +: 8];
        automatic logic [7:0] ra = rx_bits[13:6];
        automatic logic [7:0] rd = rx_bits[21:14];
        case (tc)
          TC_RUN_CTRL:
            if (rx_bits[7:6] == RC_RUN) cpu_run = 1;
            else if (rx_bits[7:6] == RC_RESET) begin cpu_run = 0; reload(); end
          TC_MEM_READ:  push(TC_READ_DATA, MSG_MAX'(ram[a[7:0]]), 8);
          TC_MEM_WRITE: begin
            ram[a[7:0]] = d;
            wr_addr.push_back(16'(a)); wr_data.push_back(d); wr_time.push_back(edges);
          end
          TC_REG_READ: case (ra)
            8'd0: push(TC_READ_DATA, MSG_MAX'(wp_lo), 8);
            8'd1: push(TC_READ_DATA, MSG_MAX'(wp_hi), 8);
            8'd2: push(TC_READ_DATA, MSG_MAX'(wp_ctl), 8);
            8'd3: push(TC_READ_DATA, MSG_MAX'(det_count), 8);
            default: push(TC_READ_DATA, MSG_MAX'({cpu_fin, cpu_run}), 8);
          endcase
          TC_REG_WRITE: case (ra)
            8'd0: wp_lo = rd;
            8'd1: wp_hi = rd;
            8'd2: wp_ctl = rd;
            default: ;
          endcase
          default: ;
        endcase
      end
      if (evti) begin cpu_run = 0; halts++; end
      // target CPU
      if (cpu_run && !cpu_fin) begin
        if (div == CPU_DIV - 1) begin
          div = 0;
          if ({wp_hi, wp_lo} == pc && wp_ctl[1:0] != 0) begin
            if (wp_ctl[0]) begin evto <= 1'b1; evto_time.push_back(edges); end
            if (wp_ctl[1]) push(TC_WATCHPOINT, MSG_MAX'(1), 8);
          end
          case (step)
            0: begin
              push(TC_PROG_TRACE, MSG_MAX'(pc), ADDR_W);
              r1 = ram[i_el];
            end
            1: r2 = ram[8'h40 + i_el];
            2: ;
            default: begin
              automatic logic [7:0] s1 = r1 + r2;
              automatic logic [7:0] s2 = ram[i_el] + ram[8'h40 + i_el];
              ram[8'h80 + i_el] = s1;
              push(TC_DATA_WRITE, (MSG_MAX'(s1) << ADDR_W) | MSG_MAX'(8'h80 + i_el), ADDR_W + 8);
              if (s1 != s2) det_count++;
            end
          endcase
          if (step == 3) begin
            step = 0;
            i_el++;
            if (i_el == N) cpu_fin = 1;
          end else begin
            step++;
          end
          pc = 16'(16'h100 + 4 * i_el + step);
        end else begin
          div++;
        end
      end
    end
  end
endmodule
