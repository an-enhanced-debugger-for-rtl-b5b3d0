// fi_workload_run: one target configuration for tb_fi_workloads. Builds a
// fi_system (debugger and on-chip debug unit) with the given address and
// message-bus widths, connects the behavioural processor model and runs a
// fault campaign covering every pair of trigger instruction (the 4 * N
// instructions the test program executes) and target cell (the 3 * N used
// RAM bytes A, B and C). Each experiment: RESET, watchpoint on the trigger
// instruction (EVTO), RUN, WAITFOR EVTO, WRITERAM of the cell's value at
// the trigger instant with one bit flipped, WAIT for the program to end.
// Program and data-write trace are enabled once per campaign; the
// experiments are loaded in campaigns of PER_LOAD, as the host would.
// Reports:
//   * the fault writes with the right address and value;
//   * the EVTO-to-write delay: the smallest, leaving out triggers on the
//     first instruction;
//   * how many delays were 4 + B or 5 + B clocks, where B is the number of
//     write-message beats. Up to 4 more are allowed when the trigger is the
//     first instruction, which can run while the debugger is still reading
//     the WAITFOR command;
//   * the trace messages the debug unit lost, and the experiments in which
//     it lost at least one;
//   * the inconclusive experiments, where the processor wrote the target
//     cell after the trigger but no later than the fault;
//   * the number of inconclusive experiments predicted from the delay: a
//     C[j] write m instructions after the trigger counts when 0 < 8m <= 4 + B.
module fi_workload_run
  import fi_dbg_pkg::*;
#(
  parameter int ADDR_W   = 16,
  parameter int MDI_W    = 2,
  parameter int MDO_W    = 4,
  parameter int N        = 8,
  parameter int PER_LOAD = 96
) (
  input  logic clk,
  input  logic rst_n,
  output logic fin,
  output int   nexp,
  output int   delay,
  output int   delay_ok,
  output int   writes_ok,
  output int   lost,
  output int   lost_exp,
  output int   inconcl,
  output int   inconcl_pred
);
  localparam int IAW = 12, OAW = 12, REC_W = 2 + 6 + ADDR_W + 8;
  localparam int AB = ADDR_W / 8;
  localparam int CPU_DIV = 8;
  localparam int NK = 4 * N, NC = 3 * N, NEXP = NK * NC;
  localparam int B = (6 + ADDR_W + 8 + MDI_W - 1) / MDI_W;

  logic host_we, start, running, done, out_overflow, err_timeout, trig, timeout;
  logic [IAW-1:0] host_waddr;
  logic [7:0] host_wdata;
  logic [IAW:0] prog_len;
  logic [OAW-1:0] host_raddr;
  logic [REC_W-1:0] host_rdata;
  logic [OAW:0] out_count;
  logic dl_cmd_sel, dl_cmd_valid, dl_cmd_ready, dl_out_sel, dl_out_valid;
  logic [7:0] dl_cmd_data;
  logic [REC_W-1:0] dl_out_data;
  logic cpu_halt, cpu_reset, cpu_fetch, cpu_wr;
  logic [ADDR_W-1:0] cpu_pc, cpu_waddr;
  logic [7:0] cpu_wdata;
  logic cpu_reg_we;
  logic [6:0] cpu_reg_addr;
  logic [7:0] cpu_reg_wdata, cpu_reg_rdata;
  logic mem_req, mem_we, mem_gnt;
  logic [ADDR_W-1:0] mem_addr;
  logic [7:0] mem_wdata, mem_rdata;

  fi_system #(.ADDR_W(ADDR_W), .MDI_W(MDI_W), .MDO_W(MDO_W)) dut (.*);
  target_cpu_model #(.ADDR_W(ADDR_W), .N(N), .CPU_DIV(CPU_DIV)) cpu (
    .clk, .rst_n, .cpu_halt, .cpu_reset, .cpu_fetch, .cpu_pc, .cpu_wr, .cpu_waddr,
    .cpu_wdata, .cpu_reg_we, .cpu_reg_addr, .cpu_reg_wdata, .cpu_reg_rdata,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rdata);

  // event logs, in the processor model's edge count
  longint evto_time[$];
  longint pwr_time[$];             // processor data writes
  logic [ADDR_W-1:0] pwr_addr[$];
  int     n_lost = 0;
  int     n_exp = 0, n_lost_exp = 0, last_lost_exp = -1;  // experiments counted by RESET
  always @(negedge clk) if (rst_n) begin
    if (cpu_reset) n_exp++;
    if (dut.u_ocd.any_lost && last_lost_exp != n_exp) begin
      n_lost_exp++;
      last_lost_exp = n_exp;
    end
    if (dut.evto) evto_time.push_back(cpu.edges);
    if (cpu_wr) begin pwr_time.push_back(cpu.edges + 1); pwr_addr.push_back(cpu_waddr); end
    if (dut.u_ocd.any_lost) n_lost++;
  end

  logic [7:0] prog [$];
  task automatic put(input logic [7:0] b); prog.push_back(b); endtask
  task automatic put_addr(input logic [31:0] a);
    for (int k = 0; k < AB; k++) put(a[8*k +: 8]);
  endtask

  // experiment e: trigger instruction k, target cell c (A, B, then C)
  function automatic int exp_k(input int e); return e % NK; endfunction
  function automatic int exp_c(input int e); return e / NK; endfunction
  function automatic logic [7:0] cell_addr(input int c);
    return (c < N) ? 8'(c) : (c < 2 * N) ? 8'('h40 + c - N) : 8'('h80 + c - 2 * N);
  endfunction
  // value of the cell when instruction k executes (fault-free run)
  function automatic logic [7:0] cell_value(input int c, input int k);
    if (c < N) return 8'(3 * c + 1);
    if (c < 2 * N) return 8'(5 * (c - N) + 2);
    return (4 * (c - 2 * N) + 3 <= k) ? 8'(8 * (c - 2 * N) + 3) : 8'd0;
  endfunction
  function automatic logic [7:0] fault_value(input int e);
    return cell_value(exp_c(e), exp_k(e)) ^ (8'd1 << ((exp_k(e) + exp_c(e)) % 8));
  endfunction

  initial begin
    fin = 0; nexp = NEXP; delay = -1; delay_ok = 0; writes_ok = 0; lost = 0; lost_exp = 0;
    inconcl = 0; inconcl_pred = 0;
    host_we = 0; host_waddr = '0; host_wdata = '0; start = 0; prog_len = '0;
    host_raddr = '0; dl_cmd_sel = 0; dl_cmd_valid = 0; dl_cmd_data = '0; dl_out_sel = 0;
    @(posedge rst_n);
    for (int e0 = 0; e0 < NEXP; e0 += PER_LOAD) begin
      prog.delete();
      put(8'(OP_WRITEREG)); put(8'd9); put(8'h03);
      for (int e = e0; e < e0 + PER_LOAD && e < NEXP; e++) begin
        automatic logic [31:0] wp = 32'('h100 + 8 * (exp_k(e) / 4) + exp_k(e) % 4);
        put(8'(OP_RESET));
        for (int b = 0; b < AB; b++) begin put(8'(OP_WRITEREG)); put(8'(b)); put(wp[8*b +: 8]); end
        put(8'(OP_WRITEREG)); put(8'd8); put(8'h01);
        put(8'(OP_RUN));
        put(8'(OP_WAITFOR)); put(8'h80); put(8'hD0); put(8'h07);      // 2000 clocks
        put(8'(OP_WRITERAM)); put_addr(32'(cell_addr(exp_c(e)))); put(fault_value(e));
        put(8'(OP_WAIT)); put(8'h90); put(8'h01);                     // 400 clocks
      end
      for (int k = 0; k < prog.size(); k++) begin
        @(negedge clk);
        host_we = 1; host_waddr = IAW'(k); host_wdata = prog[k];
      end
      @(negedge clk);
      host_we = 0; prog_len = (IAW+1)'(prog.size()); start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    // evaluation
    for (int e = 0; e < NEXP && e < cpu.wr_addr.size(); e++)
      if (cpu.wr_addr[e] == ADDR_W'(cell_addr(exp_c(e))) && cpu.wr_data[e] == fault_value(e))
        writes_ok++;
    if (cpu.wr_addr.size() != NEXP) writes_ok = -1;
    for (int e = 0; e < NEXP && e < evto_time.size() && e < cpu.wr_time.size(); e++) begin
      automatic longint d = cpu.wr_time[e] - evto_time[e];
      automatic int m = 4 * (exp_c(e) - 2 * N) + 3 - exp_k(e);
      if (exp_k(e) != 0 && (delay < 0 || d < longint'(delay))) delay = int'(d);
      if (d == longint'(4 + B) || d == longint'(5 + B)) delay_ok++;
      // the first instruction can execute while the debugger is still
      // reading the 4-byte WAITFOR command
      else if (exp_k(e) == 0 && d > longint'(5 + B) && d <= longint'(9 + B)) delay_ok++;
      // inconclusive: the processor wrote the cell in (trigger, fault]
      foreach (pwr_time[w])
        if (pwr_addr[w] == ADDR_W'(cell_addr(exp_c(e))) &&
            pwr_time[w] > evto_time[e] && pwr_time[w] <= cpu.wr_time[e]) begin
          inconcl++;
          break;
        end
      if (exp_c(e) >= 2 * N && m > 0 && CPU_DIV * m <= 4 + B) inconcl_pred++;
    end
    lost = n_lost;
    lost_exp = n_lost_exp;
    fin = 1;
  end
endmodule
