// tb_fi_system: end-to-end test of the debugger and the target-side debug
// unit at their default parameters, with a behavioural processor and data
// RAM (target_cpu_model) on the processor side.
//
// Campaign 1, loaded through the host port: configure the debug unit once
// (program and data-write trace), then E fault-injection experiments. Each
// resets the processor, programs the watchpoint address and control
// through register writes, runs it, waits for the trigger (EVTO in even
// experiments, the watchpoint message in odd ones), writes a bit-flipped
// A[i] through real-time memory access, waits for the application to
// finish, and reads back C[i] and the error counter. The last experiment's
// watchpoint lies outside the program, so its WAITFOR times out. HALT ends
// the campaign through EVTI.
// Checks: each fault write reaches target RAM with the right address and
// value while the processor runs; the EVTO-to-write delay is
// 4 + ceil(30/MDI_W) clocks, one more when the processor holds the RAM in
// the grant clock; every message on MDO is recorded, in order, in the
// output RAM; hit and timeout records; an EVTO-triggered fault lands before
// the duplicated operation re-reads A[i], so the application detects it
// and its C[i] is still correct.
// Campaign 2: RESET, RUN, WAIT, DRESET until the output RAM overflows.
// DLINK: a command in and its record out over DLINK. Campaign 3: the
// processor runs one instruction per clock, faster than MDO can carry its
// trace, so the debug unit loses trace messages and reports an error
// message, which is recorded. Campaign 4: a fault written into a processor
// register (r1 of one element, right after it was loaded) corrupts C[i]
// and is detected. Each mechanism is counted and must occur.
module tb_fi_system;
  import fi_dbg_pkg::*;
  localparam int ADDR_W = 16, MDI_W = 2, MDO_W = 4, IMEM_DEPTH = 4096, OMEM_DEPTH = 4096;
  localparam int IAW = $clog2(IMEM_DEPTH), OAW = $clog2(OMEM_DEPTH);
  localparam int PAY_W = ADDR_W + 8, REC_W = 2 + 6 + PAY_W, MSG_MAX = 6 + PAY_W;
  localparam int E = 6, N = 8;

  logic clk = 0, rst_n = 0;
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

  fi_system dut (.*);

  target_cpu_model #(.ADDR_W(ADDR_W), .N(N)) cpu (
    .clk, .rst_n, .cpu_halt, .cpu_reset, .cpu_fetch, .cpu_pc, .cpu_wr, .cpu_waddr,
    .cpu_wdata, .cpu_reg_we, .cpu_reg_addr, .cpu_reg_wdata, .cpu_reg_rdata,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rdata);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // every message on MDO, reassembled by the testbench
  logic [63:0] acc = '0;
  int          nb = 0;
  logic [MSG_MAX-1:0] sent[$];
  always @(posedge clk) if (rst_n) begin
    if (!dut.mseo_n) begin
      acc |= 64'(dut.mdo) << nb;
      nb += MDO_W;
    end else if (nb != 0) begin
      sent.push_back(MSG_MAX'(acc));
      acc = '0; nb = 0;
    end
  end

  // mechanism counters; event times in the processor model's edge count
  int n_trig = 0, n_timeout = 0, n_halt = 0, n_dl = 0, n_wait_seen = 0;
  int n_bus_stall = 0, n_wait_clk = 0, n_dreset = 0, n_gnt_wait = 0;
  longint evto_time[$];
  logic [REC_W-1:0] dl_rec = '0;
  always @(negedge clk) if (rst_n) begin
    if (dut.u_dbg.u_core.cc_valid && !dut.u_dbg.u_core.cc_ready) n_bus_stall++;
    if (dut.u_dbg.u_core.state == dut.u_dbg.u_core.EX_WAIT) n_wait_clk++;
    if (dut.u_dbg.u_core.flush) n_dreset++;
    if (mem_req && !mem_gnt) n_gnt_wait++;
    if (dut.evto) evto_time.push_back(cpu.edges);
    if (trig) n_trig++;
    if (timeout) n_timeout++;
    if (dut.evti) n_halt++;
    if (dl_out_valid) begin n_dl++; dl_rec = dl_out_data; end
  end

  // ------------------------------------------------------ campaign builder
  logic [7:0] prog [$];
  task automatic put(input logic [7:0] b); prog.push_back(b); endtask
  task automatic c0(input opcode_e op); put(8'(op)); endtask
  task automatic c_wreg(input logic [7:0] a, input logic [7:0] d);
    put(8'(OP_WRITEREG)); put(a); put(d);
  endtask
  task automatic c_wram(input logic [15:0] a, input logic [7:0] d);
    put(8'(OP_WRITERAM)); put(a[7:0]); put(a[15:8]); put(d);
  endtask
  task automatic c_rram(input logic [15:0] a); put(8'(OP_READRAM)); put(a[7:0]); put(a[15:8]); endtask
  task automatic c_wait(input logic [15:0] t); put(8'(OP_WAIT)); put(t[7:0]); put(t[15:8]); endtask
  task automatic c_waitfor(input logic [7:0] e, input logic [15:0] t);
    put(8'(OP_WAITFOR)); put(e); put(t[7:0]); put(t[15:8]);
  endtask

  task automatic load_and_start();
    for (int k = 0; k < prog.size(); k++) begin
      @(negedge clk);
      host_we = 1; host_waddr = IAW'(k); host_wdata = prog[k];
    end
    @(negedge clk);
    host_we = 0; prog_len = (IAW+1)'(prog.size()); start = 1;
    @(negedge clk);
    start = 0;
  endtask

  task automatic read_rec(input int k, output logic [REC_W-1:0] r);
    @(negedge clk) host_raddr = OAW'(k);
    @(negedge clk) r = host_rdata;
  endtask

  logic [15:0] exp_addr [E];
  logic [7:0]  exp_val  [E];

  initial begin
    int beats, k, n_msg, n_hit, n_tmo, mi, n_read, n_err, n_slow;
    logic [REC_W-1:0] r;
    logic [OAW:0] oc_before;
    host_we = 0; host_waddr = '0; host_wdata = '0; start = 0; prog_len = '0;
    host_raddr = '0; dl_cmd_sel = 0; dl_cmd_valid = 0; dl_cmd_data = '0; dl_out_sel = 0;
    // ------------------------------------------------------ campaign 1
    c_wreg(8'd9, 8'h03);                      // program and data-write trace
    for (int e = 0; e < E; e++) begin
      automatic int i = (e * 3) % N;
      automatic logic [15:0] wp = (e == E - 1) ? 16'h0FFF : 16'(16'h100 + 8 * i);
      exp_addr[e] = 16'(i);
      exp_val[e]  = 8'(3 * i + 1) ^ (8'd1 << (e % 8));
      c0(OP_RESET);
      c_wreg(8'd0, wp[7:0]);
      c_wreg(8'd1, wp[15:8]);
      c_wreg(8'd8, (e % 2 == 0) ? 8'h01 : 8'h02);
      c0(OP_RUN);
      if (e % 2 == 0) c_waitfor(8'h80, 16'd600);
      else            c_waitfor(8'h40 | 8'(TC_WATCHPOINT), 16'd600);
      c_wram(exp_addr[e], exp_val[e]);
      c_wait(16'd300);
      c_rram(16'(8'h80 + i));
      c_rram(16'h00C0);
    end
    c0(OP_HALT);
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_and_start();
    k = 0;
    while (!done && k < 100000) begin @(negedge clk); k++; end
    check(done, "campaign 1 finished");
    repeat (60) @(negedge clk);   // last read response arrives
    check(cpu_halt, "HALT stopped the processor through EVTI");
    // fault writes
    check(cpu.wr_addr.size() == E, $sformatf("%0d fault writes, expected %0d",
                                             cpu.wr_addr.size(), E));
    for (int e = 0; e < E && e < cpu.wr_addr.size(); e++)
      check(cpu.wr_addr[e] == exp_addr[e] && cpu.wr_data[e] == exp_val[e],
            $sformatf("fault write %0d: %0h<=%0h, expected %0h<=%0h", e,
                      cpu.wr_addr[e], cpu.wr_data[e], exp_addr[e], exp_val[e]));
    // EVTO-to-write delay
    beats = (6 + ADDR_W + 8 + MDI_W - 1) / MDI_W;
    mi = 0; n_slow = 0;
    for (int e = 0; e < E - 1; e += 2) begin
      if (mi < evto_time.size() && e < cpu.wr_time.size()) begin
        automatic longint d = cpu.wr_time[e] - evto_time[mi];
        check(d == longint'(4 + beats) || d == longint'(5 + beats),
              $sformatf("experiment %0d: EVTO to fault %0d clocks, expected %0d (+1)", e, d, 4 + beats));
        if (d == longint'(5 + beats)) n_slow++;
        $display("experiment %0d: EVTO to fault write %0d clocks (MDI %0d bits)", e, d, MDI_W);
      end else check(0, "missing EVTO");
      mi++;
    end
    check(evto_time.size() == (E + 1) / 2 - 1 + ((E - 1) % 2),
          $sformatf("%0d EVTO pulses", evto_time.size()));
    // output records against the messages on MDO
    n_msg = 0; n_hit = 0; n_tmo = 0; n_read = 0;
    for (int a = 0; a < int'(out_count); a++) begin
      read_rec(a, r);
      case (rec_kind_e'(r[REC_W-1 -: 2]))
        REC_MSG: begin
          if (n_msg < sent.size()) begin
            automatic logic [MSG_MAX-1:0] b = sent[n_msg];
            check(r[PAY_W +: 6] == b[5:0] && r[PAY_W-1:0] == PAY_W'(b >> 6),
                  $sformatf("record %0d: %0h, MDO carried %0h", a, r, b));
          end else check(0, "record without a message");
          if (r[PAY_W +: 6] == TC_READ_DATA) begin
            automatic int e = n_read / 2;
            automatic int i = (e * 3) % N;
            if (n_read % 2 == 0) begin
              if (r[7:0] != 8'd0) n_wait_seen++;
              if (e % 2 == 0 && e < E - 1)
                check(r[7:0] == 8'(8 * i + 3), $sformatf("experiment %0d: C[%0d] = %0d", e, i, r[7:0]));
            end else if (e % 2 == 0 && e < E - 1) begin
              check(r[7:0] == 8'd1, $sformatf("experiment %0d: fault not detected by the application", e));
            end
            n_read++;
          end
          n_msg++;
        end
        REC_HIT:     n_hit++;
        REC_TIMEOUT: n_tmo++;
        default:     check(0, "unknown record kind");
      endcase
    end
    check(n_msg == sent.size(), $sformatf("%0d message records, %0d messages on MDO", n_msg, sent.size()));
    check(n_hit == E - 1 && n_tmo == 1, $sformatf("%0d hit / %0d timeout records", n_hit, n_tmo));
    check(n_read == 2 * E, $sformatf("%0d read responses recorded", n_read));
    check(err_timeout, "timeout flagged");

    // ------------------------------------------------------ campaign 2
    prog.delete();
    c0(OP_RESET);
    c0(OP_RUN);
    c_wait(16'd300);
    c0(OP_DRESET);
    load_and_start();
    k = 0;
    while (!out_overflow && k < 300000) begin @(negedge clk); k++; end
    check(out_overflow, "output RAM overflow");
    check(out_count == (OAW+1)'(OMEM_DEPTH), "OADDR stops at the memory depth");
    check(running && !done, "DRESET kept the campaign running");
    prog.delete();
    load_and_start();
    repeat (3) @(negedge clk);
    check(done && !out_overflow, "new start clears the overflow state");

    // ------------------------------------------------------ DLINK
    repeat (400) @(negedge clk);
    oc_before = out_count;
    dl_cmd_sel = 1; dl_out_sel = 1;
    begin
      automatic logic [7:0] bytes [3] = '{8'(OP_READRAM), 8'h80, 8'h00};
      for (int b = 0; b < 3; b++) begin
        dl_cmd_valid = 1; dl_cmd_data = bytes[b];
        @(posedge clk);
        while (!dl_cmd_ready) @(posedge clk);
        @(negedge clk);
      end
      dl_cmd_valid = 0;
    end
    k = 0;
    while (n_dl == 0 && k < 200) begin @(negedge clk); k++; end
    check(n_dl > 0, "record returned over DLINK");
    check(dl_rec[PAY_W +: 6] == TC_READ_DATA && dl_rec[7:0] == 8'd3,
          $sformatf("DLINK record %0h is the read response of C[0]", dl_rec));
    check(out_count == oc_before, "DLINK output bypasses the output RAM");
    dl_cmd_sel = 0; dl_out_sel = 0;

    // ------------------------------------------------------ campaign 3
    cpu.cpu_div = 1;
    prog.delete();
    c0(OP_RESET);
    c_wreg(8'd9, 8'h03);
    c0(OP_RUN);
    c_rram(16'h0040);                         // contends with the processor for the RAM
    c_wait(16'd200);
    load_and_start();
    k = 0;
    while (!done && k < 2000) begin @(negedge clk); k++; end
    check(done, "campaign 3 finished");
    n_err = 0; n_read = 0;
    for (int a = 0; a < int'(out_count); a++) begin
      read_rec(a, r);
      if (r[REC_W-1 -: 2] == REC_MSG && r[PAY_W +: 6] == TC_ERROR) n_err++;
      if (r[REC_W-1 -: 2] == REC_MSG && r[PAY_W +: 6] == TC_READ_DATA) begin
        n_read++;
        check(r[7:0] == 8'd2, $sformatf("B[0] read while the processor runs: %0d", r[7:0]));
      end
    end
    check(n_read == 1, "read response recorded in campaign 3");
    check(n_err > 0, "trace overflow reported by an error message");
    check(out_count < (OAW+1)'(4 * N), $sformatf("%0d records for %0d instructions: trace lost", out_count, 4 * N));

    // ------------------------------------------------------ campaign 4
    // register fault: r1 of element 2 flipped after it was loaded
    cpu.cpu_div = 8;
    prog.delete();
    c0(OP_RESET);
    c_wreg(8'd0, 8'h10);
    c_wreg(8'd1, 8'h01);
    c_wreg(8'd8, 8'h01);
    c0(OP_RUN);
    c_waitfor(8'h80, 16'd600);
    c_wreg(8'h80, 8'h07 ^ 8'h10);
    c_wait(16'd300);
    c_rram(16'h0082);
    c_rram(16'h00C0);
    load_and_start();
    k = 0;
    while (!done && k < 2000) begin @(negedge clk); k++; end
    repeat (60) @(negedge clk);
    check(done && cpu.reg_writes == 1, "register fault written to the processor");
    n_read = 0;
    for (int a = 0; a < int'(out_count); a++) begin
      read_rec(a, r);
      if (r[REC_W-1 -: 2] == REC_MSG && r[PAY_W +: 6] == TC_READ_DATA) begin
        if (n_read == 0) check(r[7:0] == 8'd35, $sformatf("C[2] after the register fault: %0d, expected 35", r[7:0]));
        if (n_read == 1) check(r[7:0] == 8'd1, "register fault detected by the application");
        n_read++;
      end
    end
    check(n_read == 2, "campaign 4 read responses recorded");

    // mechanisms
    check(evto_time.size() > 0, "EVTO trigger happened");
    check(n_hit >= 2, "message trigger happened");
    check(n_timeout >= 1, "WAITFOR timeout happened");
    check(n_halt >= 1, "HALT happened");
    check(n_wait_seen == E, $sformatf("WAIT let the application finish in %0d experiments", n_wait_seen));
    check(n_dl >= 1, "DLINK used");
    check(n_bus_stall > 0, "a command waited for the MDI bus");
    check(n_wait_clk > 0, "WAIT state entered");
    check(n_dreset > 1, "DRESET restarted the campaign");
    check(n_gnt_wait > 0, "a real-time access waited for the processor");
    $display("mechanisms: trig=%0d timeout=%0d halt=%0d evto=%0d dlink=%0d mdi-stall=%0d wait-clocks=%0d dreset=%0d grant-wait=%0d slow-writes=%0d trace-errors=%0d",
             n_trig, n_timeout, n_halt, evto_time.size(), n_dl, n_bus_stall, n_wait_clk,
             n_dreset, n_gnt_wait, n_slow, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
