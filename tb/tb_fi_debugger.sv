// tb_fi_debugger: end-to-end test of the fault-injection debugger at its
// default parameters, connected to a behavioural target/OCD model.
//
// Campaign 1 (loaded into the input RAM through the host port): E fault
// injection experiments. Each resets the target, programs the watchpoint
// through register writes, starts the target, waits for the trigger
// (EVTO pin in even experiments, a watchpoint message in odd ones), writes
// the precomputed bit-flipped value into A[i] in real time, waits for the
// application to finish, and reads back C[i] and the target's
// error-detection counter. The last experiment's watchpoint is never
// reached, so its WAITFOR times out. The campaign ends with HALT.
// Checks: every fault write reaches the target with the right address and
// value; the trigger-to-write delay of EVTO-triggered experiments is
// 2 + ceil(30 / MDI_W) clocks; every message the target sent is recorded,
// in order, in the output RAM (read back through the host port), and the
// trigger and timeout records are there; read data matches the target.
// Campaign 2: RESET, RUN, WAIT, DRESET in a loop until the output RAM
// overflows. Then DLINK: a command sent over DLINK and its record returned
// over DLINK. Each mechanism (EVTO trigger, message trigger, timeout, WAIT,
// HALT, DRESET, output overflow, DLINK, a command held while MDI is busy)
// is counted and must occur.
module tb_fi_debugger;
  import fi_dbg_pkg::*;
  localparam int ADDR_W = 16, MDI_W = 2, MDO_W = 4, IMEM_DEPTH = 4096, OMEM_DEPTH = 4096;
  localparam int IAW = $clog2(IMEM_DEPTH), OAW = $clog2(OMEM_DEPTH);
  localparam int PAY_W = ADDR_W + 8, REC_W = 2 + 6 + PAY_W;
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
  logic [MDI_W-1:0] mdi;
  logic msei_n;
  logic [MDO_W-1:0] mdo;
  logic mseo_n, evti, evto;

  fi_debugger dut (.*);

  ocd_model #(.ADDR_W(ADDR_W), .MDI_W(MDI_W), .MDO_W(MDO_W), .N(N)) target (
    .clk, .rst_n, .mdi, .msei_n, .mdo, .mseo_n, .evti, .evto);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_trig = 0, n_timeout = 0, n_halt = 0, n_dl = 0, n_wait_seen = 0;
  int n_bus_stall = 0, n_wait_clk = 0, n_dreset = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.cc_valid && !dut.u_core.cc_ready) n_bus_stall++;  // MDI busy
    if (dut.u_core.state == dut.u_core.EX_WAIT) n_wait_clk++;
    if (dut.u_core.flush) n_dreset++;
    if (trig) n_trig++;
    if (timeout) n_timeout++;
    if (evti) n_halt++;
    if (dl_out_valid) n_dl++;
  end

  // ------------------------------------------------------ campaign builder
  logic [7:0] prog [$];
  task automatic put(input logic [7:0] b); prog.push_back(b); endtask
  task automatic c0(input opcode_e op); put(8'(op)); endtask
  task automatic c_wreg(input logic [7:0] a, input logic [7:0] d);
    put(8'(OP_WRITEREG)); put(a); put(d);
  endtask
  task automatic c_rreg(input logic [7:0] a); put(8'(OP_READREG)); put(a); endtask
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
    int beats, k, n_msg, n_hit, n_tmo, mi, n_read, reads_ok;
    logic [REC_W-1:0] r;
    logic [OAW:0] oc_before;
    host_we = 0; host_waddr = '0; host_wdata = '0; start = 0; prog_len = '0;
    host_raddr = '0; dl_cmd_sel = 0; dl_cmd_valid = 0; dl_cmd_data = '0; dl_out_sel = 0;
    // ------------------------------------------------------ campaign 1
    for (int e = 0; e < E; e++) begin
      automatic int i = (e * 3) % N;
      automatic logic [15:0] wp = (e == E - 1) ? 16'h0FFF : 16'(16'h100 + 4 * i);
      exp_addr[e] = 16'(i);
      exp_val[e]  = 8'(3 * i + 1) ^ (8'd1 << (e % 8));
      c0(OP_RESET);
      c_wreg(8'd0, wp[7:0]);
      c_wreg(8'd1, wp[15:8]);
      c_wreg(8'd2, (e % 2 == 0) ? 8'h01 : 8'h02);
      c0(OP_RUN);
      if (e % 2 == 0) c_waitfor(8'h80, 16'd600);
      else            c_waitfor(8'h40 | 8'(TC_WATCHPOINT), 16'd600);
      c_wram(exp_addr[e], exp_val[e]);
      c_wait(16'd300);
      c_rram(16'(8'h80 + i));
      c_rreg(8'd3);
    end
    c0(OP_HALT);
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_and_start();
    k = 0;
    while (!done && k < 100000) begin @(negedge clk); k++; end
    check(done, "campaign 1 finished");
    repeat (40) @(negedge clk);   // last read response arrives
    // fault writes
    check(target.wr_addr.size() == E, $sformatf("%0d fault writes, expected %0d",
                                                target.wr_addr.size(), E));
    for (int e = 0; e < E && e < target.wr_addr.size(); e++)
      check(target.wr_addr[e] == exp_addr[e] && target.wr_data[e] == exp_val[e],
            $sformatf("fault write %0d: %0h<=%0h, expected %0h<=%0h", e,
                      target.wr_addr[e], target.wr_data[e], exp_addr[e], exp_val[e]));
    // trigger-to-write delay for the EVTO experiments
    beats = (6 + ADDR_W + 8 + MDI_W - 1) / MDI_W;
    mi = 0;
    for (int e = 0; e < E - 1; e += 2) begin
      if (mi < target.evto_time.size()) begin
        automatic longint d = target.wr_time[e] - (target.evto_time[mi] + 1);
        check(d == longint'(2 + beats),
              $sformatf("experiment %0d: trigger to fault %0d clocks, expected %0d", e, d, 2 + beats));
        if (e == 0) $display("fault injection delay: %0d clocks (MDI %0d bits)", d, MDI_W);
      end else check(0, "missing EVTO");
      mi++;
    end
    // output records against the messages the target sent
    n_msg = 0; n_hit = 0; n_tmo = 0; n_read = 0; reads_ok = 0;
    for (int a = 0; a < int'(out_count); a++) begin
      read_rec(a, r);
      case (rec_kind_e'(r[REC_W-1 -: 2]))
        REC_MSG: begin
          if (n_msg < target.sent.size()) begin
            automatic logic [29:0] b = target.sent[n_msg].bits;
            check(r[PAY_W +: 6] == b[5:0] && r[PAY_W-1:0] == PAY_W'(b >> 6),
                  $sformatf("record %0d: %0h, target sent %0h", a, r, b));
          end else check(0, "record without a message");
          if (r[PAY_W +: 6] == TC_READ_DATA) begin
            // even responses are C[i], read after WAIT let the application finish
            if (n_read % 2 == 0 && r[7:0] != 8'd0) n_wait_seen++;
            // odd responses: the target's error-detection counter; a fault
            // written 17 clocks after an EVTO trigger lands before the
            // duplicated operation re-reads A[i], so it must be detected
            if (n_read % 2 == 1 && (n_read / 2) % 2 == 0 && n_read / 2 < E - 1)
              check(r[7:0] == 8'd1, $sformatf("experiment %0d: fault not detected by the target", n_read / 2));
            n_read++;
          end
          n_msg++;
        end
        REC_HIT:     n_hit++;
        REC_TIMEOUT: n_tmo++;
        default:     check(0, "unknown record kind");
      endcase
    end
    check(n_msg == target.sent.size(), $sformatf("%0d message records, target sent %0d",
                                                 n_msg, target.sent.size()));
    check(n_hit == E - 1 && n_tmo == 1, $sformatf("%0d hit / %0d timeout records", n_hit, n_tmo));
    check(n_read == 2 * E, $sformatf("%0d read responses recorded", n_read));
    check(err_timeout, "timeout flagged");
    check(target.halts == 1, "HALT reached the target through EVTI");
    $display("target: %0d messages, %0d lost to OCD queue overflow, last detection count %0d",
             target.sent.size(), target.ovf_count, target.det_count);

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
    // stop it: an empty campaign
    prog.delete();
    load_and_start();
    repeat (3) @(negedge clk);
    check(done && !out_overflow, "new start clears the overflow state");

    // ------------------------------------------------------ DLINK
    repeat (400) @(negedge clk);  // let the target application finish
    oc_before = out_count;
    dl_cmd_sel = 1; dl_out_sel = 1;
    begin
      logic [7:0] bytes [3] = '{8'(OP_READRAM), 8'h80, 8'h00};
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
    check(out_count == oc_before, "DLINK output bypasses the output RAM");
    dl_cmd_sel = 0; dl_out_sel = 0;

    // mechanisms
    check(E / 2 > 0 && target.evto_time.size() > 0, "EVTO trigger happened");
    check(n_hit >= 2, "message trigger happened");
    check(n_timeout >= 1, "WAITFOR timeout happened");
    check(n_halt >= 1, "HALT happened");
    check(n_wait_seen == E, $sformatf("WAIT let the application finish in %0d experiments", n_wait_seen));
    check(n_dl >= 1, "DLINK used");
    check(n_bus_stall > 0, "a command waited for the MDI bus");
    check(n_wait_clk > 0, "WAIT state entered");
    check(n_dreset > 1, "DRESET restarted the campaign");
    $display("mechanisms: trig=%0d timeout=%0d halt=%0d evto=%0d dlink=%0d mdi-stall=%0d wait-clocks=%0d dreset=%0d",
             n_trig, n_timeout, n_halt, target.evto_time.size(), n_dl, n_bus_stall, n_wait_clk, n_dreset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
