// tb_debugger_core: self-checking test of the debugger command processor.
// The testbench plays the input memory (synchronous read), the
// communication controller (cc_ready, with random stalls in part of the
// test) and the OCD (rx messages, EVTO). It checks:
//   * every message command reaches the controller in order with the right
//     operands, and HALT pulses EVTI;
//   * WAIT 20 delays the next command by at least 20 clocks;
//   * WAITFOR on EVTO releases the next command one clock after EVTO;
//   * WAITFOR on a message TCODE, WAITFOR with timeout (timeout pulse,
//     err_timeout, record with the clocks waited), DCONFIG record filtering;
//   * every output record, in order, and done at the end of the campaign;
//   * DRESET restarts fetching at address 0;
//   * DLINK command input and record output;
//   * output memory overflow (OMEM_DEPTH 16).
module tb_debugger_core;
  import fi_dbg_pkg::*;
  localparam int ADDR_W = 16, TIME_W = 16, IMEM_DEPTH = 256, OMEM_DEPTH = 16;
  localparam int IAW = $clog2(IMEM_DEPTH), OAW = $clog2(OMEM_DEPTH);
  localparam int PAY_W = ADDR_W + 8, REC_W = 2 + 6 + PAY_W;

  logic clk = 0, rst_n = 0;
  logic start;
  logic [IAW:0] prog_len;
  logic running, done;
  logic imem_re;
  logic [IAW-1:0] imem_raddr;
  logic [7:0] imem_rdata;
  logic omem_we;
  logic [OAW-1:0] omem_waddr;
  logic [REC_W-1:0] omem_wdata;
  logic [OAW:0] out_count;
  logic out_overflow;
  logic dl_cmd_sel, dl_cmd_valid, dl_cmd_ready, dl_out_sel, dl_out_valid;
  logic [7:0] dl_cmd_data;
  logic [REC_W-1:0] dl_out_data;
  logic cc_valid, cc_ready;
  opcode_e cc_op;
  logic [ADDR_W-1:0] cc_addr;
  logic [7:0] cc_data;
  logic rx_valid;
  logic [5:0] rx_tcode;
  logic [PAY_W-1:0] rx_payload;
  logic evti, evto, trig, timeout, err_timeout;

  debugger_core #(.ADDR_W(ADDR_W), .TIME_W(TIME_W), .IMEM_DEPTH(IMEM_DEPTH),
                  .OMEM_DEPTH(OMEM_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- input memory
  logic [7:0] imem [IMEM_DEPTH];
  int plen;
  always_ff @(posedge clk) if (imem_re) imem_rdata <= imem[imem_raddr];

  task automatic put(input logic [7:0] b); imem[plen] = b; plen++; endtask
  task automatic c0(input opcode_e op); put(8'(op)); endtask
  task automatic c_ram(input opcode_e op, input logic [15:0] a, input logic [7:0] d);
    put(8'(op)); put(a[7:0]); put(a[15:8]); if (op == OP_WRITERAM) put(d);
  endtask
  task automatic c_reg(input opcode_e op, input logic [7:0] a, input logic [7:0] d);
    put(8'(op)); put(a); if (op == OP_WRITEREG) put(d);
  endtask
  task automatic c_wait(input logic [15:0] t); put(8'(OP_WAIT)); put(t[7:0]); put(t[15:8]); endtask
  task automatic c_waitfor(input logic [7:0] e, input logic [15:0] t);
    put(8'(OP_WAITFOR)); put(e); put(t[7:0]); put(t[15:8]);
  endtask
  task automatic c_cfg(input logic [7:0] c); put(8'(OP_DCONFIG)); put(c); endtask

  // ------------------------------------------------- controller and monitors
  typedef struct packed { opcode_e op; logic [15:0] addr; logic [7:0] data; } cmd_t;
  cmd_t got_cmds[$];
  int   cmd_time[$];
  bit   stall_en = 0;
  function automatic int cyc(); return int'($time / 10); endfunction
  always @(negedge clk) cc_ready = stall_en ? ($urandom_range(0, 2) == 0) : 1'b1;
  always @(posedge clk) if (rst_n && cc_valid && cc_ready) begin
    got_cmds.push_back('{cc_op, cc_addr, cc_data});
    cmd_time.push_back(cyc());
  end
  int evti_n = 0, evti_cyc = 0, trig_n = 0, tmo_n = 0, tmo_cyc = 0;
  always @(posedge clk) if (rst_n) begin
    if (evti) begin evti_n++; evti_cyc = cyc(); end
    if (trig) trig_n++;
    if (timeout) begin tmo_n++; tmo_cyc = cyc(); end
  end
  logic [REC_W-1:0] recs[$];
  always @(posedge clk) if (rst_n && omem_we) begin
    check(omem_waddr == OAW'(recs.size()), "records written at consecutive OADDR");
    recs.push_back(omem_wdata);
  end
  logic [REC_W-1:0] dl_recs[$];
  always @(posedge clk) if (rst_n && dl_out_valid) dl_recs.push_back(dl_out_data);

  task automatic send_msg(input logic [5:0] tc, input logic [PAY_W-1:0] pay);
    @(negedge clk);
    rx_valid = 1; rx_tcode = tc; rx_payload = pay;
    @(negedge clk);
    rx_valid = 0; rx_tcode = '0; rx_payload = '0;
  endtask

  task automatic wait_cmds(input int n, input int limit);
    int k = 0;
    while (got_cmds.size() < n && k < limit) begin @(posedge clk); k++; end
    check(got_cmds.size() >= n, $sformatf("waiting for command %0d", n));
  endtask

  task automatic expect_cmd(input int i, input opcode_e op, input logic [15:0] a,
                            input logic [7:0] d);
    if (i >= got_cmds.size()) begin check(0, $sformatf("command %0d missing", i)); return; end
    check(got_cmds[i].op == op, $sformatf("cmd %0d op %s expected %s", i,
                                          got_cmds[i].op.name(), op.name()));
    if (op inside {OP_READRAM, OP_WRITERAM, OP_READREG, OP_WRITEREG})
      check(got_cmds[i].addr == a, $sformatf("cmd %0d addr %0h expected %0h", i, got_cmds[i].addr, a));
    if (op inside {OP_WRITERAM, OP_WRITEREG})
      check(got_cmds[i].data == d, $sformatf("cmd %0d data %0h expected %0h", i, got_cmds[i].data, d));
  endtask

  function automatic logic [REC_W-1:0] rec(input logic [1:0] k, input logic [5:0] tc,
                                           input logic [PAY_W-1:0] p);
    return {k, tc, p};
  endfunction

  task automatic do_start();
    @(negedge clk);
    prog_len = (IAW+1)'(plen);
    start = 1;
    recs.delete();
    @(negedge clk);
    start = 0;
  endtask

  initial begin
    int t_evto, t_halt;
    start = 0; prog_len = '0; dl_cmd_sel = 0; dl_cmd_valid = 0; dl_cmd_data = '0;
    dl_out_sel = 0; rx_valid = 0; rx_tcode = '0; rx_payload = '0; evto = 0;
    plen = 0;
    // ------------------------------------------------------ phase 1 program
    c_cfg(8'h07);                         // record everything
    c0(OP_RESET);                         // cmd 0
    c0(OP_RUN);                           // cmd 1
    c_reg(OP_WRITEREG, 8'h12, 8'h34);     // cmd 2
    c0(OP_HALT);
    c_wait(16'd20);
    c_ram(OP_READRAM, 16'hBEEF, 0);       // cmd 3
    c_waitfor(8'h80, 16'd0);              // wait for EVTO
    c_ram(OP_WRITERAM, 16'h0102, 8'hA5);  // cmd 4
    c_waitfor(8'h40 | 8'(TC_WATCHPOINT), 16'd0);
    c_reg(OP_READREG, 8'h07, 0);          // cmd 5
    c_waitfor(8'h80, 16'd30);             // times out
    put(8'hEE);                           // unknown opcode: skipped
    c_cfg(8'h01);                         // responses only
    c_waitfor(8'h40 | 8'(TC_ANY), 16'd0);
    c_waitfor(8'h40 | 8'(TC_READ_DATA), 16'd0);
    c0(OP_RUN);                           // cmd 6
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check(!running && !done, "idle after reset");
    stall_en = 1;
    do_start();
    wait_cmds(3, 400);
    stall_en = 0;
    wait_cmds(4, 100);
    expect_cmd(0, OP_RESET, 0, 0);
    expect_cmd(1, OP_RUN, 0, 0);
    expect_cmd(2, OP_WRITEREG, 16'h12, 8'h34);
    expect_cmd(3, OP_READRAM, 16'hBEEF, 0);
    check(evti_n == 1, "HALT pulses EVTI once");
    check(cmd_time[3] - evti_cyc >= 20 && cmd_time[3] - evti_cyc <= 26,
          $sformatf("WAIT 20: next command %0d clocks after HALT", cmd_time[3] - evti_cyc));
    // trigger on EVTO after a random delay
    repeat ($urandom_range(10, 40)) @(negedge clk);
    check(got_cmds.size() == 4, "WRITERAM held back until the trigger");
    evto = 1; t_evto = cyc();
    @(negedge clk) evto = 0;
    wait_cmds(5, 20);
    expect_cmd(4, OP_WRITERAM, 16'h0102, 8'hA5);
    check(cmd_time[4] - t_evto == 1,
          $sformatf("trigger to WRITERAM issue: %0d clocks, expected 1", cmd_time[4] - t_evto));
    // WAITFOR a watchpoint message; a different message first
    repeat (10) @(negedge clk);
    send_msg(TC_PROG_TRACE, 24'h00_1234);
    repeat (5) @(negedge clk);
    check(got_cmds.size() == 5, "WAITFOR ignores other TCODEs");
    send_msg(TC_WATCHPOINT, 24'h1);
    wait_cmds(6, 20);
    expect_cmd(5, OP_READREG, 16'h07, 0);
    // timeout of 30 clocks
    repeat (60) @(negedge clk);
    check(tmo_n == 1, "WAITFOR timed out once");
    check(err_timeout, "err_timeout set");
    // after DCONFIG 0x01: trace not stored, response stored
    send_msg(TC_DATA_WRITE, 24'h55_0102);
    repeat (5) @(negedge clk);
    send_msg(TC_READ_DATA, 24'h0000_5A);
    wait_cmds(7, 30);
    expect_cmd(6, OP_RUN, 0, 0);
    repeat (10) @(negedge clk);
    check(done && !running, "done at the end of the campaign");
    check(trig_n == 4, $sformatf("trig pulses %0d expected 4", trig_n));
    check(recs.size() == 6, $sformatf("%0d records, expected 6", recs.size()));
    if (recs.size() == 6) begin
      check(recs[0][REC_W-1 -: 8] == {REC_HIT, 6'd0}, "record 0: EVTO hit");
      check(recs[1] == rec(REC_MSG, TC_PROG_TRACE, 24'h1234), "record 1: trace message");
      check(recs[2] == rec(REC_MSG, TC_WATCHPOINT, 24'h1), "record 2: watchpoint message");
      check(recs[3][REC_W-1 -: 8] == {REC_HIT, 6'd0}, "record 3: message hit");
      check(recs[4] == rec(REC_TIMEOUT, 6'd0, 24'd30), $sformatf("record 4: timeout %0h", recs[4]));
      check(recs[5] == rec(REC_MSG, TC_READ_DATA, 24'h5A), "record 5: read data");
    end
    check(out_count == (OAW+1)'(6), "out_count");

    // ------------------------------------------------------ phase 2: DRESET
    plen = 0;
    c0(OP_RUN);
    c0(OP_DRESET);
    got_cmds.delete(); cmd_time.delete();
    do_start();
    repeat (60) @(negedge clk);
    check(got_cmds.size() >= 5, $sformatf("DRESET loops: %0d RUN commands", got_cmds.size()));
    check(running && !done, "DRESET keeps the campaign running");

    // ------------------------------------------------------ phase 3: DLINK
    plen = 0;
    do_start();          // empty campaign stops the loop
    repeat (5) @(negedge clk);
    check(done, "empty campaign done");
    got_cmds.delete(); cmd_time.delete();
    dl_cmd_sel = 1; dl_out_sel = 1;
    begin
      logic [7:0] bytes [5] = '{8'(OP_DCONFIG), 8'h07, 8'(OP_READRAM), 8'h34, 8'h12};
      for (int i = 0; i < 5; i++) begin
        dl_cmd_valid = 1; dl_cmd_data = bytes[i];
        @(posedge clk);
        while (!dl_cmd_ready) @(posedge clk);
        @(negedge clk);
      end
      dl_cmd_valid = 0;
    end
    wait_cmds(1, 20);
    expect_cmd(0, OP_READRAM, 16'h1234, 0);
    send_msg(TC_READ_DATA, 24'h77);
    @(negedge clk);
    check(dl_recs.size() == 1 && dl_recs[0] == rec(REC_MSG, TC_READ_DATA, 24'h77),
          "record on DLINK output");
    check(out_count == '0, "nothing written to the output memory in DLINK mode");
    dl_cmd_sel = 0; dl_out_sel = 0;

    // --------------------------------------------------- phase 4: overflow
    for (int i = 0; i < OMEM_DEPTH + 4; i++) send_msg(TC_PROG_TRACE, PAY_W'(i));
    check(out_count == (OAW+1)'(OMEM_DEPTH), "out_count stops at the depth");
    check(out_overflow, "overflow flagged");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
