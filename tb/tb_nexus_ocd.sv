// tb_nexus_ocd: self-checking test of the target-side on-chip debug unit.
// The testbench frames messages onto MDI itself (beats LSB first, MSEI low
// on every beat, one idle clock after) and reassembles every MDO message
// the same way, so neither direction relies on the design's serializers.
// The processor side is driven directly: fetch addresses, data writes and a
// memory that answers the real-time access port with a delayed grant.
// Checks: register write/read-back and status; processor register read
// and write through the register port; RESET pulses cpu_reset and
// holds the processor, RUN releases it, EVTI halts it; program-trace
// messages for the first fetch after RUN and for every non-sequential
// fetch only; a watchpoint hit raises EVTO exactly one clock after the
// fetch, sends a watchpoint message ahead of the trace message of the same
// fetch, and halts the processor when so configured; no hit while halted;
// a data write to the watchpoint address hits when enabled;
// data-write trace; memory write and read through the access port, the
// request held until granted; a burst of branches faster than MDO can
// carry overflows the message FIFO, loses trace messages and produces an
// error message, and status bit 1 reports the loss.
module tb_nexus_ocd;
  import fi_dbg_pkg::*;
  localparam int ADDR_W = 16, MDI_W = 2, MDO_W = 4, FIFO_DEPTH = 4;
  localparam int MSG_MAX = 6 + ADDR_W + 8;
  typedef logic [MSG_MAX-7:0] pay_t;

  logic clk = 0, rst_n = 0;
  logic [MDI_W-1:0] mdi = '0;
  logic msei_n = 1;
  logic [MDO_W-1:0] mdo;
  logic mseo_n, evti = 0, evto;
  logic cpu_halt, cpu_reset;
  logic cpu_fetch = 0, cpu_wr = 0;
  logic [ADDR_W-1:0] cpu_pc = '0, cpu_waddr = '0;
  logic [7:0] cpu_wdata = '0;
  logic cpu_reg_we;
  logic [6:0] cpu_reg_addr;
  logic [7:0] cpu_reg_wdata, cpu_reg_rdata;
  logic mem_req, mem_we, mem_gnt;
  logic [ADDR_W-1:0] mem_addr;
  logic [7:0] mem_wdata, mem_rdata;

  nexus_ocd #(.ADDR_W(ADDR_W), .MDI_W(MDI_W), .MDO_W(MDO_W), .FIFO_DEPTH(FIFO_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clock counter and event logs
  longint cyc = 0;
  always @(posedge clk) cyc++;
  longint evto_at[$];
  int     n_reset = 0;
  always @(posedge clk) if (rst_n) begin
    if (evto) evto_at.push_back(cyc);
    if (cpu_reset) n_reset++;
  end

  // MDO receiver
  logic [63:0] acc;
  int          nb;
  logic [MSG_MAX-1:0] got[$];
  always @(posedge clk) begin
    if (!rst_n) begin acc = '0; nb = 0; end
    else if (!mseo_n) begin
      acc |= 64'(mdo) << nb;
      nb += MDO_W;
    end else if (nb != 0) begin
      got.push_back(MSG_MAX'(acc));
      acc = '0; nb = 0;
    end
  end

  // processor registers: reads return 3 * number + 1, writes are logged
  assign cpu_reg_rdata = 8'(3 * cpu_reg_addr + 1);
  int n_regw = 0;
  logic [6:0] regw_addr;
  logic [7:0] regw_data;
  always @(posedge clk) if (rst_n && cpu_reg_we) begin
    n_regw++; regw_addr = cpu_reg_addr; regw_data = cpu_reg_wdata;
  end

  // target memory on the access port: grant after GNT_DLY clocks of request
  logic [7:0] tmem [256];
  int GNT_DLY = 3, req_clk = 0, n_acc = 0;
  logic force_gnt = 0;
  assign mem_gnt = mem_req && (req_clk >= GNT_DLY || force_gnt);
  always @(posedge clk) begin
    if (mem_req && !mem_gnt) req_clk++;
    if (mem_gnt) begin
      req_clk = 0; n_acc++;
      if (mem_we) tmem[mem_addr[7:0]] = mem_wdata;
      else mem_rdata <= tmem[mem_addr[7:0]];
    end
  end

  task automatic send(input logic [5:0] tc, input logic [MSG_MAX-7:0] pay, input int plen);
    logic [MSG_MAX-1:0] b = {pay, tc};
    int beats = (6 + plen + MDI_W - 1) / MDI_W;
    for (int k = 0; k < beats; k++) begin
      @(negedge clk);
      msei_n = 0; mdi = b[k*MDI_W +: MDI_W];
    end
    @(negedge clk);
    msei_n = 1; mdi = '0;
  endtask
  task automatic wreg(input logic [7:0] r, input logic [7:0] d);
    send(TC_REG_WRITE, pay_t'({d, r}), 16);
  endtask
  task automatic idle(input int n); repeat (n) @(negedge clk); endtask
  // wait for the next MDO message and check it
  task automatic expect_msg(input logic [5:0] tc, input logic [MSG_MAX-7:0] pay, input string what);
    int k = 0;
    while (got.size() == 0 && k < 200) begin @(negedge clk); k++; end
    if (got.size() == 0) check(0, {what, ": no message"});
    else begin
      logic [MSG_MAX-1:0] m;
      m = got.pop_front();
      check(m[5:0] == tc && m[MSG_MAX-1:6] == pay,
            $sformatf("%s: got tcode %0d payload %0h, expected %0d %0h", what, m[5:0], m[MSG_MAX-1:6], tc, pay));
    end
  endtask
  task automatic rreg(input logic [7:0] r, input logic [7:0] exp, input string what);
    send(TC_REG_READ, pay_t'(r), 8);
    expect_msg(TC_READ_DATA, pay_t'(exp), what);
  endtask
  task automatic fetch(input logic [ADDR_W-1:0] pc);
    @(negedge clk); cpu_fetch = 1; cpu_pc = pc;
    @(negedge clk); cpu_fetch = 0;
  endtask

  initial begin
    automatic logic [ADDR_W-1:0] pcs [6] = '{16'h1000, 16'h1001, 16'h1002, 16'h2000, 16'h2001, 16'h1234};
    longint t_hit;
    int n_pt, n_err, n_rd;
    for (int k = 0; k < 256; k++) tmem[k] = 8'(k * 7);
    mem_rdata = '0;
    idle(3); rst_n = 1; idle(2);

    // registers and status after reset
    check(cpu_halt, "processor held after reset");
    rreg(8'd10, 8'h01, "status after reset");
    rreg(8'd9, 8'h01, "program trace on after reset");
    wreg(8'd0, 8'h34); wreg(8'd1, 8'h12); wreg(8'd8, 8'h03);
    rreg(8'd0, 8'h34, "watchpoint address low");
    rreg(8'd1, 8'h12, "watchpoint address high");
    rreg(8'd8, 8'h03, "watchpoint control");
    rreg(8'h85, 8'd16, "processor register 5");
    wreg(8'h92, 8'hC3);
    idle(1);
    check(n_regw == 1 && regw_addr == 7'h12 && regw_data == 8'hC3, "processor register write");
    wreg(8'd9, 8'h01);
    check(n_regw == 1, "debug-unit register write does not reach the processor");

    // run control
    send(TC_RUN_CTRL, pay_t'(RC_RESET), 2);
    idle(2);
    check(n_reset == 1 && cpu_halt, "RESET pulses cpu_reset and holds the processor");
    send(TC_RUN_CTRL, pay_t'(RC_RUN), 2);
    idle(1);
    check(!cpu_halt, "RUN releases the processor");
    rreg(8'd10, 8'h00, "status while running");

    // program trace and watchpoint
    for (int k = 0; k < 6; k++) begin
      fetch(pcs[k]);
      if (k == 5) t_hit = cyc;
      idle(20);
    end
    expect_msg(TC_PROG_TRACE, pay_t'(16'h1000), "trace of the first fetch after RUN");
    expect_msg(TC_PROG_TRACE, pay_t'(16'h2000), "trace of a branch");
    expect_msg(TC_WATCHPOINT, pay_t'(1), "watchpoint message");
    expect_msg(TC_PROG_TRACE, pay_t'(16'h1234), "trace of the watchpoint fetch");
    check(got.size() == 0, "no trace for sequential fetches");
    check(evto_at.size() == 1, $sformatf("%0d EVTO pulses, expected 1", evto_at.size()));
    if (evto_at.size() > 0)
      check(evto_at[0] == t_hit + 1, $sformatf("EVTO %0d clocks after the fetch, expected 1", evto_at[0] - t_hit));
    check(!cpu_halt, "watchpoint without halt leaves the processor running");

    // data-write trace
    wreg(8'd9, 8'h02);
    @(negedge clk); cpu_wr = 1; cpu_waddr = 16'h0080; cpu_wdata = 8'h5A;
    @(negedge clk); cpu_wr = 0;
    expect_msg(TC_DATA_WRITE, pay_t'({8'h5A, 16'h0080}), "data-write trace");
    fetch(16'h3000);
    idle(20);
    check(got.size() == 0, "program trace off");

    // real-time memory access
    send(TC_MEM_WRITE, pay_t'({8'hA5, 16'h0042}), ADDR_W + 8);
    idle(10);
    check(n_acc == 1 && tmem[8'h42] == 8'hA5, "memory write through the access port");
    send(TC_MEM_READ, pay_t'(16'h0042), ADDR_W);
    expect_msg(TC_READ_DATA, pay_t'(8'hA5), "memory read through the access port");
    send(TC_MEM_READ, pay_t'(16'h0011), ADDR_W);
    expect_msg(TC_READ_DATA, pay_t'(8'(8'h11 * 7)), "memory read of preset data");
    check(n_acc == 3 && !cpu_halt, "accesses done while the processor runs");
    // memory data and a register read answered in the same clock
    GNT_DLY = 100000;
    send(TC_MEM_READ, pay_t'(16'h0042), ADDR_W);
    begin
      automatic logic [MSG_MAX-1:0] b = {pay_t'(8'd8), TC_REG_READ};
      for (int k = 0; k < (14 + MDI_W - 1) / MDI_W; k++) begin
        @(negedge clk);
        msei_n = 0; mdi = b[k*MDI_W +: MDI_W];
        force_gnt = (k == (14 + MDI_W - 1) / MDI_W - 1);
      end
      @(negedge clk);
      msei_n = 1; mdi = '0; force_gnt = 0;
      #1;
      check(dut.acc_rd_wait && dut.rx_valid, "memory data and register read coincide");
    end
    GNT_DLY = 3;
    expect_msg(TC_READ_DATA, pay_t'(8'h03), "register read answered first");
    expect_msg(TC_READ_DATA, pay_t'(8'hA5), "memory read data not lost");

    // watchpoint halt, no hit while halted, EVTI
    wreg(8'd8, 8'h05);
    fetch(16'h1234);
    idle(1);
    check(cpu_halt, "watchpoint with halt stops the processor");
    fetch(16'h1234);
    idle(3);
    check(evto_at.size() == 2, "one more EVTO, none while halted");
    send(TC_RUN_CTRL, pay_t'(RC_RUN), 2);
    idle(1);
    check(!cpu_halt, "RUN after a breakpoint");
    @(negedge clk) evti = 1;
    @(negedge clk) evti = 0;
    check(cpu_halt, "EVTI halts the processor");
    send(TC_RUN_CTRL, pay_t'(RC_RUN), 2);
    // data-access watchpoint: a write to the address hits only with bit 3
    wreg(8'd9, 8'h00);
    wreg(8'd0, 8'h80); wreg(8'd1, 8'h00); wreg(8'd8, 8'h01);
    @(negedge clk); cpu_wr = 1; cpu_waddr = 16'h0080;
    @(negedge clk); cpu_wr = 0;
    idle(2);
    check(evto_at.size() == 2, "no data watchpoint without bit 3");
    wreg(8'd8, 8'h09);
    @(negedge clk); cpu_wr = 1; cpu_waddr = 16'h0081;
    @(negedge clk); cpu_wr = 1; cpu_waddr = 16'h0080;
    @(negedge clk); cpu_wr = 0; t_hit = cyc;
    idle(2);
    check(evto_at.size() == 3 && evto_at[$] == t_hit + 1, "data-write watchpoint raises EVTO one clock later");
    wreg(8'd8, 8'h00);

    // trace overflow: a branch every clock for 40 clocks
    wreg(8'd9, 8'h01);
    idle(30);
    got.delete();
    for (int k = 0; k < 40; k++) begin
      @(negedge clk); cpu_fetch = 1; cpu_pc = 16'(16'h4000 + 2 * k);
    end
    @(negedge clk); cpu_fetch = 0;
    idle(5);
    send(TC_REG_READ, pay_t'(8'd10), 8);  // answered behind the queued trace
    idle(400);
    n_pt = 0; n_err = 0; n_rd = 0;
    foreach (got[k]) begin
      if (got[k][5:0] == TC_PROG_TRACE) n_pt++;
      if (got[k][5:0] == TC_ERROR) n_err++;
      if (got[k][5:0] == TC_READ_DATA) n_rd++;
    end
    check(n_rd == 1, "register read answered during the overflow");
    check(n_pt > 0 && n_pt < 40, $sformatf("%0d of 40 trace messages sent", n_pt));
    check(n_err >= 1, "overflow error message sent");
    $display("overflow: %0d trace messages of 40, %0d error messages", n_pt, n_err);
    // status read during the burst is answered; after it the loss flag is clear again
    got.delete();
    rreg(8'd10, 8'h00, "status after the error was reported");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
