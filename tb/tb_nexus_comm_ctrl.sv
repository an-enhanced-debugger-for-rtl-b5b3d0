// tb_nexus_comm_ctrl: self-checking test of the communication controller.
// Transmit: random commands are handed over; the MDI beats are collected,
// reassembled (LSB first) and compared with the message expected for the
// command (transfer code and fields as in fi_dbg_pkg); the number of beats
// must be ceil(bits/MDI_W) and the first beat must follow acceptance by one
// clock. Receive: random messages are serialized onto MDO by the testbench
// and the controller's rx outputs are compared with them.
module tb_nexus_comm_ctrl;
  import fi_dbg_pkg::*;
  localparam int ADDR_W = 16;
  localparam int MDI_W  = 2;
  localparam int MDO_W  = 4;
  localparam int PAY_W  = ADDR_W + 8;

  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready;
  opcode_e cmd_op;
  logic [ADDR_W-1:0] cmd_addr;
  logic [7:0] cmd_data;
  logic rx_valid;
  logic [5:0] rx_tcode;
  logic [PAY_W-1:0] rx_payload;
  logic [MDI_W-1:0] mdi;
  logic msei_n;
  logic [MDO_W-1:0] mdo;
  logic mseo_n;
  int checks = 0, failures = 0;

  nexus_comm_ctrl #(.ADDR_W(ADDR_W), .MDI_W(MDI_W), .MDO_W(MDO_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receive-side monitor
  logic [5:0]       exp_tc;
  logic [PAY_W-1:0] exp_pay;
  int               rx_seen = 0;
  always @(posedge clk) if (rst_n && rx_valid) begin
    rx_seen++;
    check(rx_tcode == exp_tc && rx_payload == exp_pay,
          $sformatf("rx tcode %0d/%0d payload %0h/%0h", rx_tcode, exp_tc,
                    rx_payload, exp_pay));
  end

  initial begin
    opcode_e ops [6] = '{OP_RUN, OP_RESET, OP_READRAM, OP_WRITERAM,
                         OP_READREG, OP_WRITEREG};
    cmd_valid = 0; cmd_op = OP_RUN; cmd_addr = '0; cmd_data = '0;
    mdo = '0; mseo_n = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---------------- transmit
    for (int n = 0; n < 300; n++) begin
      logic [63:0] exp_bits, got;
      int len, beats, lat;
      cmd_op   = ops[$urandom_range(0, 5)];
      cmd_addr = ADDR_W'($urandom);
      cmd_data = 8'($urandom);
      case (cmd_op)
        OP_RUN:      begin exp_bits = 64'(TC_RUN_CTRL) | (64'(RC_RUN) << 6); len = 8; end
        OP_RESET:    begin exp_bits = 64'(TC_RUN_CTRL) | (64'(RC_RESET) << 6); len = 8; end
        OP_READRAM:  begin exp_bits = 64'(TC_MEM_READ) | (64'(cmd_addr) << 6); len = 6 + ADDR_W; end
        OP_WRITERAM: begin exp_bits = 64'(TC_MEM_WRITE) | (64'(cmd_addr) << 6) |
                                      (64'(cmd_data) << (6 + ADDR_W)); len = 14 + ADDR_W; end
        OP_READREG:  begin exp_bits = 64'(TC_REG_READ) | (64'(cmd_addr[7:0]) << 6); len = 14; end
        default:     begin exp_bits = 64'(TC_REG_WRITE) | (64'(cmd_addr[7:0]) << 6) |
                                      (64'(cmd_data) << 14); len = 22; end
      endcase
      cmd_valid = 1;
      @(posedge clk);
      while (!cmd_ready) @(posedge clk);
      @(negedge clk);
      cmd_valid = 0;
      cmd_addr = ADDR_W'($urandom);   // must not matter once taken
      got = '0; beats = 0; lat = 0;
      while (msei_n && lat < 5) begin lat++; @(negedge clk); end
      check(lat == 0, $sformatf("first beat %0d clocks late", lat));
      while (!msei_n) begin
        got = got | (64'(mdi) << (beats * MDI_W));
        beats++;
        @(negedge clk);
      end
      check(beats == (len + MDI_W - 1) / MDI_W,
            $sformatf("op %s: %0d beats, expected %0d", cmd_op.name(), beats,
                      (len + MDI_W - 1) / MDI_W));
      check(got == exp_bits, $sformatf("op %s: message %0h expected %0h",
                                       cmd_op.name(), got, exp_bits));
      if ($urandom_range(0, 1) == 1) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    // ---------------- receive
    for (int n = 0; n < 300; n++) begin
      logic [63:0] msg;
      int nbits, beats, n_before;
      exp_tc  = 6'($urandom);
      nbits   = 6 + 4 * $urandom_range(0, PAY_W / 4);
      exp_pay = PAY_W'($urandom) & PAY_W'((64'(1) << (nbits - 6)) - 1);
      msg     = 64'(exp_tc) | (64'(exp_pay) << 6);
      beats   = (nbits + MDO_W - 1) / MDO_W;
      n_before  = rx_seen;
      for (int b = 0; b < beats; b++) begin
        mseo_n = 0; mdo = MDO_W'(msg >> (b * MDO_W));
        @(negedge clk);
      end
      mseo_n = 1; mdo = MDO_W'($urandom);
      @(negedge clk);
      check(rx_seen == n_before + 1, "rx message not delivered exactly once");
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
