// tb_input_ram: self-checking test of the campaign-data memory.
// Writes random bytes to random addresses through the host port, keeps a
// reference copy, and checks synchronous reads (one clock latency, data
// held while re is low) against it.
module tb_input_ram;
  localparam int DEPTH = 256;
  localparam int AW    = $clog2(DEPTH);
  logic clk = 0;
  logic we, re;
  logic [AW-1:0] waddr, raddr;
  logic [7:0] wdata, rdata, held;
  logic [7:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  input_ram #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    // fill every location
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = 8'($urandom); ref_mem[i] = wdata;
    end
    @(negedge clk) we = 0;
    // random reads and writes
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = ($urandom % 3) == 0;
      waddr = AW'($urandom); wdata = 8'($urandom);
      re = 1; raddr = AW'($urandom);
      if (we && waddr == raddr) we = 0;   // no same-address collision
      begin
        automatic logic [7:0] exp = ref_mem[raddr];
        if (we) ref_mem[waddr] = wdata;
        @(negedge clk);
        we = 0; re = 0;
        checks++;
        if (rdata !== exp) begin
          failures++;
          $display("read %0h: got %0h expected %0h", raddr, rdata, exp);
        end
        held = rdata;
        raddr = AW'($urandom);
        @(negedge clk);
        checks++;
        if (rdata !== held) begin
          failures++;
          $display("rdata changed while re low");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
