// tb_output_ram: self-checking test of the trace-data memory.
// Writes random records through the core port, keeps a reference copy and
// checks the registered host read port (one clock latency).
module tb_output_ram;
  localparam int DEPTH = 256;
  localparam int DW    = 32;
  localparam int AW    = $clog2(DEPTH);
  logic clk = 0;
  logic we;
  logic [AW-1:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  output_ram #(.DEPTH(DEPTH), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = $urandom; ref_mem[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1) == 1;
      waddr = AW'($urandom); wdata = $urandom;
      raddr = AW'($urandom);
      if (we && waddr == raddr) we = 0;
      begin
        automatic logic [DW-1:0] exp = ref_mem[raddr];
        if (we) ref_mem[waddr] = wdata;
        @(negedge clk);
        we = 0;
        checks++;
        if (rdata !== exp) begin
          failures++;
          $display("read %0h: got %0h expected %0h", raddr, rdata, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
