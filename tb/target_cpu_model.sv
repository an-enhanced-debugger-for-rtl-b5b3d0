// target_cpu_model: behavioural model of the target processor and its data
// RAM, for the testbenches of the on-chip debug unit and the whole set-up.
// Not design content: it stands in for the processor core and memories of
// the target system, which are outside this design.
//
// Program: a fault-tolerant matrix add over N elements. Iteration i
// occupies instruction addresses 0x100+8i .. 0x103+8i and executes, one
// instruction every CPU_DIV clocks: r1 = A[i]; r2 = B[i]; s2 = A[i] + B[i]
// (the duplicated operation, re-reading memory); C[i] = r1 + r2 with a
// branch to the next iteration, and a mismatch s2 != r1 + r2 increments
// the error-detection counter, kept in RAM at 0xC0 (and in det_count).
// A at 0x00, B at 0x40, C at 0x80. The clocks per instruction start at
// CPU_DIV and can be changed through cpu_div between runs.
// cpu_reset reloads A[i] = 3i+1, B[i] = 5i+2, clears C and restarts at
// 0x100; cpu_halt stops instruction execution. The processor fetches on
// the clock an instruction executes (cpu_fetch, cpu_pc) and reports its
// data write (cpu_wr) in the same clock.
// Memory access port of the debug unit: granted on clocks the processor
// does not use the data RAM (or always, if STEAL is 0); read data is
// returned the clock after the grant. Register port of the debug unit:
// register 0 is r1, register 1 is r2 (others read as 0); reads follow
// cpu_reg_addr combinationally, writes take effect at the clock edge.
module target_cpu_model #(
  parameter int ADDR_W  = 16,
  parameter int N       = 8,
  parameter int CPU_DIV = 8,
  parameter bit STEAL   = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cpu_halt,
  input  logic              cpu_reset,
  output logic              cpu_fetch,
  output logic [ADDR_W-1:0] cpu_pc,
  output logic              cpu_wr,
  output logic [ADDR_W-1:0] cpu_waddr,
  output logic [7:0]        cpu_wdata,
  input  logic              cpu_reg_we,
  input  logic [6:0]        cpu_reg_addr,
  input  logic [7:0]        cpu_reg_wdata,
  output logic [7:0]        cpu_reg_rdata,
  input  logic              mem_req,
  input  logic              mem_we,
  input  logic [ADDR_W-1:0] mem_addr,
  input  logic [7:0]        mem_wdata,
  output logic              mem_gnt,
  output logic [7:0]        mem_rdata
);
  // observable state for testbenches
  logic [7:0]  ram [256];
  logic        cpu_fin;
  int          det_count;
  logic [ADDR_W-1:0] wr_addr[$];  // every debug-port memory write, in order
  logic [7:0]  wr_data[$];
  longint      wr_time[$];        // clock edge count at which it took effect
  longint      fetch_time[$];     // edge count of each fetch
  logic [ADDR_W-1:0] fetch_pc[$];
  longint      edges;
  int          gnt_wait;          // clocks a request waited for the grant
  int          cpu_div;           // clocks per instruction

  int          i_el, step, div;
  logic [7:0]  r1, r2;
  logic        uses_ram;

  task automatic reload();
    for (int k = 0; k < 256; k++) ram[k] = 8'h00;
    for (int k = 0; k < N; k++) begin
      ram[k]         = 8'(3 * k + 1);
      ram['h40 + k] = 8'(5 * k + 2);
    end
    i_el = 0; step = 0; div = 0;
    cpu_fin = 0; det_count = 0;
  endtask

  // the processor executes an instruction this clock
  assign cpu_fetch = rst_n && !cpu_halt && !cpu_fin && div >= cpu_div - 1;
  assign cpu_pc    = ADDR_W'('h100 + 8 * i_el + step);
  assign uses_ram  = cpu_fetch && step != 2;
  assign cpu_wr    = cpu_fetch && step == 3;
  assign cpu_waddr = ADDR_W'('h80 + i_el);
  assign cpu_wdata = r1 + r2;
  assign mem_gnt   = mem_req && !(STEAL && uses_ram);
  assign cpu_reg_rdata = (cpu_reg_addr == 7'd0) ? r1 : (cpu_reg_addr == 7'd1) ? r2 : 8'd0;
  int          reg_writes;        // debug-port register writes

  initial begin
    edges = 0; gnt_wait = 0; reg_writes = 0; cpu_div = CPU_DIV; mem_rdata = '0; r1 = 0; r2 = 0;
    reload();
  end

  always @(posedge clk) begin
    edges++;
    if (rst_n) begin
      if (mem_req && !mem_gnt) gnt_wait++;
      if (mem_gnt) begin
        if (mem_we) begin
          ram[mem_addr[7:0]] = mem_wdata;
          wr_addr.push_back(mem_addr); wr_data.push_back(mem_wdata); wr_time.push_back(edges);
        end else begin
          mem_rdata <= ram[mem_addr[7:0]];
        end
      end
      if (cpu_reg_we) begin
        reg_writes++;
        if (cpu_reg_addr == 7'd0) r1 = cpu_reg_wdata;
        if (cpu_reg_addr == 7'd1) r2 = cpu_reg_wdata;
      end
      if (cpu_reset) reload();
      else if (cpu_fetch) begin
        fetch_time.push_back(edges); fetch_pc.push_back(cpu_pc);
        case (step)
          0: r1 = ram[i_el];
          1: r2 = ram['h40 + i_el];
          2: ;
          default: begin
            automatic logic [7:0] s1 = r1 + r2;
            automatic logic [7:0] s2 = ram[i_el] + ram['h40 + i_el];
            ram['h80 + i_el] = s1;
            if (s1 != s2) begin
              det_count++;
              ram[8'hC0] = 8'(det_count);
            end
          end
        endcase
        div = 0;
        if (step == 3) begin
          step = 0;
          i_el++;
          if (i_el == N) cpu_fin = 1;
        end else begin
          step++;
        end
      end else if (!cpu_halt && !cpu_fin) begin
        div++;
      end
    end
  end
endmodule
