// tb_fi_workloads: the four target configurations of the evaluation
// (8-bit minimal and recommended, 32-bit equivalent and improved), each as
// a fi_system with that configuration's MDI/MDO widths, running a fault
// campaign over every trigger instruction and every used RAM cell of the
// test program (fi_workload_run).
// Checks per configuration: every fault write arrives with the right
// address and value; every EVTO-to-write delay is 4 + ceil((6 + ADDR_W +
// 8) / MDI_W) clocks, or one more when the processor holds the RAM (up to
// four more when the trigger is the first instruction); the
// number of inconclusive experiments (the processor overwrote the target
// cell between trigger and fault) equals the number predicted from that
// delay; only the minimal configuration, with a 1-bit MDO, loses trace
// messages. It prints delay and inconclusive rate next to the published
// figures.
module tb_fi_workloads;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NCFG = 4;
  localparam int AW [NCFG]  = '{16, 16, 32, 32};
  localparam int MI [NCFG]  = '{1, 2, 2, 4};
  localparam int MO [NCFG]  = '{1, 4, 8, 8};
  localparam int PUB [NCFG] = '{25, 14, 24, 21};
  localparam int PUBI [NCFG] = '{0, 2, 4, 3};
  localparam int PUBE [NCFG] = '{88, 0, 0, 0};
  localparam string NAME [NCFG] = '{"CPU8a", "CPU8b", "CPU32a", "CPU32b"};

  logic fin [NCFG];
  int nexp [NCFG], delay [NCFG], dok [NCFG], wok [NCFG], lost [NCFG], lexp [NCFG], inc [NCFG], incp [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : cfg
    fi_workload_run #(.ADDR_W(AW[g]), .MDI_W(MI[g]), .MDO_W(MO[g])) run (
      .clk, .rst_n, .fin(fin[g]), .nexp(nexp[g]), .delay(delay[g]), .delay_ok(dok[g]),
      .writes_ok(wok[g]), .lost(lost[g]), .lost_exp(lexp[g]), .inconcl(inc[g]), .inconcl_pred(incp[g]));
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < NCFG; g++) while (!fin[g]) @(negedge clk);
    for (int g = 0; g < NCFG; g++) begin
      check(wok[g] == nexp[g], $sformatf("%s: %0d of %0d fault writes right", NAME[g], wok[g], nexp[g]));
      check(dok[g] == nexp[g], $sformatf("%s: %0d of %0d delays as expected", NAME[g], dok[g], nexp[g]));
      check(inc[g] == incp[g], $sformatf("%s: %0d inconclusive, %0d predicted", NAME[g], inc[g], incp[g]));
      check((lost[g] > 0) == (g == 0), $sformatf("%s: %0d trace messages lost", NAME[g], lost[g]));
      $display("%-7s MDI %0d MDO %0d: trigger-to-fault %0d clocks (published %0d); %0d experiments, %0d inconclusive = %0d.%0d%% (published %0d%%); %0d trace messages lost, in %0d experiments = %0d%% (published OCD errors %0d%%)",
               NAME[g], MI[g], MO[g], delay[g], PUB[g], nexp[g], inc[g],
               inc[g] * 100 / nexp[g], (inc[g] * 1000 / nexp[g]) % 10, PUBI[g], lost[g],
               lexp[g], lexp[g] * 100 / nexp[g], PUBE[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
