// tb_ctec_workload: the evaluated configurations, run side by side.
// 5- and 10-stage pipelines of c6288 stages, 100 random vectors each, at two
// timing-violation rates chosen to give a throughput near 0.9 and near 0.7
// (the two throughput targets of the evaluation). Each run checks every
// result and that the cycle count is exactly vectors + stalls (one cycle per
// correction, however many errors a correction covered); this testbench
// also checks that each throughput lands in a band around its target and
// that, at the same rate, more errors are covered per stall than one. It
// prints the mean number of cycles a stage spends in error-free mode.
module tb_ctec_workload;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int RUNS = 4;
  logic done   [RUNS];
  int   chk    [RUNS], fail[RUNS], stl[RUNS], errs[RUNS], efc[RUNS];
  real  thr    [RUNS];

  ctec_workload_run #(.N_STAGES(5),  .VECTORS(100), .LATE_PCT(2))  r5_hi (
    .clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]), .stalls(stl[0]), .errors(errs[0]), .ef_cycles(efc[0]), .throughput(thr[0]));
  ctec_workload_run #(.N_STAGES(5),  .VECTORS(100), .LATE_PCT(16)) r5_lo (
    .clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]), .stalls(stl[1]), .errors(errs[1]), .ef_cycles(efc[1]), .throughput(thr[1]));
  ctec_workload_run #(.N_STAGES(10), .VECTORS(100), .LATE_PCT(1))  r10_hi (
    .clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]), .stalls(stl[2]), .errors(errs[2]), .ef_cycles(efc[2]), .throughput(thr[2]));
  ctec_workload_run #(.N_STAGES(10), .VECTORS(100), .LATE_PCT(9))  r10_lo (
    .clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fail[3]), .stalls(stl[3]), .errors(errs[3]), .ef_cycles(efc[3]), .throughput(thr[3]));

  int checks = 0, failures = 0;
  string names[RUNS] = '{"5 stages, ~0.9", "5 stages, ~0.7", "10 stages, ~0.9", "10 stages, ~0.7"};
  real   lo[RUNS]    = '{0.80, 0.55, 0.80, 0.55};
  real   hi[RUNS]    = '{0.98, 0.82, 0.98, 0.82};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int r = 0; r < RUNS; r++) begin
      $display("%s: throughput %0.3f, %0d timing errors corrected with %0d stall cycles, %0.1f error-free cycles per stage",
               names[r], thr[r], errs[r], stl[r], real'(efc[r]) / real'(r < 2 ? 5 : 10));
      checks   += chk[r] + 1;
      failures += fail[r];
      if (thr[r] < lo[r] || thr[r] > hi[r]) begin
        failures++;
        $display("FAIL %s: throughput outside %0.2f..%0.2f", names[r], lo[r], hi[r]);
      end
    end
    checks++;
    if (errs[1] + errs[3] <= stl[1] + stl[3]) begin
      failures++;
      $display("FAIL: no correction covered more than one error");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
