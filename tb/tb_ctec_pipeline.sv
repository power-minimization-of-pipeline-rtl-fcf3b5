// tb_ctec_pipeline: end-to-end test of the 1-cycle error-correcting pipeline
// at its default size.
//
// A scoreboard computes the expected result of every accepted valid word
// independently (N_STAGES chained 16 x 16 products, done with 64-bit
// arithmetic) and compares it, in order, with every valid output word.
// Directed streams of M back-to-back words with injected timing violations
// check the cycle cost of a correction: the last result must appear
// M - 1 + N_STAGES cycles after the first word was accepted, plus exactly
// one cycle per correction:
//   no violation                                        -> 0 extra cycles
//   one error                                           -> 1
//   a second violation at the same stage while it is
//   still in error-free mode                            -> 1 (1 error only)
//   errors at two stages in the same cycle              -> 1
//   errors at the last stage                            -> 1
//   two errors far apart in time                        -> 2
// Throughout, a stall must follow every output bubble by exactly one cycle.
// A random phase then injects violations at all stages with random input
// gaps. The monitor counts each mechanism (timing error, CG propagation by a
// gated stage, error-free cycles, violations ignored in error-free mode, CG
// waves stopping at a stage, stalls) and fails if one never happened.
module tb_ctec_pipeline;
  import ctec_pkg::*;

  localparam int N    = 5;    // default N_STAGES of ctec_pipeline
  localparam int HALF = 16;
  localparam int W    = 2 * HALF;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         in_valid = 1'b0;
  logic [W-1:0] in_data = '0;
  logic         in_ready;
  logic [N-1:0] late = '0;
  logic         out_valid;
  logic [W-1:0] out_data;
  logic [N-1:0] err, cg, ef, gated, absorb;
  logic         stall;

  ctec_pipeline dut (
    .clk, .rst_n, .in_valid, .in_data, .in_ready, .late,
    .out_valid, .out_data, .err, .cg, .ef, .gated, .absorb, .stall
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  // ---------------- reference model ----------------
  function automatic logic [W-1:0] f1(input logic [W-1:0] x);
    logic [63:0] p;
    p = 64'(x[W-1:HALF]) * 64'(x[HALF-1:0]);
    return p[W-1:0];
  endfunction

  function automatic logic [W-1:0] fn(input logic [W-1:0] x);
    logic [W-1:0] v = x;
    for (int i = 0; i < N; i++) v = f1(v);
    return v;
  endfunction

  logic [W-1:0] expq[$];
  int first_acc, last_out;
  logic prev_last_cg = 1'b0;

  // mechanism counters
  int n_err = 0, n_gated = 0, n_ef = 0, n_absorb = 0, n_stall = 0;
  int n_ignored = 0, n_bubble = 0;

  // sampled mid-cycle: stimulus changes just after each rising edge
  always @(negedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        expq.push_back(fn(in_data));
        if (first_acc < 0) first_acc = cycle;
      end
      if (out_valid) begin
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL cycle %0d: output %h with nothing expected", cycle, out_data);
        end else begin
          logic [W-1:0] e;
          e = expq.pop_front();
          if (out_data !== e) begin
            failures++;
            $display("FAIL cycle %0d: output %h expected %h", cycle, out_data, e);
          end
        end
        last_out = cycle;
      end
      // a stall follows every output bubble by one cycle, and only then
      if (prev_last_cg || stall) begin
        checks++;
        if (prev_last_cg != stall) begin
          failures++;
          $display("FAIL cycle %0d: stall=%0b after last-stage CG=%0b", cycle, stall, prev_last_cg);
        end
      end
      prev_last_cg = cg[N-1];
      n_err     += $countones(err);
      n_gated   += $countones(gated);
      n_ef      += $countones(ef);
      n_absorb  += $countones(absorb);
      n_ignored += $countones(late & ef);
      n_stall   += int'(stall);
      n_bubble  += int'(cg[N-1]);
    end
  end

  // ---------------- stimulus ----------------
  task automatic idle_until_empty();
    int guard = 0;
    @(posedge clk); #1;
    in_valid = 1'b0;
    late     = '0;
    do begin
      @(negedge clk);
      guard++;
    end while ((expq.size() != 0 || ef != '0 || stall || cg != '0) && guard < 1000);
    repeat (N + 2) @(negedge clk);
    checks++;
    if (expq.size() != 0 || ef != '0) begin
      failures++;
      $display("FAIL: pipeline did not drain (%0d pending, ef=%b)", expq.size(), ef);
    end
  endtask

  // Stream m back-to-back valid words; inject a violation at stage s0 on
  // stream cycle c0 and at s1 on c1 (stage -1: none). Returns the extra
  // cycles compared with an error-free run and the number of real errors.
  task automatic run_stream(input int m, input int s0, input int c0,
                            input int s1, input int c1,
                            output int penalty, output int errs);
    int sent = 0, k = 0, err0;
    err0      = n_err;
    first_acc = -1;
    last_out  = -1;
    while (sent < m) begin
      @(posedge clk); #1;
      in_valid = 1'b1;
      in_data  = $urandom();
      late     = '0;
      if (s0 >= 0 && k == c0) late[s0] = 1'b1;
      if (s1 >= 0 && k == c1) late[s1] = 1'b1;
      if (in_ready) sent++;
      k++;
    end
    idle_until_empty();
    penalty = last_out - first_acc - (m - 1 + N);
    errs    = n_err - err0;
  endtask

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end else begin
      $display("ok   %s = %0d", what, got);
    end
  endtask

  int pen, errs;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    run_stream(40, -1, 0, -1, 0, pen, errs);
    expect_eq("no error: penalty", pen, 0);
    expect_eq("no error: errors", errs, 0);

    run_stream(40, 1, 10, -1, 0, pen, errs);
    expect_eq("single error: errors", errs, 1);
    expect_eq("single error: penalty", pen, 1);

    run_stream(40, 1, 10, 1, 12, pen, errs);
    expect_eq("repeat at same stage: errors", errs, 1);
    expect_eq("repeat at same stage: penalty", pen, 1);

    run_stream(40, 0, 10, 2, 10, pen, errs);
    expect_eq("two stages same cycle: errors", errs, 2);
    expect_eq("two stages same cycle: penalty", pen, 1);

    run_stream(40, N - 1, 10, -1, 0, pen, errs);
    expect_eq("last stage error: errors", errs, 1);
    expect_eq("last stage error: penalty", pen, 1);

    run_stream(60, 1, 5, 2, 35, pen, errs);
    expect_eq("two separate errors: errors", errs, 2);
    expect_eq("two separate errors: penalty", pen, 2);

    // random phase
    for (int c = 0; c < 4000; c++) begin
      @(posedge clk); #1;
      in_valid = ($urandom_range(99) < 90);
      in_data  = $urandom();
      for (int j = 0; j < N; j++) late[j] = ($urandom_range(99) < 12);
    end
    idle_until_empty();
    expect_eq("random: stalls equal output bubbles", n_stall, n_bubble);

    $display("mechanisms: errors=%0d cg_gated=%0d error_free_cycles=%0d ignored_in_ef=%0d waves_stopped=%0d stalls=%0d",
             n_err, n_gated, n_ef, n_ignored, n_absorb, n_stall);
    checks++; if (n_err     == 0) begin failures++; $display("FAIL: no timing error"); end
    checks++; if (n_gated   == 0) begin failures++; $display("FAIL: no CG propagation"); end
    checks++; if (n_ef      == 0) begin failures++; $display("FAIL: no error-free mode"); end
    checks++; if (n_ignored == 0) begin failures++; $display("FAIL: no violation in error-free mode"); end
    checks++; if (n_absorb  == 0) begin failures++; $display("FAIL: no CG wave stopped"); end
    checks++; if (n_stall   == 0) begin failures++; $display("FAIL: no stall"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
