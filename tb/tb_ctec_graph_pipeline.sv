// tb_ctec_graph_pipeline: end-to-end test of the general-graph pipeline at
// its default graph A->B, A->C, B->D, C->D, D->E, E->C, E->F (source A,
// sink F).
//
// Golden model: the same graph clocked without any error, one step per
// cycle, where every stage computes c6288(sum of its input words) from the
// previous step. The n-th new result at the output must equal the sink's
// value at step n, whatever bubbles, gating, virtual errors and stalls the
// design used on the way; the model is fed with the input words in the order
// the design accepted them. Directed runs put one timing error before the
// loop (A, B), in the loop (C, D, E) and after it (F), errors at both
// inputs of the fan-in stage D; each must cost exactly one output bubble and
// leave the graph back in normal mode. A random run then injects
// errors everywhere. Counted mechanisms: errors, virtual errors, error-free
// cycles, waves stopped, stall cycles; each must happen.
module tb_ctec_graph_pipeline;
  import ctec_pkg::*;

  localparam int N    = 6;
  localparam int HALF = 16;
  localparam int W    = 2 * HALF;
  localparam int SRC  = 0;
  localparam int SINK = 5;
  localparam logic [N*N-1:0] ADJ = 36'h0_2440_8206;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid = 1'b0;
  logic [W-1:0] in_data = '0;
  logic         in_ready, out_valid, out_fresh, stall;
  logic [W-1:0] out_data;
  logic [N-1:0] late = '0, err, ef, fire, ve, absorb;

  ctec_graph_pipeline dut (
    .clk, .rst_n, .in_valid, .in_data, .in_ready, .late, .out_valid, .out_fresh,
    .out_data, .err, .ef, .fire, .ve, .absorb, .stall
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- golden model ----------------
  function automatic logic [W-1:0] c6288(input logic [W-1:0] x);
    logic [63:0] p;
    p = 64'(x[W-1:HALF]) * 64'(x[HALF-1:0]);
    return p[W-1:0];
  endfunction

  logic [W:0] g_state [N];   // golden {valid, data} of every stage
  int         g_step = 0;
  logic [W:0] inq[$];        // accepted input words, oldest first
  logic [W:0] outq[$];       // new results seen at the output
  int         n_out = 0;

  task automatic golden_step(input logic [W:0] inw);
    logic [W:0] nxt [N];
    for (int k = 0; k < N; k++) begin
      logic [W-1:0] sum;
      logic         v;
      sum = (k == SRC) ? inw[W-1:0] : '0;
      v   = (k == SRC) ? inw[W] : 1'b0;
      for (int i = 0; i < N; i++)
        if (ADJ[i*N + k]) begin
          sum = sum + g_state[i][W-1:0];
          v   = v | g_state[i][W];
        end
      nxt[k] = {v, c6288(sum)};
    end
    g_state = nxt;
    g_step++;
  endtask

  // compare every output whose golden value can be computed already
  task automatic score();
    while (outq.size() > 0 && inq.size() > 0) begin
      logic [W:0] got;
      got = outq.pop_front();
      checks++;
      if (got !== g_state[SINK]) begin
        failures++;
        $display("FAIL output %0d: %h expected %h", g_step, got, g_state[SINK]);
      end
      golden_step(inq.pop_front());
    end
  endtask

  // ---------------- monitor (mid-cycle) ----------------
  int n_err = 0, n_ve = 0, n_ef = 0, n_absorb = 0, n_stall = 0, n_bubble = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (in_ready) inq.push_back({in_valid, in_data});
      if (out_fresh) begin
        outq.push_back({out_valid, out_data});
        n_out++;
      end else begin
        n_bubble++;
      end
      n_err    += $countones(err);
      n_ve     += $countones(ve);
      n_ef     += $countones(ef);
      n_absorb += $countones(absorb);
      n_stall  += int'(stall);
    end
  end

  // ---------------- stimulus ----------------
  task automatic cycle_in(input logic [N-1:0] lt);
    @(posedge clk); #1;
    in_valid = ($urandom_range(9) != 0);
    in_data  = $urandom();
    late     = lt;
  endtask

  // run one violation at stage s in steady streaming; report extra bubbles
  task automatic one_error(input int s, input int s2, input string tag);
    int b0, e0;
    repeat (20) cycle_in('0);
    b0 = n_bubble; e0 = n_err;
    cycle_in((N'(1) << s) | ((s2 >= 0) ? (N'(1) << s2) : '0));
    repeat (60) cycle_in('0);
    checks++;
    if (n_err - e0 != ((s2 >= 0) ? 2 : 1) || ef != '0 || stall || n_bubble - b0 != 1) begin
      failures++;
      $display("FAIL %s: errors=%0d bubbles=%0d ef=%b", tag, n_err - e0, n_bubble - b0, ef);
    end else begin
      $display("ok   %s: %0d error(s), %0d output bubble(s)", tag, n_err - e0, n_bubble - b0);
    end
    score();
  endtask

  initial begin
    for (int k = 0; k < N; k++) g_state[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    one_error(0, -1, "error at A, before the loop");
    one_error(1, -1, "error at B, one input of fan-in D");
    one_error(2, -1, "error at C, in the loop");
    one_error(3, -1, "error at D, in the loop");
    one_error(4, -1, "error at E, in the loop");
    one_error(5, -1, "error at F, after the loop");
    one_error(1, 2,  "errors at B and C, both inputs of D");
    for (int c = 0; c < 6000; c++) begin
      logic [N-1:0] lt;
      for (int j = 0; j < N; j++) lt[j] = ($urandom_range(99) < 4);
      cycle_in(lt);
    end
    repeat (80) cycle_in('0);
    score();
    checks++;
    if (outq.size() > 0) begin failures++; $display("FAIL: %0d outputs left unchecked", outq.size()); end
    checks++;
    if (ef != '0 || stall) begin failures++; $display("FAIL: not back in normal mode, ef=%b", ef); end
    checks++;
    if (n_out < 5000) begin failures++; $display("FAIL: only %0d results", n_out); end
    $display("mechanisms: errors=%0d virtual_errors=%0d error_free_cycles=%0d waves_stopped=%0d stall_cycles=%0d output_bubbles=%0d results=%0d",
             n_err, n_ve, n_ef, n_absorb, n_stall, n_bubble, n_out);
    checks++; if (n_err    == 0) begin failures++; $display("FAIL: no error"); end
    checks++; if (n_ve     == 0) begin failures++; $display("FAIL: no virtual error"); end
    checks++; if (n_ef     == 0) begin failures++; $display("FAIL: no error-free mode"); end
    checks++; if (n_absorb == 0) begin failures++; $display("FAIL: no wave stopped"); end
    checks++; if (n_stall  == 0) begin failures++; $display("FAIL: no stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
