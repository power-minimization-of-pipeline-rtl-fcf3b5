// tb_ctec_top: end-to-end test of ctec_top at its default parameters (5-stage
// linear pipeline and the 6-stage graph A->B, A->C, B->D, C->D, D->E, E->C,
// E->F), both fed with random words and random timing violations.
//
// Linear pipeline: every valid result must equal five chained 16 x 16
// products of the accepted word, in order; an isolated error must cost
// exactly one cycle (checked on a directed stream); a stall must follow
// every output bubble by one cycle.
// Graph pipeline: the n-th new result must equal the sink of an error-free
// copy of the graph after n steps, fed with the accepted words in order.
// Each mechanism of each pipeline is counted and must occur: timing error,
// CG propagation, error-free mode, a violation ignored in error-free mode,
// a CG wave stopped, stall (linear); timing error, virtual error,
// error-free mode, wave stopped, stall (graph).
module tb_ctec_top;
  localparam int N    = 5;
  localparam int G    = 6;
  localparam int HALF = 16;
  localparam int W    = 2 * HALF;
  localparam logic [G*G-1:0] ADJ = 36'h0_2440_8206;
  localparam int SRC = 0, SINK = 5;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         l_in_valid = 1'b0, g_in_valid = 1'b0;
  logic [W-1:0] l_in_data = '0, g_in_data = '0;
  logic [N-1:0] l_late = '0;
  logic [G-1:0] g_late = '0;
  logic         l_in_ready, l_out_valid, l_stall;
  logic [W-1:0] l_out_data, g_out_data;
  logic [N-1:0] l_err, l_cg, l_ef, l_gated, l_absorb;
  logic         g_in_ready, g_out_valid, g_out_fresh, g_stall;
  logic [G-1:0] g_err, g_ef, g_fire, g_ve, g_absorb;

  ctec_top dut (
    .clk, .rst_n,
    .lin_in_valid(l_in_valid), .lin_in_data(l_in_data), .lin_in_ready(l_in_ready),
    .lin_late(l_late), .lin_out_valid(l_out_valid), .lin_out_data(l_out_data),
    .lin_err(l_err), .lin_cg(l_cg), .lin_ef(l_ef), .lin_gated(l_gated),
    .lin_absorb(l_absorb), .lin_stall(l_stall),
    .g_in_valid, .g_in_data, .g_in_ready, .g_late, .g_out_valid, .g_out_fresh,
    .g_out_data, .g_err, .g_ef, .g_fire, .g_ve, .g_absorb, .g_stall
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;

  function automatic logic [W-1:0] c6288(input logic [W-1:0] x);
    logic [63:0] p;
    p = 64'(x[W-1:HALF]) * 64'(x[HALF-1:0]);
    return p[W-1:0];
  endfunction

  // ---------------- linear reference ----------------
  logic [W-1:0] l_expq[$];
  int l_first = -1, l_last = -1;
  logic l_prev_cg = 1'b0;
  int l_n_err = 0, l_n_gated = 0, l_n_ef = 0, l_n_ign = 0, l_n_abs = 0, l_n_stall = 0;

  // ---------------- graph reference ----------------
  logic [W:0] g_state [G];
  logic [W:0] g_inq[$], g_outq[$];
  int g_n_err = 0, g_n_ve = 0, g_n_ef = 0, g_n_abs = 0, g_n_stall = 0, g_n_out = 0;

  task automatic g_step(input logic [W:0] inw);
    logic [W:0] nxt [G];
    for (int k = 0; k < G; k++) begin
      logic [W-1:0] sum;
      logic         v;
      sum = (k == SRC) ? inw[W-1:0] : '0;
      v   = (k == SRC) ? inw[W] : 1'b0;
      for (int i = 0; i < G; i++)
        if (ADJ[i*G + k]) begin
          sum = sum + g_state[i][W-1:0];
          v   = v | g_state[i][W];
        end
      nxt[k] = {v, c6288(sum)};
    end
    g_state = nxt;
  endtask

  task automatic g_score();
    while (g_outq.size() > 0 && g_inq.size() > 0) begin
      logic [W:0] got;
      got = g_outq.pop_front();
      checks++;
      if (got !== g_state[SINK]) begin
        failures++;
        $display("FAIL graph result %h expected %h", got, g_state[SINK]);
      end
      g_step(g_inq.pop_front());
    end
  endtask

  // ---------------- monitor, mid-cycle ----------------
  always @(negedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      // linear
      if (l_in_valid && l_in_ready) begin
        logic [W-1:0] v;
        v = l_in_data;
        for (int i = 0; i < N; i++) v = c6288(v);
        l_expq.push_back(v);
        if (l_first < 0) l_first = cycle;
      end
      if (l_out_valid) begin
        checks++;
        l_last = cycle;
        if (l_expq.size() == 0 || l_out_data !== l_expq.pop_front()) begin
          failures++;
          $display("FAIL linear result %h at cycle %0d", l_out_data, cycle);
        end
      end
      if (l_prev_cg || l_stall) begin
        checks++;
        if (l_prev_cg != l_stall) begin failures++; $display("FAIL linear stall timing"); end
      end
      l_prev_cg  = l_cg[N-1];
      l_n_err   += $countones(l_err);
      l_n_gated += $countones(l_gated);
      l_n_ef    += $countones(l_ef);
      l_n_ign   += $countones(l_late & l_ef);
      l_n_abs   += $countones(l_absorb);
      l_n_stall += int'(l_stall);
      // graph
      if (g_in_ready) g_inq.push_back({g_in_valid, g_in_data});
      if (g_out_fresh) begin
        g_outq.push_back({g_out_valid, g_out_data});
        g_n_out++;
      end
      g_n_err   += $countones(g_err);
      g_n_ve    += $countones(g_ve);
      g_n_ef    += $countones(g_ef);
      g_n_abs   += $countones(g_absorb);
      g_n_stall += int'(g_stall);
    end
  end

  task automatic step(input logic lv, input logic [N-1:0] ll, input logic [G-1:0] gl);
    @(posedge clk); #1;
    l_in_valid = lv;
    l_in_data  = $urandom();
    l_late     = ll;
    g_in_valid = ($urandom_range(9) != 0);
    g_in_data  = $urandom();
    g_late     = gl;
  endtask

  initial begin
    int sent, e0;
    for (int k = 0; k < G; k++) g_state[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // directed: 50 back-to-back words with one error at linear stage 2
    e0 = l_n_err;
    l_first = -1;
    sent = 0;
    for (int k = 0; sent < 50; k++) begin
      step(1'b1, (k == 20) ? N'(4) : '0, (k == 20) ? G'(2) : '0);
      if (l_in_ready) sent++;
    end
    repeat (N + 20) step(1'b0, '0, '0);
    checks++;
    if (l_n_err - e0 != 1 || l_last - l_first != 50 - 1 + N + 1) begin
      failures++;
      $display("FAIL linear: %0d errors, %0d cycles for 50 words", l_n_err - e0, l_last - l_first + 1 - N);
    end

    // random operation of both
    for (int c = 0; c < 5000; c++) begin
      logic [N-1:0] ll;
      logic [G-1:0] gl;
      for (int j = 0; j < N; j++) ll[j] = ($urandom_range(99) < 4);
      for (int j = 0; j < G; j++) gl[j] = ($urandom_range(99) < 4);
      step($urandom_range(9) != 0, ll, gl);
    end
    repeat (60) step(1'b0, '0, '0);
    g_score();

    checks++;
    if (l_expq.size() != 0 || l_ef != '0) begin failures++; $display("FAIL linear did not drain"); end
    checks++;
    if (g_outq.size() != 0 || g_ef != '0) begin failures++; $display("FAIL graph did not drain"); end
    checks++;
    if (g_n_out < 4000) begin failures++; $display("FAIL graph gave only %0d results", g_n_out); end

    $display("linear: errors=%0d cg_gated=%0d error_free=%0d ignored_in_ef=%0d waves_stopped=%0d stalls=%0d",
             l_n_err, l_n_gated, l_n_ef, l_n_ign, l_n_abs, l_n_stall);
    $display("graph:  errors=%0d virtual_errors=%0d error_free=%0d waves_stopped=%0d stalls=%0d results=%0d",
             g_n_err, g_n_ve, g_n_ef, g_n_abs, g_n_stall, g_n_out);
    checks++; if (l_n_err   == 0) begin failures++; $display("FAIL: linear error never"); end
    checks++; if (l_n_gated == 0) begin failures++; $display("FAIL: linear CG never"); end
    checks++; if (l_n_ef    == 0) begin failures++; $display("FAIL: linear error-free never"); end
    checks++; if (l_n_ign   == 0) begin failures++; $display("FAIL: linear ignored violation never"); end
    checks++; if (l_n_abs   == 0) begin failures++; $display("FAIL: linear wave stop never"); end
    checks++; if (l_n_stall == 0) begin failures++; $display("FAIL: linear stall never"); end
    checks++; if (g_n_err   == 0) begin failures++; $display("FAIL: graph error never"); end
    checks++; if (g_n_ve    == 0) begin failures++; $display("FAIL: graph virtual error never"); end
    checks++; if (g_n_ef    == 0) begin failures++; $display("FAIL: graph error-free never"); end
    checks++; if (g_n_abs   == 0) begin failures++; $display("FAIL: graph wave stop never"); end
    checks++; if (g_n_stall == 0) begin failures++; $display("FAIL: graph stall never"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
