// ctec_workload_run: one throughput run of ctec_pipeline, used by
// tb_ctec_workload.
//
// Streams VECTORS random 32-bit words back to back into a pipeline of
// N_STAGES c6288 stages while every stage is given a timing violation with
// probability LATE_PCT percent per cycle (standing for one supply voltage).
// Every result is checked against a model computed here. Throughput is
// VECTORS / (cycles from first input to last result - pipeline latency + 1);
// with a 1-cycle correction cost it must equal VECTORS / (VECTORS + stalls).
// Also counts stage-cycles spent in error-free mode. Reports through its
// ports when done.
module ctec_workload_run #(
  parameter int N_STAGES = 5,
  parameter int VECTORS  = 100,
  parameter int LATE_PCT = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls,
  output int   errors,
  output int   ef_cycles,
  output real  throughput
);
  localparam int HALF = 16;
  localparam int W    = 2 * HALF;

  logic                in_valid = 1'b0, in_ready, out_valid, stall;
  logic [W-1:0]        in_data = '0, out_data;
  logic [N_STAGES-1:0] late = '0, err, cg, ef, gated, absorb;

  ctec_pipeline #(.N_STAGES(N_STAGES), .HALF(HALF)) dut (
    .clk, .rst_n, .in_valid, .in_data, .in_ready, .late,
    .out_valid, .out_data, .err, .cg, .ef, .gated, .absorb, .stall
  );

  function automatic logic [W-1:0] fn(input logic [W-1:0] x);
    logic [W-1:0] v = x;
    logic [63:0]  p;
    for (int i = 0; i < N_STAGES; i++) begin
      p = 64'(v[W-1:HALF]) * 64'(v[HALF-1:0]);
      v = p[W-1:0];
    end
    return v;
  endfunction

  logic [W-1:0] expq[$];
  int cycle = 0, first_acc = -1, last_out = -1, n_out = 0;

  initial begin
    done = 1'b0; checks = 0; failures = 0; stalls = 0; errors = 0; ef_cycles = 0; throughput = 0.0;
  end

  always @(negedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        expq.push_back(fn(in_data));
        if (first_acc < 0) first_acc = cycle;
      end
      if (out_valid) begin
        checks++;
        n_out++;
        last_out = cycle;
        if (expq.size() == 0 || out_data !== expq.pop_front()) begin
          failures++;
          $display("FAIL N=%0d cycle %0d: wrong or unexpected result %h", N_STAGES, cycle, out_data);
        end
      end
      stalls += int'(stall);
      errors += $countones(err);
      ef_cycles += $countones(ef);
    end
  end

  initial begin
    int sent;
    int span;
    sent = 0;
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    while (sent < VECTORS) begin
      @(posedge clk); #1;
      in_valid = 1'b1;
      in_data  = $urandom();
      for (int j = 0; j < N_STAGES; j++) late[j] = ($urandom_range(99) < LATE_PCT);
      if (in_ready) sent++;
    end
    @(posedge clk); #1;
    in_valid = 1'b0;
    late     = '0;
    while (n_out < VECTORS) @(posedge clk);
    repeat (N_STAGES + 4) @(posedge clk);
    span       = last_out - first_acc - N_STAGES + 1;
    throughput = real'(VECTORS) / real'(span);
    checks++;
    if (span != VECTORS + stalls) begin
      failures++;
      $display("FAIL N=%0d: %0d cycles for %0d vectors with %0d stalls", N_STAGES, span, VECTORS, stalls);
    end
    checks++;
    if (ef != '0 || expq.size() != 0) begin
      failures++;
      $display("FAIL N=%0d: pipeline not back in normal mode", N_STAGES);
    end
    done = 1'b1;
  end
endmodule
