// graph_shape_run: one randomized run of ctec_graph_pipeline on a given graph,
// used by tb_ctec_graph_shapes.
//
// Streams CYCLES random words (10 % of them bubbles) with timing violations of
// probability LATE_PCT percent per stage and cycle, then idles. Every new
// result is compared with the sink of an error-free copy of the graph stepped
// once per result (each stage: c6288 of the sum of its input words). Reports
// checks, failures, errors and virtual errors through its ports.
module graph_shape_run #(
  parameter int           N        = 4,
  parameter logic [N*N-1:0] ADJ    = '0,
  parameter int           SRC      = 0,
  parameter int           SINK     = 0,
  parameter int           CYCLES   = 3000,
  parameter int           LATE_PCT = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   errors,
  output int   ves,
  output int   results
);
  localparam int HALF = 16;
  localparam int W    = 2 * HALF;

  logic         in_valid = 1'b0, in_ready, out_valid, out_fresh, stall;
  logic [W-1:0] in_data = '0, out_data;
  logic [N-1:0] late = '0, err, ef, fire, ve, absorb;

  ctec_graph_pipeline #(.N_STAGES(N), .HALF(HALF), .ADJ(ADJ), .SRC(SRC), .SINK(SINK)) dut (
    .clk, .rst_n, .in_valid, .in_data, .in_ready, .late, .out_valid, .out_fresh,
    .out_data, .err, .ef, .fire, .ve, .absorb, .stall
  );

  function automatic logic [W-1:0] c6288(input logic [W-1:0] x);
    return W'(x[W-1:HALF]) * W'(x[HALF-1:0]);
  endfunction

  logic [W:0] g_state [N];
  logic [W:0] inq[$], outq[$];

  task automatic g_step(input logic [W:0] inw);
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
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0; errors = 0; ves = 0; results = 0;
    for (int k = 0; k < N; k++) g_state[k] = '0;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (in_ready) inq.push_back({in_valid, in_data});
      if (out_fresh) begin
        outq.push_back({out_valid, out_data});
        results++;
      end
      errors += $countones(err);
      ves    += $countones(ve);
    end
  end

  initial begin
    @(posedge rst_n);
    for (int c = 0; c < CYCLES + 20 * N; c++) begin
      @(posedge clk); #1;
      in_valid = ($urandom_range(9) != 0);
      in_data  = $urandom();
      for (int j = 0; j < N; j++) late[j] = (c < CYCLES) && ($urandom_range(99) < LATE_PCT);
    end
    while (outq.size() > 0 && inq.size() > 0) begin
      logic [W:0] got;
      got = outq.pop_front();
      checks++;
      if (got !== g_state[SINK]) begin
        failures++;
        if (failures < 5) $display("FAIL graph %h: result %h expected %h", ADJ, got, g_state[SINK]);
      end
      g_step(inq.pop_front());
    end
    checks++;
    if (outq.size() != 0 || ef != '0 || results < CYCLES / 2) begin
      failures++;
      $display("FAIL graph %h: %0d results, %0d unchecked, ef=%b", ADJ, results, outq.size(), ef);
    end
    done = 1'b1;
  end
endmodule
