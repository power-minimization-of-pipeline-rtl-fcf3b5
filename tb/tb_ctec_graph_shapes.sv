// tb_ctec_graph_shapes: the general-graph pipeline on other graphs than its
// default, each checked result by result against an error-free copy:
//   chain   0->1->...->9              (10-stage linear pipeline)
//   diamond 0->1, 0->2, 1->3, 2->3     (fan-out then fan-in)
//   loops   0->1->2->3->1, 3->4->5->2, 5->6  (two loops sharing stages 2, 3)
// Each must see timing errors and, where a stage has two inputs, virtual
// errors, and must end back in normal mode.
module tb_ctec_graph_shapes;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int R = 3;
  logic done [R];
  int   chk [R], fail [R], errs [R], ves [R], res [R];

  graph_shape_run #(.N(10), .ADJ(100'h20040080100200400801002), .SRC(0), .SINK(9)) r_chain (
    .clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]), .errors(errs[0]), .ves(ves[0]), .results(res[0]));
  graph_shape_run #(.N(4), .ADJ(16'h0886), .SRC(0), .SINK(3)) r_diamond (
    .clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]), .errors(errs[1]), .ves(ves[1]), .results(res[1]));
  graph_shape_run #(.N(7), .ADJ(49'h22202420202), .SRC(0), .SINK(6)) r_loops (
    .clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]), .errors(errs[2]), .ves(ves[2]), .results(res[2]));

  int checks = 0, failures = 0;
  string names [R] = '{"chain", "diamond", "loops"};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2]);
    for (int r = 0; r < R; r++) begin
      $display("%-8s results=%0d errors=%0d virtual_errors=%0d failures=%0d",
               names[r], res[r], errs[r], ves[r], fail[r]);
      checks   += chk[r] + 1;
      failures += fail[r];
      if (errs[r] == 0) begin failures++; $display("FAIL %s: no timing error", names[r]); end
    end
    checks += 2;
    if (ves[1] == 0) begin failures++; $display("FAIL diamond: no virtual error"); end
    if (ves[2] == 0) begin failures++; $display("FAIL loops: no virtual error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
