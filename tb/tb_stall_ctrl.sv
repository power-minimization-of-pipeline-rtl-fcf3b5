// tb_stall_ctrl: checks the stall controller with random stage flags.
// The stall must come exactly one cycle after the last stage's CG, last one
// cycle, lower in_ready, drain the first stage (from the input side) that is
// in error-free mode or in error and not receiving CG, and hold every stage
// before it. Outside a stall nothing is held or drained. Stage flags are
// chosen so that a stalled cycle always has a stage to drain.
module tb_stall_ctrl;
  localparam int N = 6;

  logic         clk = 1'b0, rst_n = 1'b0, last_cg = 1'b0;
  logic [N-1:0] ef = '0, err = '0, cg_in = '0;
  logic         stall, in_ready;
  logic [N-1:0] freeze, drain;
  int checks = 0, failures = 0;
  int n_stall = 0;

  stall_ctrl #(.N_STAGES(N)) dut (.clk, .rst_n, .last_cg, .ef, .err, .cg_in,
                                  .stall, .freeze, .drain, .in_ready);

  always #5 clk = ~clk;

  logic prev_cg = 1'b0;

  initial begin
    #12 rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk); #1;
      last_cg = ($urandom_range(3) == 0);
      ef      = N'($urandom());
      err     = N'($urandom()) & ~ef;
      cg_in   = N'($urandom()) & N'($urandom());
      if (stall && (((ef | err) & ~cg_in) == '0)) ef[$urandom_range(N - 1)] = 1'b1;
      if (stall && (((ef | err) & ~cg_in) == '0)) cg_in = '0;
      #1;
      begin
        logic [N-1:0] e_drain, e_freeze;
        bit found;
        found = 0;
        e_drain = '0; e_freeze = '0;
        if (prev_cg)
          for (int j = 0; j < N; j++)
            if (!found) begin
              if ((ef[j] | err[j]) & !cg_in[j]) begin e_drain[j] = 1; found = 1; end
              else e_freeze[j] = 1;
            end
        checks++;
        if (stall !== prev_cg || in_ready !== !prev_cg || drain !== e_drain || freeze !== e_freeze) begin
          failures++;
          $display("FAIL: stall=%b/%b drain=%b/%b freeze=%b/%b (ef=%b err=%b cg_in=%b)",
                   stall, prev_cg, drain, e_drain, freeze, e_freeze, ef, err, cg_in);
        end
        n_stall += int'(stall);
      end
      prev_cg = last_cg;
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL: no stall seen"); end
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
