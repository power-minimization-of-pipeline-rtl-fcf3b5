// tb_cg_stage_ctrl: checks one stage controller.
// Directed part: the life of one error (normal -> error -> restore ->
// error-free -> wave arrives and is stopped -> normal) and a CG wave passing
// a normal stage (gated for exactly one cycle, CG forwarded one cycle later).
// Random part: random cg_in / mismatch / freeze / drain each cycle, compared
// with a reference table of (situation -> command, next state) kept here.
module tb_cg_stage_ctrl;
  import ctec_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    cg_in = 1'b0, mismatch = 1'b0, freeze = 1'b0, drain = 1'b0;
  reg_op_e op;
  logic    err, cg_out, ef, gated, absorb;
  int checks = 0, failures = 0;

  cg_stage_ctrl dut (.clk, .rst_n, .cg_in, .mismatch, .freeze, .drain,
                     .op, .err, .cg_out, .ef, .gated, .absorb);

  always #5 clk = ~clk;

  // reference state
  logic r_ef = 1'b0, r_gated = 1'b0;

  task automatic check_now(input string tag);
    reg_op_e e_op;
    logic e_err, e_abs, n_ef, n_gated;
    e_err = mismatch && !r_ef;
    e_abs = 1'b0;
    n_ef = r_ef; n_gated = r_gated;
    casez ({freeze, drain, cg_in, r_ef | e_err})
      4'b1???: e_op = REG_HOLD;
      4'b01??: begin e_op = REG_DRAIN; n_ef = 0; n_gated = 0; end
      4'b0011: begin e_op = REG_DRAIN; n_ef = 0; n_gated = 0; e_abs = 1; end
      4'b0010: begin e_op = REG_HOLD;  n_gated = 1; end
      4'b0001: begin e_op = REG_RESTORE; n_ef = 1; n_gated = 0; end
      default: begin e_op = REG_CAPTURE; n_gated = 0; end
    endcase
    checks++;
    if (op !== e_op || err !== e_err || cg_out !== (e_err | r_gated) || ef !== r_ef ||
        gated !== r_gated || absorb !== e_abs) begin
      failures++;
      $display("FAIL %s: op=%s/%s err=%b/%b cg=%b ef=%b/%b gated=%b/%b abs=%b/%b", tag,
               op.name(), e_op.name(), err, e_err, cg_out, ef, r_ef, gated, r_gated, absorb, e_abs);
    end
    @(posedge clk);
    r_ef = n_ef; r_gated = n_gated;
    #1;
  endtask

  task automatic drive(input logic c, m, f, dr, input string tag);
    cg_in = c; mismatch = m; freeze = f; drain = dr;
    #1;
    check_now(tag);
  endtask

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %b expected %b", what, got, exp); end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    @(posedge clk); #1;
    // one error at this stage
    drive(0, 0, 0, 0, "normal");
    cg_in = 0; mismatch = 1; #1;
    expect_bit("error raises CG", cg_out, 1);
    check_now("error");                        // -> restore
    expect_bit("error-free after restore", ef, 1);
    cg_in = 0; mismatch = 1; #1;
    expect_bit("no error in error-free mode", err, 0);
    expect_bit("no CG in error-free mode", cg_out, 0);
    check_now("error-free");
    cg_in = 1; mismatch = 1; #1;
    expect_bit("wave stops here", absorb, 1);
    check_now("absorb");
    cg_in = 0; mismatch = 0; #1;
    expect_bit("normal after absorbing", ef, 0);
    expect_bit("absorbed wave not forwarded", cg_out, 0);
    // a wave passing a normal stage
    cg_in = 1; mismatch = 0; #1;
    expect_bit("gated: clock held", op == REG_HOLD, 1);
    check_now("gate");
    cg_in = 0; #1;
    expect_bit("CG forwarded one cycle later", cg_out, 1);
    check_now("after gate");
    expect_bit("CG lasts one cycle", cg_out, 0);
    // random
    for (int i = 0; i < 4000; i++)
      drive(1'($urandom_range(1)), 1'($urandom_range(1)), ($urandom_range(9) == 0),
            ($urandom_range(9) == 0), "random");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
