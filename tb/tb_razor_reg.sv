// tb_razor_reg: drives random commands, late flags and data into the
// main/shadow register and compares main, shadow and mismatch each cycle with
// a model kept in the testbench:
//   capture: shadow <= d, main <= d unless late;  restore: main <= shadow,
//   shadow <= d;  drain: main <= shadow;  hold: nothing.
// Also checks the restore cycle of a timing error explicitly: after a late
// capture the mismatch is flagged, and one restore puts the correct value in
// main while the new word goes into the shadow.
module tb_razor_reg;
  import ctec_pkg::*;
  localparam int WIDTH = 33;

  logic             clk = 1'b0, rst_n = 1'b0, late = 1'b0;
  reg_op_e          op = REG_HOLD;
  logic [WIDTH-1:0] d = '0, q, shadow;
  logic             mismatch;
  int checks = 0, failures = 0;

  razor_reg #(.WIDTH(WIDTH)) dut (.clk, .rst_n, .op, .late, .d, .q, .shadow, .mismatch);

  always #5 clk = ~clk;

  logic [WIDTH-1:0] m_main = '0, m_shadow = '0;

  task automatic compare(input string tag);
    checks++;
    if (q !== m_main || shadow !== m_shadow || mismatch !== (m_main != m_shadow)) begin
      failures++;
      $display("FAIL %s: q=%h/%h shadow=%h/%h mismatch=%b", tag, q, m_main, shadow, m_shadow, mismatch);
    end
  endtask

  task automatic step(input reg_op_e o, input logic lt, input logic [WIDTH-1:0] dv);
    op = o; late = lt; d = dv;
    @(posedge clk);
    case (o)
      REG_CAPTURE: begin m_shadow = dv; if (!lt) m_main = dv; end
      REG_RESTORE: begin m_main = m_shadow; m_shadow = dv; end
      REG_DRAIN:   m_main = m_shadow;
      default: ;
    endcase
    #1;
    compare(o.name());
  endtask

  initial begin
    #12 rst_n = 1'b1;
    @(negedge clk);
    compare("reset");
    // timing error and its restore cycle
    step(REG_CAPTURE, 1'b0, 33'h0_1111_1111);
    step(REG_CAPTURE, 1'b1, 33'h1_2222_2222);
    checks++;
    if (!mismatch || q !== 33'h0_1111_1111) begin failures++; $display("FAIL: late capture not flagged"); end
    step(REG_RESTORE, 1'b0, 33'h1_3333_3333);
    checks++;
    if (q !== 33'h1_2222_2222 || shadow !== 33'h1_3333_3333) begin failures++; $display("FAIL: restore"); end
    step(REG_DRAIN, 1'b0, 33'h0);
    checks++;
    if (q !== 33'h1_3333_3333 || mismatch) begin failures++; $display("FAIL: drain"); end
    // random commands
    for (int i = 0; i < 3000; i++)
      step(reg_op_e'($urandom_range(3)), 1'($urandom_range(1)), {1'($urandom()), 32'($urandom())});
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
