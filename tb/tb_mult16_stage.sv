// tb_mult16_stage: checks the c6288-equivalent stage logic, y = x[31:16] * x[15:0],
// on corner operands and random words against a 64-bit product computed here.
module tb_mult16_stage;
  localparam int HALF = 16;
  logic [2*HALF-1:0] x, y;
  int checks = 0, failures = 0;

  mult16_stage #(.HALF(HALF)) dut (.x, .y);

  task automatic check(input logic [2*HALF-1:0] v);
    logic [63:0] p;
    x = v;
    #1;
    p = 64'(v[2*HALF-1:HALF]) * 64'(v[HALF-1:0]);
    checks++;
    if (y !== p[2*HALF-1:0]) begin
      failures++;
      $display("FAIL x=%h y=%h expected %h", v, y, p[2*HALF-1:0]);
    end
  endtask

  initial begin
    check(32'h0000_0000);
    check(32'hFFFF_FFFF);   // 65535^2 = fffe0001
    check(32'h0001_FFFF);
    check(32'hFFFF_0001);
    check(32'h8000_8000);
    check(32'h1234_5678);
    for (int i = 0; i < 2000; i++) check($urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
