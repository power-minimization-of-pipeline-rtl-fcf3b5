// razor_reg: main/shadow register pair of one pipeline stage.
//
// The main latch samples the stage logic at the clock edge. The shadow latch
// is clocked so that it opens only after the main latch has closed, and it
// therefore still sees the settled logic output when the logic was too slow
// for the main latch. A difference between the two flags a timing error.
// Unlike a plain Razor register the shadow is a full storage element: in the
// restore cycle it writes its (correct) value back into the main latch and,
// in the same edge, captures the next logic output, so no input data is lost.
//
// Timing is modelled at cycle level with ordinary flip-flops on one clock:
// the late shadow clock and the latch pulse widths are physical properties
// that do not change the cycle-level behaviour. A timing violation is given
// by the input 'late': on a REG_CAPTURE edge with late = 1 the main register
// keeps its old value (the new value did not reach it in time) while the
// shadow takes the new value. If old and new values happen to be equal the
// main register is still correct and no error is flagged, as in the circuit.
//
// Ports: op (ctec_pkg::reg_op_e) selects the action at the next edge; d is the
// stage logic output; q is the main latch (drives the next stage); shadow is
// the shadow latch; mismatch = (q != shadow). Reset clears both latches.
module razor_reg
  import ctec_pkg::*;
#(
  parameter int unsigned WIDTH = 33
) (
  input  logic             clk,
  input  logic             rst_n,
  input  reg_op_e          op,
  input  logic             late,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] shadow,
  output logic             mismatch
);

  logic [WIDTH-1:0] main_q, shadow_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      main_q   <= '0;
      shadow_q <= '0;
    end else begin
      unique case (op)
        REG_CAPTURE: begin
          shadow_q <= d;
          if (!late) main_q <= d;
        end
        REG_RESTORE: begin
          main_q   <= shadow_q;
          shadow_q <= d;
        end
        REG_DRAIN:   main_q <= shadow_q;
        default:     ;  // REG_HOLD: clock gated
      endcase
    end
  end

  assign q        = main_q;
  assign shadow   = shadow_q;
  assign mismatch = (main_q != shadow_q);

endmodule
