// cg_stage_ctrl: clock-gating (CG) and error-free-mode controller of one stage.
//
// A stage is in one of four situations, decided from two state bits and the
// register pair's mismatch flag:
//   normal      ef = 0, no mismatch : the stage captures every cycle
//   error       ef = 0, mismatch    : the main latch missed its data this
//                                     cycle; the stage sends CG downstream
//   error-free  ef = 1              : main is fed from the shadow and the
//                                     shadow from the logic, so the stage holds
//                                     one extra data item and its logic gets
//                                     the longer shadow timing; no timing error
//                                     can occur, and mismatch is expected
//   gated       gated = 1           : the stage's clock was gated at the last
//                                     edge, so its output repeats the previous
//                                     item; it sends CG downstream
// CG output = error | gated. A stage that receives CG from its input stage
// (its input is wrong or a repeat) must not take new data at the next edge:
//   normal     -> clock gated, becomes 'gated' (the CG wave moves on)
//   error-free -> drains its extra item (main <- shadow) and returns to
//                 normal: the CG wave stops here, which is how errors at
//                 different stages are corrected together
//   error      -> restores main from shadow and returns to normal; its own CG
//                 continues, the arriving one stops here
// Without CG an error or error-free stage performs the restore operation
// (main <- shadow, shadow <- logic) and is in error-free mode afterwards; a
// normal stage captures.
// The stall controller can override this: 'freeze' gates the stage completely
// for one cycle, 'drain' hands the extra item on and leaves error-free mode.
//
// All outputs except the registered state are combinational in the current
// cycle; op acts at the next rising edge. The four-way decision follows the
// described behaviour of CG propagation and error-free mode; the exact
// priority between freeze, drain and CG is this design's choice.
module cg_stage_ctrl
  import ctec_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    cg_in,     // CG from the input stage
  input  logic    mismatch,  // main != shadow in this stage's register
  input  logic    freeze,    // stall: hold everything this cycle
  input  logic    drain,     // stall: leave error-free mode this cycle
  output reg_op_e op,
  output logic    err,       // real timing error detected this cycle
  output logic    cg_out,    // CG to the output stage(s)
  output logic    ef,        // error-free mode
  output logic    gated,     // clock was gated at the last edge
  output logic    absorb     // an arriving CG wave stops at this stage now
);

  logic ef_q, gated_q, ef_d, gated_d;

  assign err    = mismatch & ~ef_q;
  assign cg_out = err | gated_q;
  assign ef     = ef_q;
  assign gated  = gated_q;

  always_comb begin
    op      = REG_HOLD;
    ef_d    = ef_q;
    gated_d = gated_q;
    absorb  = 1'b0;
    if (freeze) begin
      op = REG_HOLD;
    end else if (drain) begin
      op      = REG_DRAIN;
      ef_d    = 1'b0;
      gated_d = 1'b0;
    end else if (cg_in) begin
      if (ef_q || err) begin
        op      = REG_DRAIN;
        ef_d    = 1'b0;
        gated_d = 1'b0;
        absorb  = 1'b1;
      end else begin
        op      = REG_HOLD;
        gated_d = 1'b1;
      end
    end else if (ef_q || err) begin
      op      = REG_RESTORE;
      ef_d    = 1'b1;
      gated_d = 1'b0;
    end else begin
      op      = REG_CAPTURE;
      gated_d = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ef_q    <= 1'b0;
      gated_q <= 1'b0;
    end else begin
      ef_q    <= ef_d;
      gated_q <= gated_d;
    end
  end

endmodule
