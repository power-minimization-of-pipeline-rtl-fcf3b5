// ctec_pipeline: linear timing-speculative pipeline with 1-cycle error
// correction, for operation at a supply voltage below the point where all
// timing is met.
//
// Each of the N_STAGES stages is a combinational block (mult16_stage, the
// c6288 16 x 16 multiplier) followed by a razor_reg main/shadow register and
// a cg_stage_ctrl controller. Data words carry a valid bit, so a stage word
// is {valid, data}.
//
// How an error is corrected: when stage k's main latch misses its data, the
// mismatch with the shadow is seen in the same cycle and stage k raises CG.
// At the next edge stage k+1 is clock gated (it would otherwise take wrong
// data), stage k restores main from its shadow and the shadow takes the next
// item, so nothing upstream has to wait: stage k is now in error-free mode and
// holds one extra item. The gated stage repeats its output, so the CG wave
// travels one stage per cycle toward the output, where it appears as a single
// cycle with out_valid = 0. One cycle later stall_ctrl holds the input for one
// cycle while stage k drains its extra item and leaves error-free mode.
// Further errors do not add cycles while they overlap: a stage in error-free
// mode cannot fail again, and a CG wave that reaches a stage in error-free
// mode (or one in error) ends there.
//
// Interface: in_valid/in_data are accepted at each rising edge where
// in_ready = 1 (in_ready is low only during the stall cycle; a word with
// in_valid = 0 enters as a bubble). late[j] marks that stage j's logic misses
// the main latch at the next edge; it stands for the physical timing
// violation at the scaled voltage and is ignored unless the stage captures
// normally. out_valid/out_data give the result f^N(in) of each accepted
// valid word, in order, with latency N_STAGES cycles when no error is
// pending. Status outputs expose each stage's error, CG, error-free, gated and
// wave-absorb flags and the stall. Clock gating is written as register
// enables; an implementation maps them to integrated clock-gating cells.
// Stage count follows the evaluated 5- and 10-stage pipelines; the word width
// is that of c6288. Reset is asynchronous, active low.
module ctec_pipeline
  import ctec_pkg::*;
#(
  parameter int unsigned N_STAGES = 5,
  parameter int unsigned HALF     = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [2*HALF-1:0]   in_data,
  output logic                in_ready,
  input  logic [N_STAGES-1:0] late,
  output logic                out_valid,
  output logic [2*HALF-1:0]   out_data,
  output logic [N_STAGES-1:0] err,
  output logic [N_STAGES-1:0] cg,
  output logic [N_STAGES-1:0] ef,
  output logic [N_STAGES-1:0] gated,
  output logic [N_STAGES-1:0] absorb,
  output logic                stall
);

  localparam int unsigned W = 2 * HALF;

  logic [W:0]          stage_q [N_STAGES];   // main latch {valid, data}
  logic [W:0]          stage_d [N_STAGES];   // stage logic output
  logic [W:0]          shadow  [N_STAGES];
  logic [N_STAGES-1:0] mismatch, cg_in, freeze, drain;
  reg_op_e             op      [N_STAGES];

  for (genvar j = 0; j < N_STAGES; j++) begin : g_stage
    logic [W-1:0] logic_in, logic_out;
    logic         valid_in;

    if (j == 0) begin : g_first
      assign logic_in = in_data;
      assign valid_in = in_valid;
      assign cg_in[j] = 1'b0;
    end else begin : g_next
      assign logic_in = stage_q[j-1][W-1:0];
      assign valid_in = stage_q[j-1][W];
      assign cg_in[j] = cg[j-1];
    end

    mult16_stage #(.HALF(HALF)) u_logic (
      .x (logic_in),
      .y (logic_out)
    );

    assign stage_d[j] = {valid_in, logic_out};

    razor_reg #(.WIDTH(W + 1)) u_reg (
      .clk      (clk),
      .rst_n    (rst_n),
      .op       (op[j]),
      .late     (late[j]),
      .d        (stage_d[j]),
      .q        (stage_q[j]),
      .shadow   (shadow[j]),
      .mismatch (mismatch[j])
    );

    cg_stage_ctrl u_ctrl (
      .clk      (clk),
      .rst_n    (rst_n),
      .cg_in    (cg_in[j]),
      .mismatch (mismatch[j]),
      .freeze   (freeze[j]),
      .drain    (drain[j]),
      .op       (op[j]),
      .err      (err[j]),
      .cg_out   (cg[j]),
      .ef       (ef[j]),
      .gated    (gated[j]),
      .absorb   (absorb[j])
    );
  end

  stall_ctrl #(.N_STAGES(N_STAGES)) u_stall (
    .clk      (clk),
    .rst_n    (rst_n),
    .last_cg  (cg[N_STAGES-1]),
    .ef       (ef),
    .err      (err),
    .cg_in    (cg_in),
    .stall    (stall),
    .freeze   (freeze),
    .drain    (drain),
    .in_ready (in_ready)
  );

  assign out_valid = stage_q[N_STAGES-1][W] & ~cg[N_STAGES-1];
  assign out_data  = stage_q[N_STAGES-1][W-1:0];

endmodule
