// ctec_top: the two forms of the 1-cycle timing-error-correcting pipeline,
// side by side with separate ports and a shared clock and reset.
//
//   lin_*  ctec_pipeline: the linear pipeline of N_STAGES c6288 stages used
//          in the evaluation (CG wave to the output, stall when it gets
//          there, error-free mode, overlapping errors corrected together).
//   g_*    ctec_graph_pipeline: the extension to stages with several inputs
//          and outputs and to loops, with virtual errors; default graph
//          A->B, A->C, B->D, C->D, D->E, E->C, E->F.
//
// Both take one 32-bit word per cycle when *_in_ready is high and give one
// result per cycle when no correction is under way; late[] inputs mark the
// timing violations that a lowered supply voltage causes in each stage.
// See the two modules for timing and status signals.
module ctec_top
  import ctec_pkg::*;
#(
  parameter int unsigned N_STAGES = 5,
  parameter int unsigned G_STAGES = 6,
  parameter int unsigned HALF     = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  // linear pipeline
  input  logic                lin_in_valid,
  input  logic [2*HALF-1:0]   lin_in_data,
  output logic                lin_in_ready,
  input  logic [N_STAGES-1:0] lin_late,
  output logic                lin_out_valid,
  output logic [2*HALF-1:0]   lin_out_data,
  output logic [N_STAGES-1:0] lin_err,
  output logic [N_STAGES-1:0] lin_cg,
  output logic [N_STAGES-1:0] lin_ef,
  output logic [N_STAGES-1:0] lin_gated,
  output logic [N_STAGES-1:0] lin_absorb,
  output logic                lin_stall,
  // general-graph pipeline
  input  logic                g_in_valid,
  input  logic [2*HALF-1:0]   g_in_data,
  output logic                g_in_ready,
  input  logic [G_STAGES-1:0] g_late,
  output logic                g_out_valid,
  output logic                g_out_fresh,
  output logic [2*HALF-1:0]   g_out_data,
  output logic [G_STAGES-1:0] g_err,
  output logic [G_STAGES-1:0] g_ef,
  output logic [G_STAGES-1:0] g_fire,
  output logic [G_STAGES-1:0] g_ve,
  output logic [G_STAGES-1:0] g_absorb,
  output logic                g_stall
);

  ctec_pipeline #(.N_STAGES(N_STAGES), .HALF(HALF)) u_linear (
    .clk, .rst_n,
    .in_valid (lin_in_valid), .in_data (lin_in_data), .in_ready (lin_in_ready),
    .late     (lin_late),
    .out_valid(lin_out_valid), .out_data(lin_out_data),
    .err      (lin_err), .cg(lin_cg), .ef(lin_ef), .gated(lin_gated),
    .absorb   (lin_absorb), .stall(lin_stall)
  );

  ctec_graph_pipeline #(.N_STAGES(G_STAGES), .HALF(HALF)) u_graph (
    .clk, .rst_n,
    .in_valid (g_in_valid), .in_data (g_in_data), .in_ready (g_in_ready),
    .late     (g_late),
    .out_valid(g_out_valid), .out_fresh(g_out_fresh), .out_data(g_out_data),
    .err      (g_err), .ef(g_ef), .fire(g_fire), .ve(g_ve),
    .absorb   (g_absorb), .stall(g_stall)
  );

endmodule
