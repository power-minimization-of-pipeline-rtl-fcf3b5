// ctec_graph_pipeline: 1-cycle timing-error correction for a pipeline whose
// stages form a general graph: stages with several input stages (fan-in),
// several output stages (fan-out) and loops.
//
// Every stage has the same main/shadow register (razor_reg) and c6288 logic
// (mult16_stage) as the linear pipeline; a stage with several inputs
// multiplies the sum of its input words (and the primary input word, for the
// source stage), and its valid bit is the OR of theirs.
//
// Per link i -> k the flag cons[i][k] records that k has already used the
// value now in i's main latch. The CG signal of a link is
//   cg_link[i][k] = err[i] | cons[i][k]
// (wrong data, or a repeat for that consumer). A stage fires, i.e. takes a
// new result from its logic, when none of its input links carries CG and it
// has room. When a stage k does not fire, every input stage of k whose value
// k has not used must keep that value for one more cycle: this is the virtual
// error (VE) sent back to the input stages of a stage that receives CG. A
// stage with a VE that still fires behaves as in a restore cycle: main keeps
// its value and the shadow takes the new result, so the stage enters
// error-free mode holding one extra item, and nothing is lost at the fan-in.
// A real error is corrected as in the linear pipeline: main <- shadow in the
// next cycle while the shadow takes the new result.
// A stage in error-free mode that does not fire while its main value has been
// used by all consumers drains its extra item (the CG wave stops there);
// this is also what stops a CG wave that travels around a loop.
//
// Stall: the output port is one more consumer of the sink stage; a cycle in
// which it gets no new result is an output bubble. A counter of bubbles not
// yet matched by an input cycle in which the source stage did not fire drives
// a one-cycle CG on the primary input link (in_ready = 0), which travels
// into the graph and is taken up by a stage in error-free mode.
//
// Room, to avoid loops of combinational logic: a stage in error-free mode
// fires only if each consumer has already used its main value or is certain
// to fire (no CG in and not in error-free mode, or in error-free mode with a
// fully used main value). This is this design's rule; it can cost an extra
// bubble but never loses data.
//
// Timing: late[j] makes stage j's main latch miss the result at the next edge
// (only on a normal capture). Graph: ADJ[i*N_STAGES + k] = 1 for a link
// i -> k; SRC is the stage fed by the primary input, SINK the stage whose
// main latch is the output. The default graph is A->B, A->C, B->D, C->D,
// D->E, E->C, E->F (fan-out at A and E, fan-in at C and D, loop
// C->D->E->C, stages before, in and after the loop), stages A..F = 0..5,
// source A, sink F. The VE rule and the wave-stopping role of VE follow the
// described method; per-link tracking, the stall counter and the room rule
// are this design's choices.
module ctec_graph_pipeline
  import ctec_pkg::*;
#(
  parameter int unsigned                  N_STAGES = 6,
  parameter int unsigned                  HALF     = 16,
  parameter logic [N_STAGES*N_STAGES-1:0] ADJ      = 36'h0_2440_8206,
  parameter int unsigned                  SRC      = 0,
  parameter int unsigned                  SINK     = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [2*HALF-1:0]   in_data,
  output logic                in_ready,
  input  logic [N_STAGES-1:0] late,
  output logic                out_valid,   // new result with valid bit set
  output logic                out_fresh,   // new result (valid or bubble word)
  output logic [2*HALF-1:0]   out_data,
  output logic [N_STAGES-1:0] err,
  output logic [N_STAGES-1:0] ef,
  output logic [N_STAGES-1:0] fire,
  output logic [N_STAGES-1:0] ve,
  output logic [N_STAGES-1:0] absorb,
  output logic                stall
);

  localparam int unsigned W  = 2 * HALF;
  localparam int unsigned PW = $clog2(4 * N_STAGES + 4) + 1;

  function automatic logic link(input int unsigned i, input int unsigned k);
    return ADJ[i*N_STAGES + k];
  endfunction

  logic [W:0]          main_q  [N_STAGES];
  logic [W:0]          stage_d [N_STAGES];
  logic [N_STAGES-1:0] mismatch, ef_q, cg_in, gfire, room, main_free, advance;
  logic [N_STAGES-1:0] cons_q  [N_STAGES];   // cons_q[i][k]: k used i's main
  logic                cons_out_q, fire_out;
  logic                in_cg;
  logic signed [PW-1:0] pend_q;
  reg_op_e             op      [N_STAGES];

  // ---------------- stage logic and registers ----------------
  for (genvar j = 0; j < N_STAGES; j++) begin : g_stage
    logic [W-1:0] sum;
    logic         vin;
    logic [W-1:0] prod;

    always_comb begin
      sum = (j == SRC) ? in_data  : '0;
      vin = (j == SRC) ? in_valid : 1'b0;
      for (int unsigned i = 0; i < N_STAGES; i++)
        if (link(i, j)) begin
          sum = sum + main_q[i][W-1:0];
          vin = vin | main_q[i][W];
        end
    end

    mult16_stage #(.HALF(HALF)) u_logic (.x(sum), .y(prod));
    assign stage_d[j] = {vin, prod};

    razor_reg #(.WIDTH(W + 1)) u_reg (
      .clk, .rst_n, .op(op[j]), .late(late[j]), .d(stage_d[j]),
      .q(main_q[j]), .shadow(), .mismatch(mismatch[j])
    );
  end

  assign err   = mismatch & ~ef_q;
  assign ef    = ef_q;
  assign in_cg = (pend_q > 0);

  // ---------------- firing, VE and room ----------------
  always_comb begin
    // CG into each stage
    for (int unsigned k = 0; k < N_STAGES; k++) begin
      cg_in[k] = (k == SRC) ? in_cg : 1'b0;
      for (int unsigned i = 0; i < N_STAGES; i++)
        if (link(i, k) && (err[i] || cons_q[i][k])) cg_in[k] = 1'b1;
    end
    // stages certain to fire
    for (int unsigned k = 0; k < N_STAGES; k++) begin
      logic used;
      used = (k == SINK) ? cons_out_q : 1'b1;
      for (int unsigned m = 0; m < N_STAGES; m++)
        if (link(k, m) && !cons_q[k][m]) used = 1'b0;
      gfire[k] = !cg_in[k] && (!ef_q[k] || used);
    end
    // room and firing
    for (int unsigned j = 0; j < N_STAGES; j++) begin
      room[j] = 1'b1;
      if (ef_q[j]) begin
        for (int unsigned k = 0; k < N_STAGES; k++)
          if (link(j, k) && !cons_q[j][k] && !gfire[k]) room[j] = 1'b0;
      end
      fire[j] = !cg_in[j] && room[j];
    end
    fire_out = !err[SINK] && !cons_out_q;
    // main value used by every consumer after this edge (else: VE)
    for (int unsigned j = 0; j < N_STAGES; j++) begin
      main_free[j] = (j == SINK) ? (cons_out_q || fire_out) : 1'b1;
      for (int unsigned k = 0; k < N_STAGES; k++)
        if (link(j, k) && !cons_q[j][k] && !fire[k]) main_free[j] = 1'b0;
      ve[j] = !err[j] && !main_free[j] && fire[j];
    end
    // register commands
    for (int unsigned j = 0; j < N_STAGES; j++) begin
      absorb[j]  = 1'b0;
      advance[j] = 1'b0;
      if (err[j]) begin
        op[j]      = fire[j] ? REG_RESTORE : REG_DRAIN;   // correct main
        advance[j] = 1'b1;
      end else if (!ef_q[j]) begin
        if (fire[j] && main_free[j]) begin
          op[j]      = REG_CAPTURE;
          advance[j] = 1'b1;
        end else if (fire[j]) begin
          op[j] = REG_RESTORE;    // virtual error: main == shadow keeps its value
        end else begin
          op[j] = REG_HOLD;       // clock gated
        end
      end else begin
        if (main_free[j]) begin
          op[j]      = fire[j] ? REG_RESTORE : REG_DRAIN;
          advance[j] = 1'b1;
          absorb[j]  = !fire[j];
        end else begin
          op[j] = REG_HOLD;
        end
      end
    end
  end

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ef_q       <= '0;
      cons_out_q <= 1'b0;
      pend_q     <= '0;
      for (int unsigned j = 0; j < N_STAGES; j++) cons_q[j] <= '0;
    end else begin
      for (int unsigned j = 0; j < N_STAGES; j++) begin
        unique case (op[j])
          REG_RESTORE: ef_q[j] <= 1'b1;
          REG_DRAIN:   ef_q[j] <= 1'b0;
          default:     ;
        endcase
        if (advance[j]) cons_q[j] <= '0;
        else            cons_q[j] <= cons_q[j] | fire;
      end
      if (advance[SINK]) cons_out_q <= 1'b0;
      else               cons_out_q <= cons_out_q | fire_out;
      pend_q <= pend_q + PW'(!fire_out) - PW'(!fire[SRC]);
    end
  end

  assign in_ready  = fire[SRC];
  assign stall     = in_cg;
  assign out_fresh = fire_out;
  assign out_valid = fire_out && main_q[SINK][W];
  assign out_data  = main_q[SINK][W-1:0];

endmodule
