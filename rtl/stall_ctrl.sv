// stall_ctrl: pipeline stall issued when a CG wave reaches the last stage.
//
// Every timing error leaves one stage in error-free mode holding one extra
// data item, and sends one CG wave (a bubble) toward the output. Waves that
// meet an error-free stage stop there and take its extra item, so when a wave
// leaves the last stage exactly one extra item is still held somewhere
// upstream. One cycle later this block issues a one-cycle stall: the most
// upstream stage that is in error-free mode and is not receiving CG in that
// cycle drains its extra item (main <- shadow) and returns to normal mode,
// and every stage upstream of it, and the pipeline input, is held. Stages
// downstream keep running. The cost of one correction is thus the single
// bubble at the output and the single input cycle lost to the stall.
//
// The stall follows the described rule ('stall when CG reaches the last
// stage'); which stage is drained, and the one-cycle delay, are this design's
// choices. Index 0 is the first (input) stage.
//
// Ports: last_cg is the CG output of the last stage; ef, err and cg_in are
// the per-stage error-free flags, error flags and CG inputs of the current
// cycle. stall is a
// register; freeze, drain and in_ready follow from it combinationally.
module stall_ctrl #(
  parameter int unsigned N_STAGES = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                last_cg,
  input  logic [N_STAGES-1:0] ef,
  input  logic [N_STAGES-1:0] err,
  input  logic [N_STAGES-1:0] cg_in,
  output logic                stall,
  output logic [N_STAGES-1:0] freeze,
  output logic [N_STAGES-1:0] drain,
  output logic                in_ready
);

  logic stall_q;
  logic found;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stall_q <= 1'b0;
    else        stall_q <= last_cg;
  end

  always_comb begin
    freeze = '0;
    drain  = '0;
    found  = 1'b0;
    if (stall_q) begin
      for (int unsigned j = 0; j < N_STAGES; j++) begin
        if (!found) begin
          if ((ef[j] || err[j]) && !cg_in[j]) begin
            drain[j] = 1'b1;
            found    = 1'b1;
          end else begin
            freeze[j] = 1'b1;
          end
        end
      end
    end
  end

  assign stall    = stall_q;
  assign in_ready = ~stall_q;

  // A stall always finds a stage holding an extra item.
  a_stall_drains : assert property (@(posedge clk) disable iff (!rst_n)
    stall_q |-> (drain != '0));

endmodule
