// ctec_pkg: types shared by the 1-cycle timing-error-correcting pipeline.
//
// reg_op_e is the command a stage controller gives its main/shadow register
// pair for the coming clock edge:
//   REG_HOLD    both latches keep their contents (the stage clock is gated)
//   REG_CAPTURE normal mode: both latches take the stage logic output; the
//               main latch may miss it when the stage logic is late
//   REG_RESTORE restore / error-free mode: main takes the shadow contents
//               while the shadow takes the new stage logic output
//   REG_DRAIN   main takes the shadow contents, shadow keeps its value (the
//               extra data item held by the stage is handed on, no new input)
package ctec_pkg;

  typedef enum logic [1:0] {
    REG_HOLD    = 2'd0,
    REG_CAPTURE = 2'd1,
    REG_RESTORE = 2'd2,
    REG_DRAIN   = 2'd3
  } reg_op_e;

endpackage
