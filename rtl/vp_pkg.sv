// vp_pkg: types, sizes and helper functions shared by the trace value
// predictors (increment, context-based and the hybrid of the two).
//
// Sizes that follow the predictor evaluation: 3 values of history in the
// context predictor, folded with 0-, 2- and 4-bit shifts; 3-bit up/down
// saturating confidence counters in the hybrid. The 64-bit register value
// (Alpha integer registers), the 16-bit stored increment, the 32-bit PC and
// the 16-bit branch-outcome vector are this design's own choices.
package vp_pkg;

  // Width of a predicted register value.
  localparam int unsigned VAL_W = 64;
  // Width of a stored increment (two per increment-table entry).
  localparam int unsigned INC_W = 16;
  // Width of the instruction address that starts a trace.
  localparam int unsigned PC_W  = 32;
  // Conditional-branch outcomes recorded per trace (oldest in bit 0).
  localparam int unsigned BR_W  = 16;
  // Architectural register identifier (32 integer + 32 FP registers).
  localparam int unsigned REG_W = 6;
  // Confidence counter width of the hybrid chooser.
  localparam int unsigned CONF_W = 3;
  // Values of history kept per operand by the context predictor.
  localparam int unsigned FCM_ORDER = 3;

  typedef logic [VAL_W-1:0]  val_t;
  typedef logic [INC_W-1:0]  inc_t;
  typedef logic [CONF_W-1:0] conf_t;

  // Which component supplied a hybrid prediction.
  typedef enum logic {SRC_INCR = 1'b0, SRC_FCM = 1'b1} pred_src_e;

  // 3-bit up/down saturating counter step: up on a correct prediction,
  // down on a wrong one.
  function automatic conf_t conf_step(conf_t c, logic correct);
    if (correct) return (c == '1) ? c : conf_t'(c + 1'b1);
    else         return (c == '0) ? c : conf_t'(c - 1'b1);
  endfunction

  // Sign-extend a stored increment to a full value.
  function automatic val_t inc_sext(inc_t i);
    return val_t'(signed'(i));
  endfunction

  // True when a full-width difference can be held in INC_W bits exactly.
  function automatic logic inc_fits(val_t d);
    return val_t'(signed'(d[INC_W-1:0])) == d;
  endfunction

endpackage
