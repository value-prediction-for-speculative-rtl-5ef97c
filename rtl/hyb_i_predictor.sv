// hyb_i_predictor: hybrid increment-context (HYB-I) trace value predictor.
//
// An increment predictor and a trace-indexed context-based predictor are
// looked up in parallel with the same (trace, register) index. Each keeps a
// 3-bit up/down saturating confidence counter per entry, counted up when its
// own prediction for that entry would have been right and down when it
// would have been wrong; the prediction of the component with the higher
// counter is delivered. The structure, the 3-bit counters and the 1024
// entries per table follow the evaluated HYB-I configuration. Ties going to
// the increment component is this design's own choice.
//
// Timing: as the components. ready rises ENTRIES cycles after reset. A
// predict request in cycle t gives pred_vld/pred_val/pred_src in cycle t+1.
// An update in cycle t trains both components at the end of cycle t and
// reports in cycle t+1 whether each of them had predicted upd_actual.
module hyb_i_predictor
  import vp_pkg::*;
#(
  parameter int unsigned ENTRIES = 1024,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             ready,

  input  logic             pred_req,
  input  logic [IDX_W-1:0] pred_idx,
  input  val_t             pred_base,     // register value at trace start
  output logic             pred_vld,
  output val_t             pred_val,
  output pred_src_e        pred_src,

  input  logic             upd_req,
  input  logic [IDX_W-1:0] upd_idx,
  input  val_t             upd_base,      // register value at trace start
  input  val_t             upd_actual,    // register value at trace end
  output logic             upd_vld,
  output logic             upd_incr_hit,
  output logic             upd_fcm_hit
);

  logic  i_ready, f_ready;
  logic  i_pvld, f_pvld;
  val_t  i_pval, f_pval;
  conf_t i_pconf, f_pconf;
  logic  i_uvld, f_uvld;

  incr_predictor #(.ENTRIES(ENTRIES)) u_incr (
    .clk, .rst_n, .ready(i_ready),
    .pred_req, .pred_idx, .pred_base,
    .pred_vld(i_pvld), .pred_val(i_pval), .pred_conf(i_pconf),
    .upd_req, .upd_idx, .upd_base, .upd_actual,
    .upd_vld(i_uvld), .upd_hit(upd_incr_hit)
  );

  fcm_predictor #(.ENTRIES(ENTRIES)) u_fcm (
    .clk, .rst_n, .ready(f_ready),
    .pred_req, .pred_idx,
    .pred_vld(f_pvld), .pred_val(f_pval), .pred_conf(f_pconf),
    .upd_req, .upd_idx, .upd_actual,
    .upd_vld(f_uvld), .upd_hit(upd_fcm_hit)
  );

  assign ready    = i_ready & f_ready;
  assign pred_vld = i_pvld & f_pvld;
  assign upd_vld  = i_uvld & f_uvld;
  assign pred_src = (f_pconf > i_pconf) ? SRC_FCM : SRC_INCR;
  assign pred_val = (pred_src == SRC_FCM) ? f_pval : i_pval;

endmodule
