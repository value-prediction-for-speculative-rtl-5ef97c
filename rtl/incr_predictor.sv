// incr_predictor: increment value predictor for loop-trace outputs.
//
// The predictor guesses the value a storage location (here a register) will
// hold at the end of a loop trace as the value it held when the trace began
// plus an increment learnt from earlier runs of the same trace. The increment
// is the end value minus the start value; the one used for prediction is
// replaced only when the same new increment has been seen in two runs in a
// row. Because the increment is taken between the start and end of one
// trace, writes by other paths of the loop (other traces) do not disturb it,
// which is where it beats a per-instruction stride predictor. All of this
// follows the increment predictor as proposed for speculative multithreaded
// processors. The 3-bit up/down saturating confidence counter is the one the
// hybrid predictor uses to choose between its components.
//
// Table: ENTRIES direct-mapped, untagged entries of {predicted increment,
// last increment, confidence}. Index formation is outside (trace_index).
// This design's own choices: 16-bit signed stored increments (two per entry,
// 4 bytes, which is what 4096 entries in a 16-KB budget leave), an increment
// that does not fit in 16 bits is never promoted to the predicted one, and
// the table is cleared by a walk over all entries after reset.
//
// Timing:
//   * After reset the table is cleared one entry per cycle; ready rises
//     after ENTRIES cycles. Requests before ready are ignored.
//   * Predict: pred_req with pred_idx and pred_base (start-of-trace value,
//     itself possibly predicted) in cycle t; pred_vld, pred_val and
//     pred_conf in cycle t+1.
//   * Update: upd_req with upd_idx, upd_base and upd_actual (value at the
//     end of the trace) in cycle t; the entry is written at the end of
//     cycle t; upd_vld and upd_hit (whether the table, as it was, predicted
//     upd_actual) in cycle t+1. One update per cycle, fully pipelined.
//   * A predict and an update to the same entry in the same cycle: the
//     predict sees the entry as it was before the update.
module incr_predictor
  import vp_pkg::*;
#(
  parameter int unsigned ENTRIES = 4096,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             ready,

  input  logic             pred_req,
  input  logic [IDX_W-1:0] pred_idx,
  input  val_t             pred_base,
  output logic             pred_vld,
  output val_t             pred_val,
  output conf_t            pred_conf,

  input  logic             upd_req,
  input  logic [IDX_W-1:0] upd_idx,
  input  val_t             upd_base,
  input  val_t             upd_actual,
  output logic             upd_vld,
  output logic             upd_hit
);

  typedef struct packed {
    inc_t  pinc;   // increment used for prediction
    inc_t  linc;   // increment seen in the last run
    conf_t conf;   // confidence counter
  } entry_t;

  entry_t tbl [ENTRIES];

  // ---- clear walk after reset ----
  logic             clearing;
  logic [IDX_W-1:0] clr_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b1;
      clr_idx  <= '0;
    end else if (clearing) begin
      clr_idx <= clr_idx + 1'b1;
      if (clr_idx == IDX_W'(ENTRIES - 1)) clearing <= 1'b0;
    end
  end

  assign ready = ~clearing;

  // ---- update: read-modify-write in one cycle ----
  entry_t upd_old, upd_new;
  val_t   upd_diff;
  logic   upd_ok;

  always_comb begin
    upd_old  = tbl[upd_idx];
    upd_diff = upd_actual - upd_base;
    upd_ok   = (upd_base + inc_sext(upd_old.pinc)) == upd_actual;
    upd_new.linc = upd_diff[INC_W-1:0];
    upd_new.pinc = (inc_fits(upd_diff) && upd_diff[INC_W-1:0] == upd_old.linc)
                   ? upd_diff[INC_W-1:0] : upd_old.pinc;
    upd_new.conf = conf_step(upd_old.conf, upd_ok);
  end

  always_ff @(posedge clk) begin
    if (clearing)     tbl[clr_idx] <= '0;
    else if (upd_req) tbl[upd_idx] <= upd_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd_vld <= 1'b0;
      upd_hit <= 1'b0;
    end else begin
      upd_vld <= upd_req & ~clearing;
      upd_hit <= upd_ok;
    end
  end

  // ---- predict ----
  inc_t  prd_pinc;
  conf_t prd_conf;
  assign prd_pinc = tbl[pred_idx].pinc;
  assign prd_conf = tbl[pred_idx].conf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pred_vld  <= 1'b0;
      pred_val  <= '0;
      pred_conf <= '0;
    end else begin
      pred_vld  <= pred_req & ~clearing;
      pred_val  <= pred_base + inc_sext(prd_pinc);
      pred_conf <= prd_conf;
    end
  end

endmodule
