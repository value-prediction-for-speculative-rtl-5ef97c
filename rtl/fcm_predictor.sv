// fcm_predictor: trace-indexed context-based (finite context method) value
// predictor, the context half of the hybrid increment-context predictor.
//
// A Value History Table (VHT) keeps, for every (trace, register) index, the
// last three values that register held at the end of that trace. The three
// values, shifted left by 0, 2 and 4 bits (most recent unshifted) and
// xor-ed together, index a Value Prediction Table (VPT) that holds the value
// that followed that same history the last time it was seen. Because the
// VHT is looked up by trace, each trace keeps its own value sequence. The
// history depth, the shifts, the xor, equal entry counts in both tables and
// 1024 entries per table follow the evaluated configuration.
//
// This design's own choices: the shift-xor result (VAL_W+4 bits) is
// xor-folded in IDX_W-bit slices to form the VPT index; the 3-bit confidence
// counter the hybrid chooser reads sits in the VHT entry; tables are
// untagged and cleared by a walk over all entries after reset.
//
// Timing:
//   * ready rises ENTRIES cycles after reset; earlier requests are ignored.
//   * Predict: pred_req/pred_idx in cycle t; pred_vld, pred_val, pred_conf
//     in cycle t+1 (VHT read, hash and VPT read in one cycle).
//   * Update: upd_req/upd_idx/upd_actual in cycle t; the VPT entry of the
//     old history gets upd_actual, the history shifts it in, both at the end
//     of cycle t; upd_vld/upd_hit in cycle t+1. One update per cycle.
//   * A predict in the same cycle as an update sees the tables before it.
module fcm_predictor
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
  output logic             pred_vld,
  output val_t             pred_val,
  output conf_t            pred_conf,

  input  logic             upd_req,
  input  logic [IDX_W-1:0] upd_idx,
  input  val_t             upd_actual,
  output logic             upd_vld,
  output logic             upd_hit
);

  typedef struct packed {
    val_t  [FCM_ORDER-1:0] hist;  // hist[0] most recent
    conf_t                 conf;
  } vht_t;

  vht_t vht [ENTRIES];
  val_t vpt [ENTRIES];

  // Shift-xor of the history, folded to a VPT index.
  function automatic logic [IDX_W-1:0] ctx_hash(val_t [FCM_ORDER-1:0] h);
    localparam int unsigned MW = VAL_W + 2 * (FCM_ORDER - 1);
    localparam int unsigned NS = (MW + IDX_W - 1) / IDX_W;
    logic [NS*IDX_W-1:0] m;
    logic [IDX_W-1:0]    r;
    m = '0;
    for (int unsigned k = 0; k < FCM_ORDER; k++)
      m = m ^ ((NS*IDX_W)'(h[k]) << (2 * k));
    r = '0;
    for (int unsigned s = 0; s < NS; s++)
      r = r ^ m[s*IDX_W +: IDX_W];
    return r;
  endfunction

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

  // ---- update ----
  vht_t             u_old, u_new;
  logic [IDX_W-1:0] u_vidx;
  logic             u_ok;

  always_comb begin
    u_old  = vht[upd_idx];
    u_vidx = ctx_hash(u_old.hist);
    u_ok   = vpt[u_vidx] == upd_actual;
    u_new.hist = {u_old.hist[FCM_ORDER-2:0], upd_actual};
    u_new.conf = conf_step(u_old.conf, u_ok);
  end

  always_ff @(posedge clk) begin
    if (clearing) begin
      vht[clr_idx] <= '0;
      vpt[clr_idx] <= '0;
    end else if (upd_req) begin
      vht[upd_idx] <= u_new;
      vpt[u_vidx]  <= upd_actual;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd_vld <= 1'b0;
      upd_hit <= 1'b0;
    end else begin
      upd_vld <= upd_req & ~clearing;
      upd_hit <= u_ok;
    end
  end

  // ---- predict ----
  vht_t p_e;
  assign p_e = vht[pred_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pred_vld  <= 1'b0;
      pred_val  <= '0;
      pred_conf <= '0;
    end else begin
      pred_vld  <= pred_req & ~clearing;
      pred_val  <= vpt[ctx_hash(p_e.hist)];
      pred_conf <= p_e.conf;
    end
  end

endmodule
