// tb_cap_lane: one table size of the capacity-sweep testbench.
//
// Holds a hybrid increment-context predictor with ENTRIES entries per table
// and an increment predictor alone with 4*ENTRIES entries (the same ratio as
// the two 16-KB configurations), both fed by the trace-based index. The
// shared request stream comes in through the ports; reference models check
// every answer one cycle after its request. Counts predictions and correct
// predictions of each predictor for the accuracy report.
module tb_cap_lane
  import vp_pkg::*;
  import vp_ref_pkg::*;
#(
  parameter int unsigned ENTRIES = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             ready,
  input  logic             pred_req,
  input  logic [PC_W-1:0]  pred_pc,
  input  logic [BR_W-1:0]  pred_br,
  input  logic [REG_W-1:0] pred_reg,
  input  val_t             pred_base,
  input  val_t             pred_truth,     // value the trace will produce
  input  logic             upd_req,
  input  logic [PC_W-1:0]  upd_pc,
  input  logic [BR_W-1:0]  upd_br,
  input  logic [REG_W-1:0] upd_reg,
  input  val_t             upd_base,
  input  val_t             upd_actual,
  output int               checks,
  output int               failures,
  output int               n_pred,
  output int               hyb_ok,
  output int               incr_ok
);
  localparam int unsigned HW = $clog2(ENTRIES);
  localparam int unsigned IW = $clog2(4 * ENTRIES);

  logic [HW-1:0] hp_idx, hu_idx;
  logic [IW-1:0] ip_idx, iu_idx;
  trace_index #(.IDX_W(HW)) u_hp (.start_pc(pred_pc), .br_vec(pred_br), .reg_id(pred_reg), .idx(hp_idx));
  trace_index #(.IDX_W(HW)) u_hu (.start_pc(upd_pc),  .br_vec(upd_br),  .reg_id(upd_reg),  .idx(hu_idx));
  trace_index #(.IDX_W(IW)) u_ip (.start_pc(pred_pc), .br_vec(pred_br), .reg_id(pred_reg), .idx(ip_idx));
  trace_index #(.IDX_W(IW)) u_iu (.start_pc(upd_pc),  .br_vec(upd_br),  .reg_id(upd_reg),  .idx(iu_idx));

  logic      h_ready, i_ready, h_pvld, i_pvld, h_uvld, i_uvld, h_ih, h_fh, i_hit;
  val_t      h_pval, i_pval;
  pred_src_e h_src;
  conf_t     i_conf;

  hyb_i_predictor #(.ENTRIES(ENTRIES)) u_hyb (
    .clk, .rst_n, .ready(h_ready),
    .pred_req, .pred_idx(hp_idx), .pred_base,
    .pred_vld(h_pvld), .pred_val(h_pval), .pred_src(h_src),
    .upd_req, .upd_idx(hu_idx), .upd_base, .upd_actual,
    .upd_vld(h_uvld), .upd_incr_hit(h_ih), .upd_fcm_hit(h_fh));

  incr_predictor #(.ENTRIES(4 * ENTRIES)) u_incr (
    .clk, .rst_n, .ready(i_ready),
    .pred_req, .pred_idx(ip_idx), .pred_base,
    .pred_vld(i_pvld), .pred_val(i_pval), .pred_conf(i_conf),
    .upd_req, .upd_idx(iu_idx), .upd_base, .upd_actual,
    .upd_vld(i_uvld), .upd_hit(i_hit));

  assign ready = h_ready & i_ready;

  incr_ref hmi, imi;
  fcm_ref  hmf;
  initial begin
    hmi = new(ENTRIES);
    hmf = new(ENTRIES);
    imi = new(4 * ENTRIES);
    checks = 0; failures = 0; n_pred = 0; hyb_ok = 0; incr_ok = 0;
  end

  logic   e_pred = 1'b0;
  longint e_hval, e_ival, e_truth;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL [%0d entries] %s: got %0d expected %0d at %0t", ENTRIES, what, got, exp, $time);
    end
  endtask

  // Check at the falling edge the answers registered at the rising edge,
  // then work out the answers to the requests now on the inputs.
  always @(negedge clk) if (rst_n && ready) begin
    int hp, hu, ip, iu;
    if (e_pred) begin
      chk("hyb pred_val", h_pval, e_hval);
      chk("incr pred_val", i_pval, e_ival);
      n_pred++;
      if (e_hval == e_truth) hyb_ok++;
      if (e_ival == e_truth) incr_ok++;
    end
    chk("hyb pred_vld", h_pvld, e_pred);
    chk("incr pred_vld", i_pvld, e_pred);
    #1;
    e_pred = pred_req;
    if (pred_req) begin
      hp = ref_trace_index(HW, pred_pc, pred_br, pred_reg);
      ip = ref_trace_index(IW, pred_pc, pred_br, pred_reg);
      e_hval  = (hmf.conf[hp] > hmi.conf[hp]) ? hmf.predict(hp) : hmi.predict(hp, pred_base);
      e_ival  = imi.predict(ip, pred_base);
      e_truth = pred_truth;
    end
    if (upd_req) begin
      hu = ref_trace_index(HW, upd_pc, upd_br, upd_reg);
      iu = ref_trace_index(IW, upd_pc, upd_br, upd_reg);
      void'(hmi.update(hu, upd_base, upd_actual));
      void'(hmf.update(hu, upd_actual));
      void'(imi.update(iu, upd_base, upd_actual));
    end
  end
endmodule
