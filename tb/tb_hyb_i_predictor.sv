// tb_hyb_i_predictor: self-checking test of the hybrid increment-context
// predictor.
//
// Random prediction and update traffic from simulated (trace, register)
// streams of three kinds: values that grow by a fixed increment (the
// increment component's case), values that repeat a short sequence with no
// common increment (the context component's case), and values that switch
// between the two behaviours. Reference models of both components give the
// expected delivered value, the chosen component and both hit flags one
// cycle after each request. Counts how often each component was chosen,
// including confidence ties, and fails if one never happened.
module tb_hyb_i_predictor;
  import vp_pkg::*;
  import vp_ref_pkg::*;

  localparam int unsigned ENTRIES = 1024;
  localparam int unsigned IDX_W   = $clog2(ENTRIES);
  localparam int unsigned NSTR    = 12;

  int checks = 0, failures = 0;
  int n_incr = 0, n_fcm = 0, n_tie = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             ready;
  logic             pred_req = 1'b0, upd_req = 1'b0;
  logic [IDX_W-1:0] pred_idx = '0, upd_idx = '0;
  val_t             pred_base = '0, upd_base = '0, upd_actual = '0;
  logic             pred_vld, upd_vld, upd_incr_hit, upd_fcm_hit;
  val_t             pred_val;
  pred_src_e        pred_src;

  hyb_i_predictor #(.ENTRIES(ENTRIES)) dut (.*);

  incr_ref mi;
  fcm_ref  mf;

  logic [IDX_W-1:0] s_idx [NSTR];
  longint           s_val [NSTR];
  longint           s_inc [NSTR];
  longint           s_seq [NSTR][4];
  int               s_pos [NSTR];
  int               s_kind[NSTR];

  logic e_pred = 0, e_upd = 0, e_ih, e_fh;
  longint e_pval; pred_src_e e_src;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  function automatic longint next_val(int s);
    int k = s_kind[s];
    if (k == 2) k = ((s_pos[s] / 50) % 2);   // switches behaviour
    s_pos[s]++;
    if (k == 0) return s_val[s] + s_inc[s];
    return s_seq[s][s_pos[s] % 3];
  endfunction

  initial begin
    int cyc;
    mi = new(ENTRIES);
    mf = new(ENTRIES);
    for (int s = 0; s < NSTR; s++) begin
      s_idx[s] = IDX_W'($urandom);
      for (int t = 0; t < s; t++) if (s_idx[t] == s_idx[s]) s_idx[s] = s_idx[s] + 1'b1;
      s_kind[s] = s % 3;
      s_inc[s]  = longint'($urandom_range(1, 40));
      s_val[s]  = longint'($urandom);
      s_pos[s]  = 0;
      for (int k = 0; k < 4; k++) s_seq[s][k] = {$urandom, $urandom};
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cyc = 0;
    while (!ready) begin @(negedge clk); cyc++; end
    chk("cycles to ready", cyc, ENTRIES);

    for (int n = 0; n < 20000; n++) begin
      int ps, us, pi, ui;
      longint nv;
      chk("pred_vld", pred_vld, e_pred);
      if (e_pred) begin
        chk("pred_val", pred_val, e_pval);
        chk("pred_src", pred_src, e_src);
      end
      chk("upd_vld", upd_vld, e_upd);
      if (e_upd) begin
        chk("upd_incr_hit", upd_incr_hit, e_ih);
        chk("upd_fcm_hit", upd_fcm_hit, e_fh);
      end

      pred_req = ($urandom_range(0, 3) != 0);
      upd_req  = ($urandom_range(0, 2) != 0);
      ps = $urandom_range(0, NSTR - 1);
      us = $urandom_range(0, NSTR - 1);
      pi = int'(s_idx[ps]);
      pred_idx  = s_idx[ps];
      pred_base = val_t'(s_val[ps]);
      e_pred = pred_req;
      if (pred_req) begin
        if (mf.conf[pi] > mi.conf[pi]) begin
          e_src = SRC_FCM; e_pval = mf.predict(pi); n_fcm++;
        end else begin
          e_src = SRC_INCR; e_pval = mi.predict(pi, s_val[ps]); n_incr++;
          if (mf.conf[pi] == mi.conf[pi]) n_tie++;
        end
      end
      e_upd = upd_req;
      if (upd_req) begin
        ui = int'(s_idx[us]);
        nv = next_val(us);
        upd_idx    = s_idx[us];
        upd_base   = val_t'(s_val[us]);
        upd_actual = val_t'(nv);
        e_ih = mi.update(ui, s_val[us], nv);
        e_fh = mf.update(ui, nv);
        s_val[us] = nv;
      end
      @(negedge clk);
    end
    $display("chosen: incr=%0d (ties %0d) fcm=%0d", n_incr, n_tie, n_fcm);
    checks++; if (n_fcm == 0)  begin failures++; $display("FAIL context never chosen"); end
    checks++; if (n_incr - n_tie == 0) begin failures++; $display("FAIL increment never won outright"); end
    checks++; if (n_tie == 0)  begin failures++; $display("FAIL no tie"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
