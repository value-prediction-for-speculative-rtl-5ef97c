// tb_fcm_predictor: self-checking test of the trace-indexed context-based
// predictor.
//
// Checks that ready rises ENTRIES cycles after reset, then drives random
// prediction and update traffic from simulated (trace, register) streams
// whose values repeat with periods of 1 to 6, with occasional noise. A
// reference model in the testbench keeps the three-value histories, the
// confidence counters and the prediction table, and computes the table
// index independently (shift by 0/2/4, xor, then per-bit parity fold). It
// checks every prediction, confidence and hit flag one cycle after its
// request, and that repeating sequences are eventually predicted.
module tb_fcm_predictor;
  import vp_pkg::*;

  localparam int unsigned ENTRIES = 1024;
  localparam int unsigned IDX_W   = $clog2(ENTRIES);
  localparam int unsigned NSTR    = 10;

  int checks = 0, failures = 0;
  int n_hit = 0, n_upd = 0, n_conf_max = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             ready;
  logic             pred_req = 1'b0, upd_req = 1'b0;
  logic [IDX_W-1:0] pred_idx = '0, upd_idx = '0;
  val_t             upd_actual = '0;
  logic             pred_vld, upd_vld, upd_hit;
  val_t             pred_val;
  conf_t            pred_conf;

  fcm_predictor #(.ENTRIES(ENTRIES)) dut (.*);

  val_t m_h0 [ENTRIES], m_h1 [ENTRIES], m_h2 [ENTRIES];
  int   m_conf [ENTRIES];
  val_t m_vpt [ENTRIES];

  logic [IDX_W-1:0] s_idx [NSTR];
  int               s_per [NSTR];
  int               s_pos [NSTR];
  val_t             s_seq [NSTR][6];

  logic e_pred = 0, e_upd = 0, e_hit;
  val_t e_pval; int e_pconf;

  function automatic int ref_hash(val_t a, val_t b, val_t c);
    logic [VAL_W+3:0] m;
    int r;
    m = {4'b0, a} ^ ({4'b0, b} << 2) ^ ({4'b0, c} << 4);
    r = 0;
    for (int i = 0; i < VAL_W + 4; i++) if (m[i]) r = r ^ (1 << (i % IDX_W));
    return r;
  endfunction

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    int cyc;
    for (int i = 0; i < ENTRIES; i++) begin
      m_h0[i] = '0; m_h1[i] = '0; m_h2[i] = '0; m_conf[i] = 0; m_vpt[i] = '0;
    end
    for (int s = 0; s < NSTR; s++) begin
      s_idx[s] = IDX_W'($urandom);
      for (int t = 0; t < s; t++) if (s_idx[t] == s_idx[s]) s_idx[s] = s_idx[s] + 1'b1;
      s_per[s] = 1 + (s % 6);
      s_pos[s] = 0;
      for (int k = 0; k < 6; k++) s_seq[s][k] = {$urandom, $urandom};
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cyc = 0;
    while (!ready) begin @(negedge clk); cyc++; end
    chk("cycles to ready", cyc, ENTRIES);

    for (int n = 0; n < 20000; n++) begin
      int ps, us, h;
      val_t v;
      chk("pred_vld", pred_vld, e_pred);
      if (e_pred) begin
        chk("pred_val", pred_val, e_pval);
        chk("pred_conf", pred_conf, e_pconf);
      end
      chk("upd_vld", upd_vld, e_upd);
      if (e_upd) chk("upd_hit", upd_hit, e_hit);

      pred_req = ($urandom_range(0, 3) != 0);
      upd_req  = ($urandom_range(0, 2) != 0);
      ps = $urandom_range(0, NSTR - 1);
      us = $urandom_range(0, 3) == 0 ? ps : $urandom_range(0, NSTR - 1);
      pred_idx = s_idx[ps];
      e_pred = pred_req;
      if (pred_req) begin
        e_pval  = m_vpt[ref_hash(m_h0[pred_idx], m_h1[pred_idx], m_h2[pred_idx])];
        e_pconf = m_conf[pred_idx];
      end
      e_upd = upd_req;
      if (upd_req) begin
        upd_idx = s_idx[us];
        v = ($urandom_range(0, 40) == 0) ? val_t'({$urandom, $urandom}) : s_seq[us][s_pos[us]];
        s_pos[us] = (s_pos[us] + 1) % s_per[us];
        upd_actual = v;
        h = ref_hash(m_h0[upd_idx], m_h1[upd_idx], m_h2[upd_idx]);
        e_hit = (m_vpt[h] == v);
        m_vpt[h] = v;
        m_h2[upd_idx] = m_h1[upd_idx];
        m_h1[upd_idx] = m_h0[upd_idx];
        m_h0[upd_idx] = v;
        if (e_hit) m_conf[upd_idx] = (m_conf[upd_idx] == 7) ? 7 : m_conf[upd_idx] + 1;
        else       m_conf[upd_idx] = (m_conf[upd_idx] == 0) ? 0 : m_conf[upd_idx] - 1;
        if (m_conf[upd_idx] == 7) n_conf_max++;
        if (e_hit) n_hit++;
        n_upd++;
      end
      @(negedge clk);
    end
    $display("updates=%0d hits=%0d saturated=%0d", n_upd, n_hit, n_conf_max);
    // repeating sequences must be learnt: most updates are hits
    checks++; if (n_hit * 2 < n_upd) begin failures++; $display("FAIL hit rate too low"); end
    checks++; if (n_conf_max == 0) begin failures++; $display("FAIL confidence never saturated"); end
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
