// tb_incr_predictor: self-checking test of the increment predictor.
//
// Checks that ready rises ENTRIES cycles after reset, then runs random
// prediction and update traffic from a set of simulated (trace, register)
// streams, each with its own increment that changes now and then and is
// sometimes too large for a stored increment. A reference model kept in the
// testbench (predicted increment, last increment, 3-bit confidence per
// entry) gives the expected prediction, confidence and hit flag; every
// answer must come exactly one cycle after its request. Also counts that
// increments were promoted, held back by the twice-in-a-row rule, refused
// for size, and that a predict and an update met on one entry.
module tb_incr_predictor;
  import vp_pkg::*;

  localparam int unsigned ENTRIES = 4096;
  localparam int unsigned IDX_W   = $clog2(ENTRIES);
  localparam int unsigned NSTR    = 12;

  int checks = 0, failures = 0;
  int n_promote = 0, n_hold = 0, n_nofit = 0, n_collide = 0, n_hit = 0, n_upd = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             ready;
  logic             pred_req = 1'b0, upd_req = 1'b0;
  logic [IDX_W-1:0] pred_idx = '0, upd_idx = '0;
  val_t             pred_base = '0, upd_base = '0, upd_actual = '0;
  logic             pred_vld, upd_vld, upd_hit;
  val_t             pred_val;
  conf_t            pred_conf;

  incr_predictor #(.ENTRIES(ENTRIES)) dut (.*);

  // reference model
  longint m_pinc [ENTRIES];
  longint m_linc [ENTRIES];
  int     m_conf [ENTRIES];

  // streams
  logic [IDX_W-1:0] s_idx [NSTR];
  longint           s_inc [NSTR];
  longint           s_val [NSTR];

  // expectations for the next cycle
  logic   e_pred = 0, e_upd = 0;
  longint e_pval; int e_pconf; logic e_hit;

  function automatic longint trunc_inc(longint d);
    return longint'(signed'(d[INC_W-1:0]));
  endfunction

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  function automatic longint pick_inc();
    int r = $urandom_range(0, 9);
    if (r == 0) return longint'($urandom_range(0, 200000)) - 100000;  // often too wide
    return longint'($urandom_range(0, 64)) - 32;
  endfunction

  initial begin
    int cyc;
    for (int i = 0; i < ENTRIES; i++) begin m_pinc[i] = 0; m_linc[i] = 0; m_conf[i] = 0; end
    for (int s = 0; s < NSTR; s++) begin
      s_idx[s] = IDX_W'($urandom);
      for (int t = 0; t < s; t++) if (s_idx[t] == s_idx[s]) s_idx[s] = s_idx[s] + 1'b1;
      s_inc[s] = pick_inc();
      s_val[s] = longint'({$urandom, $urandom});
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // clear walk takes ENTRIES cycles
    cyc = 0;
    while (!ready) begin @(negedge clk); cyc++; end
    chk("cycles to ready", cyc, ENTRIES);

    for (int n = 0; n < 20000; n++) begin
      int ps, us;
      longint d, old_linc;
      // outputs of the previous cycle's requests
      chk("pred_vld", pred_vld, e_pred);
      if (e_pred) begin
        chk("pred_val", pred_val, e_pval);
        chk("pred_conf", pred_conf, e_pconf);
      end
      chk("upd_vld", upd_vld, e_upd);
      if (e_upd) chk("upd_hit", upd_hit, e_hit);

      // new requests
      pred_req = ($urandom_range(0, 3) != 0);
      upd_req  = ($urandom_range(0, 2) != 0);
      ps = $urandom_range(0, NSTR - 1);
      us = $urandom_range(0, 3) == 0 ? ps : $urandom_range(0, NSTR - 1);
      pred_idx  = s_idx[ps];
      pred_base = val_t'(s_val[ps]);
      e_pred = pred_req;
      if (pred_req) begin
        e_pval  = s_val[ps] + m_pinc[s_idx[ps]];
        e_pconf = m_conf[s_idx[ps]];
      end
      e_upd = upd_req;
      if (upd_req) begin
        if (pred_req && us == ps) n_collide++;
        if ($urandom_range(0, 60) == 0) s_inc[us] = pick_inc();
        upd_idx    = s_idx[us];
        upd_base   = val_t'(s_val[us]);
        d          = ($urandom_range(0, 15) == 0) ? longint'($urandom_range(0, 9)) - 5 : s_inc[us];
        upd_actual = val_t'(s_val[us] + d);
        e_hit      = (s_val[us] + m_pinc[upd_idx]) == s_val[us] + d;
        // model update
        old_linc = m_linc[upd_idx];
        if (d >= -32768 && d <= 32767) begin
          if (d == old_linc) begin
            if (m_pinc[upd_idx] != d) n_promote++;
            m_pinc[upd_idx] = d;
          end else n_hold++;
        end else n_nofit++;
        m_linc[upd_idx] = trunc_inc(d);
        if (e_hit) m_conf[upd_idx] = (m_conf[upd_idx] == 7) ? 7 : m_conf[upd_idx] + 1;
        else       m_conf[upd_idx] = (m_conf[upd_idx] == 0) ? 0 : m_conf[upd_idx] - 1;
        if (e_hit) n_hit++;
        n_upd++;
        s_val[us] = s_val[us] + d;
      end
      @(negedge clk);
    end
    $display("updates=%0d hits=%0d promotions=%0d held=%0d too_wide=%0d same_cycle=%0d",
             n_upd, n_hit, n_promote, n_hold, n_nofit, n_collide);
    checks++; if (n_promote == 0) begin failures++; $display("FAIL no promotion"); end
    checks++; if (n_hold == 0)    begin failures++; $display("FAIL no held increment"); end
    checks++; if (n_nofit == 0)   begin failures++; $display("FAIL no too-wide increment"); end
    checks++; if (n_collide == 0) begin failures++; $display("FAIL no same-cycle collision"); end
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
