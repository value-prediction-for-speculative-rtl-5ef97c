// tb_csm_value_predictor_incr: end-to-end test of the trace output value
// prediction unit configured as the increment predictor alone (HYBRID=0,
// 4096 entries); same scenario and checks as tb_csm_value_predictor.
//
// Models a loop run by speculative threads on 4 thread units. Each thread
// runs one iteration (loop trace) along one of two paths, A or B, which give
// two traces with the same start address and different branch vectors.
// Four registers are predicted per iteration:
//   r1: +4 on path A, +100 on path B (the case where the increment taken per
//       trace beats a per-instruction stride);
//   r2: +8 on both paths;
//   r3: cycles through three unrelated values (context predictor's case);
//   r4: random (never predictable).
// When iteration k is spawned, each register's end value is predicted from
// its predicted start value, i.e. the prediction made for iteration k-1.
// When the oldest iteration completes it trains the unit with its real start
// and end values; if a register was mispredicted, the younger iterations in
// flight are predicted again from the corrected value. One prediction and
// one update are issued per cycle. Reference models give every expected
// answer and hit flag one cycle after the request. The test counts each
// mechanism and fails if one never happened: predictions from a predicted
// start value, correct predictions across a path switch, choices of each
// component, mispredictions with re-prediction, same-cycle predict and
// update, and the clear walk after reset.
module tb_csm_value_predictor_incr;
  import vp_pkg::*;
  import vp_ref_pkg::*;

  localparam bit          HYB     = 1'b0;
  localparam int unsigned ENTRIES = HYB ? 1024 : 4096;
  localparam int unsigned IW      = $clog2(ENTRIES);
  localparam int          NTU     = 4;       // thread units
  localparam int          NREG    = 4;
  localparam int          NITER   = 3000;
  localparam logic [31:0] LOOP_PC = 32'h0001_2a40;

  int checks = 0, failures = 0;
  int n_chain = 0, n_switch_ok = 0, n_src_incr = 0, n_src_fcm = 0;
  int n_miss = 0, n_repred = 0, n_same = 0, n_pred = 0, n_correct = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             ready;
  logic             pred_req = 0, upd_req = 0;
  logic [PC_W-1:0]  pred_pc = '0, upd_pc = '0;
  logic [BR_W-1:0]  pred_br = '0, upd_br = '0;
  logic [REG_W-1:0] pred_reg = '0, upd_reg = '0;
  val_t             pred_base = '0, upd_base = '0, upd_actual = '0;
  logic             pred_vld, upd_vld, upd_incr_hit, upd_fcm_hit;
  val_t             pred_val;
  pred_src_e        pred_src;

  csm_value_predictor #(.HYBRID(1'b0)) dut (.*);

  incr_ref mi;
  fcm_ref  mf;

  // ground truth per iteration
  longint act_end [NITER][NREG];
  bit     path_b  [NITER];
  // predictions per iteration
  longint prd_end [NITER][NREG];

  // expected answers for the previous cycle
  logic e_pred = 0, e_upd = 0, e_ih, e_fh;
  longint e_pval; pred_src_e e_src;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  function automatic logic [15:0] br_of(int k);
    return path_b[k] ? 16'h0002 : 16'h0001;
  endfunction

  function automatic longint start_val(int k, int r);
    if (k == 0) return 1000 * (r + 1);
    return act_end[k-1][r];
  endfunction

  // One cycle: check last cycle's answers, then drive this cycle's requests.
  // pk/pr: iteration and register to predict (pk < 0: none).
  // uk/ur: iteration and register to train (uk < 0: none).
  task automatic cycle(int pk, int pr, longint pbase, int uk, int ur);
    int pi, ui;
    chk("pred_vld", pred_vld, e_pred);
    if (e_pred) begin
      chk("pred_val", pred_val, e_pval);
      chk("pred_src", pred_src, e_src);
    end
    chk("upd_vld", upd_vld, e_upd);
    if (e_upd) begin
      chk("upd_incr_hit", upd_incr_hit, e_ih);
      if (HYB) chk("upd_fcm_hit", upd_fcm_hit, e_fh);
    end
    pred_req = pk >= 0;
    upd_req  = uk >= 0;
    e_pred = pred_req;
    e_upd  = upd_req;
    if (pred_req) begin
      pred_pc = LOOP_PC; pred_br = br_of(pk); pred_reg = REG_W'(pr + 1);
      pred_base = val_t'(pbase);
      pi = ref_trace_index(IW, LOOP_PC, br_of(pk), 6'(pr + 1));
      if (HYB && mf.conf[pi] > mi.conf[pi]) begin
        e_src = SRC_FCM; e_pval = mf.predict(pi); n_src_fcm++;
      end else begin
        e_src = SRC_INCR; e_pval = mi.predict(pi, pbase); n_src_incr++;
      end
      prd_end[pk][pr] = e_pval;
      n_pred++;
      if (e_pval == act_end[pk][pr]) begin
        n_correct++;
        if (pr == 0 && pk > 0 && path_b[pk] != path_b[pk-1]) n_switch_ok++;
      end
    end
    if (upd_req) begin
      upd_pc = LOOP_PC; upd_br = br_of(uk); upd_reg = REG_W'(ur + 1);
      upd_base = val_t'(start_val(uk, ur)); upd_actual = val_t'(act_end[uk][ur]);
      ui = ref_trace_index(IW, LOOP_PC, br_of(uk), 6'(ur + 1));
      if (pred_req && ui == pi) n_same++;
      e_ih = mi.update(ui, start_val(uk, ur), act_end[uk][ur]);
      e_fh = HYB ? mf.update(ui, act_end[uk][ur]) : 1'b0;
    end
    @(negedge clk);
  endtask

  int seq3 [3] = '{7, 19, 5};

  initial begin
    int cyc, oldest;
    mi = new(ENTRIES);
    mf = new(ENTRIES);
    for (int k = 0; k < NITER; k++) begin
      path_b[k] = ($urandom_range(0, 3) == 0);
      for (int r = 0; r < NREG; r++) begin
        longint s;
        s = start_val(k, r);
        case (r)
          0: act_end[k][r] = s + (path_b[k] ? 100 : 4);
          1: act_end[k][r] = s + 8;
          2: act_end[k][r] = seq3[k % 3];
          default: act_end[k][r] = longint'({$urandom, $urandom});
        endcase
      end
    end

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cyc = 0;
    while (!ready) begin @(negedge clk); cyc++; end
    chk("cycles to ready", cyc, ENTRIES);

    // iteration 0 is non-speculative: its start values are known
    oldest = 0;
    for (int k = 0; k < NITER; k++) begin
      // spawning k needs a free thread unit: retire the oldest first
      // (train with it while predicting for k)
      int uk;
      uk = (k - oldest >= NTU) ? oldest : -1;
      for (int r = 0; r < NREG; r++) begin
        longint base;
        base = (k == 0) ? start_val(0, r) : prd_end[k-1][r];
        if (k > 0 && uk != k - 1) n_chain++;
        cycle(k, r, base, uk, r);
      end
      if (uk >= 0) begin
        bit miss;
        miss = 0;
        for (int r = 0; r < NREG; r++)
          if (r != 3 && prd_end[uk][r] != act_end[uk][r]) miss = 1;
        oldest++;
        if (miss) begin
          // younger threads restart from the produced values
          n_miss++;
          for (int j = uk + 1; j <= k; j++) begin
            for (int r = 0; r < NREG; r++) begin
              longint base;
              base = (j == uk + 1) ? act_end[uk][r] : prd_end[j-1][r];
              cycle(j, r, base, -1, 0);
            end
            n_repred++;
          end
        end
      end
    end
    cycle(-1, 0, 0, -1, 0);
    cycle(-1, 0, 0, -1, 0);

    $display("predictions=%0d correct=%0d chained=%0d path_switch_ok=%0d incr=%0d fcm=%0d",
             n_pred, n_correct, n_chain, n_switch_ok, n_src_incr, n_src_fcm);
    $display("thread_misses=%0d repredicted_threads=%0d same_cycle=%0d", n_miss, n_repred, n_same);
    checks++; if (n_chain == 0)     begin failures++; $display("FAIL no chained prediction"); end
    checks++; if (n_switch_ok == 0) begin failures++; $display("FAIL no path switch predicted"); end
    checks++; if (n_src_incr == 0)  begin failures++; $display("FAIL increment never chosen"); end
    checks++; if (HYB && n_src_fcm == 0) begin failures++; $display("FAIL context never chosen"); end
    checks++; if (n_repred == 0)    begin failures++; $display("FAIL no re-prediction"); end
    checks++; if (n_same == 0)      begin failures++; $display("FAIL no same-cycle predict/update"); end
    checks++; if (n_correct * 2 < n_pred) begin failures++; $display("FAIL accuracy below 50%%"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
