// tb_table_capacity: table-capacity sweep of the value predictors.
//
// Runs one synthetic loop workload through three table sizes side by side:
// the hybrid increment-context predictor with 256, 1024 and 4096 entries
// per table, each next to an increment predictor alone with four times as
// many entries. The workload has 40 loops with two paths each and eight
// registers per loop: four grow by path-dependent increments, one repeats a
// three-value sequence, one is constant, one grows by more than a 16-bit
// increment can hold and one is random, 640 (trace, register) pairs in all,
// so the small tables alias and the large ones do not. Every answer is
// checked against reference models; the sweep also requires that the
// largest tables are more accurate than the smallest and prints the
// accuracy of each predictor and size.
module tb_table_capacity;
  import vp_pkg::*;

  localparam int NLOOP = 40, NREG = 8, NITER = 150;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             pred_req = 0, upd_req = 0;
  logic [PC_W-1:0]  pred_pc = '0, upd_pc = '0;
  logic [BR_W-1:0]  pred_br = '0, upd_br = '0;
  logic [REG_W-1:0] pred_reg = '0, upd_reg = '0;
  val_t             pred_base = '0, pred_truth = '0, upd_base = '0, upd_actual = '0;

  logic rdy [3];
  int   c_chk [3], c_fail [3], c_pred [3], c_hyb [3], c_incr [3];

  tb_cap_lane #(.ENTRIES(256)) lane0 (.clk, .rst_n, .ready(rdy[0]), .pred_req, .pred_pc, .pred_br,
    .pred_reg, .pred_base, .pred_truth, .upd_req, .upd_pc, .upd_br, .upd_reg, .upd_base, .upd_actual,
    .checks(c_chk[0]), .failures(c_fail[0]), .n_pred(c_pred[0]), .hyb_ok(c_hyb[0]), .incr_ok(c_incr[0]));
  tb_cap_lane #(.ENTRIES(1024)) lane1 (.clk, .rst_n, .ready(rdy[1]), .pred_req, .pred_pc, .pred_br,
    .pred_reg, .pred_base, .pred_truth, .upd_req, .upd_pc, .upd_br, .upd_reg, .upd_base, .upd_actual,
    .checks(c_chk[1]), .failures(c_fail[1]), .n_pred(c_pred[1]), .hyb_ok(c_hyb[1]), .incr_ok(c_incr[1]));
  tb_cap_lane #(.ENTRIES(4096)) lane2 (.clk, .rst_n, .ready(rdy[2]), .pred_req, .pred_pc, .pred_br,
    .pred_reg, .pred_base, .pred_truth, .upd_req, .upd_pc, .upd_br, .upd_reg, .upd_base, .upd_actual,
    .checks(c_chk[2]), .failures(c_fail[2]), .n_pred(c_pred[2]), .hyb_ok(c_hyb[2]), .incr_ok(c_incr[2]));

  longint      val [NLOOP][NREG];
  logic [31:0] lpc [NLOOP];
  longint      inc [NLOOP][2][NREG];
  longint      seq [NLOOP][2][3];
  int          cnt [NLOOP];

  int checks = 0, failures = 0;

  initial begin
    for (int l = 0; l < NLOOP; l++) begin
      lpc[l] = {$urandom_range(0, 32'h3fff_ffff), 2'b00};
      cnt[l] = 0;
      for (int r = 0; r < NREG; r++) val[l][r] = longint'($urandom);
      for (int p = 0; p < 2; p++) begin
        for (int r = 0; r < NREG; r++) inc[l][p][r] = longint'($urandom_range(1, 300)) - 150;
        for (int k = 0; k < 3; k++) seq[l][p][k] = {$urandom, $urandom};
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (!(rdy[0] && rdy[1] && rdy[2])) @(negedge clk);
    @(negedge clk);
    for (int n = 0; n < NLOOP * NITER; n++) begin
      int l, p;
      l = $urandom_range(0, NLOOP - 1);
      p = ($urandom_range(0, 3) == 0);
      for (int r = 0; r < NREG; r++) begin
        longint s, e;
        s = val[l][r];
        case (r)
          0, 1, 2, 3: e = s + inc[l][p][r];
          4:          e = seq[l][p][cnt[l] % 3];
          5:          e = s;
          6:          e = s + 70000;
          default:    e = {$urandom, $urandom};
        endcase
        pred_req = 1'b1; pred_pc = lpc[l]; pred_br = p ? 16'h0006 : 16'h0001;
        pred_reg = REG_W'(r); pred_base = val_t'(s); pred_truth = val_t'(e);
        upd_req = 1'b1; upd_pc = lpc[l]; upd_br = pred_br;
        upd_reg = REG_W'(r); upd_base = val_t'(s); upd_actual = val_t'(e);
        val[l][r] = e;
        @(negedge clk);
      end
      cnt[l]++;
    end
    pred_req = 1'b0; upd_req = 1'b0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      $display("tables %0d entries: hybrid %0d/%0d correct, increment alone (%0d entries) %0d/%0d",
               256 << (2 * i), c_hyb[i], c_pred[i], 1024 << (2 * i), c_incr[i], c_pred[i]);
      checks += c_chk[i];
      failures += c_fail[i];
    end
    checks++;
    if (c_hyb[2] <= c_hyb[0]) begin failures++; $display("FAIL hybrid: no gain from larger tables"); end
    checks++;
    if (c_incr[2] <= c_incr[0]) begin failures++; $display("FAIL increment: no gain from larger table"); end
    checks++;
    if (c_pred[0] == 0) begin failures++; $display("FAIL nothing predicted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
