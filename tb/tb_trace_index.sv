// tb_trace_index: self-checking test of the trace-based index fold.
//
// Drives random trace start addresses, branch-outcome vectors and register
// numbers into two instances (12-bit and 10-bit index) and compares each
// index bit with an independent reference: bit b of the index is the parity
// of all bits of the mixed identifier whose position is b modulo the index
// width. Also checks that the two low address bits are ignored and that
// traces differing only in one branch outcome get different indices.
module tb_trace_index;
  import vp_pkg::*;

  int checks = 0, failures = 0;

  logic [PC_W-1:0]  pc;
  logic [BR_W-1:0]  br;
  logic [REG_W-1:0] rg;
  logic [11:0]      idx12;
  logic [9:0]       idx10;

  trace_index #(.IDX_W(12)) dut12 (.start_pc(pc), .br_vec(br), .reg_id(rg), .idx(idx12));
  trace_index #(.IDX_W(10)) dut10 (.start_pc(pc), .br_vec(br), .reg_id(rg), .idx(idx10));

  // Reference: build the mixed identifier bit by bit, then fold by parity.
  function automatic logic [31:0] ref_idx(int unsigned w, logic [PC_W-1:0] p,
                                          logic [BR_W-1:0] b, logic [REG_W-1:0] r);
    logic mixbit [64];
    logic [31:0] res;
    for (int i = 0; i < 64; i++) mixbit[i] = 1'b0;
    for (int i = 2; i < PC_W; i++) mixbit[i-2] ^= p[i];
    for (int i = 0; i < BR_W; i++) mixbit[REG_W+i] ^= b[i];
    for (int i = 0; i < REG_W; i++) mixbit[i] ^= r[i];
    res = '0;
    for (int i = 0; i < 64; i++) res[i % w] ^= mixbit[i];
    return res;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (pc=%h br=%h reg=%0d)", what, got, exp, pc, br, rg);
    end
  endtask

  initial begin
    logic [11:0] a;
    for (int n = 0; n < 2000; n++) begin
      pc = $urandom; br = 16'($urandom); rg = 6'($urandom);
      #1;
      check("idx12", 32'(idx12), ref_idx(12, pc, br, rg));
      check("idx10", 32'(idx10), ref_idx(10, pc, br, rg));
    end
    // low address bits are not part of the identifier
    pc = 32'h0001_2340; br = 16'h00a5; rg = 6'd3; #1; a = idx12;
    pc = 32'h0001_2343; #1;
    check("pc[1:0] ignored", 32'(idx12), 32'(a));
    // one differing branch outcome changes the index
    br = 16'h00a4; #1;
    checks++;
    if (idx12 == a) begin failures++; $display("FAIL branch vector not in index"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
