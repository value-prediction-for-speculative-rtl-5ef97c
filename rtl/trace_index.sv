// trace_index: trace-based indexing of the value-prediction tables.
//
// A loop trace is named by a pseudo-identifier: the address of its first
// instruction together with the vector of outcomes of the conditional
// branches it executed. A trace-based predictor looks its tables up by this
// identifier plus the operand being predicted (here, the destination
// register). Two traces that differ only in the target of an indirect jump
// share an identifier; that aliasing is inherent in the scheme.
//
// The way the three fields are folded into an index is this design's own:
// the word address (pc >> 2) is xor-ed with the branch vector shifted above
// the register field and with the register number, and the result is
// xor-folded in IDX_W-bit slices down to IDX_W bits. The two low address
// bits are always zero for 4-byte instructions and are left out, so lint
// reports them unused. The block is purely combinational; idx is valid in
// the same cycle as its inputs.
module trace_index
  import vp_pkg::*;
#(
  parameter int unsigned IDX_W = 12          // log2 of the table entries
) (
  input  logic [PC_W-1:0]  start_pc,         // address of the trace's first instruction
  input  logic [BR_W-1:0]  br_vec,           // conditional-branch outcomes in the trace
  input  logic [REG_W-1:0] reg_id,           // predicted register
  output logic [IDX_W-1:0] idx               // table index
);

  localparam int unsigned MIX_W  = PC_W + BR_W + REG_W;
  localparam int unsigned SLICES = (MIX_W + IDX_W - 1) / IDX_W;

  logic [SLICES*IDX_W-1:0] mix;

  assign mix = (SLICES*IDX_W)'(start_pc[PC_W-1:2])
             ^ ((SLICES*IDX_W)'(br_vec) << REG_W)
             ^ (SLICES*IDX_W)'(reg_id);

  always_comb begin
    idx = '0;
    for (int unsigned s = 0; s < SLICES; s++)
      idx = idx ^ mix[s*IDX_W +: IDX_W];
  end

endmodule
