// Branch logic of the general microsequencer.
//
// Decodes the branch-instruction field of the current microinstruction,
// together with the condition inputs, into the one-hot select of the
// three-way next-address multiplexer: uPC + 1, branch_target or address 0.
// The field is {op[2:0], sel}: op is a microcode_pkg::ubr_op_t, sel picks the
// input an IF_SET / IF_CLR branch tests. Unused op codes behave as NEXT.
// Purely combinational.
//
// The lecture gives the block, its inputs and its 3-wire select; the
// operation set and encoding are this design's choice.
module branch_logic
  import microcode_pkg::*;
#(
  parameter int I  = 2,
  parameter int IW = sel_width(I),
  parameter int B  = 3 + IW
) (
  input  logic [B-1:0] branch_instruction,
  input  logic [I-1:0] inputs,
  output logic [2:0]   mux_sel
);

  ubr_op_t       op;
  logic [IW-1:0] sel;
  logic          cond;

  assign op   = ubr_op_t'(branch_instruction[B-1 -: 3]);
  assign sel  = branch_instruction[IW-1:0];
  assign cond = (int'(sel) < I) ? inputs[sel] : 1'b0;

  always_comb begin
    case (op)
      UB_JUMP:    mux_sel = SEL_TARGET;
      UB_IF_SET:  mux_sel = cond  ? SEL_TARGET : SEL_INC;
      UB_IF_CLR:  mux_sel = !cond ? SEL_TARGET : SEL_INC;
      UB_RESTART: mux_sel = SEL_ZERO;
      default:    mux_sel = SEL_INC;
    endcase
  end

endmodule
