// General microsequencer: a microcoded state machine that behaves like a
// tiny processor.
//
// The microprogram counter uPC is the state and addresses the microcode
// memory. Each microinstruction is {branch_target[S-1:0], out[O-1:0],
// branch_instruction[B-1:0]}. Branch logic looks at the branch instruction
// and the inputs and steers a three-input multiplexer (Mux3): input 0 is
// uPC + 1 (carry on in sequence), input 1 is branch_target (jump), input 2 is
// 0 (restart). Its output nuPC is loaded into uPC on the next clock. The
// output field passes through a register, so `out` shows the output of the
// instruction executed in the previous cycle.
//
// Structure, field order and the registered output follow the lecture's
// block diagram. The branch operations (see branch_logic), the widths
// (S = 4, I = 2, O = 4) and the asynchronous reset of uPC and the output
// register to 0 are this design's choices, as is the demo microprogram
// loaded by default.
module microsequencer
  import microcode_pkg::*;
#(
  parameter int    S        = 4,
  parameter int    I        = 2,
  parameter int    O        = 4,
  parameter logic [(2**S)*(S+O+3+sel_width(I))-1:0] ROM = useq_demo_rom()
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [I-1:0] inputs,
  output logic [O-1:0] out,
  output logic [S-1:0] upc
);

  localparam int IW = sel_width(I);
  localparam int B  = 3 + IW;
  localparam int DW = S + O + B;

  logic [DW-1:0] d;
  logic [S-1:0]  upc_q, nupc, branch_target;
  logic [O-1:0]  n_out, out_q;
  logic [B-1:0]  branch_instruction;
  logic [2:0]    mux_sel;

  rom_async #(.AW(S), .DW(DW), .CONTENTS(ROM)) u_mem (
    .addr (upc_q),
    .data (d)
  );

  assign {branch_target, n_out, branch_instruction} = d;

  branch_logic #(.I(I), .IW(IW), .B(B)) u_branch (
    .branch_instruction (branch_instruction),
    .inputs             (inputs),
    .mux_sel            (mux_sel)
  );

  // Mux3
  always_comb begin
    case (mux_sel)
      SEL_TARGET: nupc = branch_target;
      SEL_ZERO:   nupc = '0;
      default:    nupc = upc_q + S'(1);  // SEL_INC
    endcase
  end

  // Branch logic must select exactly one Mux3 input.
  a_sel_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(mux_sel))
    else $error("Mux3 select %b is not one-hot", mux_sel);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      upc_q <= '0;
      out_q <= '0;
    end else begin
      upc_q <= nupc;
      out_q <= n_out;
    end
  end

  assign out = out_q;
  assign upc = upc_q;

endmodule
