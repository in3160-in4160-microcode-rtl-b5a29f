// Exhaustive test of the microsequencer's branch logic: every op code, input
// select and input value against the branch rules (NEXT -> +1, JUMP ->
// target, IF_SET / IF_CLR -> target when the selected input is 1 / 0,
// RESTART -> 0, unused op codes -> +1).
module tb_branch_logic;
  import microcode_pkg::*;

  logic [3:0] branch_instruction;
  logic [1:0] inputs;
  logic [2:0] mux_sel;
  int checks = 0, failures = 0;

  branch_logic #(.I(2)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      logic [2:0] op, exp;
      logic       sel, c;
      {branch_instruction, inputs} = 6'(i);
      op  = branch_instruction[3:1];
      sel = branch_instruction[0];
      c   = inputs[sel];
      case (op)
        3'd1:    exp = 3'b010;
        3'd2:    exp = c ? 3'b010 : 3'b001;
        3'd3:    exp = c ? 3'b001 : 3'b010;
        3'd4:    exp = 3'b100;
        default: exp = 3'b001;
      endcase
      #1;
      checks++;
      if (mux_sel !== exp) begin
        failures++;
        $display("FAIL op=%0d sel=%0d inputs=%b: mux_sel=%b expected %b", op, sel, inputs, mux_sel, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
