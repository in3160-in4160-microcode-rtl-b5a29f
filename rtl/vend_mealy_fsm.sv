// Hard-wired (not microcoded) Mealy vending machine.
//
// The reference the microcoded versions are compared with. Four states
// count the money inserted (0, 10, 20, 30 cents). Ready is on in S_RDY and
// coin is on in S_10, S_20 and S_30 whatever the input; dispense and return
// are decided on the transition: reaching exactly 40c dispenses, passing 40c
// returns the coins, and both go straight back to S_RDY. As in the ASM chart
// the 10c input is tested before the 20c input, so a cycle with both coins
// counts as 10c.
//
// Outputs are combinational from state and inputs (no output register). The
// state register resets asynchronously to S_RDY. Everything here follows the
// lecture's Mealy ASM chart; the 2-bit state encoding matches the microcoded
// Mealy ROM so the two can be compared state for state.
module vend_mealy_fsm
  import microcode_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         ten,
  input  logic         twenty,
  output vend_out_t    out,
  output vend_mstate_t state
);

  vend_mstate_t state_q, next_state;

  always_comb begin
    next_state = state_q;
    out        = '0;
    unique case (state_q)
      M_RDY: begin
        out.ready = 1'b1;
        if (ten)         next_state = M_10;
        else if (twenty) next_state = M_20;
      end
      M_10: begin
        out.coin = 1'b1;
        if (ten)         next_state = M_20;
        else if (twenty) next_state = M_30;
      end
      M_20: begin
        out.coin = 1'b1;
        if (ten) next_state = M_30;
        else if (twenty) begin
          out.dispense = 1'b1;
          next_state   = M_RDY;
        end
      end
      M_30: begin
        out.coin = 1'b1;
        if (ten) begin
          out.dispense = 1'b1;
          next_state   = M_RDY;
        end else if (twenty) begin
          out.ret    = 1'b1;
          next_state = M_RDY;
        end
      end
      default: next_state = M_RDY;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state_q <= M_RDY;
    else     state_q <= next_state;
  end

  assign state = state_q;

endmodule
