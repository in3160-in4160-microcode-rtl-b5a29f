// Microcoded vending machine with a sequencer (Moore).
//
// The state is the ROM address: an 8-entry x 5-bit ROM holds, for each state,
// a branch bit followed by the four outputs (ready, coin, dispense, return).
// vend_sequencer turns the branch bit and the coin inputs into the next
// state, so the ROM needs one word per state instead of one per state/input
// pair (8x5 = 40 bits against 32x7 = 224 bits for the plain single-ROM form).
//
// SYNC_OUT = 1: the outputs are registered from the ROM word, giving
// hazard-free outputs one clock after the state they belong to.
// SYNC_OUT = 0: the outputs come straight from the ROM word of the current
// state, removing that cycle of delay (still a Moore machine, since the ROM is
// addressed by the state alone).
//
// The ROM contents, the +0/+1/+2 sequencer and the asynchronous reset to
// S_RDY (outputs cleared) follow the lecture. Unused states 6 and 7 hold
// b = 0 and no outputs, so they fall back to S_RDY.
module seq_rom_fsm
  import microcode_pkg::*;
#(
  parameter bit    SYNC_OUT = 1'b1,
  parameter logic [8*5-1:0] ROM = vend_seq_rom()
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ten,
  input  logic        twenty,
  output vend_out_t   out,
  output vend_state_t state
);

  localparam int S = 3;

  logic [4:0]   data;        // {b, ready, coin, dispense, ret}
  logic [S-1:0] next_state;
  logic [S-1:0] state_q;

  rom_async #(.AW(S), .DW(5), .CONTENTS(ROM)) u_rom (
    .addr (state_q),
    .data (data)
  );

  vend_sequencer #(.S(S)) u_seq (
    .state      (state_q),
    .b          (data[4]),
    .ten        (ten),
    .twenty     (twenty),
    .next_state (next_state)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state_q <= '0;
    else     state_q <= next_state;
  end

  // With the vending microcode the sequencer never steps past S_RET: only
  // S_RDY..S_30 branch, and S_30 + 2 = S_RET.
  a_used_states: assert property (@(posedge clk) disable iff (rst) state_q <= S_RET)
    else $error("sequencer reached unused state %0d", state_q);

  if (SYNC_OUT) begin : g_sync
    vend_out_t out_q;
    always_ff @(posedge clk or posedge rst) begin
      if (rst) out_q <= '0;
      else     out_q <= vend_out_t'(data[3:0]);
    end
    assign out = out_q;
  end else begin : g_comb
    assign out = vend_out_t'(data[3:0]);
  end

  assign state = vend_state_t'(state_q);

endmodule
