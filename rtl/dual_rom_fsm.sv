// Dual-ROM microcoded state machine.
//
// State decoding and output decoding are kept in two ROMs. The next-state ROM
// is addressed by {state, input} and holds only the next state, which the
// state register loads on each clock. The output ROM is addressed by the
// state alone when MEALY = 0 (Moore: 2**S words, the smallest storage, and
// the output changes only with the state) or by {state, input} when
// MEALY = 1 (Mealy: both ROMs share the same address and nothing is saved).
// Outputs come straight from the output ROM.
//
// The two structures follow the lecture. The ROM contents are this design's
// split of the lecture's vending-machine tables: by default the six-state
// Moore machine (32x3 next-state ROM, 8x4 output ROM). The state register
// resets asynchronously to 0.
module dual_rom_fsm #(
  parameter int    I        = 2,
  parameter int    S        = 3,
  parameter int    O        = 4,
  parameter bit    MEALY    = 1'b0,
  parameter logic [(2**(S+I))*S-1:0]                  NS_ROM  = microcode_pkg::vend_dual_moore_ns_rom(),
  parameter logic [(2**(MEALY ? S+I : S))*O-1:0]      OUT_ROM = microcode_pkg::vend_dual_moore_out_rom()
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [I-1:0] in,
  output logic [O-1:0] out,
  output logic [S-1:0] state
);

  localparam int OAW = MEALY ? S + I : S;

  logic [S-1:0]   next_state;
  logic [S-1:0]   state_q;
  logic [OAW-1:0] out_addr;

  rom_async #(.AW(S+I), .DW(S), .CONTENTS(NS_ROM)) u_ns_rom (
    .addr ({state_q, in}),
    .data (next_state)
  );

  if (MEALY) begin : g_mealy_addr
    assign out_addr = {state_q, in};
  end else begin : g_moore_addr
    assign out_addr = state_q;
  end

  rom_async #(.AW(OAW), .DW(O), .CONTENTS(OUT_ROM)) u_out_rom (
    .addr (out_addr),
    .data (out)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state_q <= '0;
    else     state_q <= next_state;
  end

  assign state = state_q;

endmodule
