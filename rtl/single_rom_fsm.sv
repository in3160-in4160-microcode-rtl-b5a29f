// Single-ROM microcoded state machine.
//
// One ROM is addressed by {state, input} (state in the upper bits) and holds
// {next_state, output} for every combination, so any state machine of S
// state bits, I inputs and O outputs fits without extra logic. The upper S
// bits of the word are loaded into the state register on each clock.
//
// SYNC_OUT = 0 (single ROM FSM): the output is the lower O bits of the ROM
// word. It is a Mealy output in general and a Moore output when the table
// repeats the same output for every input of a state; it adds the ROM to the
// critical path of whatever it drives.
// SYNC_OUT = 1 (single ROM, output synchronized): the output passes through a
// register, free of hazards but one clock later.
//
// The structure follows the lecture. The defaults load the lecture's
// extended vending-machine table (3 state bits, inputs {twenty, ten},
// 4 outputs, 32x7 = 224 bits); loading its 16x6 table with S = 2 gives the
// microcoded Mealy machine. The state and output registers reset
// asynchronously to 0.
module single_rom_fsm #(
  parameter int    I        = 2,
  parameter int    S        = 3,
  parameter int    O        = 4,
  parameter bit    SYNC_OUT = 1'b0,
  parameter logic [(2**(S+I))*(S+O)-1:0] ROM = microcode_pkg::vend_moore_rom()
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [I-1:0] in,
  output logic [O-1:0] out,
  output logic [S-1:0] state
);

  logic [S+O-1:0] data;   // {next_state, output}
  logic [S-1:0]   state_q;

  rom_async #(.AW(S+I), .DW(S+O), .CONTENTS(ROM)) u_rom (
    .addr ({state_q, in}),
    .data (data)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state_q <= '0;
    else     state_q <= data[S+O-1:O];
  end

  if (SYNC_OUT) begin : g_sync
    logic [O-1:0] out_q;
    always_ff @(posedge clk or posedge rst) begin
      if (rst) out_q <= '0;
      else     out_q <= data[O-1:0];
    end
    assign out = out_q;
  end else begin : g_comb
    assign out = data[O-1:0];
  end

  assign state = state_q;

endmodule
