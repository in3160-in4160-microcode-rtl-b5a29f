// Microcoded state machines, side by side.
//
// Eight implementations of the same 40c vending machine share the clock,
// reset and coin inputs, so their outputs can be compared cycle by cycle:
//   V_SINGLE_MOORE       one 32x7 ROM {state, coins} -> {next state, outputs}
//   V_SINGLE_MOORE_SYNC  the same with registered outputs (one cycle later)
//   V_DUAL_MOORE         32x3 next-state ROM + 8x4 output ROM on the state
//   V_DUAL_MEALY         16x2 next-state ROM + 16x4 output ROM, 2-bit state
//   V_SEQ_SYNC           8x5 ROM {branch bit, outputs} + sequencer,
//                        registered outputs
//   V_SEQ_FAST           the same with outputs straight from the ROM
//   V_MEALY_ROM          one 16x6 ROM, 2-bit state, Mealy outputs
//   V_MEALY_HARDWIRED    conventional Mealy FSM, no ROM
// vend_out[v] carries {ready, coin, dispense, return} of variant v (indices
// in microcode_pkg::vend_variant_e). The coin inputs are expected to be high
// for one clock per coin and to be synchronous to clk.
//
// Beside them, the general microsequencer runs its demo microprogram on its
// own condition inputs useq_in; useq_out is its registered output field and
// useq_upc its microprogram counter. rst is an asynchronous, active-high
// reset for everything.
module microcode_top
  import microcode_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      ten,
  input  logic      twenty,
  output vend_out_t vend_out [N_VARIANTS],
  input  logic [1:0] useq_in,
  output logic [3:0] useq_out,
  output logic [3:0] useq_upc
);

  logic [1:0] coins;
  assign coins = {twenty, ten};

  // Single ROM, Moore table, outputs from the ROM
  single_rom_fsm #(
    .I(2), .S(3), .O(4), .SYNC_OUT(1'b0), .ROM(vend_moore_rom())
  ) u_single_moore (
    .clk, .rst, .in(coins), .out(vend_out[V_SINGLE_MOORE]), .state()
  );

  // Single ROM, Moore table, outputs synchronized
  single_rom_fsm #(
    .I(2), .S(3), .O(4), .SYNC_OUT(1'b1), .ROM(vend_moore_rom())
  ) u_single_moore_sync (
    .clk, .rst, .in(coins), .out(vend_out[V_SINGLE_MOORE_SYNC]), .state()
  );

  // Dual ROM, Moore
  dual_rom_fsm #(
    .I(2), .S(3), .O(4), .MEALY(1'b0),
    .NS_ROM(vend_dual_moore_ns_rom()), .OUT_ROM(vend_dual_moore_out_rom())
  ) u_dual_moore (
    .clk, .rst, .in(coins), .out(vend_out[V_DUAL_MOORE]), .state()
  );

  // Dual ROM, Mealy
  dual_rom_fsm #(
    .I(2), .S(2), .O(4), .MEALY(1'b1),
    .NS_ROM(vend_dual_mealy_ns_rom()), .OUT_ROM(vend_dual_mealy_out_rom())
  ) u_dual_mealy (
    .clk, .rst, .in(coins), .out(vend_out[V_DUAL_MEALY]), .state()
  );

  // ROM + sequencer, outputs synchronized
  seq_rom_fsm #(.SYNC_OUT(1'b1)) u_seq_sync (
    .clk, .rst, .ten, .twenty, .out(vend_out[V_SEQ_SYNC]), .state()
  );

  // ROM + sequencer, outputs straight from the ROM
  seq_rom_fsm #(.SYNC_OUT(1'b0)) u_seq_fast (
    .clk, .rst, .ten, .twenty, .out(vend_out[V_SEQ_FAST]), .state()
  );

  // Single ROM, Mealy table
  single_rom_fsm #(
    .I(2), .S(2), .O(4), .SYNC_OUT(1'b0), .ROM(vend_mealy_rom())
  ) u_mealy_rom (
    .clk, .rst, .in(coins), .out(vend_out[V_MEALY_ROM]), .state()
  );

  // Hard-wired Mealy reference
  vend_mealy_fsm u_mealy_hw (
    .clk, .rst, .ten, .twenty, .out(vend_out[V_MEALY_HARDWIRED]), .state()
  );

  // General microsequencer
  microsequencer #(.S(4), .I(2), .O(4)) u_useq (
    .clk, .rst, .inputs(useq_in), .out(useq_out), .upc(useq_upc)
  );

endmodule
