// Shared types and constants for the microcoded state machines.
//
// The vending machine (40c drink, 10c and 20c coins) has four outputs that
// every implementation drives in the same bit order as its microcode words:
// bit 3 ready, bit 2 coin, bit 1 dispense, bit 0 return. The Moore versions
// use six states in three bits, numbered so that a sequencer can reach the
// next amount by adding 1 (10c) or 2 (20c); the Mealy versions fold dispense
// and return into transitions and need only four states in two bits.
//
// The ROM images are computed here from the vending machine's rules rather
// than typed in as tables: a word is {next state, outputs} or {branch bit,
// outputs}, and entries the lecture calls illegal (both coins at once, the
// unused states 6 and 7) are all zero, meaning "no output, back to S_RDY".
//
// The general microsequencer's branch-instruction encoding (op + input
// select) and the one-hot select of its three-way next-address multiplexer
// are this design's own choice; the lecture shows the structure only.
package microcode_pkg;

  // Vending-machine outputs, packed in microcode-word order.
  typedef struct packed {
    logic ready;
    logic coin;
    logic dispense;
    logic ret;
  } vend_out_t;

  // Moore state assignment (state register value = ROM address).
  typedef enum logic [2:0] {
    S_RDY  = 3'd0,
    S_10   = 3'd1,
    S_20   = 3'd2,
    S_30   = 3'd3,
    S_DISP = 3'd4,
    S_RET  = 3'd5
  } vend_state_t;

  // Mealy state assignment (two bits; dispense/return happen on transitions).
  typedef enum logic [1:0] {
    M_RDY = 2'd0,
    M_10  = 2'd1,
    M_20  = 2'd2,
    M_30  = 2'd3
  } vend_mstate_t;

  // Vending-machine variants placed side by side in microcode_top.
  typedef enum int {
    V_SINGLE_MOORE      = 0,  // one 32x7 ROM, outputs straight from ROM
    V_SINGLE_MOORE_SYNC = 1,  // one 32x7 ROM, outputs registered
    V_DUAL_MOORE        = 2,  // 32x3 next-state ROM + 8x4 output ROM
    V_DUAL_MEALY        = 3,  // 16x2 next-state ROM + 16x4 output ROM
    V_SEQ_SYNC          = 4,  // 8x5 ROM + sequencer, outputs registered
    V_SEQ_FAST          = 5,  // 8x5 ROM + sequencer, outputs straight from ROM
    V_MEALY_ROM         = 6,  // one 16x6 ROM, Mealy
    V_MEALY_HARDWIRED   = 7   // hard-wired Mealy reference
  } vend_variant_e;

  localparam int N_VARIANTS = 8;

  // Branch operations of the general microsequencer.
  typedef enum logic [2:0] {
    UB_NEXT    = 3'd0,  // uPC + 1
    UB_JUMP    = 3'd1,  // branch_target
    UB_IF_SET  = 3'd2,  // branch_target if the selected input is 1, else uPC + 1
    UB_IF_CLR  = 3'd3,  // branch_target if the selected input is 0, else uPC + 1
    UB_RESTART = 3'd4   // address 0
  } ubr_op_t;

  // One-hot select of the microsequencer's Mux3 (input numbers as drawn).
  localparam logic [2:0] SEL_INC    = 3'b001;  // Mux3 input 0: uPC + 1
  localparam logic [2:0] SEL_TARGET = 3'b010;  // Mux3 input 1: branch_target
  localparam logic [2:0] SEL_ZERO   = 3'b100;  // Mux3 input 2: 0

  // Width of the input-select field of a branch instruction.
  function automatic int unsigned sel_width(int unsigned n_inputs);
    return (n_inputs > 1) ? $clog2(n_inputs) : 1;
  endfunction

  // ---------------------------------------------------------------------
  // Vending machine rules
  // ---------------------------------------------------------------------

  // Moore output of each state: ready in S_RDY, coin while money is held,
  // dispense at exactly 40c, return above 40c.
  function automatic vend_out_t moore_out(logic [2:0] s);
    vend_out_t o;
    o = '0;
    case (s)
      S_RDY:            o.ready    = 1'b1;
      S_10, S_20, S_30: o.coin     = 1'b1;
      S_DISP:           o.dispense = 1'b1;
      S_RET:            o.ret      = 1'b1;
      default:          o = '0;
    endcase
    return o;
  endfunction

  // Moore next state: a coin moves one (10c) or two (20c) states on; from
  // S_DISP and S_RET the machine goes back to S_RDY.
  function automatic logic [2:0] moore_next(logic [2:0] s, logic ten, logic twenty);
    if (s == S_DISP || s == S_RET || s > S_RET) return S_RDY;
    if (ten)    return s + 3'd1;
    if (twenty) return s + 3'd2;
    return s;
  endfunction

  // Mealy step over the 2-bit state (the amount held, in units of 10c):
  // returns {next state, outputs}. Reaching 40c dispenses and passing it
  // returns the coins, both on the transition back to S_RDY.
  function automatic logic [5:0] mealy_word(logic [1:0] s, logic ten, logic twenty);
    int unsigned total;
    vend_out_t   o;
    total = int'(s) + (ten ? 1 : (twenty ? 2 : 0));
    o     = '0;
    if (total == 4) begin
      o.dispense = 1'b1;
      return {2'd0, o};
    end
    if (total > 4) begin
      o.ret = 1'b1;
      return {2'd0, o};
    end
    if (s == M_RDY) o.ready = 1'b1;
    else            o.coin  = 1'b1;
    return {total[1:0], o};
  endfunction

  // ---------------------------------------------------------------------
  // ROM images (word a at bits [a*DW +: DW])
  // ---------------------------------------------------------------------

  // Single ROM, Moore: address {state[2:0], twenty, ten}, word
  // {next_state[2:0], ready, coin, dispense, ret}; 32 x 7 = 224 bits.
  function automatic logic [32*7-1:0] vend_moore_rom();
    logic [32*7-1:0] r;
    r = '0;
    for (int a = 0; a < 32; a++) begin
      logic [2:0] s;
      s = a[4:2];
      if (s <= S_RET && a[1:0] != 2'b11)
        r[a*7 +: 7] = {moore_next(s, a[0], a[1]), moore_out(s)};
    end
    return r;
  endfunction

  // Dual ROM, Moore: next-state ROM, 32 x 3.
  function automatic logic [32*3-1:0] vend_dual_moore_ns_rom();
    logic [32*7-1:0] full;
    logic [32*3-1:0] r;
    full = vend_moore_rom();
    for (int a = 0; a < 32; a++) r[a*3 +: 3] = full[a*7+4 +: 3];
    return r;
  endfunction

  // Dual ROM, Moore: output ROM addressed by the state only, 8 x 4.
  function automatic logic [8*4-1:0] vend_dual_moore_out_rom();
    logic [8*4-1:0] r;
    for (int a = 0; a < 8; a++) r[a*4 +: 4] = moore_out(3'(a));
    return r;
  endfunction

  // ROM + sequencer: address state[2:0], word {b, ready, coin, dispense,
  // ret}; b = 1 in the four states that wait for coins. 8 x 5 = 40 bits.
  function automatic logic [8*5-1:0] vend_seq_rom();
    logic [8*5-1:0] r;
    for (int a = 0; a < 8; a++)
      r[a*5 +: 5] = {(a <= int'(S_30)), moore_out(3'(a))};
    return r;
  endfunction

  // Single ROM, Mealy: address {state[1:0], twenty, ten}, word
  // {next_state[1:0], ready, coin, dispense, ret}; 16 x 6 = 96 bits.
  function automatic logic [16*6-1:0] vend_mealy_rom();
    logic [16*6-1:0] r;
    r = '0;
    for (int a = 0; a < 16; a++)
      if (a[1:0] != 2'b11) r[a*6 +: 6] = mealy_word(a[3:2], a[0], a[1]);
    return r;
  endfunction

  // Dual ROM, Mealy: next-state ROM 16 x 2 and output ROM 16 x 4, both
  // addressed by {state[1:0], twenty, ten}.
  function automatic logic [16*2-1:0] vend_dual_mealy_ns_rom();
    logic [16*6-1:0] full;
    logic [16*2-1:0] r;
    full = vend_mealy_rom();
    for (int a = 0; a < 16; a++) r[a*2 +: 2] = full[a*6+4 +: 2];
    return r;
  endfunction

  function automatic logic [16*4-1:0] vend_dual_mealy_out_rom();
    logic [16*6-1:0] full;
    logic [16*4-1:0] r;
    full = vend_mealy_rom();
    for (int a = 0; a < 16; a++) r[a*4 +: 4] = full[a*6 +: 4];
    return r;
  endfunction

  // Demo microprogram for the general microsequencer (S = 4, I = 2, O = 4):
  // word {branch_target[3:0], out[3:0], op[2:0], sel[0]}.
  function automatic logic [11:0] useq_word(logic [3:0] target, logic [3:0] o,
                                            ubr_op_t op, logic sel);
    return {target, o, op, sel};
  endfunction

  function automatic logic [16*12-1:0] useq_demo_rom();
    logic [16*12-1:0] r;
    for (int a = 0; a < 16; a++) r[a*12 +: 12] = useq_word(4'd0, 4'b0000, UB_RESTART, 1'b0);
    r[0*12 +: 12] = useq_word(4'd0, 4'b0001, UB_IF_CLR,  1'b0);  // wait while in[0] = 0
    r[1*12 +: 12] = useq_word(4'd0, 4'b0010, UB_NEXT,    1'b0);
    r[2*12 +: 12] = useq_word(4'd5, 4'b0100, UB_IF_SET,  1'b1);  // in[1] = 1: go to 5
    r[3*12 +: 12] = useq_word(4'd1, 4'b1000, UB_JUMP,    1'b0);  // loop to 1
    r[4*12 +: 12] = useq_word(4'd0, 4'b1111, UB_RESTART, 1'b0);  // not reached
    r[5*12 +: 12] = useq_word(4'd0, 4'b0011, UB_NEXT,    1'b0);
    r[6*12 +: 12] = useq_word(4'd6, 4'b0110, UB_IF_SET,  1'b0);  // hold while in[0] = 1
    r[7*12 +: 12] = useq_word(4'd0, 4'b1100, UB_RESTART, 1'b0);  // back to 0
    return r;
  endfunction

endpackage
