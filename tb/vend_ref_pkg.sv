// Reference models for the vending-machine testbenches.
//
// Written from the machine's rules (40c drink, 10c/20c coins, ready / coin /
// dispense / return lights), not from the RTL's ROM images. One class covers
// every variant through a few knobs:
//   mealy     0: six-state Moore machine, 1: four-state Mealy machine
//   both      what a cycle with both coins does (BOTH_ZERO: no output, back
//             to ready; BOTH_ZERO_NEXT: back to ready but the output shows
//             the state; BOTH_TEN: counts as 10c)
//   asm_coin  Mealy only: coin stays on in S_10..S_30 even while dispensing
//             or returning (the hard-wired ASM chart)
//   sync      outputs delayed by one register
// Outputs are 4-bit {ready, coin, dispense, return}.
package vend_ref_pkg;

  typedef enum int {BOTH_ZERO, BOTH_ZERO_NEXT, BOTH_TEN} both_e;

  class vend_ref;
    bit    mealy;
    both_e both;
    bit    asm_coin;
    bit    sync;
    int    st;      // Moore: 0..3 = cents/10, 4 = dispense, 5 = return; Mealy: cents/10
    bit [3:0] out_q;

    function new(bit mealy, both_e both, bit asm_coin, bit sync);
      this.mealy    = mealy;
      this.both     = both;
      this.asm_coin = asm_coin;
      this.sync     = sync;
      reset();
    endfunction

    function void reset();
      st    = 0;
      out_q = 4'b0000;
    endfunction

    // Combinational output and next state for the given coins.
    function void eval(bit ten, bit twenty, output bit [3:0] o, output int nxt);
      int add;
      bit both_now = ten && twenty;
      add = ten ? 1 : (twenty ? 2 : 0);
      if (!mealy) begin
        case (st)
          0: o = 4'b1000;
          1, 2, 3: o = 4'b0100;
          4: o = 4'b0010;
          default: o = 4'b0001;
        endcase
        if (st >= 4) nxt = 0;
        else         nxt = st + add;
        if (both_now && both != BOTH_TEN) begin
          nxt = 0;
          if (both == BOTH_ZERO) o = 4'b0000;
        end
      end else begin
        int total = st + add;
        o = (st == 0) ? 4'b1000 : 4'b0100;
        if (total == 4)      begin o = asm_coin ? (o | 4'b0010) : 4'b0010; nxt = 0; end
        else if (total > 4)  begin o = asm_coin ? (o | 4'b0001) : 4'b0001; nxt = 0; end
        else nxt = total;
        if (both_now && both != BOTH_TEN) begin
          nxt = 0;
          o   = 4'b0000;
        end
      end
    endfunction

    function bit [3:0] expected(bit ten, bit twenty);
      bit [3:0] o;
      int nxt;
      eval(ten, twenty, o, nxt);
      return sync ? out_q : o;
    endfunction

    function void step(bit ten, bit twenty);
      bit [3:0] o;
      int nxt;
      eval(ten, twenty, o, nxt);
      out_q = o;
      st    = nxt;
    endfunction
  endclass

endpackage
