// End-to-end test of microcode_top at its default parameters.
//
// All eight vending-machine variants see the same random coin stream and are
// compared every cycle with their reference models; the microsequencer runs
// its demo microprogram with random condition inputs and is compared with a
// reference interpreter. The run counts how often each mechanism happened
// and fails if one never did: a drink dispensed, coins returned, an illegal
// both-coin cycle, a reset in mid-run, the sequencer's +0 / +1 / +2 steps and
// its return to S_RDY (branch bit 0), the registered-output delay, and each
// microsequencer branch kind (next, jump, branch taken / not taken, restart).
module tb_microcode_top;
  import microcode_pkg::*;
  import vend_ref_pkg::*;

  localparam int CYCLES = 20000;
  localparam logic [16*12-1:0] PROG = useq_demo_rom();

  logic clk = 1'b0, rst = 1'b1, ten = 1'b0, twenty = 1'b0;
  vend_out_t  vend_out [N_VARIANTS];
  logic [1:0] useq_in = 2'b00;
  logic [3:0] useq_out, useq_upc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  microcode_top dut (.*);

  vend_ref refs [N_VARIANTS];

  // Mechanism counters
  int n_disp = 0, n_ret = 0, n_both = 0, n_reset = 0;
  int n_hold = 0, n_plus1 = 0, n_plus2 = 0, n_b0 = 0, n_delay = 0;
  int n_next = 0, n_jump = 0, n_taken = 0, n_not_taken = 0, n_restart = 0;
  int ref_pc = 0;
  logic [3:0] ref_out = '0;

  task automatic check(string name, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %0t %s: %b expected %b", $time, name, got, exp);
    end
  endtask

  task automatic need(string name, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", name);
    end
  endtask

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    refs[V_SINGLE_MOORE]      = new(1'b0, BOTH_ZERO,      1'b0, 1'b0);
    refs[V_SINGLE_MOORE_SYNC] = new(1'b0, BOTH_ZERO,      1'b0, 1'b1);
    refs[V_DUAL_MOORE]        = new(1'b0, BOTH_ZERO_NEXT, 1'b0, 1'b0);
    refs[V_DUAL_MEALY]        = new(1'b1, BOTH_ZERO,      1'b0, 1'b0);
    refs[V_SEQ_SYNC]          = new(1'b0, BOTH_TEN,       1'b0, 1'b1);
    refs[V_SEQ_FAST]          = new(1'b0, BOTH_TEN,       1'b0, 1'b0);
    refs[V_MEALY_ROM]         = new(1'b1, BOTH_ZERO,      1'b0, 1'b0);
    refs[V_MEALY_HARDWIRED]   = new(1'b1, BOTH_TEN,       1'b1, 1'b0);
    repeat (2) @(posedge clk);
    for (int c = 0; c < CYCLES; c++) begin
      int p, seq_before;
      logic [11:0] w;
      bit cond;
      @(negedge clk);
      rst     = 1'b0;
      p       = $urandom_range(199);
      ten     = (p < 60) || (p >= 190);
      twenty  = (p >= 60 && p < 100) || (p >= 190);
      if (p == 189) rst = 1'b1;
      useq_in = 2'($urandom_range(3));
      #1;
      if (!rst) begin
        for (int v = 0; v < N_VARIANTS; v++)
          check($sformatf("variant %0d", v), vend_out[v], refs[v].expected(ten, twenty));
        check("useq_upc", useq_upc, 4'(ref_pc));
        check("useq_out", useq_out, ref_out);
        n_disp  += int'(vend_out[V_SEQ_FAST].dispense);
        n_ret   += int'(vend_out[V_SEQ_FAST].ret);
        n_both  += int'(ten && twenty);
        n_delay += int'(vend_out[V_SEQ_FAST] != vend_out[V_SEQ_SYNC]);
      end
      seq_before = refs[V_SEQ_FAST].st;
      w    = PROG[ref_pc*12 +: 12];
      cond = useq_in[w[0]];
      @(posedge clk);
      if (rst) begin
        n_reset++;
        foreach (refs[v]) refs[v].reset();
        ref_pc  = 0;
        ref_out = '0;
      end else begin
        foreach (refs[v]) refs[v].step(ten, twenty);
        // Sequencer step taken by the ROM + sequencer machine
        if (seq_before >= 4)                              n_b0++;
        else if (refs[V_SEQ_FAST].st == seq_before)       n_hold++;
        else if (refs[V_SEQ_FAST].st == seq_before + 1)   n_plus1++;
        else if (refs[V_SEQ_FAST].st == seq_before + 2)   n_plus2++;
        // Microsequencer reference step
        ref_out = w[7:4];
        case (int'(w[3:1]))
          1: begin ref_pc = int'(w[11:8]); n_jump++; end
          2: if (cond)  begin ref_pc = int'(w[11:8]); n_taken++; end
             else       begin ref_pc = (ref_pc + 1) % 16; n_not_taken++; end
          3: if (!cond) begin ref_pc = int'(w[11:8]); n_taken++; end
             else       begin ref_pc = (ref_pc + 1) % 16; n_not_taken++; end
          4: begin ref_pc = 0; n_restart++; end
          default: begin ref_pc = (ref_pc + 1) % 16; n_next++; end
        endcase
      end
    end
    need("dispense", n_disp);
    need("return coins", n_ret);
    need("both coins (illegal input)", n_both);
    need("reset in mid-run", n_reset);
    need("sequencer +0 (hold)", n_hold);
    need("sequencer +1 (10c)", n_plus1);
    need("sequencer +2 (20c)", n_plus2);
    need("sequencer branch bit 0 (back to S_RDY)", n_b0);
    need("registered-output delay visible", n_delay);
    need("microsequencer next", n_next);
    need("microsequencer jump", n_jump);
    need("microsequencer branch taken", n_taken);
    need("microsequencer branch not taken", n_not_taken);
    need("microsequencer restart", n_restart);
    $display("dispense %0d, return %0d, both coins %0d, resets %0d", n_disp, n_ret, n_both, n_reset);
    $display("sequencer: hold %0d, +1 %0d, +2 %0d, back to S_RDY %0d; output delay seen %0d",
             n_hold, n_plus1, n_plus2, n_b0, n_delay);
    $display("microsequencer: next %0d, jump %0d, taken %0d, not taken %0d, restart %0d",
             n_next, n_jump, n_taken, n_not_taken, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
