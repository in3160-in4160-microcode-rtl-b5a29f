// Replays on microcode_top the coin sequence of the lecture's comparison
// simulation and checks that every vending-machine variant ends up doing the
// same thing: four drinks dispensed and the coins returned twice.
//
// The sequence (T = 10c, W = 20c) is read off the Mealy state labels printed
// in that simulation (S_RDY=0 .. S_30=3: 0 1 2 3 0 1 3 0 2 3 0 2 0 2 0 1 2 3
// 0 1 2 3); each coin is one clock wide and followed by a few idle clocks,
// since the exact spacing is not part of the behaviour. After every coin the
// Mealy machines' state must equal the printed label, and every Moore
// machine must hold the same amount (or be back in S_RDY after a dispense or
// return).
module tb_lecture_sequence;
  import microcode_pkg::*;

  localparam int N = 21;
  localparam string COINS = "TTTTTWWWTTWWWWTTTWTTT";
  localparam int STATES [N] = '{1, 2, 3, 0, 1, 3, 0, 2, 3, 0, 2, 0, 2, 0, 1, 2, 3, 0, 1, 2, 3};

  logic clk = 1'b0, rst = 1'b1, ten = 1'b0, twenty = 1'b0;
  vend_out_t  vend_out [N_VARIANTS];
  logic [1:0] useq_in = 2'b00;
  logic [3:0] useq_out, useq_upc;
  int checks = 0, failures = 0;
  int n_disp [N_VARIANTS], n_ret [N_VARIANTS];
  vend_out_t prev [N_VARIANTS];

  always #5 clk = ~clk;

  microcode_top dut (.*);

  task automatic check(string name, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %0t %s: %0d expected %0d", $time, name, got, exp);
    end
  endtask

  // Count output pulses (rising edges) of every variant, sampled just before
  // each clock edge, where the Mealy outputs are settled.
  always @(posedge clk) begin
    if (!rst) begin
      for (int v = 0; v < N_VARIANTS; v++) begin
        if (vend_out[v].dispense && !prev[v].dispense) n_disp[v]++;
        if (vend_out[v].ret && !prev[v].ret)           n_ret[v]++;
      end
    end
    prev <= vend_out;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_disp[v]) begin n_disp[v] = 0; n_ret[v] = 0; prev[v] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (3) @(negedge clk);
    for (int k = 0; k < N; k++) begin
      int amount;
      ten    = (COINS[k] == "T");
      twenty = (COINS[k] == "W");
      @(negedge clk);
      ten    = 1'b0;
      twenty = 1'b0;
      #1;
      check($sformatf("coin %0d Mealy ROM state", k), int'(dut.u_mealy_rom.state), STATES[k]);
      check($sformatf("coin %0d dual Mealy state", k), int'(dut.u_dual_mealy.state), STATES[k]);
      check($sformatf("coin %0d hard-wired Mealy state", k), int'(dut.u_mealy_hw.state), STATES[k]);
      repeat (3) @(negedge clk);
      #1;
      amount = STATES[k];
      check($sformatf("coin %0d single Moore state", k), int'(dut.u_single_moore.state), amount);
      check($sformatf("coin %0d seq Moore state", k), int'(dut.u_seq_sync.state), amount);
      check($sformatf("coin %0d dual Moore state", k), int'(dut.u_dual_moore.state), amount);
    end
    for (int v = 0; v < N_VARIANTS; v++) begin
      check($sformatf("variant %0d dispensed", v), n_disp[v], 4);
      check($sformatf("variant %0d returned", v), n_ret[v], 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
