// Exhaustive test of the vending-machine sequencer: every state, branch bit
// and coin combination is compared with the rule "branch bit 0 -> state 0,
// otherwise +1 for 10c, +2 for 20c, +0 for no coin (10c wins if both)".
module tb_vend_sequencer;
  logic [2:0] state, next_state;
  logic       b, ten, twenty;
  int checks = 0, failures = 0;

  vend_sequencer #(.S(3)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      logic [2:0] exp_ns;
      {state, b, twenty, ten} = 6'(i);
      #1;
      if (!b)          exp_ns = 3'd0;
      else if (ten)    exp_ns = 3'((int'(state) + 1) % 8);
      else if (twenty) exp_ns = 3'((int'(state) + 2) % 8);
      else             exp_ns = state;
      checks++;
      if (next_state !== exp_ns) begin
        failures++;
        $display("FAIL state=%0d b=%0b ten=%0b twenty=%0b: next=%0d expected %0d",
                 state, b, ten, twenty, next_state, exp_ns);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
