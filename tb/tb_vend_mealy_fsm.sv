// Random-coin test of the hard-wired Mealy vending machine against the
// reference model (coin stays on while dispensing or returning; a cycle with
// both coins counts as 10c), plus a directed check that 10c + 10c + 20c
// dispenses in the same cycle as the last coin.
module tb_vend_mealy_fsm;
  import microcode_pkg::*;
  import vend_ref_pkg::*;

  localparam int CYCLES = 4000;

  logic clk = 1'b0, rst = 1'b1, ten = 1'b0, twenty = 1'b0;
  vend_out_t    out;
  vend_mstate_t state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vend_mealy_fsm dut (.*);

  vend_ref r = new(1'b1, BOTH_TEN, 1'b1, 1'b0);

  task automatic check(string name, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %0t %s: out=%b expected %b", $time, name, got, exp);
    end
  endtask

  initial begin
    repeat (CYCLES * 2 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // Directed: 10c, 10c, 20c -> dispense together with the 20c coin.
    @(negedge clk) ten = 1'b1;
    @(negedge clk);
    @(negedge clk) begin ten = 1'b0; twenty = 1'b1; end
    #1 check("dispense_with_last_coin", {out.dispense, state}, {1'b1, M_20});
    @(negedge clk) twenty = 1'b0;
    #1 check("back_to_ready", {out.ready, state}, {1'b1, M_RDY});
    for (int c = 0; c < CYCLES; c++) begin
      int p;
      @(negedge clk);
      rst    = 1'b0;
      p = $urandom_range(99);
      ten    = (p < 30) || (p >= 95);
      twenty = (p >= 30 && p < 50) || (p >= 95);
      if (p == 94) rst = 1'b1;
      #1;
      if (!rst) check("mealy_hw", out, r.expected(ten, twenty));
      @(posedge clk);
      if (rst) begin
        r.reset();
      end else begin
        r.step(ten, twenty);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
