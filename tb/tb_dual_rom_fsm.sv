// Random-coin test of the dual-ROM state machine: the Moore form (32 x 3
// next-state ROM, 8 x 4 output ROM on the state) and the Mealy form (16 x 2
// and 16 x 4 ROMs on {state, coins}). Every cycle the outputs are compared
// with the reference model, including both-coin cycles and resets.
module tb_dual_rom_fsm;
  import microcode_pkg::*;
  import vend_ref_pkg::*;

  localparam int CYCLES = 4000;

  logic clk = 1'b0, rst = 1'b1, ten = 1'b0, twenty = 1'b0;
  logic [3:0] out_moore, out_mealy;
  int checks = 0, failures = 0;
  int n_disp = 0, n_ret = 0;

  always #5 clk = ~clk;

  dual_rom_fsm #(.I(2), .S(3), .O(4), .MEALY(1'b0),
                 .NS_ROM(vend_dual_moore_ns_rom()), .OUT_ROM(vend_dual_moore_out_rom())) u_moore (
    .clk, .rst, .in({twenty, ten}), .out(out_moore), .state());
  dual_rom_fsm #(.I(2), .S(2), .O(4), .MEALY(1'b1),
                 .NS_ROM(vend_dual_mealy_ns_rom()), .OUT_ROM(vend_dual_mealy_out_rom())) u_mealy (
    .clk, .rst, .in({twenty, ten}), .out(out_mealy), .state());

  vend_ref r_moore = new(1'b0, BOTH_ZERO_NEXT, 1'b0, 1'b0);
  vend_ref r_mealy = new(1'b1, BOTH_ZERO, 1'b0, 1'b0);

  task automatic check(string name, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %0t %s: out=%b expected %b", $time, name, got, exp);
    end
  endtask

  initial begin
    repeat (CYCLES * 2 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    for (int c = 0; c < CYCLES; c++) begin
      int p;
      @(negedge clk);
      rst    = 1'b0;
      p = $urandom_range(99);
      ten    = (p < 30) || (p >= 95);
      twenty = (p >= 30 && p < 50) || (p >= 95);
      if (p == 94) rst = 1'b1;
      #1;
      if (!rst) begin
        check("dual_moore", out_moore, r_moore.expected(ten, twenty));
        check("dual_mealy", out_mealy, r_mealy.expected(ten, twenty));
        n_disp += int'(out_moore[1]);
        n_ret  += int'(out_moore[0]);
      end
      @(posedge clk);
      if (rst) begin
        r_moore.reset(); r_mealy.reset();
      end else begin
        r_moore.step(ten, twenty); r_mealy.step(ten, twenty);
      end
    end
    checks++;
    if (n_disp == 0 || n_ret == 0) begin
      failures++;
      $display("FAIL dispense or return never seen");
    end
    $display("dispense cycles %0d, return cycles %0d", n_disp, n_ret);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
