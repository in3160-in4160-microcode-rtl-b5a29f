// Test of the ROM + sequencer vending machine with synchronized outputs and
// with outputs straight from the ROM.
//  - Latency: from S_RDY a 10c coin must raise `coin` one clock after the
//    coin for the fast form and two clocks after it for the synchronized
//    form (the register costs one cycle).
//  - Random coins, both-coin cycles (10c wins) and mid-run resets, compared
//    every cycle with the reference model.
//  - The unused states 6 and 7 are never entered.
module tb_seq_rom_fsm;
  import microcode_pkg::*;
  import vend_ref_pkg::*;

  localparam int CYCLES = 4000;

  logic clk = 1'b0, rst = 1'b1, ten = 1'b0, twenty = 1'b0;
  vend_out_t   out_sync, out_fast;
  vend_state_t st_sync, st_fast;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  seq_rom_fsm #(.SYNC_OUT(1'b1)) u_sync (.clk, .rst, .ten, .twenty, .out(out_sync), .state(st_sync));
  seq_rom_fsm #(.SYNC_OUT(1'b0)) u_fast (.clk, .rst, .ten, .twenty, .out(out_fast), .state(st_fast));

  vend_ref r_sync = new(1'b0, BOTH_TEN, 1'b0, 1'b1);
  vend_ref r_fast = new(1'b0, BOTH_TEN, 1'b0, 1'b0);

  task automatic check(string name, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %0t %s: %b expected %b", $time, name, got, exp);
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
    int lat_fast, lat_sync;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    @(negedge clk);
    // Latency of the coin light after a 10c coin from S_RDY.
    ten = 1'b1;
    lat_fast = -1;
    lat_sync = -1;
    for (int k = 1; k <= 4; k++) begin
      @(negedge clk) ten = 1'b0;
      #1;
      if (lat_fast < 0 && out_fast.coin) lat_fast = k;
      if (lat_sync < 0 && out_sync.coin) lat_sync = k;
    end
    check("latency_fast", 4'(lat_fast), 4'd1);
    check("latency_sync", 4'(lat_sync), 4'd2);
    // Back to a known state for the random run.
    @(negedge clk) rst = 1'b1;
    r_sync.reset(); r_fast.reset();
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
        check("seq_sync", out_sync, r_sync.expected(ten, twenty));
        check("seq_fast", out_fast, r_fast.expected(ten, twenty));
        check("state", {1'b0, st_fast}, 4'(r_fast.st));
      end
      @(posedge clk);
      if (rst) begin
        r_sync.reset(); r_fast.reset();
      end else begin
        r_sync.step(ten, twenty); r_fast.step(ten, twenty);
      end
    end
    $display("coin latency: fast %0d, synchronized %0d cycles", lat_fast, lat_sync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
