// Test of the general microsequencer running its demo microprogram.
// A reference interpreter reads the same microprogram image, decodes each
// word {target, out, op, sel} itself and predicts uPC and the registered
// output every cycle while the condition inputs change at random. It also
// counts how often each branch kind happened and fails if one never did.
module tb_microsequencer;
  import microcode_pkg::*;

  localparam int CYCLES = 3000;
  localparam logic [16*12-1:0] PROG = useq_demo_rom();

  logic clk = 1'b0, rst = 1'b1;
  logic [1:0] inputs = 2'b00;
  logic [3:0] out, upc;
  int checks = 0, failures = 0;
  int ref_pc = 0;
  logic [3:0] ref_out = '0;
  int n_next = 0, n_jump = 0, n_taken = 0, n_not_taken = 0, n_restart = 0;

  always #5 clk = ~clk;

  microsequencer dut (.clk, .rst, .inputs, .out, .upc);

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    for (int c = 0; c < CYCLES; c++) begin
      logic [11:0] w;
      int target, op;
      bit cond;
      @(negedge clk);
      rst    = 1'b0;
      inputs = 2'($urandom_range(3));
      #1;
      checks++;
      if (upc !== 4'(ref_pc) || out !== ref_out) begin
        failures++;
        if (failures < 20)
          $display("FAIL %0t: uPC=%0d out=%b expected uPC=%0d out=%b", $time, upc, out, ref_pc, ref_out);
      end
      w      = PROG[ref_pc*12 +: 12];
      target = int'(w[11:8]);
      op     = int'(w[3:1]);
      cond   = inputs[w[0]];
      @(posedge clk);
      ref_out = w[7:4];
      case (op)
        1: begin ref_pc = target; n_jump++; end
        2: if (cond)  begin ref_pc = target; n_taken++; end
           else       begin ref_pc = (ref_pc + 1) % 16; n_not_taken++; end
        3: if (!cond) begin ref_pc = target; n_taken++; end
           else       begin ref_pc = (ref_pc + 1) % 16; n_not_taken++; end
        4: begin ref_pc = 0; n_restart++; end
        default: begin ref_pc = (ref_pc + 1) % 16; n_next++; end
      endcase
    end
    checks++;
    if (n_next == 0 || n_jump == 0 || n_taken == 0 || n_not_taken == 0 || n_restart == 0) begin
      failures++;
      $display("FAIL a branch kind never happened");
    end
    $display("next %0d, jump %0d, taken %0d, not taken %0d, restart %0d",
             n_next, n_jump, n_taken, n_not_taken, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
