// Reads every word of two ROM images and compares them with the vending
// machine's microcode tables written out by hand: the 8 x 5 sequencer ROM
// {b, ready, coin, dispense, return} and the 16 x 6 Mealy ROM
// {next state, ready, coin, dispense, return}.
module tb_rom_async;
  import microcode_pkg::*;

  logic [2:0] a_seq;
  logic [4:0] d_seq;
  logic [3:0] a_mealy;
  logic [5:0] d_mealy;
  int checks = 0, failures = 0;

  rom_async #(.AW(3), .DW(5), .CONTENTS(vend_seq_rom()))   u_seq   (.addr(a_seq),   .data(d_seq));
  rom_async #(.AW(4), .DW(6), .CONTENTS(vend_mealy_rom())) u_mealy (.addr(a_mealy), .data(d_mealy));

  // Expected words, from the lecture's state tables.
  logic [4:0] exp_seq [8] = '{5'b11000, 5'b10100, 5'b10100, 5'b10100,
                              5'b00010, 5'b00001, 5'b00000, 5'b00000};
  logic [5:0] exp_mealy [16] = '{
    6'b001000, 6'b011000, 6'b101000, 6'b000000,   // S_RDY: none, 10c, 20c, both
    6'b010100, 6'b100100, 6'b110100, 6'b000000,   // S_10
    6'b100100, 6'b110100, 6'b000010, 6'b000000,   // S_20
    6'b110100, 6'b000010, 6'b000001, 6'b000000};  // S_30

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++) begin
      a_seq = 3'(a);
      #1;
      checks++;
      if (d_seq !== exp_seq[a]) begin
        failures++;
        $display("FAIL seq ROM[%0d] = %b, expected %b", a, d_seq, exp_seq[a]);
      end
    end
    for (int a = 0; a < 16; a++) begin
      a_mealy = 4'(a);
      #1;
      checks++;
      if (d_mealy !== exp_mealy[a]) begin
        failures++;
        $display("FAIL Mealy ROM[%0d] = %b, expected %b", a, d_mealy, exp_mealy[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
