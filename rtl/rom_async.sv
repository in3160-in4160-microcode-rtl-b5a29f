// Asynchronous-read ROM holding a microprogram or a state table.
//
// The word at `addr` appears on `data` combinationally, with no clock: this is
// the "asynchronous memory" every microcoded state machine here is built
// around, so that the state register alone sets the machine's timing. The
// contents are the parameter CONTENTS, a flat image with word a at bits
// [a*DW +: DW]; a different image reprograms the machine without touching
// its logic. The lecture loads the table from a text file; passing it as a
// parameter (computed by the functions in microcode_pkg) is this design's
// choice, so simulation and synthesis see the same contents.
//
// Parameters: AW address bits (2**AW words), DW word bits, CONTENTS image.
module rom_async #(
  parameter int                     AW       = 3,
  parameter int                     DW       = 5,
  parameter logic [(2**AW)*DW-1:0]  CONTENTS = microcode_pkg::vend_seq_rom()
) (
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);

  logic [DW-1:0] mem [2**AW];

  for (genvar a = 0; a < 2**AW; a++) begin : g_word
    assign mem[a] = CONTENTS[a*DW +: DW];
  end

  assign data = mem[addr];

endmodule
