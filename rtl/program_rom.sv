// program_rom -- constant program ROM of 26-bit controller instructions.
//
// Synchronous read: the word at addr appears on data one cycle later; while
// en is low the output register holds its word (used by stalls). The contents
// come from a hex file, one instruction word per line, produced offline by a
// greedy list scheduler; the file shipped with the design holds five
// instruction blocks (Fp^2 multiply-and-square, the 3-isogeny curve, a
// point-queue copy, and 3-isogeny evaluation at one and at two queued
// points), not a whole key exchange. Unused words read as 0 (no operation).
module program_rom #(
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned PW        = $clog2(DEPTH),
  parameter string       INIT_FILE = "rtl/sidh_program.hex"
) (
  input  logic          clk,
  input  logic          en,
  input  logic [PW-1:0] addr,
  output logic [25:0]   data
);
  logic [25:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) rom[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  always_ff @(posedge clk) begin
    if (en) data <= rom[addr];
  end

endmodule
