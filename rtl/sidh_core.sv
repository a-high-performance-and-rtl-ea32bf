// sidh_core -- top level of the isogeny arithmetic core: controller, program
// ROM and field arithmetic unit.
//
// The controller steps through the program ROM one word per cycle and drives
// the field arithmetic unit (register RAM, modulo-2p adder, NMULT replicated
// Montgomery multipliers, 64-bit host interface) with the word's controls.
// A host first loads constants and operands into the register RAM through
// the 64-bit interface (host_mode = 1), then runs instruction blocks with
// start/start_pc/end_pc and waits for done, and finally reads results back.
// The sequencing of whole protocol rounds (ladder loops over the private key,
// the isogeny strategy walk and its point-queue pushes and pops) belongs to
// a sequencer outside this module; its connections (start, start_pc, end_pc,
// done, q_push, q_pop) are ports here.
// Defaults: p751, 12 multipliers (6 even/odd pairs), 256 registers, a
// 1024-word program ROM.
module sidh_core
  import sidh_pkg::*;
#(
  parameter int unsigned  NMULT      = sidh_pkg::NMULT,
  parameter int unsigned  NW         = sidh_pkg::NW,
  parameter int unsigned  W          = 16 * NW,
  parameter logic [W-1:0] P          = W'(sidh_pkg::P751),
  parameter int unsigned  PROG_DEPTH = 1024,
  parameter int unsigned  PW         = $clog2(PROG_DEPTH),
  parameter string        PROG_FILE  = "rtl/sidh_program.hex"
) (
  input  logic          clk,
  input  logic          rst_n,
  // block sequencing
  input  logic          start,
  input  logic [PW-1:0] start_pc,
  input  logic [PW-1:0] end_pc,
  output logic          running,
  output logic          done,
  input  logic          q_push,
  input  logic          q_pop,
  output logic [3:0]    queue_size,
  output logic          stalling,
  // 64-bit host interface
  input  logic          host_mode,
  output logic          busy,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [63:0]   din,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [63:0]   dout,
  output logic          dout_valid,
  output logic          rd_busy
);
  logic [PW-1:0] rom_addr;
  logic          rom_en, eo_phase;
  logic [25:0]   rom_data;
  fau_ctrl_t     ctrl;

  program_rom #(.DEPTH(PROG_DEPTH), .PW(PW), .INIT_FILE(PROG_FILE)) u_rom (
    .clk, .en(rom_en), .addr(rom_addr), .data(rom_data)
  );

  controller #(.PW(PW)) u_ctrl (
    .clk, .rst_n, .start, .start_pc, .end_pc, .eo_phase, .q_push, .q_pop,
    .rom_addr, .rom_en, .rom_data, .ctrl, .running, .done, .queue_size, .stalling
  );

  field_arith_unit #(.NMULT(NMULT), .NW(NW), .W(W), .P(P)) u_fau (
    .clk, .rst_n, .ctrl,
    .host_mode, .busy, .wr_en, .wr_addr, .din, .rd_en, .rd_addr,
    .dout, .dout_valid, .rd_busy, .eo_phase
  );

endmodule
