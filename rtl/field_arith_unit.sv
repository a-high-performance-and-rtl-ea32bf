// field_arith_unit -- the Fp arithmetic datapath of the SIDH core.
//
// A dual-port register RAM of 256 values (mod 2p) feeds a pipelined modular
// adder/subtractor and a bank of replicated Montgomery multipliers. Both
// units take their operands straight from the two RAM read ports; the adder
// result is written back through port A and the multiplier result through
// port B, so one sum and one product can be stored in the same cycle, and
// products never pass through the adder. The adder's operand 1 is port A or
// its own result (reduction pass); operand 2 is 0, port B or 2p.
// Every cycle the controller supplies one set of controls (fau_ctrl_t):
// a read of both ports, a write on port A (adder result) and/or port B
// (multiplier result, which also advances the multiplier read index), one
// adder operation and one multiplier operation. The unit itself has no
// scheduling logic: the program must place every read, operation and store
// at the right cycle (read 2, one adder pass ADD_LAT, multiplication
// MULT_LAT, write 1).
// While busy is 0 (host_mode) the 64-bit host interface owns the RAM
// addresses and the port-B write mux (input 0 = interface data, input 1 =
// mult_res, selected by busy), as in the published block diagram.
module field_arith_unit
  import sidh_pkg::*;
#(
  parameter int unsigned  NMULT = sidh_pkg::NMULT,
  parameter int unsigned  NW    = sidh_pkg::NW,
  parameter int unsigned  W     = 16 * NW,
  parameter logic [W-1:0] P     = W'(sidh_pkg::P751)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  fau_ctrl_t    ctrl,
  // host interface
  input  logic         host_mode,
  output logic         busy,
  input  logic         wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [63:0]  din,
  input  logic         rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [63:0]  dout,
  output logic         dout_valid,
  output logic         rd_busy,
  // status
  output logic         eo_phase
);
  localparam logic [W-1:0] TWO_P = P << 1;

  logic [W-1:0]  rdata_a, rdata_b, add_res, mult_res, if_wdata_b;
  logic          add_neg, add_valid;
  logic [AW-1:0] if_addr_a, if_addr_b, ram_addr_a, ram_addr_b;
  logic          if_we_b, ram_we_a, ram_we_b;
  logic [W-1:0]  ram_wdata_b;
  add_op_e       add_op;
  mul_op_e       mul_op;

  // ------------------------------------------------ host interface muxes
  always_comb begin
    if (!busy) begin
      ram_addr_a  = if_addr_a;
      ram_addr_b  = if_addr_b;
      ram_we_a    = 1'b0;
      ram_we_b    = if_we_b;
      ram_wdata_b = if_wdata_b;     // port-B mux input 0
      add_op      = ADD_NOP;
      mul_op      = MUL_NOP;
    end else begin
      ram_addr_a  = ctrl.addr_a;
      ram_addr_b  = ctrl.addr_b;
      ram_we_a    = ctrl.wr_a;
      ram_we_b    = ctrl.wr_b;
      ram_wdata_b = mult_res;       // port-B mux input 1
      add_op      = ctrl.add_op;
      mul_op      = ctrl.mul_op;
    end
  end

  register_ram #(.W(W), .NREGS(NREGS), .AW(AW)) u_ram (
    .clk,
    .addr_a (ram_addr_a), .we_a(ram_we_a), .wdata_a(add_res), .rdata_a,
    .addr_b (ram_addr_b), .we_b(ram_we_b), .wdata_b(ram_wdata_b), .rdata_b
  );

  fp_addsub #(.W(W), .CHUNK(CHUNK), .TWO_P(TWO_P)) u_add (
    .clk, .rst_n, .op(add_op), .a_in(rdata_a), .b_in(rdata_b),
    .res(add_res), .res_neg(add_neg), .res_valid(add_valid)
  );

  mult_unit #(.NMULT(NMULT), .NW(NW), .W(W), .M(P)) u_mul (
    .clk, .rst_n, .op(mul_op), .a(rdata_a), .b(rdata_b),
    .pop(ram_we_b && busy), .mult_res, .eo_phase
  );

  fpga_interface #(.W(W), .AW(AW)) u_if (
    .clk, .rst_n, .host_mode, .busy,
    .wr_en, .wr_addr, .din, .rd_en, .rd_addr, .dout, .dout_valid, .rd_busy,
    .ram_addr_a(if_addr_a), .ram_rdata_a(rdata_a),
    .ram_addr_b(if_addr_b), .ram_we_b(if_we_b), .ram_wdata_b(if_wdata_b)
  );

endmodule
