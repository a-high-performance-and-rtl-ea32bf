// fp_addsub -- pipelined modular adder/subtractor working modulo 2p.
//
// Every value in the register file lies in [0, 2p). A modular addition or
// subtraction takes two passes through this unit, each ADD_LAT = NCHUNK
// cycles long:
//   pass 1 (ADD_MEM_ADD / ADD_MEM_SUB): r = A + B or r = A - B on the two
//          register-file operands; for a subtraction the sign is kept in
//          res_neg.
//   pass 2 (ADD_RED_SUB after an add): op1 is the fed-back result r and op2
//          is 2p; the unit forms r - 2p and keeps r if that is negative.
//   pass 2 (ADD_RED_ADD after a sub): forms r + 2p and keeps it only if r
//          was negative (flag fed back with r).
// So both A+-B and A+-B-+2p are always computed and the result is selected,
// giving a constant set of operations. The sum is cut into CHUNK (256) bit
// slices; slice s is added in pipeline stage s with the carry of slice s-1
// from the previous cycle, so a new operation can enter every cycle.
// The operand muxes of the published block diagram are inside this unit:
// operand 1 is the fed-back result (res) or port A, operand 2 is 0, port B or
// 2p, chosen from the operation code.
// Timing: operands and op sampled in cycle t, result in res/res_neg from
// cycle t + NCHUNK until the next result. Requires 4p < 2^W.
module fp_addsub
  import sidh_pkg::*;
#(
  parameter int unsigned  W      = sidh_pkg::W,
  parameter int unsigned  CHUNK  = sidh_pkg::CHUNK,
  parameter logic [W-1:0] TWO_P  = sidh_pkg::TWO_P751
) (
  input  logic         clk,
  input  logic         rst_n,
  input  add_op_e      op,
  input  logic [W-1:0] a_in,      // register RAM port A
  input  logic [W-1:0] b_in,      // register RAM port B
  output logic [W-1:0] res,       // add_res, also fed back as operand 1
  output logic         res_neg,   // pass-1 subtraction went negative
  output logic         res_valid  // res was produced by a (non-nop) op
);

  localparam int unsigned NCH = (W + CHUNK - 1) / CHUNK;
  localparam int unsigned WP  = NCH * CHUNK;

  typedef struct packed {
    logic          valid;
    add_op_e       op;
    logic          carry;
    logic          op1_neg;
    logic [WP-1:0] op1;    // operand 1 as entered (kept for the selection)
    logic [WP-1:0] op2x;   // operand 2, complemented for a subtraction
    logic [WP-1:0] sum;    // result slices done so far
  } stage_t;

  stage_t stg_in;
  stage_t stg_q [NCH];     // stg_q[s] feeds slice s (s >= 1); stg_q[NCH-1] ends
  stage_t stg_d [NCH];

  // ----------------------------------------------------- operand selection
  logic          is_sub, use_fb;
  logic [W-1:0]  op1, op2;

  always_comb begin
    is_sub = (op == ADD_MEM_SUB) || (op == ADD_RED_SUB);
    use_fb = (op == ADD_RED_ADD) || (op == ADD_RED_SUB);
    op1    = use_fb ? res : a_in;           // a_op1: 0 = add_res, 1 = a_in
    unique case (op)                        // a_op2: 0, b_in, 2p
      ADD_MEM_ADD, ADD_MEM_SUB: op2 = b_in;
      ADD_RED_ADD, ADD_RED_SUB: op2 = TWO_P;
      default:                  op2 = '0;
    endcase
    stg_in         = '0;
    stg_in.valid   = (op != ADD_NOP);
    stg_in.op      = op;
    stg_in.carry   = is_sub;                // +1 of the two's complement
    stg_in.op1_neg = use_fb & res_neg;
    stg_in.op1     = WP'(op1);
    stg_in.op2x    = is_sub ? ~WP'(op2) : WP'(op2);
  end

  // --------------------------------------------- one 256-bit slice per stage
  for (genvar s = 0; s < NCH; s++) begin : g_slice
    stage_t      src;
    logic [CHUNK:0] part;
    assign src = (s == 0) ? stg_in : stg_q[s-1];
    always_comb begin
      part     = {1'b0, src.op1[s*CHUNK +: CHUNK]} + {1'b0, src.op2x[s*CHUNK +: CHUNK]}
               + {{CHUNK{1'b0}}, src.carry};
      stg_d[s] = src;
      stg_d[s].sum[s*CHUNK +: CHUNK] = part[CHUNK-1:0];
      stg_d[s].carry = part[CHUNK];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) stg_q[s] <= '0;
      else        stg_q[s] <= stg_d[s];
    end
  end

  // ------------------------------------------------------ result selection
  stage_t fin;
  logic   borrow;
  assign fin    = stg_q[NCH-1];
  assign borrow = ~fin.carry;               // meaningful for subtractions

  always_comb begin
    res_valid = fin.valid;
    res_neg   = 1'b0;
    res       = fin.sum[W-1:0];
    unique case (fin.op)
      ADD_MEM_SUB: res_neg = borrow;
      ADD_RED_SUB: if (borrow) res = fin.op1[W-1:0];       // r - 2p < 0: keep r
      ADD_RED_ADD: if (!fin.op1_neg) res = fin.op1[W-1:0]; // r >= 0: keep r
      default: ;
    endcase
  end

endmodule
