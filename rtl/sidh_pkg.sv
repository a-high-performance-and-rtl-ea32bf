// sidh_pkg -- constants and types shared by the SIDH field-arithmetic core.
//
// The default configuration is the 124-bit quantum security level: the prime
// p751 = 2^372 * 3^239 - 1, with every register-file value kept modulo 2p.
// Field elements are stored in W = 16*NW bit words, where NW = ceil((751+2)/16)
// = 48 radix-2^16 digits, so the Montgomery multiplier works on 768 bits and the
// adder on ceil(768/256) = 3 chunks of 256 bits, as in the latency table for p751.
// The 26-bit controller instruction word follows the published bit layout; the
// encodings of the 3-bit adder field and the 2-bit multiplier field are this
// design's own choice, since only the list of operations is given.
package sidh_pkg;

  // ---------------------------------------------------------------- field
  localparam int unsigned PBITS = 751;                   // bits of the prime
  localparam int unsigned RADIX = 16;                    // multiplier digit size k
  localparam int unsigned NW    = (PBITS + 2 + RADIX - 1) / RADIX; // 48 digits
  localparam int unsigned W     = NW * RADIX;            // 768-bit register word
  localparam int unsigned CHUNK = 256;                   // adder stage width
  localparam int unsigned NCHUNK = (W + CHUNK - 1) / CHUNK; // 3 adder stages

  // p751 = 2^372 * 3^239 - 1 (hex), and 2p.
  localparam logic [W-1:0] P751 = W'({
    192'h00006fe5d541f71c0e12909f97badc668562b5045cb25748,
    192'h084e9867d6ebe876da959b1a13f7cc76e3ec968549f878a8,
    192'heeafffffffffffffffffffffffffffffffffffffffffffff,
    192'hffffffffffffffffffffffffffffffffffffffffffffffff});
  localparam logic [W-1:0] TWO_P751 = P751 << 1;

  // ------------------------------------------------------------- latencies
  localparam int unsigned READ_LAT  = 2;                 // RAM read
  localparam int unsigned WRITE_LAT = 1;                 // RAM write
  localparam int unsigned ADD_LAT   = NCHUNK;            // one adder pass
  localparam int unsigned MULT_LAT  = 3 * NW + 4;        // 148 for p751

  // ------------------------------------------------------- register file
  localparam int unsigned NREGS  = 256;
  localparam int unsigned AW     = 8;
  localparam int unsigned NMULT  = 12;                   // 6 dual multipliers
  localparam int unsigned QUEUE_POINTS = 12;             // point-queue depth
  localparam int unsigned QUEUE_REGS_PER_POINT = 8;      // 96 registers / 12
  localparam int unsigned QUEUE_BASE = NREGS - QUEUE_POINTS * QUEUE_REGS_PER_POINT;

  // --------------------------------------------------------- instructions
  typedef enum logic [2:0] {
    ADD_NOP     = 3'd0,   // adder idle
    ADD_MEM_ADD = 3'd1,   // port A + port B
    ADD_MEM_SUB = 3'd2,   // port A - port B
    ADD_RED_ADD = 3'd3,   // reduction pass after a subtraction: +2p if negative
    ADD_RED_SUB = 3'd4    // reduction pass after an addition: -2p if not negative
  } add_op_e;

  typedef enum logic [1:0] {
    MUL_NOP   = 2'd0,
    MUL_START = 2'd1,     // start a multiplication on the next FIFO slot
    MUL_RESET = 2'd2      // reset the circular FIFO indices and even/odd bit
  } mul_op_e;

  // Bits 0-7 addr A, 8-15 addr B, 16 write A, 17 write B, 18 read A and B,
  // 19-21 adder op, 22-23 multiplier op, 24 special port-A address, 25 stall.
  typedef struct packed {
    logic          stall;
    logic          special_a;
    mul_op_e       mul_op;
    add_op_e       add_op;
    logic          rd;
    logic          wr_b;
    logic          wr_a;
    logic [AW-1:0] addr_b;
    logic [AW-1:0] addr_a;
  } instr_t;

  // Controls driven into the field arithmetic unit every cycle.
  typedef struct packed {
    logic          rd;
    logic          wr_a;
    logic          wr_b;
    logic [AW-1:0] addr_a;
    logic [AW-1:0] addr_b;
    add_op_e       add_op;
    mul_op_e       mul_op;
  } fau_ctrl_t;

  // --------------------------------------------------- Montgomery multiplier
  localparam int unsigned MM_CW = 18;   // carry between processing elements

  // Token that travels up the systolic array with one round of one product.
  typedef struct packed {
    logic        v;       // token present
    logic        slot;    // 0 = even product, 1 = odd product
    logic        first;   // round 0: S_0 = 0 (synchronous clear)
    logic        last;    // final round: outputs are result digits
    logic [15:0] a;       // digit a_i of operand A
    logic [15:0] q;       // quotient digit q_i = S_i mod 2^16
  } mm_tok_t;

endpackage
