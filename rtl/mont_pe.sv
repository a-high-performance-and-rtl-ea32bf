// mont_pe -- one processing element of the systolic Montgomery multiplier.
//
// The multiplier evaluates, in radix 2^16 and with M' = 1 (true for primes
// 2^a * 3^b * f - 1, whose lowest digit is 0xFFFF),
//     q_i = S_i mod 2^16,   S_{i+1} = (S_i + q_i*M)/2^16 + a_i*B.
// Written with U_i = S_i + q_i*M + 2^16*a_i*B, digit j of U_i is
//     U_ij = S_ij + q_i*m_j + a_i*b_{j-1} + carry_{j-1}
// and digit j-1 of S_{i+1} is the low half of U_ij. Element j computes
// exactly this: it receives a_i, q_i and the carry from element j-1 (one
// cycle after j-1 handled the same round), the digit S_ij from element j+1
// (produced one cycle earlier, for round i-1), and hands the low 16 bits of
// U_ij down to element j-1. Round i therefore reaches element j at cycle
// 2i + j: every element works on a given product only every other cycle,
// which lets a second (odd) product use the other cycles.
// Element 0 forms q_i = S_i0 itself. On the first round S is forced to 0
// (the synchronous clear of the published design). The two multiplications
// of a 16x16 digit pair and the four-input addition form the critical path.
// Each element keeps b_{j-1} of both products, loaded when the first round
// passes. All outputs except res_* are registered.
module mont_pe
  import sidh_pkg::mm_tok_t;
#(
  parameter bit FIRST = 1'b0        // element 0: produces q_i
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  mm_tok_t                  tok_in,     // from element j-1
  input  logic [sidh_pkg::MM_CW-1:0] carry_in, // from element j-1
  input  logic [15:0]              s_above,    // S_ij from element j+1
  input  logic [15:0]              m_word,     // m_j
  input  logic [15:0]              b_load,     // b_{j-1} of the product starting
  output mm_tok_t                  tok_out,
  output logic [sidh_pkg::MM_CW-1:0] carry_out,
  output logic [15:0]              s_out,      // S_{i+1,j-1} to element j-1
  output logic                     res_we,     // this round is the last one (slot: tok_in.slot)
  output logic [15:0]              res_word    // result digit j-1
);


  logic [15:0] b_q [2];
  logic [15:0] s_in, q, b;
  logic [31:0] qm, ab;
  logic [33:0] u;

  always_comb begin
    s_in = tok_in.first ? 16'd0 : s_above;
    q    = FIRST ? s_in : tok_in.q;
    b    = tok_in.first ? b_load : b_q[tok_in.slot];
    qm   = {16'd0, q} * {16'd0, m_word};
    ab   = {16'd0, tok_in.a} * {16'd0, b};
    u    = {18'd0, s_in} + {2'd0, qm} + {2'd0, ab} + {16'd0, carry_in};
    res_we   = tok_in.v & tok_in.last;
    res_word = u[15:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_out   <= '0;
      carry_out <= '0;
      s_out     <= '0;
      b_q[0]    <= '0;
      b_q[1]    <= '0;
    end else begin
      tok_out   <= tok_in;
      tok_out.q <= q;
      if (tok_in.v) begin
        carry_out <= u[33:16];
        s_out     <= u[15:0];
      end else begin
        carry_out <= '0;
      end
      if (tok_in.v && tok_in.first) b_q[tok_in.slot] <= b_load;
    end
  end

endmodule
