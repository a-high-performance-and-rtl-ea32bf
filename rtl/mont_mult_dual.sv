// mont_mult_dual -- interleaved systolic radix-2^16 Montgomery multiplier
// that carries two products at once ("even" and "odd").
//
// Computes res = A*B*2^(-16*(NW+1)) mod M, with res < 2M, for A, B < 2M and
// 2M < 2^(16*NW). It is a one-dimensional array of NW+2 mont_pe elements;
// element j holds modulus digit m_j and the B digit b_{j-1} of both products.
// Digits a_0 .. a_{NW-1} of A, followed by two zero digits, enter element 0
// one every other cycle (NW+2 rounds in all) and travel up the array together
// with the quotient digit q_i found in element 0; the partial sum S travels
// down. Element NW+1 feeds its own carry back to itself as the top digit.
// Because a product uses each element only every other cycle, a second product
// started one cycle later (opposite parity) runs in the free cycles. Which of
// the two result registers a product uses is given by start_slot; the caller
// must start slot 0 on even and slot 1 on odd cycles of its even/odd count,
// which the assertion below checks as "no two products in one phase".
// Timing: A and B are sampled in the start cycle c; the result register of
// the slot holds the product from cycle c + 3*NW + 4 (148 for p751, the
// published multiplication latency) until the same slot finishes again.
// The same slot can be restarted 2*NW+4 cycles after its previous start.
module mont_mult_dual #(
  parameter int unsigned  NW = sidh_pkg::NW,
  parameter int unsigned  W  = 16 * NW,
  parameter logic [W-1:0] M  = W'(sidh_pkg::P751)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          start_slot,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  output logic [W-1:0]  res  [2],
  output logic [1:0]    done           // pulse: res[slot] just completed
);
  import sidh_pkg::mm_tok_t;
  localparam int unsigned CW = sidh_pkg::MM_CW;
  localparam int unsigned NP = NW + 2;            // processing elements
  localparam int unsigned RW = $clog2(NW + 2) + 1;

  // --------------------------------------------------------- A feeders
  logic [W-1:0]  a_sr   [2];
  logic [W-1:0]  b_stage[2];
  logic [RW-1:0] rnd    [2];
  logic          busy   [2];
  logic          ph     [2];
  mm_tok_t       feed_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 2; s++) begin
        a_sr[s] <= '0; b_stage[s] <= '0; rnd[s] <= '0; busy[s] <= 1'b0; ph[s] <= 1'b0;
      end
      feed_q <= '0;
    end else begin
      feed_q <= '0;
      for (int s = 0; s < 2; s++) begin
        if (start && start_slot == s[0]) begin
          feed_q.v     <= 1'b1;
          feed_q.slot  <= s[0];
          feed_q.first <= 1'b1;
          feed_q.a     <= a[15:0];
          a_sr[s]      <= a >> 16;
          b_stage[s]   <= b;
          rnd[s]       <= RW'(1);
          busy[s]      <= 1'b1;
          ph[s]        <= 1'b1;
        end else if (busy[s]) begin
          ph[s] <= ~ph[s];
          if (!ph[s]) begin
            feed_q.v    <= 1'b1;
            feed_q.slot <= s[0];
            feed_q.last <= (rnd[s] == RW'(NW + 1));
            feed_q.a    <= a_sr[s][15:0];
            a_sr[s]     <= a_sr[s] >> 16;
            rnd[s]      <= rnd[s] + RW'(1);
            if (rnd[s] == RW'(NW + 1)) busy[s] <= 1'b0;
          end
        end
      end
    end
  end

  // ---------------------------------------------------------- the array
  mm_tok_t        tok   [NP+1];     // tok[j] enters element j
  logic [CW-1:0]  carry [NP+1];
  logic [15:0]    s_dn  [NP+1];     // s_dn[j] is the S digit leaving element j
  logic [15:0]    top_q [2];        // top digit of S, per product
  logic           r_we  [NP];
  logic [15:0]    r_word[NP];

  assign tok[0]   = feed_q;
  assign carry[0] = '0;
  assign s_dn[NP] = top_q[tok[NP-1].slot];

  for (genvar j = 0; j < NP; j++) begin : g_pe
    localparam logic [15:0] MJ = 16'(M >> (16 * j));
    logic [15:0] bl;
    if (j >= 1 && j <= NW) begin : g_b
      assign bl = b_stage[tok[j].slot][16*(j-1) +: 16];
    end else begin : g_nob
      assign bl = 16'd0;
    end
    mont_pe #(.FIRST(j == 0)) u_pe (
      .clk, .rst_n,
      .tok_in   (tok[j]),
      .carry_in (carry[j]),
      .s_above  (s_dn[j+1]),
      .m_word   (MJ),
      .b_load   (bl),
      .tok_out  (tok[j+1]),
      .carry_out(carry[j+1]),
      .s_out    (s_dn[j]),
      .res_we   (r_we[j]),
      .res_word (r_word[j])
    );
  end

  // top element: its carry-out is the top digit of S for the next round
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      top_q[0] <= '0; top_q[1] <= '0;
    end else if (tok[NP].v) begin
      top_q[tok[NP].slot] <= carry[NP][15:0];
    end
  end

  // ------------------------------------------------------- result digits
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res[0] <= '0; res[1] <= '0; done <= '0;
    end else begin
      done <= '0;
      for (int j = 1; j <= NW; j++) begin
        if (r_we[j]) res[tok[j].slot][16*(j-1) +: 16] <= r_word[j];
      end
      if (r_we[NW]) done[tok[NW].slot] <= 1'b1;
    end
  end

endmodule
