// tb_mont_pe -- checks one systolic element (a middle one and element 0)
// against the digit equation U = S + q*m + a*b + carry: low half to s_out
// and res_word, high part to carry_out, token passed on with q (element 0
// produces q = S), S forced to 0 on a first round, b_{j-1} kept per product.
module tb_mont_pe;
  import sidh_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mm_tok_t       tin, tout0, tout1;
  logic [MM_CW-1:0] cin, cout0, cout1;
  logic [15:0]   s_above, m_word, b_load, s0, s1, rw0, rw1;
  logic          we0, we1;
  int checks = 0, failures = 0;

  mont_pe #(.FIRST(1'b0)) u_mid (.clk, .rst_n, .tok_in(tin), .carry_in(cin), .s_above, .m_word,
    .b_load, .tok_out(tout1), .carry_out(cout1), .s_out(s1), .res_we(we1), .res_word(rw1));
  mont_pe #(.FIRST(1'b1)) u_first (.clk, .rst_n, .tok_in(tin), .carry_in(cin), .s_above, .m_word,
    .b_load, .tok_out(tout0), .carry_out(cout0), .s_out(s0), .res_we(we0), .res_word(rw0));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] bmem [2];
  initial begin
    tin = '0; cin = '0; s_above = '0; m_word = '0; b_load = '0;
    bmem[0] = '0; bmem[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      logic [15:0] s, q0, b;
      logic [33:0] u0, u1;
      @(negedge clk);
      tin.v = 1; tin.slot = $urandom_range(0, 1); tin.first = (n < 2) || ($urandom_range(0, 7) == 0);
      tin.last = $urandom_range(0, 1); tin.a = 16'($urandom); tin.q = 16'($urandom);
      cin = MM_CW'($urandom); s_above = 16'($urandom); m_word = 16'($urandom); b_load = 16'($urandom);
      if (n % 50 == 0) begin tin.a = 16'hffff; tin.q = 16'hffff; m_word = 16'hffff; b_load = 16'hffff; cin = '1; s_above = 16'hffff; end
      if (tin.first) bmem[tin.slot] = b_load;
      b  = bmem[tin.slot];
      s  = tin.first ? 16'd0 : s_above;
      q0 = s;
      u1 = 34'(s) + 34'(tin.q) * 34'(m_word) + 34'(tin.a) * 34'(b) + 34'(cin);
      u0 = 34'(s) + 34'(q0) * 34'(m_word) + 34'(tin.a) * 34'(b) + 34'(cin);
      #1;
      checks++;
      if (rw1 !== u1[15:0] || we1 !== tin.last || rw0 !== u0[15:0]) begin
        failures++; if (failures < 5) $display("FAIL comb n=%0d", n);
      end
      @(posedge clk); #1;
      checks++;
      if (s1 !== u1[15:0] || cout1 !== u1[33:16] || tout1.q !== tin.q || tout1.a !== tin.a
          || s0 !== u0[15:0] || cout0 !== u0[33:16] || tout0.q !== q0 || tout0.slot !== tin.slot) begin
        failures++; if (failures < 5) $display("FAIL reg n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
