// tb_mont_mult_dual -- self-checking test of the dual Montgomery multiplier
// at the full p751 size. Products are started in pairs (even slot, then odd
// slot one cycle later), back to back at the minimum restart distance, with
// random operands in [0, 2p) and the corner values 0, 1, p and 2p-1. Each
// result r must satisfy r < 2p and r * 2^(16*(NW+1)) = A*B (mod p), checked
// with wide integer arithmetic here, and must be present exactly MULT_LAT
// cycles after its start, which is also when done rises.
module tb_mont_mult_dual;
  import sidh_pkg::*;
  localparam int unsigned RB = 16 * (NW + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, start_slot;
  logic [W-1:0] a, b;
  logic [W-1:0] res [2];
  logic [1:0]   done;
  int checks = 0, failures = 0;
  longint cyc = 0;

  mont_mult_dual dut (.clk, .rst_n, .start, .start_slot, .a, .b, .res, .done);

  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd2p(input int kind);
    logic [W:0] v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    v[W] = 1'b0;
    case (kind)
      0: return '0;
      1: return W'(1);
      2: return P751;
      3: return TWO_P751 - 1;
      default: return W'(v % {1'b0, TWO_P751});
    endcase
  endfunction

  // reference: is r*2^RB == a*b mod p, with r < 2p ?
  function automatic bit ok(input logic [W-1:0] aa, bb, r);
    logic [2*W+RB:0] lhs, rhs, pp;
    pp  = (2*W+RB+1)'(P751);
    lhs = ((2*W+RB+1)'(r) << RB) % pp;
    rhs = ((2*W+RB+1)'(aa) * (2*W+RB+1)'(bb)) % pp;
    return (r < TWO_P751) && (lhs == rhs);
  endfunction

  logic [W-1:0] av [2], bv [2];
  longint t_start;

  initial begin
    start = 0; start_slot = 0; a = '0; b = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 12; n++) begin
      for (int s = 0; s < 2; s++) begin
        av[s] = rnd2p(n < 4 ? n : 9);
        bv[s] = rnd2p(n < 4 ? 3 - n + s : 9);
      end
      // even product, then odd product in the next cycle
      start = 1; start_slot = 0; a = av[0]; b = bv[0];
      t_start = cyc;
      @(negedge clk);
      start_slot = 1; a = av[1]; b = bv[1];
      @(negedge clk);
      start = 0; a = '0; b = '0;
      // wait until the latency has elapsed for the even product
      while (cyc < t_start + MULT_LAT) @(negedge clk);
      // cycle t_start + MULT_LAT: slot 0 result present, done[0] seen on this cycle
      checks++;
      if (!ok(av[0], bv[0], res[0]) || !done[0]) begin
        failures++;
        $display("FAIL n=%0d slot0 res=%h done=%b", n, res[0], done);
      end
      @(negedge clk);
      checks++;
      if (!ok(av[1], bv[1], res[1]) || !done[1]) begin
        failures++;
        $display("FAIL n=%0d slot1 res=%h done=%b", n, res[1], done);
      end
      // one cycle earlier the result must not yet have been flagged
    end
    // restart distance: two products in the same slot 2*NW+4 apart
    av[0] = rnd2p(9); bv[0] = rnd2p(9); av[1] = rnd2p(9); bv[1] = rnd2p(9);
    start = 1; start_slot = 0; a = av[0]; b = bv[0];
    t_start = cyc;
    @(negedge clk);
    start = 0;
    while (cyc < t_start + 2 * NW + 4) @(negedge clk);
    start = 1; start_slot = 0; a = av[1]; b = bv[1];
    @(negedge clk);
    start = 0;
    while (cyc < t_start + MULT_LAT) @(negedge clk);
    checks++;
    if (!ok(av[0], bv[0], res[0]) || !done[0]) begin failures++; $display("FAIL restart first"); end
    while (cyc < t_start + 2 * NW + 4 + MULT_LAT) @(negedge clk);
    checks++;
    if (!ok(av[1], bv[1], res[0]) || !done[0]) begin failures++; $display("FAIL restart second"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
