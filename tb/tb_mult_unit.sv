// tb_mult_unit -- the 12 replicated multipliers driven as the program does:
// after MUL_RESET, twelve products are started in consecutive cycles (even,
// odd, even, ...), two more reuse multipliers 0 and 1 after the restart
// distance, and every result is read (pop) exactly MULT_LAT cycles after its
// start, in issue order. Each mult_res must be A*B*R^-1 mod p (below 2p).
// A second MUL_RESET must bring both indices back to multiplier 0.
module tb_mult_unit;
  import sidh_pkg::*;
  localparam int unsigned RB = 16 * (NW + 1);
  localparam int NPROD = 14;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mul_op_e      op;
  logic [W-1:0] a, b, mult_res;
  logic         pop, eo_phase;
  int checks = 0, failures = 0;

  mult_unit dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd2p();
    logic [W:0] v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    v[W] = 1'b0;
    return W'(v % {1'b0, TWO_P751});
  endfunction

  function automatic bit ok(input logic [W-1:0] aa, bb, r);
    logic [2*W+RB:0] pp, lhs, rhs;
    pp  = (2*W+RB+1)'(P751);
    lhs = ((2*W+RB+1)'(r) << RB) % pp;
    rhs = ((2*W+RB+1)'(aa) * (2*W+RB+1)'(bb)) % pp;
    return (r < TWO_P751) && (lhs == rhs);
  endfunction

  logic [W-1:0] av [NPROD], bv [NPROD];
  int           st [NPROD];

  initial begin
    op = MUL_NOP; a = '0; b = '0; pop = 0;
    for (int k = 0; k < NPROD; k++) begin
      av[k] = rnd2p(); bv[k] = rnd2p();
      st[k] = (k < 12) ? 1 + k : 1 + 2 * NW + 4 + (k - 12);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    op = MUL_RESET;
    for (int t = 0; t <= st[NPROD-1] + int'(MULT_LAT) + 1; t++) begin
      @(negedge clk);
      op = MUL_NOP; a = '0; b = '0; pop = 0;
      for (int k = 0; k < NPROD; k++) begin
        if (t + 1 == st[k]) begin op = MUL_START; a = av[k]; b = bv[k]; end
        if (t + 1 == st[k] + int'(MULT_LAT)) begin
          pop = 1;
          checks++;
          if (!ok(av[k], bv[k], mult_res)) begin
            failures++; $display("FAIL product %0d", k);
          end
        end
      end
    end
    @(negedge clk);
    op = MUL_RESET; pop = 0;
    @(negedge clk);
    op = MUL_NOP;
    checks++;
    if (dut.issue_idx != 0 || dut.read_idx != 0 || eo_phase != 1'b0) begin
      failures++; $display("FAIL reset");
    end
    // result register of multiplier 0 still holds product 12
    checks++;
    if (!ok(av[12], bv[12], mult_res)) begin failures++; $display("FAIL result after reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
