// tb_fp_addsub -- self-checking test of the modulo-2p adder/subtractor.
// Runs groups of NCHUNK back-to-back first passes (random additions and
// subtractions of values in [0, 2p)) followed by their NCHUNK reduction
// passes, which exercises the full pipeline rate of one operation per cycle
// and the feedback of res into operand 1. Each result is compared with
// (a+b) mod 2p or (a-b) mod 2p computed here with wide integers, and must
// appear exactly 2*NCHUNK cycles after its first pass entered.
module tb_fp_addsub;
  import sidh_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  add_op_e      op;
  logic [W-1:0] a_in, b_in, res;
  logic         res_neg, res_valid;
  int checks = 0, failures = 0, cycles = 0;

  fp_addsub dut (.clk, .rst_n, .op, .a_in, .b_in, .res, .res_neg, .res_valid);

  always @(posedge clk) cycles <= cycles + 1;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rand_mod2p(input int kind);
    logic [W:0] v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    v[W] = 1'b0;
    case (kind)
      0: rand_mod2p = '0;
      1: rand_mod2p = TWO_P751 - 1;
      2: rand_mod2p = P751;
      default: rand_mod2p = W'(v % {1'b0, TWO_P751});
    endcase
  endfunction

  logic [W-1:0] av [NCHUNK], bv [NCHUNK], expv [NCHUNK];
  logic         sub  [NCHUNK];

  initial begin
    op = ADD_NOP; a_in = '0; b_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 200; g++) begin
      for (int k = 0; k < NCHUNK; k++) begin
        av[k] = rand_mod2p((g < 3) ? g : 9);
        bv[k] = rand_mod2p((g < 6 && g >= 3) ? g - 3 : 9);
        sub[k] = $urandom_range(0, 1) == 1;
        if (!sub[k]) begin
          logic [W:0] s;
          s = {1'b0, av[k]} + {1'b0, bv[k]};
          expv[k] = (s >= {1'b0, TWO_P751}) ? W'(s - {1'b0, TWO_P751}) : W'(s);
        end else begin
          expv[k] = (av[k] >= bv[k]) ? av[k] - bv[k] : av[k] + TWO_P751 - bv[k];
        end
      end
      // first passes, one per cycle
      for (int k = 0; k < NCHUNK; k++) begin
        @(negedge clk);
        op = sub[k] ? ADD_MEM_SUB : ADD_MEM_ADD; a_in = av[k]; b_in = bv[k];
      end
      // reduction passes consume the results as they leave the pipeline
      for (int k = 0; k < NCHUNK; k++) begin
        @(negedge clk);
        a_in = '0; b_in = '0;
        op = sub[k] ? ADD_RED_ADD : ADD_RED_SUB;
      end
      for (int k = 0; k < NCHUNK; k++) begin
        @(negedge clk);
        op = ADD_NOP;
        checks++;
        if (!res_valid || res !== expv[k]) begin
          failures++;
          if (failures < 5) $display("FAIL g=%0d k=%0d sub=%0d\n a %h\n b %h\n got %h\n exp %h", g, k, sub[k], av[k], bv[k], res, expv[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
