// sidh_prime_run -- test helper: runs the core end to end for one SIDH prime
// p = 2^EA * 3^EB * F - 1 and NMULT multipliers, both set by parameters, so
// that the same sequence can be repeated for every security level and
// multiplier count.
//
// The prime is computed here from its exponents; the core is built with
// NW = ceil((bits(p)+2)/16) radix-2^16 digits and W = 16*NW. The program file
// must have been scheduled for the same NW (multiplier latency 3*NW+4 and
// adder latency ceil(W/256) cycles) and multiplier count. The sequence is the one of the
// default-size test: load constants and operands through the 64-bit host
// port, run block 0 (Fp^2 product and square), block 1 (3-isogeny curve
// coefficients) and block 2 (copy of the last point-queue entry through the
// special port-A address), optionally blocks 3 and 4 (3-isogeny evaluation
// at one and at two queued points; skipped when S3 is negative), read back
// and compare with values computed here with wide integers. Each block's cycle count is held against the schedule.
//
// Interface: fin rises when the sequence has ended; checks and failures are
// then final. The helper drives its own clock.
module sidh_prime_run #(
  parameter int    EA = 250,
  parameter int    EB = 159,
  parameter int    F  = 1,
  parameter int    PBITS = 503,
  parameter int    NMULT = 12,
  parameter string PROG_FILE = "tb/sidh_program_nw32.hex",
  parameter int    S0 = 0, E0 = 37, C0 = 125,
  parameter int    S1 = 37, E1 = 181, C1 = 298,
  parameter int    S2 = 181, E2 = 193, C2 = 12,
  parameter int    S3 = -1,  E3 = 0,   C3 = 0,
  parameter int    S4 = -1,  E4 = 0,   C4 = 0
) (
  output logic fin,
  output int   checks,
  output int   failures
);
  import sidh_pkg::AW, sidh_pkg::QUEUE_BASE, sidh_pkg::QUEUE_REGS_PER_POINT;
  localparam int unsigned NW = (PBITS + 2 + 15) / 16;
  localparam int unsigned W  = 16 * NW;
  localparam int unsigned RB = 16 * (NW + 1);
  localparam int unsigned XW = W + RB + 2;   // holds x*y and x*R for x, y < p
  typedef logic [XW-1:0] big_t;
  typedef struct { big_t re, im; } fp2_t;

  function automatic logic [W-1:0] sidh_prime();
    logic [W-1:0] v = W'(F);
    v = v << EA;
    for (int i = 0; i < EB; i++) v = v * W'(3);
    return v - W'(1);
  endfunction
  localparam logic [W-1:0] P = sidh_prime();

  localparam int BS [5] = '{S0, S1, S2, S3, S4};
  localparam int BE [5] = '{E0, E1, E2, E3, E4};
  localparam int BC [5] = '{C0, C1, C2, C3, C4};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start = 0, q_push = 0, q_pop = 0, host_mode = 1;
  logic [9:0]    start_pc = '0, end_pc = '0;
  logic          running, done, stalling, busy, dout_valid, rd_busy;
  logic [3:0]    queue_size;
  logic          wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [63:0]   din = '0, dout;

  sidh_core #(.NMULT(NMULT), .NW(NW), .P(P), .PROG_FILE(PROG_FILE)) dut (.*);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic big_t md(big_t x); return x % big_t'(P); endfunction
  function automatic big_t mmul(big_t x, big_t y); return md(x * y); endfunction
  function automatic big_t msub(big_t x, big_t y); return md(x + big_t'(P) - md(y)); endfunction
  function automatic big_t tomont(big_t x); return md(x << RB); endfunction
  function automatic fp2_t f2(big_t re, big_t im); fp2_t r; r.re = md(re); r.im = md(im); return r; endfunction
  function automatic fp2_t f2mul(fp2_t x, fp2_t y);
    return f2(msub(mmul(x.re, y.re), mmul(x.im, y.im)), mmul(x.re, y.im) + mmul(x.im, y.re));
  endfunction
  function automatic fp2_t f2add(fp2_t x, fp2_t y); return f2(x.re + y.re, x.im + y.im); endfunction
  function automatic fp2_t f2sub(fp2_t x, fp2_t y); return f2(msub(x.re, y.re), msub(x.im, y.im)); endfunction
  function automatic fp2_t f2k(fp2_t x, int k); return f2(x.re * k, x.im * k); endfunction
  function automatic big_t rnd_fp();
    big_t v = '0;
    for (int i = 0; i < (W + 31) / 32; i++) v[i*32 +: 32] = $urandom;
    return md(v);
  endfunction

  task automatic host_write(input int addr, input logic [W-1:0] val);
    for (int k = 0; k < W / 64; k++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(addr); din = val[64*k +: 64];
    end
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic host_read(input int addr, output logic [W-1:0] val);
    int k = 0;
    @(negedge clk);
    rd_en = 1; rd_addr = AW'(addr);
    @(negedge clk);
    rd_en = 0;
    while (k < W / 64) begin
      @(posedge clk);
      if (dout_valid) begin val[64*k +: 64] = dout; k++; end
    end
  endtask

  task automatic load_fp2(input int r, input fp2_t x);
    host_write(r,     W'(tomont(x.im)));
    host_write(r + 1, W'(tomont(x.re)));
  endtask

  task automatic check_fp2(input int r, input fp2_t x, input string what);
    logic [W-1:0] vi, vr;
    host_read(r, vi);
    host_read(r + 1, vr);
    checks++;
    if (big_t'(vi) >= 2 * big_t'(P) || big_t'(vr) >= 2 * big_t'(P)
        || md(big_t'(vi)) != tomont(x.im) || md(big_t'(vr)) != tomont(x.re)) begin
      failures++;
      $display("FAIL p%0d %s", PBITS, what);
    end
  endtask

  task automatic run_block(input int b);
    longint t0, t1;
    @(negedge clk);
    host_mode = 0;
    repeat (b % 3) @(negedge clk);
    start = 1; start_pc = 10'(BS[b]); end_pc = 10'(BE[b]);
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    t1 = cyc;
    checks++;
    if (t1 - t0 < BC[b] + 2 || t1 - t0 > BC[b] + 4) begin
      failures++;
      $display("FAIL p%0d block %0d took %0d cycles, schedule has %0d", PBITS, b, t1 - t0, BC[b]);
    end
    @(negedge clk);
    host_mode = 1;
  endtask

  fp2_t a, b, x3, z3, ex [3], ez [3];
  function automatic fp2_t eval_x(int k);
    return f2mul(ex[k], f2mul(f2sub(f2mul(x3, ex[k]), f2mul(z3, ez[k])),
                              f2sub(f2mul(x3, ex[k]), f2mul(z3, ez[k]))));
  endfunction
  function automatic fp2_t eval_z(int k);
    return f2mul(ez[k], f2mul(f2sub(f2mul(z3, ex[k]), f2mul(x3, ez[k])),
                              f2sub(f2mul(z3, ex[k]), f2mul(x3, ez[k]))));
  endfunction
  big_t qp [4];

  initial begin
    fin = 0; checks = 0; failures = 0;
    // the prime itself: right size and p + 1 divisible by 2^EA
    checks++;
    if (P[PBITS-1] !== 1'b1 || (W > PBITS && P[W-1:PBITS] != '0)
        || ((P + W'(1)) & ((W'(1) << EA) - W'(1))) != '0) begin
      failures++;
      $display("FAIL p%0d prime constant", PBITS);
    end
    a  = f2(rnd_fp(), rnd_fp());
    b  = f2(rnd_fp(), rnd_fp());
    x3 = f2(rnd_fp(), rnd_fp());
    z3 = f2(rnd_fp(), rnd_fp());
    repeat (4) @(posedge clk);
    rst_n = 1;
    host_write(0, '0);
    host_write(1, W'(tomont(1)));
    host_write(2, W'(tomont(2)));
    host_write(3, W'(tomont(6)));
    host_write(4, W'(tomont(md(big_t'(1) << RB))));
    load_fp2(16, a);
    load_fp2(18, b);
    load_fp2(24, x3);
    load_fp2(26, z3);

    run_block(0);
    check_fp2(20, f2mul(a, b), "A*B");
    check_fp2(22, f2mul(a, a), "A^2");

    run_block(1);
    begin
      fp2_t x2, z2, z4, x4, ea, ec;
      x2 = f2mul(x3, x3); z2 = f2mul(z3, z3); z4 = f2mul(z2, z2); x4 = f2mul(x2, x2);
      ea = f2sub(f2add(z4, f2k(f2mul(z2, x2), 18)), f2k(x4, 27));
      ec = f2k(f2mul(x3, f2mul(z2, z3)), 4);
      check_fp2(28, ea, "3-isogeny A");
      check_fp2(30, ec, "3-isogeny C");
    end

    @(negedge clk); q_push = 1;
    @(negedge clk); q_push = 0;
    for (int k = 0; k < 4; k++) begin
      qp[k] = rnd_fp();
      host_write(QUEUE_BASE + k, W'(tomont(qp[k])));
    end
    run_block(2);
    for (int k = 0; k < 4; k++) begin
      logic [W-1:0] v;
      host_read(32 + k, v);
      checks++;
      if (v != W'(tomont(qp[k]))) begin failures++; $display("FAIL p%0d queue copy %0d", PBITS, k); end
    end
    if (S3 >= 0) begin
      for (int k = 0; k < 3; k++) begin
        ex[k] = f2(rnd_fp(), rnd_fp());
        ez[k] = f2(rnd_fp(), rnd_fp());
        load_fp2(QUEUE_BASE + QUEUE_REGS_PER_POINT * k,     ex[k]);
        load_fp2(QUEUE_BASE + QUEUE_REGS_PER_POINT * k + 2, ez[k]);
      end
      run_block(3);
      check_fp2(36, eval_x(0), "eval X'");
      check_fp2(38, eval_z(0), "eval Z'");
      run_block(4);
      for (int k = 1; k < 3; k++) begin
        check_fp2(36 + 4 * (k - 1), eval_x(k), "eval2 X'");
        check_fp2(38 + 4 * (k - 1), eval_z(k), "eval2 Z'");
      end
    end
    $display("p%0d (NW=%0d, W=%0d, %0d multipliers): 3-isogeny block %0d cycles, evaluation blocks %0d and %0d cycles, checks=%0d failures=%0d",
             PBITS, NW, W, NMULT, C1, C3, C4, checks, failures);
    fin = 1;
  end
endmodule
