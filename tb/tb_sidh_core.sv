// tb_sidh_core -- end-to-end test of the core at its default size (p751,
// 12 multipliers). A host model loads operands in Montgomery form through
// the 64-bit interface, runs the three instruction blocks of the shipped
// program and reads the results back:
//   block 0: C = A*B and D = A^2 in Fp^2,
//   block 1: the 3-isogeny of (X3:Z3): A = Z^4 + 18 Z^2 X^2 - 27 X^4 and
//            C = 4 X Z^3,
//   block 2: copies the last point of the point queue through the special
//            port-A address,
//   block 3: evaluates the 3-isogeny at the point in queue slot 0,
//   block 4: evaluates it at the points in slots 1 and 2 in parallel:
//            X' = X (X3 X - Z3 Z)^2, Z' = Z (Z3 X - X3 Z)^2.
// Expected values are computed here with wide integers modulo p (Fp^2 with
// i^2 = -1), independently of the schedule. A result register is correct if
// it is below 2p and congruent to x*R mod p, R = 2^(16*(NW+1)).
// It also checks each block's cycle count against the schedule length and
// counts that every mechanism happened: stall words, even-phase alignment,
// wrap-around of the multiplier FIFO, both multiplier phases, both outcomes
// of both reduction passes, special port-A addressing, host loads and reads.
module tb_sidh_core;
  import sidh_pkg::*;
  localparam int unsigned RB = 16 * (NW + 1);
  localparam int unsigned XW = 2 * W + RB + 2;
  typedef logic [XW-1:0] big_t;
  typedef struct { big_t re, im; } fp2_t;

  // block table of the shipped program: start, end (exclusive), cycles
  localparam int BLK_START [5] = '{0, 44, 203, 217, 413};
  localparam int BLK_END   [5] = '{44, 203, 217, 413, 805};
  localparam int BLK_CYC   [5] = '{179, 413, 15, 562, 1016};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start = 0, q_push = 0, q_pop = 0, host_mode = 1;
  logic [9:0]    start_pc = '0, end_pc = '0;
  logic          running, done, stalling, busy, dout_valid, rd_busy;
  logic [3:0]    queue_size;
  logic          wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [63:0]   din = '0, dout;

  sidh_core dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ mechanism counters
  int n_stall_words = 0, n_align = 0, n_fifo_wrap = 0, n_even = 0, n_odd = 0;
  int n_redsub_keep = 0, n_redsub_sub = 0, n_redadd_keep = 0, n_redadd_add = 0;
  int n_special = 0, n_host_wr = 0, n_host_rd = 0;
  always @(posedge clk) if (rst_n) begin
    if (stalling && !dut.u_ctrl.stall_active) n_stall_words++;
    if (dut.u_ctrl.state == 2'd1 && !dut.u_ctrl.eo_phase) n_align++;
    if (dut.u_fau.u_mul.op == MUL_START) begin
      if (dut.u_fau.u_mul.issue_idx == 4'(NMULT - 1)) n_fifo_wrap++;
      if (dut.u_fau.u_mul.issue_idx[0]) n_odd++; else n_even++;
    end
    if (dut.u_fau.u_add.fin.valid && dut.u_fau.u_add.fin.op == ADD_RED_SUB)
      if (dut.u_fau.u_add.borrow) n_redsub_keep++; else n_redsub_sub++;
    if (dut.u_fau.u_add.fin.valid && dut.u_fau.u_add.fin.op == ADD_RED_ADD)
      if (dut.u_fau.u_add.fin.op1_neg) n_redadd_add++; else n_redadd_keep++;
    if (dut.u_ctrl.exec_valid && !dut.u_ctrl.ins.stall && dut.u_ctrl.ins.special_a) n_special++;
  end

  // ------------------------------------------------------------ arithmetic
  function automatic big_t md(big_t x); return x % big_t'(P751); endfunction
  function automatic big_t mmul(big_t x, big_t y); return md(x * y); endfunction
  function automatic big_t msub(big_t x, big_t y); return md(x + big_t'(P751) - md(y)); endfunction
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

  // --------------------------------------------------------------- host
  task automatic host_write(input int addr, input logic [W-1:0] val);
    for (int k = 0; k < W / 64; k++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(addr); din = val[64*k +: 64];
    end
    @(negedge clk);
    wr_en = 0;
    n_host_wr++;
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
    n_host_rd++;
  endtask

  task automatic load_fp2(input int r, input fp2_t x);   // r: imaginary part, r+1: real
    host_write(r,     W'(tomont(x.im)));
    host_write(r + 1, W'(tomont(x.re)));
  endtask

  task automatic check_fp2(input int r, input fp2_t x, input string what);
    logic [W-1:0] vi, vr;
    host_read(r, vi);
    host_read(r + 1, vr);
    checks++;
    if (vi >= TWO_P751 || vr >= TWO_P751 || md(big_t'(vi)) != tomont(x.im)
        || md(big_t'(vr)) != tomont(x.re)) begin
      failures++;
      $display("FAIL %s: got im=%h re=%h", what, vi, vr);
    end
  endtask

  task automatic run_block(input int b);
    longint t0, t1;
    @(negedge clk);
    host_mode = 0;
    repeat (b % 3) @(negedge clk); // vary the phase at which blocks start
    start = 1; start_pc = 10'(BLK_START[b]); end_pc = 10'(BLK_END[b]);
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    t1 = cyc;
    // start cycle, one or two alignment cycles, one fetch cycle, the block, done
    checks++;
    if (t1 - t0 < BLK_CYC[b] + 2 || t1 - t0 > BLK_CYC[b] + 4) begin
      failures++;
      $display("FAIL block %0d took %0d cycles, schedule has %0d", b, t1 - t0, BLK_CYC[b]);
    end
    @(negedge clk);
    host_mode = 1;
  endtask

  fp2_t a, b, x3, z3, qp [4], ex [3], ez [3];
  function automatic fp2_t f2sq(fp2_t x); return f2mul(x, x); endfunction

  initial begin
    a  = f2(rnd_fp(), rnd_fp());
    b  = f2(rnd_fp(), rnd_fp());
    x3 = f2(rnd_fp(), rnd_fp());
    z3 = f2(rnd_fp(), rnd_fp());
    repeat (4) @(posedge clk);
    rst_n = 1;
    // constants 0, 1, 2, 6 (Montgomery form) and R^2, as at the start of the file
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

    // point queue: push three points, put a point in the last slot, copy it out
    for (int k = 0; k < 3; k++) begin
      @(negedge clk); q_push = 1;
    end
    @(negedge clk); q_push = 0;
    checks++;
    if (queue_size != 4'd3) begin failures++; $display("FAIL queue_size %0d", queue_size); end
    for (int k = 0; k < 4; k++) begin
      qp[k] = f2(rnd_fp(), 0);
      host_write(QUEUE_BASE + 2 * QUEUE_REGS_PER_POINT + k, W'(tomont(qp[k].re)));
    end
    run_block(2);
    for (int k = 0; k < 4; k++) begin
      logic [W-1:0] v;
      host_read(32 + k, v);
      checks++;
      if (v != W'(tomont(qp[k].re))) begin failures++; $display("FAIL queue copy %0d", k); end
    end
    @(negedge clk); q_pop = 1;
    @(negedge clk); q_pop = 0;
    checks++;
    if (queue_size != 4'd2) begin failures++; $display("FAIL queue pop"); end

    // 3-isogeny evaluation at queued points: one point, then two at once
    for (int k = 0; k < 3; k++) begin
      ex[k] = f2(rnd_fp(), rnd_fp());
      ez[k] = f2(rnd_fp(), rnd_fp());
      load_fp2(QUEUE_BASE + QUEUE_REGS_PER_POINT * k,     ex[k]);
      load_fp2(QUEUE_BASE + QUEUE_REGS_PER_POINT * k + 2, ez[k]);
    end
    run_block(3);
    check_fp2(36, f2mul(ex[0], f2sq(f2sub(f2mul(x3, ex[0]), f2mul(z3, ez[0])))), "eval X'");
    check_fp2(38, f2mul(ez[0], f2sq(f2sub(f2mul(z3, ex[0]), f2mul(x3, ez[0])))), "eval Z'");
    run_block(4);
    for (int k = 1; k < 3; k++) begin
      check_fp2(36 + 4 * (k - 1), f2mul(ex[k], f2sq(f2sub(f2mul(x3, ex[k]), f2mul(z3, ez[k])))), "eval2 X'");
      check_fp2(38 + 4 * (k - 1), f2mul(ez[k], f2sq(f2sub(f2mul(z3, ex[k]), f2mul(x3, ez[k])))), "eval2 Z'");
    end

    $display("mechanisms: stall_words=%0d align=%0d fifo_wrap=%0d even=%0d odd=%0d",
             n_stall_words, n_align, n_fifo_wrap, n_even, n_odd);
    $display("  red_sub keep/sub=%0d/%0d red_add keep/add=%0d/%0d special=%0d host wr/rd=%0d/%0d",
             n_redsub_keep, n_redsub_sub, n_redadd_keep, n_redadd_add, n_special, n_host_wr, n_host_rd);
    if (n_stall_words == 0) begin failures++; $display("FAIL no stall word"); end
    if (n_align == 0)       begin failures++; $display("FAIL no alignment wait"); end
    if (n_fifo_wrap == 0)   begin failures++; $display("FAIL no FIFO wrap"); end
    if (n_even == 0 || n_odd == 0) begin failures++; $display("FAIL phase unused"); end
    if (n_redsub_keep == 0 || n_redsub_sub == 0) begin failures++; $display("FAIL red_sub case"); end
    if (n_redadd_keep == 0 || n_redadd_add == 0) begin failures++; $display("FAIL red_add case"); end
    if (n_special == 0)     begin failures++; $display("FAIL no special address"); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
