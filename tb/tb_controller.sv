// tb_controller -- runs a four-word block through the controller with a
// model ROM and a model even/odd bit: a read-and-add word, a 4-cycle stall
// word, a word with the special port-A (point queue) address and a store
// with MUL_RESET. Checks the controls cycle by cycle, that the first word
// executes on an even phase whatever the start phase, the stall length,
// the queue address for queue_size = 2, queue_size limits and done timing.
module tb_controller;
  import sidh_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start, q_push, q_pop, rom_en, running, done, stalling, eo_phase;
  logic [9:0]  start_pc, end_pc, rom_addr;
  logic [25:0] rom_data;
  logic [3:0]  queue_size;
  fau_ctrl_t   ctrl;
  int checks = 0, failures = 0;

  controller #(.PW(10)) dut (.*);

  logic [25:0] rom [16];
  always_ff @(posedge clk) if (rom_en) rom_data <= rom[rom_addr[3:0]];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) eo_phase <= 1'b0;
    else        eo_phase <= (ctrl.mul_op == MUL_RESET) ? 1'b0 : ~eo_phase;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  instr_t w0, w2, w3;
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    w0 = '0; w0.rd = 1; w0.addr_a = 8'd5; w0.addr_b = 8'd6; w0.add_op = ADD_MEM_ADD;
    w2 = '0; w2.special_a = 1; w2.addr_a = 8'd3; w2.wr_a = 1; w2.add_op = ADD_RED_SUB;
    w3 = '0; w3.wr_b = 1; w3.addr_b = 8'd9; w3.mul_op = MUL_RESET;
    for (int i = 0; i < 16; i++) rom[i] = '0;
    rom[2] = 26'(w0); rom[3] = {1'b1, 25'd4}; rom[4] = 26'(w2); rom[5] = 26'(w3);
    start = 0; q_push = 0; q_pop = 0; start_pc = '0; end_pc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // queue: pop at 0 stays 0, then two pushes
    @(negedge clk); q_pop = 1;
    @(negedge clk); q_pop = 0; chk(queue_size == 0, "pop at empty");
    @(negedge clk); q_push = 1;
    @(negedge clk); @(negedge clk); q_push = 0;
    chk(queue_size == 2, "two pushes");
    for (int run = 0; run < 2; run++) begin
      int t;
      repeat (run) @(negedge clk);
      start = 1; start_pc = 10'd2; end_pc = 10'd6;
      @(negedge clk);
      start = 0;
      t = 0;
      while (ctrl == '0) begin @(negedge clk); t++; chk(t < 6, "first word late"); end
      chk(eo_phase == 1'b0, "first word on even phase");
      chk(ctrl.rd && ctrl.addr_a == 8'd5 && ctrl.addr_b == 8'd6 && ctrl.add_op == ADD_MEM_ADD, "word 0");
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        chk(ctrl == '0 && stalling, "stall cycle");
      end
      @(negedge clk);
      chk(ctrl.wr_a && ctrl.addr_a == 8'(QUEUE_BASE + QUEUE_REGS_PER_POINT + 3) && ctrl.add_op == ADD_RED_SUB,
          "special address");
      @(negedge clk);
      chk(ctrl.wr_b && ctrl.addr_b == 8'd9 && ctrl.mul_op == MUL_RESET && !done, "last word");
      @(negedge clk);
      chk(done && ctrl == '0, "done after last word");
      @(negedge clk);
      chk(!running && !done, "idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
