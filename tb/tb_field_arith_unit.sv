// tb_field_arith_unit -- the datapath driven by hand-placed controls:
// operands are loaded through the host interface, then one modular
// subtraction, one modular addition (overlapped in the adder pipeline) and
// one Montgomery product are run with the published timing (read 2, adder
// pass ADD_LAT twice, multiplication MULT_LAT) and stored through ports A
// and B in the same cycle where they coincide; results are read back
// through the interface and compared with values computed here. The
// sequence is repeated with fresh random operands.
module tb_field_arith_unit;
  import sidh_pkg::*;
  localparam int unsigned RB = 16 * (NW + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fau_ctrl_t     ctrl;
  logic          host_mode, busy, wr_en, rd_en, dout_valid, rd_busy, eo_phase;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [63:0]   din, dout;
  int checks = 0, failures = 0;

  field_arith_unit dut (.*);

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

  task automatic host_write(input int addr, input logic [W-1:0] val);
    for (int k = 0; k < W / 64; k++) begin
      @(negedge clk); wr_en = 1; wr_addr = AW'(addr); din = val[64*k +: 64];
    end
    @(negedge clk); wr_en = 0;
  endtask
  task automatic host_read(input int addr, output logic [W-1:0] val);
    int k = 0;
    @(negedge clk); rd_en = 1; rd_addr = AW'(addr);
    @(negedge clk); rd_en = 0;
    while (k < W / 64) begin @(posedge clk); if (dout_valid) begin val[64*k +: 64] = dout; k++; end end
  endtask

  logic [W-1:0] x [4], got;
  logic [W-1:0] e_sub, e_add;
  logic [2*W+RB:0] pp, lhs, rhs;

  initial begin
    ctrl = '0; host_mode = 1; wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 20; it++) begin
      for (int r = 0; r < 4; r++) begin x[r] = rnd2p(); host_write(10 + r, x[r]); end
      e_sub = (x[0] >= x[1]) ? x[0] - x[1] : x[0] + TWO_P751 - x[1];
      e_add = ({1'b0, x[2]} + {1'b0, x[3]} >= {1'b0, TWO_P751}) ? x[2] + x[3] - TWO_P751 : x[2] + x[3];
      @(negedge clk);
      host_mode = 0;
      ctrl = '0; ctrl.mul_op = MUL_RESET;
      for (int t = 0; t < 2 + int'(MULT_LAT) + 2; t++) begin
        @(negedge clk);
        ctrl = '0;
        if (t == 0) begin ctrl.rd = 1; ctrl.addr_a = 8'd10; ctrl.addr_b = 8'd11; end
        if (t == 1) begin ctrl.rd = 1; ctrl.addr_a = 8'd12; ctrl.addr_b = 8'd13; end
        if (t == 2) begin ctrl.add_op = ADD_MEM_SUB; ctrl.mul_op = MUL_START; end  // x0 * x1 on multiplier 0
        if (t == 3) ctrl.add_op = ADD_MEM_ADD;
        if (t == 2 + int'(ADD_LAT)) ctrl.add_op = ADD_RED_ADD;
        if (t == 3 + int'(ADD_LAT)) ctrl.add_op = ADD_RED_SUB;
        if (t == 2 + 2 * int'(ADD_LAT)) begin ctrl.wr_a = 1; ctrl.addr_a = 8'd20; end
        if (t == 3 + 2 * int'(ADD_LAT)) begin ctrl.wr_a = 1; ctrl.addr_a = 8'd21; end
        if (t == 2 + int'(MULT_LAT)) begin ctrl.wr_b = 1; ctrl.addr_b = 8'd22; end
      end
      @(negedge clk);
      ctrl = '0; host_mode = 1;
      host_read(20, got); checks++;
      if (got !== e_sub) begin failures++; $display("FAIL sub %h", got); end
      host_read(21, got); checks++;
      if (got !== e_add) begin failures++; $display("FAIL add %h", got); end
      host_read(22, got); checks++;
      pp  = (2*W+RB+1)'(P751);
      lhs = ((2*W+RB+1)'(got) << RB) % pp;
      rhs = ((2*W+RB+1)'(x[0]) * (2*W+RB+1)'(x[1])) % pp;
      if (lhs != rhs || got >= TWO_P751) begin failures++; $display("FAIL mult %h", got); end
      host_read(10, got); checks++;
      if (got !== x[0]) begin failures++; $display("FAIL operand overwritten"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
