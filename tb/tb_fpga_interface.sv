// tb_fpga_interface -- the host interface in front of a register RAM: words
// written as 64-bit beats must land in the RAM (checked in the RAM model
// array directly), must read back beat by beat in order, the first beat
// appearing four cycles after the request, and busy must be the inverse of
// host_mode (0 while the host owns the RAM).
module tb_fpga_interface;
  import sidh_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          host_mode, busy, wr_en, rd_en, dout_valid, rd_busy, ram_we_b;
  logic [AW-1:0] wr_addr, rd_addr, ram_addr_a, ram_addr_b;
  logic [63:0]   din, dout;
  logic [W-1:0]  ram_rdata_a, ram_wdata_b, rdata_b_unused;
  int checks = 0, failures = 0;

  fpga_interface dut (.*);
  register_ram u_ram (.clk, .addr_a(ram_addr_a), .we_a(1'b0), .wdata_a('0), .rdata_a(ram_rdata_a),
                      .addr_b(ram_addr_b), .we_b(ram_we_b), .wdata_b(ram_wdata_b), .rdata_b(rdata_b_unused));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] words [16];
  initial begin
    host_mode = 0; wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (busy !== 1'b1) failures++;
    host_mode = 1;
    #1 checks++;
    if (busy !== 1'b0) failures++;
    for (int n = 0; n < 16; n++) begin
      for (int i = 0; i < W / 32; i++) words[n][i*32 +: 32] = $urandom;
      for (int k = 0; k < W / 64; k++) begin
        @(negedge clk);
        wr_en = 1; wr_addr = AW'(n * 7 + 3); din = words[n][64*k +: 64];
      end
      @(negedge clk);
      wr_en = 0;
      // a gap between beats must not matter
      @(negedge clk);
    end
    @(negedge clk);
    for (int n = 0; n < 16; n++) begin
      checks++;
      if (u_ram.mem[n * 7 + 3] !== words[n]) begin failures++; $display("FAIL write %0d", n); end
    end
    for (int n = 15; n >= 0; n--) begin
      logic [W-1:0] got;
      int wait_c;
      @(negedge clk);
      rd_en = 1; rd_addr = AW'(n * 7 + 3);
      @(negedge clk);
      rd_en = 0; wait_c = 1;
      while (!dout_valid) begin @(negedge clk); wait_c++; end
      checks++;
      if (wait_c != 4) begin failures++; $display("FAIL first beat after %0d cycles", wait_c); end
      for (int k = 0; k < W / 64; k++) begin
        if (!dout_valid) begin failures++; $display("FAIL beat %0d missing", k); end
        got[64*k +: 64] = dout;
        @(negedge clk);
      end
      checks++;
      if (got !== words[n] || dout_valid) begin failures++; $display("FAIL read %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
