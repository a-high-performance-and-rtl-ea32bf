// tb_program_rom -- reads a small instruction file through the ROM: one
// cycle of read latency, output held while en is low, unused words zero.
module tb_program_rom;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        en;
  logic [9:0]  addr;
  logic [25:0] data;
  int checks = 0, failures = 0;
  localparam logic [25:0] EXP [6] = '{26'h2000005, 26'h0041011, 26'h00c1310,
                                      26'h3ffffff, 26'h0000000, 26'h1234567};

  program_rom #(.INIT_FILE("tb/tb_program_rom.hex")) dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; addr = '0;
    for (int i = 0; i < 12; i++) begin
      @(negedge clk);
      addr = 10'(i);
      @(negedge clk);
      checks++;
      if (data !== ((i < 6) ? EXP[i] : 26'd0)) begin failures++; $display("FAIL addr %0d", i); end
    end
    // hold
    @(negedge clk); addr = 10'd5;
    @(negedge clk); en = 0; addr = 10'd1;
    @(negedge clk);
    checks++;
    if (data !== EXP[5]) begin failures++; $display("FAIL hold"); end
    en = 1;
    @(negedge clk);
    checks++;
    if (data !== EXP[1]) begin failures++; $display("FAIL after hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
