// tb_register_ram -- random reads and writes on both ports of the register
// RAM, compared with a model array. Checks the two-cycle read latency and
// that a value written in cycle t is returned by a read issued in cycle t+1.
module tb_register_ram;
  import sidh_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [AW-1:0] addr_a, addr_b;
  logic          we_a, we_b;
  logic [W-1:0]  wdata_a, wdata_b, rdata_a, rdata_b;
  logic [W-1:0]  model [NREGS];
  logic [W-1:0]  exp_a [3], exp_b [3];
  logic          vld [3];
  int checks = 0, failures = 0;

  register_ram dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rndw();
    logic [W-1:0] v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    we_a = 0; we_b = 0; addr_a = '0; addr_b = '0; wdata_a = '0; wdata_b = '0;
    for (int i = 0; i < 3; i++) vld[i] = 0;
    // initialise every register through both ports
    for (int r = 0; r < NREGS; r += 2) begin
      @(negedge clk);
      we_a = 1; addr_a = AW'(r);     wdata_a = rndw(); model[r]     = wdata_a;
      we_b = 1; addr_b = AW'(r + 1); wdata_b = rndw(); model[r + 1] = wdata_b;
    end
    @(negedge clk);
    we_a = 0; we_b = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // outputs now belong to the reads issued two cycles ago
      if (vld[2]) begin
        checks++;
        if (rdata_a !== exp_a[2] || rdata_b !== exp_b[2]) begin
          failures++;
          if (failures < 5) $display("FAIL n=%0d", n);
        end
      end
      vld[2] = vld[1]; exp_a[2] = exp_a[1]; exp_b[2] = exp_b[1];
      vld[1] = 0;
      we_a = 0; we_b = 0;
      if ($urandom_range(0, 1) == 0) begin
        addr_a = AW'($urandom); addr_b = AW'($urandom);
        exp_a[1] = model[addr_a]; exp_b[1] = model[addr_b];
        vld[1] = 1;
      end else begin
        addr_a = AW'($urandom); addr_b = AW'($urandom);
        if (addr_a == addr_b) addr_b = addr_b + 1'b1;
        we_a = $urandom_range(0, 1) == 1; we_b = $urandom_range(0, 1) == 1;
        wdata_a = rndw(); wdata_b = rndw();
        if (we_a) model[addr_a] = wdata_a;
        if (we_b) model[addr_b] = wdata_b;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
