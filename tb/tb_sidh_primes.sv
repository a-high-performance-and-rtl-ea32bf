// tb_sidh_primes -- runs the core at the three other security levels of the
// design, each with its own prime and word size and with 12 multipliers:
//   p503  = 2^250 3^159 - 1      NW = 32, W = 512
//   p1019 = 2^508 3^319 35 - 1   NW = 64, W = 1024
//   p1533 = 2^776 3^477 - 1      NW = 96, W = 1536
// Each instance performs the Fp^2 product and square, the 3-isogeny curve
// coefficients, a point-queue copy and the 3-isogeny evaluation at one and
// at two queued points, and checks values and cycle counts
// (see sidh_prime_run). The primes and the multiplier latencies 3*NW+4
// (100, 196, 292) are the published ones; the programs are this design's
// schedules for each size, and the block start, end and cycle numbers below
// belong to those program files.
module tb_sidh_primes;
  logic fin [3];
  int   chk [3], fl [3];

  sidh_prime_run #(.EA(250), .EB(159), .F(1), .PBITS(503),
    .PROG_FILE("tb/sidh_program_nw32.hex"),
    .S0(0), .E0(37), .C0(125), .S1(37), .E1(181), .C1(298), .S2(181), .E2(193), .C2(12),
    .S3(193), .E3(361), .C3(405), .S4(361), .E4(703), .C4(726))
    u_p503 (.fin(fin[0]), .checks(chk[0]), .failures(fl[0]));

  sidh_prime_run #(.EA(508), .EB(319), .F(35), .PBITS(1019),
    .PROG_FILE("tb/sidh_program_nw64.hex"),
    .S0(0), .E0(49), .C0(233), .S1(49), .E1(210), .C1(513), .S2(210), .E2(224), .C2(14),
    .S3(224), .E3(433), .C3(724), .S4(433), .E4(851), .C4(1316))
    u_p1019 (.fin(fin[1]), .checks(chk[1]), .failures(fl[1]));

  sidh_prime_run #(.EA(776), .EB(477), .F(1), .PBITS(1533),
    .PROG_FILE("tb/sidh_program_nw96.hex"),
    .S0(0), .E0(50), .C0(341), .S1(50), .E1(226), .C1(735), .S2(226), .E2(242), .C2(18),
    .S3(242), .E3(466), .C3(1045), .S4(466), .E4(920), .C4(1914))
    u_p1533 (.fin(fin[2]), .checks(chk[2]), .failures(fl[2]));

  int checks, failures;

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2],
             fl[0] + fl[1] + fl[2] + 1);
    $finish;
  end

  initial begin
    wait (fin[0] && fin[1] && fin[2]);
    checks   = chk[0] + chk[1] + chk[2];
    failures = fl[0] + fl[1] + fl[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
