// tb_sidh_mults -- runs the core at p751 with 6, 8 and 10 multipliers (3, 4
// and 5 dual arrays), the smaller configurations next to the default 12.
// Each instance runs the Fp^2 product and square, the 3-isogeny curve
// coefficients and a point-queue copy and checks values and cycle counts
// (see sidh_prime_run). For these first three blocks the scheduler finds
// the same words with 8 or more multipliers as with 12 (the 3-isogeny needs
// at most 8 products in flight), so those instances use the default program
// (its later blocks, scheduled for 12, are not run); 6 multipliers need
// their own schedule, in which the 3-isogeny takes 482 cycles instead of
// 413 (the published schedules take 455 and 424). The 6-multiplier program
// also runs the evaluation blocks: 644 cycles for one point (published 830)
// and 1198 for two.
module tb_sidh_mults;
  logic fin [3];
  int   chk [3], fl [3];

  sidh_prime_run #(.EA(372), .EB(239), .F(1), .PBITS(751), .NMULT(6),
    .PROG_FILE("tb/sidh_program_m6.hex"),
    .S0(0), .E0(44), .C0(179), .S1(44), .E1(250), .C1(482), .S2(250), .E2(264), .C2(15),
    .S3(264), .E3(481), .C3(644), .S4(481), .E4(926), .C4(1198))
    u_m6 (.fin(fin[0]), .checks(chk[0]), .failures(fl[0]));

  sidh_prime_run #(.EA(372), .EB(239), .F(1), .PBITS(751), .NMULT(8),
    .PROG_FILE("rtl/sidh_program.hex"),
    .S0(0), .E0(44), .C0(179), .S1(44), .E1(203), .C1(413), .S2(203), .E2(217), .C2(15))
    u_m8 (.fin(fin[1]), .checks(chk[1]), .failures(fl[1]));

  sidh_prime_run #(.EA(372), .EB(239), .F(1), .PBITS(751), .NMULT(10),
    .PROG_FILE("rtl/sidh_program.hex"),
    .S0(0), .E0(44), .C0(179), .S1(44), .E1(203), .C1(413), .S2(203), .E2(217), .C2(15))
    u_m10 (.fin(fin[2]), .checks(chk[2]), .failures(fl[2]));

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
