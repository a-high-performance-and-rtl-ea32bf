// register_ram -- the dual-port register file of the field arithmetic unit.
//
// Holds NREGS field values of W bits (256 values of Fp, i.e. 128 of Fp^2).
// Both ports can read or write in any cycle. A read has a latency of two
// cycles (address register, then output register), a write takes effect one
// cycle after it is presented, matching the read/write latencies of the
// published scheduling table. In the core, port A is written by the adder and
// port B by the multiplier unit (or the host interface), so one adder and one
// multiplier result can be stored in the same cycle.
// If both ports write the same address in one cycle, port B wins (this
// design's choice; the schedule never does it). Contents are not reset: the
// host interface loads the constants and parameters before a run.
module register_ram #(
  parameter int unsigned W     = sidh_pkg::W,
  parameter int unsigned NREGS = sidh_pkg::NREGS,
  parameter int unsigned AW    = $clog2(NREGS)
) (
  input  logic          clk,
  // port A
  input  logic [AW-1:0] addr_a,
  input  logic          we_a,
  input  logic [W-1:0]  wdata_a,
  output logic [W-1:0]  rdata_a,
  // port B
  input  logic [AW-1:0] addr_b,
  input  logic          we_b,
  input  logic [W-1:0]  wdata_b,
  output logic [W-1:0]  rdata_b
);

  logic [W-1:0]  mem [NREGS];
  logic [AW-1:0] raddr_a_q, raddr_b_q;

  always_ff @(posedge clk) begin
    raddr_a_q <= addr_a;
    raddr_b_q <= addr_b;
    rdata_a   <= mem[raddr_a_q];
    rdata_b   <= mem[raddr_b_q];
    if (we_a) mem[addr_a] <= wdata_a;
    if (we_b) mem[addr_b] <= wdata_b;
  end

endmodule
