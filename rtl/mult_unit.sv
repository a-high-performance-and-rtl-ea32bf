// mult_unit -- the replicated Montgomery multipliers with their circular
// issue/read bookkeeping.
//
// NMULT logical multipliers are built as NMULT/2 mont_mult_dual arrays, each
// carrying an even and an odd product. Logical multiplier k is slot k%2 of
// array k/2. Multiplications are issued in circular order: a MUL_START
// starts the multiplier at issue_idx with operands a (register RAM port A)
// and b (port B) and advances issue_idx; each read of a result (a write of
// mult_res into port B, signalled by pop) advances read_idx, and mult_res
// always shows the result register of the multiplier at read_idx (the
// result-select mux). MUL_RESET clears both indices and the even/odd phase
// bit, which otherwise toggles every cycle. The static schedule must start
// an even multiplier on an even phase and an odd one on an odd phase; an
// assertion reports a mismatch. Knowing when a result is ready is the job of
// the program: a product started in cycle c can be read from cycle
// c + MULT_LAT. The circular order and reset follow the published text; the
// phase counter is this design's way of keeping the even/odd rule visible.
module mult_unit
  import sidh_pkg::*;
#(
  parameter int unsigned  NMULT = sidh_pkg::NMULT,   // even number
  parameter int unsigned  NW    = sidh_pkg::NW,
  parameter int unsigned  W     = 16 * NW,
  parameter logic [W-1:0] M     = W'(sidh_pkg::P751)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  mul_op_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         pop,        // result at read_idx is being stored
  output logic [W-1:0] mult_res,
  output logic         eo_phase    // even/odd phase of the current cycle
);
  localparam int unsigned ND = NMULT / 2;
  localparam int unsigned IW = (NMULT > 1) ? $clog2(NMULT) : 1;

  logic [IW-1:0] issue_idx, read_idx;
  logic [W-1:0]  res  [ND][2];
  logic [1:0]    done [ND];
  logic          start_any;

  assign start_any = (op == MUL_START);

  for (genvar d = 0; d < ND; d++) begin : g_dual
    mont_mult_dual #(.NW(NW), .W(W), .M(M)) u_mm (
      .clk, .rst_n,
      .start     (start_any && (issue_idx >> 1) == IW'(d)),
      .start_slot(issue_idx[0]),
      .a, .b,
      .res       (res[d]),
      .done      (done[d])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issue_idx <= '0;
      read_idx  <= '0;
      eo_phase  <= 1'b0;
    end else if (op == MUL_RESET) begin
      issue_idx <= '0;
      read_idx  <= '0;
      eo_phase  <= 1'b0;
    end else begin
      eo_phase <= ~eo_phase;
      if (start_any) issue_idx <= (issue_idx == IW'(NMULT - 1)) ? '0 : issue_idx + 1'b1;
      if (pop)       read_idx  <= (read_idx  == IW'(NMULT - 1)) ? '0 : read_idx + 1'b1;
    end
  end

  localparam int unsigned DW = (ND > 1) ? $clog2(ND) : 1;
  logic [DW-1:0] read_dual;
  assign read_dual = DW'(read_idx >> 1);
  assign mult_res  = res[read_dual][read_idx[0]];

  // even multipliers start on even phases, odd ones on odd phases
  a_even_odd: assert property (@(posedge clk) disable iff (!rst_n)
                               start_any |-> (issue_idx[0] == eo_phase))
    else $error("multiplier %0d issued on the wrong even/odd phase", issue_idx);

endmodule
