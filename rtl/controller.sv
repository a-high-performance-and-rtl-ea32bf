// controller -- program counter, instruction decode and stall handling.
//
// The core is driven by a static program: every cycle one 26-bit ROM word
// gives all datapath controls (memory addresses, read, port writes, adder
// operation, multiplier operation). There is no run-time dependency
// checking; the schedule was made offline. A word with bit 25 set and bits
// 0-24 = N stands for N consecutive cycles with no controls (stall), so long
// waits for a multiplier cost one ROM word.
// A block (subroutine) is run by pulsing start with its first address
// start_pc and its end address end_pc (exclusive); done pulses in the cycle
// after its last word executed. The controller fetches the first word only
// when that word will execute on an even phase of the multiplier even/odd bit,
// so every block starts even (the program also resets the bit and the
// multiplier FIFO indices on its last cycle).
// Bit 24 of a word replaces the port-A address by the point-queue address
// QUEUE_BASE + 8*(queue_size-1) + (addr_a mod 8), i.e. the registers of the
// last point in the point queue; queue_size is kept here and moved by
// q_push / q_pop from the isogeny sequencing.
// Timing: ROM read has one cycle of latency; the decoded controls are
// combinational from the ROM output register.
// The instruction layout, the stall word, the special port-A bit and the
// queue_size counter follow the published description; the block start/end
// interface, the even-phase alignment and the 8-register queue slots (96
// registers for 12 points) are this design's reading of it.
module controller
  import sidh_pkg::*;
#(
  parameter int unsigned PW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [PW-1:0] start_pc,
  input  logic [PW-1:0] end_pc,
  input  logic          eo_phase,
  input  logic          q_push,
  input  logic          q_pop,
  output logic [PW-1:0] rom_addr,
  output logic          rom_en,
  input  logic [25:0]   rom_data,
  output fau_ctrl_t     ctrl,
  output logic          running,
  output logic          done,
  output logic [3:0]    queue_size,
  output logic          stalling        // a stall word is being executed
);
  typedef enum logic [1:0] {IDLE, ALIGN, RUN} state_e;
  state_e        state;
  logic [PW-1:0] pc, exec_pc, end_q, start_pc_q;
  logic          exec_valid, advance, stall_active;
  logic [24:0]   stall_cnt, remaining;
  instr_t        ins;

  assign ins = instr_t'(rom_data);

  // --------------------------------------------------------------- decode
  always_comb begin
    ctrl = '0;
    if (exec_valid && !ins.stall) begin
      ctrl.rd     = ins.rd;
      ctrl.wr_a   = ins.wr_a;
      ctrl.wr_b   = ins.wr_b;
      ctrl.addr_b = ins.addr_b;
      ctrl.add_op = ins.add_op;
      ctrl.mul_op = ins.mul_op;
      ctrl.addr_a = ins.special_a
                  ? AW'(QUEUE_BASE + QUEUE_REGS_PER_POINT * ((queue_size == 0) ? 0 : 32'(queue_size) - 1)
                        + (32'(ins.addr_a) % QUEUE_REGS_PER_POINT))
                  : ins.addr_a;
    end
    remaining = stall_active ? stall_cnt : {ins.special_a, ins.mul_op, ins.add_op, ins.rd,
                                            ins.wr_b, ins.wr_a, ins.addr_b, ins.addr_a};
    stalling  = exec_valid && ins.stall;
    advance   = !(stalling && remaining > 25'd1);
    rom_en    = (state == ALIGN) ? (eo_phase == 1'b1) : advance;
    rom_addr  = (state == ALIGN) ? start_pc_q : pc;
  end

  // -------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; pc <= '0; exec_pc <= '0; end_q <= '0; start_pc_q <= '0;
      exec_valid <= 1'b0; stall_active <= 1'b0; stall_cnt <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          exec_valid <= 1'b0;
          if (start) begin
            state      <= ALIGN;
            start_pc_q <= start_pc;
            end_q      <= end_pc;
          end
        end
        ALIGN: begin
          // fetch now if the word will execute on an even phase next cycle
          if (eo_phase) begin
            state      <= RUN;
            exec_valid <= 1'b1;
            exec_pc    <= start_pc_q;
            pc         <= start_pc_q + 1'b1;
          end
        end
        RUN: begin
          if (advance) begin
            stall_active <= 1'b0;
            if (exec_pc + 1'b1 == end_q) begin
              state      <= IDLE;
              exec_valid <= 1'b0;
              done       <= 1'b1;
            end else begin
              exec_pc <= pc;
              pc      <= pc + 1'b1;
            end
          end else begin
            stall_active <= 1'b1;
            stall_cnt    <= remaining - 25'd1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign running = (state != IDLE);

  // --------------------------------------------------------- point queue
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) queue_size <= '0;
    else if (q_push && !q_pop && queue_size != 4'(QUEUE_POINTS)) queue_size <= queue_size + 1'b1;
    else if (q_pop && !q_push && queue_size != '0)               queue_size <= queue_size - 1'b1;
  end

endmodule
