// fpga_interface -- 64-bit host port to the register RAM.
//
// While host_mode is high the interface owns the register RAM: busy, the
// select of the port-B write-data mux, is then 0 and the mux takes the
// interface data (input 0) instead of the multiplier result (input 1), and
// the port addresses come from here. busy is the inverse of host_mode, so a
// netlist shows it as following an input; it is kept as a port because it
// is the status the rest of the core and the host see. A W-bit word is
// written as W/64 beats on din, least significant beat first; the beat that
// completes the word writes it to register wr_addr through port B in the
// next cycle. A read request (rd_en with rd_addr) reads the register through
// port A and returns it as W/64 beats on dout, least significant first, with
// dout_valid high, from the fourth cycle after the request (one address
// register plus the two-cycle RAM read, then the capture); further
// requests are ignored until the last beat has left (rd_busy).
// Only the 64-bit data widths and the busy-controlled mux come from the
// published block diagram; the beat order, address handling and timing are
// this design's choices.
module fpga_interface #(
  parameter int unsigned W  = sidh_pkg::W,
  parameter int unsigned AW = sidh_pkg::AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          host_mode,
  output logic          busy,
  // host side
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [63:0]   din,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [63:0]   dout,
  output logic          dout_valid,
  output logic          rd_busy,
  // register RAM side
  output logic [AW-1:0] ram_addr_a,
  input  logic [W-1:0]  ram_rdata_a,
  output logic [AW-1:0] ram_addr_b,
  output logic          ram_we_b,
  output logic [W-1:0]  ram_wdata_b
);
  localparam int unsigned NB = (W + 63) / 64;
  localparam int unsigned BW = $clog2(NB + 1);

  logic [NB*64-1:0] in_sr, out_sr;
  logic [BW-1:0]    in_cnt, out_cnt;
  logic [2:0]       rd_pipe;        // read in flight, READ_LAT = 2

  assign busy = !host_mode;      // 1: the core owns the RAM

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_sr <= '0; in_cnt <= '0; ram_we_b <= 1'b0; ram_addr_b <= '0;
    end else begin
      ram_we_b <= 1'b0;
      if (host_mode && wr_en) begin
        in_sr <= {din, in_sr[NB*64-1:64]};
        if (in_cnt == BW'(NB - 1)) begin
          in_cnt     <= '0;
          ram_we_b   <= 1'b1;
          ram_addr_b <= wr_addr;
        end else begin
          in_cnt <= in_cnt + 1'b1;
        end
      end
    end
  end
  assign ram_wdata_b = in_sr[W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ram_addr_a <= '0; rd_pipe <= '0; out_sr <= '0; out_cnt <= '0;
    end else begin
      rd_pipe <= {rd_pipe[1:0], 1'b0};
      if (host_mode && rd_en && !rd_busy) begin
        ram_addr_a <= rd_addr;
        rd_pipe[0] <= 1'b1;
      end
      if (rd_pipe[2]) begin
        out_sr  <= (NB*64)'(ram_rdata_a);
        out_cnt <= BW'(NB);
      end else if (out_cnt != '0) begin
        out_sr  <= out_sr >> 64;
        out_cnt <= out_cnt - 1'b1;
      end
    end
  end

  assign rd_busy    = (rd_pipe != '0) || (out_cnt != '0);
  assign dout       = out_sr[63:0];
  assign dout_valid = (out_cnt != '0);

endmodule
