// sram_dp: dual-port SRAM, one write port (A) and one read port (B), native
// interface with a one-cycle read latency. Used for the accelerator's output
// feature map: the engine writes port A while the bus side reads port B.
// A read of the address being written in the same cycle returns the old
// contents. Contents are not reset.
// Following the thesis: a dual-port 2 kB OFM memory of 16-bit words. This
// design's choices: one port fixed to writing and one to reading, and
// read-before-write on a clash.
module sram_dp #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned DW    = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  input  logic          b_ce,
  input  logic [AW-1:0] b_addr,
  output logic [DW-1:0] b_rdata
);
  logic [DW-1:0] mem [DEPTH];
  always_ff @(posedge clk) if (a_we) mem[a_addr] <= a_wdata;
  always_ff @(posedge clk) if (b_ce) b_rdata <= mem[b_addr];
endmodule
