// gpr_3r: general-purpose register file of the core with a third read port.
//
// 32 registers of 32 bits. x0 always reads 0, and writes to it are dropped.
// The three read ports are combinational: rdata[k] shows register raddr[k]
// in the same cycle. The single write port writes wdata to waddr at the
// rising clock edge when we is high. So an instruction in the execute stage
// can read its operands and write its result in one cycle. An instruction in
// the next cycle sees that result without any bypass. Ports 0 and 1 are the
// usual rs1/rs2 ports. Port 2 exists for MAC, which reads rd as its third
// operand.
//
// Following the core changes: a third read port was added because a standard
// register file reads only two values at a time. The core reads and writes
// registers in its execute stage. This design's choices: the combinational
// reads, the single write port, and clearing every register at reset, so that
// no read ever returns a power-up value.
module gpr_3r #(
  parameter int unsigned XLEN = 32,
  parameter int unsigned NREG = 32,
  localparam int unsigned AW  = $clog2(NREG)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [AW-1:0]            waddr,
  input  logic [XLEN-1:0]          wdata,
  input  logic [2:0][AW-1:0]       raddr,
  output logic [2:0][XLEN-1:0]     rdata
);
  logic [XLEN-1:0] regs [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREG); i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int k = 0; k < 3; k++)
      rdata[k] = (raddr[k] == '0) ? '0 : regs[raddr[k]];
  end
endmodule
