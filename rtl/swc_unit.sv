// swc_unit: execute-stage logic of the SWC custom instruction, the
// instruction-level control path from the core to the DMA.
// SWC is S-type: no destination register, so all 32 bits carry data:
//   [31:25] DMA address (which DMA)      [24:20] rs2 = memory address
//   [19:15] rs1 = control data           [14:12] funct3 = 000
//   [11:9]  Opt1    [8:7] Opt2           [6:0]   opcode (custom-0)
// When a valid SWC is in EX, the unit raises dma_we for that cycle with the
// two register values and the immediate fields on the DMA's input buses.
// If the addressed DMA cannot take a request (dma_ready low) it raises stall
// instead, and the core keeps the instruction in EX. Combinational; the
// field layout follows the custom-instruction table, the opcode and funct3
// values and the stall are this design's choices.
module swc_unit
  import nmc_pkg::*;
(
  input  logic        ex_valid,
  input  logic [31:0] ex_instr,
  input  logic [31:0] rs1_val,
  input  logic [31:0] rs2_val,
  input  logic        dma_ready,
  output logic        is_swc,
  output logic        dma_we,
  output logic [31:0] dma_mem_addr,
  output logic [31:0] dma_ctrl,
  output logic [6:0]  dma_addr,
  output logic [2:0]  opt1,
  output logic [1:0]  opt2,
  output logic        stall
);
  assign is_swc       = ex_instr[6:0] == OPC_SWC && ex_instr[14:12] == 3'b000;
  assign dma_we       = ex_valid && is_swc && dma_ready;
  assign stall        = ex_valid && is_swc && !dma_ready;
  assign dma_mem_addr = rs2_val;
  assign dma_ctrl     = rs1_val;
  assign dma_addr     = ex_instr[31:25];
  assign opt1         = ex_instr[11:9];
  assign opt2         = ex_instr[8:7];
endmodule
