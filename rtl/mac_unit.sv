// mac_unit: execute-stage datapath of the MAC custom instruction,
// rd <- rd + rs1 * rs2, in one cycle. MAC is R-type; the old value of rd
// comes from the register file's third read port (rs3_val). The low 32 bits
// of the result are kept, as for C int arithmetic. Combinational.
// Encoding: opcode custom-1, funct3 000, funct7 0000000 - this design's
// choice; the operation and the third read port follow the core changes.
module mac_unit
  import nmc_pkg::*;
(
  input  logic [31:0] instr,
  input  logic [31:0] rs1_val,
  input  logic [31:0] rs2_val,
  input  logic [31:0] rs3_val,
  output logic        is_mac,
  output logic [4:0]  rd,
  output logic [31:0] result
);
  logic [63:0] prod;
  assign is_mac = instr[6:0] == OPC_MAC && instr[14:12] == 3'b000 && instr[31:25] == 7'b0;
  assign rd     = instr[11:7];
  assign prod   = rs1_val * rs2_val;
  assign result = rs3_val + prod[31:0];
endmodule
