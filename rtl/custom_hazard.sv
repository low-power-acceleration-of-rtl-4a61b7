// custom_hazard: ID-stage hazard check for the custom instructions (SWC and
// MAC). When the instruction being decoded uses the custom functional unit,
// its source registers (rs1, rs2 and, for MAC, rd through the third read
// port) are compared with the destination of the instruction in EX. If EX
// holds a multi-cycle instruction (a load, a division) that has not yet
// produced its result and writes one of those registers, ID stalls and FE
// stalls with it; the stall lifts when EX completes. x0 never stalls.
// Combinational. This follows the core changes described for SWC and MAC.
module custom_hazard (
  input  logic       id_valid,
  input  logic       id_custom,      // decoded FU is the SWC/MAC unit
  input  logic [4:0] id_rs1,
  input  logic [4:0] id_rs2,
  input  logic [4:0] id_rs3,
  input  logic       id_uses_rs3,    // MAC reads rd as third operand
  input  logic       ex_valid,
  input  logic       ex_writes_rd,
  input  logic [4:0] ex_rd,
  input  logic       ex_pending,     // EX result not yet available
  output logic       stall_id,
  output logic       stall_fe
);
  logic match;
  always_comb begin
    match = (ex_rd == id_rs1) || (ex_rd == id_rs2) || (id_uses_rs3 && ex_rd == id_rs3);
    stall_id = id_valid && id_custom && ex_valid && ex_writes_rd && ex_pending
               && ex_rd != 5'd0 && match;
    stall_fe = stall_id;
  end
endmodule
