// nmc_soc: RISC-V SoC with a near-memory CNN accelerator, without the core.
//
// The core's AHB master port (core_m2s/core_s2m) and its execute/decode-stage
// hooks are ports; everything else is inside:
//   * ahb_interconnect: decoders for the core and the DMA, a fixed-priority
//     arbiter in front of every slave (core first)
//   * Memory 1 (96 kB, 0x0000_0000) and Memory 2 (32 kB, 0x0002_0000), both
//     ahb_sram; both reachable by core and DMA, so the core can work in one
//     while the DMA streams from the other
//   * the DMA (register port at 0x0003_0000 for the core, SWC instruction
//     port, memory master on the interconnect, accelerator master wired
//     straight to the accelerator bridge); dma_irq goes to the core's
//     external interrupt input
//   * acc_bridge + cnn_accel: the accelerator behind its AHB bridge
//   * the core's custom-instruction logic: gpr_3r, the register file with
//     its third read port; swc_unit and mac_unit in the execute stage; and
//     custom_hazard in the decode stage. The core itself is not part of this
//     RTL, so these blocks' core-side signals are ports.
// Execute stage: ex_instr is the instruction in EX. Its rs1, rs2 and rd
// fields address the three register-file read ports. The values feed SWC and
// MAC and go out as gpr_rs1_val/gpr_rs2_val for the core's own units. A MAC
// with ex_valid high writes rd <- rd + rs1*rs2 at the next clock edge, so
// ex_valid must be high for exactly one cycle per MAC. Otherwise the register
// file's write port belongs to the core's write-back (gpr_we/gpr_waddr/
// gpr_wdata). Both cannot happen in one cycle, because a write-back comes
// from the instruction in EX. An SWC holds EX while swc_stall is high.
// A typical inference: two SWC requests copy image and weights from memory
// into the accelerator, a third starts it, a fourth copies the pooled result
// back (the bridge holds that read until the accelerator is done) and the
// DMA interrupts the core.
// Following the thesis: the final system with two SRAMs of 96 and 32 kB,
// the DMA with both programming paths, one accelerator behind its bridge, the
// interrupt, and the SWC and MAC instructions with a third register read
// port. This design's choices: the address map, the core first at every
// arbiter, and the execute-stage hook-up of the register file.
module nmc_soc
  import ahb_pkg::*;
#(
  parameter int unsigned MEM1_BYTES = 98304,
  parameter int unsigned MEM2_BYTES = 32768
) (
  input  logic        clk,
  input  logic        rst_n,
  // core bus
  input  ahb_m2s_t    core_m2s,
  output ahb_s2m_t    core_s2m,
  // SWC in the core's execute stage
  input  logic        ex_valid,
  input  logic [31:0] ex_instr,
  // register file: write-back from the core, operands to the core
  input  logic        gpr_we,
  input  logic [4:0]  gpr_waddr,
  input  logic [31:0] gpr_wdata,
  output logic [31:0] gpr_rs1_val,
  output logic [31:0] gpr_rs2_val,
  output logic        swc_stall,
  output logic [2:0]  swc_opt1,
  output logic [1:0]  swc_opt2,
  output logic        dma_irq,
  output logic        dma_busy,
  output logic        acc_busy,
  // MAC in the core's execute stage (written back here)
  output logic        mac_is_mac,
  output logic [4:0]  mac_rd,
  output logic [31:0] mac_result,
  // custom-instruction hazard check in the core's decode stage
  input  logic        hz_id_valid,
  input  logic        hz_id_custom,
  input  logic [4:0]  hz_id_rs1,
  input  logic [4:0]  hz_id_rs2,
  input  logic [4:0]  hz_id_rs3,
  input  logic        hz_id_uses_rs3,
  input  logic        hz_ex_valid,
  input  logic        hz_ex_writes_rd,
  input  logic [4:0]  hz_ex_rd,
  input  logic        hz_ex_pending,
  output logic        hz_stall_id,
  output logic        hz_stall_fe
);
  ahb_m2s_t [1:0] m_req;
  ahb_s2m_t [1:0] m_rsp;
  ahb_m2s_t [2:0] s_req;
  ahb_s2m_t [2:0] s_rsp;
  ahb_m2s_t       dma_mem_m2s, dma_acc_m2s;
  ahb_s2m_t       dma_acc_s2m;

  assign m_req[0] = core_m2s;
  assign m_req[1] = dma_mem_m2s;
  assign core_s2m = m_rsp[0];

  ahb_interconnect #(.NM(2), .NS(3)) u_xbar (
    .clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp
  );

  ahb_sram #(.BYTES(MEM1_BYTES)) u_mem1 (
    .clk, .rst_n, .req(s_req[0]), .hready(s_rsp[0].hready), .rsp(s_rsp[0])
  );
  ahb_sram #(.BYTES(MEM2_BYTES)) u_mem2 (
    .clk, .rst_n, .req(s_req[1]), .hready(s_rsp[1].hready), .rsp(s_rsp[1])
  );

  // register file with the third read port (rd, for MAC)
  logic [2:0][4:0]  rf_raddr;
  logic [2:0][31:0] rf_rdata;
  logic             rf_we, mac_wb;
  logic [4:0]       rf_waddr;
  logic [31:0]      rf_wdata;
  assign rf_raddr    = {ex_instr[11:7], ex_instr[24:20], ex_instr[19:15]};
  assign gpr_rs1_val = rf_rdata[0];
  assign gpr_rs2_val = rf_rdata[1];
  assign mac_wb      = ex_valid && mac_is_mac;
  assign rf_we       = mac_wb || gpr_we;
  assign rf_waddr    = mac_wb ? mac_rd : gpr_waddr;
  assign rf_wdata    = mac_wb ? mac_result : gpr_wdata;
  gpr_3r u_gpr (
    .clk, .rst_n, .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .raddr(rf_raddr), .rdata(rf_rdata)
  );

  // SWC -> DMA instruction port
  logic        swc_we, swc_ready;
  logic [31:0] swc_mem_addr, swc_ctrl;
  logic [6:0]  swc_dma_addr;
  swc_unit u_swc (
    .ex_valid, .ex_instr, .rs1_val(rf_rdata[0]), .rs2_val(rf_rdata[1]),
    .dma_ready(swc_ready), .is_swc(), .dma_we(swc_we), .dma_mem_addr(swc_mem_addr),
    .dma_ctrl(swc_ctrl), .dma_addr(swc_dma_addr), .opt1(swc_opt1), .opt2(swc_opt2),
    .stall(swc_stall)
  );

  dma u_dma (
    .clk, .rst_n, .swc_we, .swc_mem_addr, .swc_ctrl, .swc_dma_addr, .swc_ready,
    .cfg_req(s_req[2]), .cfg_hready(s_rsp[2].hready), .cfg_rsp(s_rsp[2]),
    .mem_m2s(dma_mem_m2s), .mem_s2m(m_rsp[1]),
    .acc_m2s(dma_acc_m2s), .acc_s2m(dma_acc_s2m),
    .busy(dma_busy), .irq(dma_irq)
  );

  // accelerator behind its bridge
  nmc_pkg::acc_sel_e acc_sel;
  logic        acc_ce, acc_we;
  logic [9:0]  acc_addr;
  logic [15:0] acc_wdata, acc_rdata;
  acc_bridge u_bridge (
    .clk, .rst_n, .req(dma_acc_m2s), .hready(dma_acc_s2m.hready), .rsp(dma_acc_s2m),
    .acc_sel, .acc_ce, .acc_we, .acc_addr, .acc_wdata, .acc_rdata, .acc_busy
  );
  cnn_accel u_acc (
    .clk, .rst_n, .mem_sel(acc_sel), .ce(acc_ce), .we(acc_we), .addr(acc_addr),
    .wdata(acc_wdata), .rdata(acc_rdata), .busy(acc_busy), .done()
  );

  mac_unit u_mac (
    .instr(ex_instr), .rs1_val(rf_rdata[0]), .rs2_val(rf_rdata[1]), .rs3_val(rf_rdata[2]),
    .is_mac(mac_is_mac), .rd(mac_rd), .result(mac_result)
  );

  custom_hazard u_hz (
    .id_valid(hz_id_valid), .id_custom(hz_id_custom), .id_rs1(hz_id_rs1),
    .id_rs2(hz_id_rs2), .id_rs3(hz_id_rs3), .id_uses_rs3(hz_id_uses_rs3),
    .ex_valid(hz_ex_valid), .ex_writes_rd(hz_ex_writes_rd), .ex_rd(hz_ex_rd),
    .ex_pending(hz_ex_pending), .stall_id(hz_stall_id), .stall_fe(hz_stall_fe)
  );

  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n) !(mac_wb && gpr_we))
    else $error("MAC write-back and core write-back in the same cycle");
endmodule
