// dma: the near-memory DMA. Front-end (dma_frontend: SWC instruction port,
// AHB register port, address and control FIFOs), mid-end controller
// (dma_midend) and two AHB-Lite master back-ends (dma_backend): one towards
// the main memories through the interconnect, one directly to the
// accelerator(s). Requests are queued so the core can schedule several
// transfers and continue; irq pulses when data has been moved back from an
// accelerator to memory. Throughput is set by the back-ends: one word read
// every third cycle, one word written every second, so a block transfer moves
// one word per three cycles once the read of the next word overlaps the write
// of the current one.
//
// Following the thesis: the front/mid/back-end split, the two FIFOs, the
// second master wired straight to the accelerator, the interrupt after a
// transfer back to memory, and the back-end rates. This design's choices:
// the FIFO depth and the one-cycle irq pulse.
module dma
  import ahb_pkg::*;
  import nmc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4,
  parameter logic [6:0]  DMA_ID     = 7'd0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        swc_we,
  input  logic [31:0] swc_mem_addr,
  input  logic [31:0] swc_ctrl,
  input  logic [6:0]  swc_dma_addr,
  output logic        swc_ready,
  input  ahb_m2s_t    cfg_req,
  input  logic        cfg_hready,
  output ahb_s2m_t    cfg_rsp,
  output ahb_m2s_t    mem_m2s,
  input  ahb_s2m_t    mem_s2m,
  output ahb_m2s_t    acc_m2s,
  input  ahb_s2m_t    acc_s2m,
  output logic        busy,
  output logic        irq
);
  logic        q_valid, q_pop;
  logic [31:0] q_addr;
  dma_ctrl_t   q_ctrl;

  logic        m_valid, m_ready, m_write, m_rvalid, m_idle;
  logic [31:0] m_addr, m_wdata, m_rdata;
  logic        a_valid, a_ready, a_write, a_rvalid, a_idle;
  logic [31:0] a_addr, a_wdata, a_rdata;
  logic        run;

  dma_frontend #(.DEPTH(FIFO_DEPTH), .DMA_ID(DMA_ID)) u_front (
    .clk, .rst_n, .swc_we, .swc_mem_addr, .swc_ctrl, .swc_dma_addr, .swc_ready,
    .cfg_req, .cfg_hready, .cfg_rsp, .q_valid, .q_addr, .q_ctrl, .q_pop
  );

  dma_midend u_mid (
    .clk, .rst_n, .q_valid, .q_addr, .q_ctrl, .q_pop,
    .mem_req_valid(m_valid), .mem_req_ready(m_ready), .mem_req_write(m_write),
    .mem_req_addr(m_addr), .mem_req_wdata(m_wdata), .mem_rsp_valid(m_rvalid),
    .mem_rsp_rdata(m_rdata), .mem_idle(m_idle),
    .acc_req_valid(a_valid), .acc_req_ready(a_ready), .acc_req_write(a_write),
    .acc_req_addr(a_addr), .acc_req_wdata(a_wdata), .acc_rsp_valid(a_rvalid),
    .acc_rsp_rdata(a_rdata), .acc_idle(a_idle),
    .busy(run), .irq
  );

  dma_backend u_mem_be (
    .clk, .rst_n, .req_valid(m_valid), .req_ready(m_ready), .req_write(m_write),
    .req_addr(m_addr), .req_wdata(m_wdata), .rsp_valid(m_rvalid), .rsp_rdata(m_rdata),
    .rsp_err(), .idle(m_idle), .m2s(mem_m2s), .s2m(mem_s2m)
  );

  dma_backend u_acc_be (
    .clk, .rst_n, .req_valid(a_valid), .req_ready(a_ready), .req_write(a_write),
    .req_addr(a_addr), .req_wdata(a_wdata), .rsp_valid(a_rvalid), .rsp_rdata(a_rdata),
    .rsp_err(), .idle(a_idle), .m2s(acc_m2s), .s2m(acc_s2m)
  );

  assign busy = run || q_valid;
endmodule
