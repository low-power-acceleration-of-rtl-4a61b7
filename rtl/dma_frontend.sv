// dma_frontend: the DMA's programming interface. Transfer requests - a start
// address plus a control data word (layout in nmc_pkg) - arrive either from
// the SWC custom instruction (swc_we strobes the operands for one cycle) or
// through the AHB-Lite register port:
//   0x0 START ADDR  read/write
//   0x4 CTRL DATA   read/write; a write with START (bit 0) set queues
//                   {START ADDR, written value} as a request
//   0x8 STATUS      read: [3:0] queued requests, [4] queue full
// A request is queued into the paired address and control FIFOs, from which
// the controller takes it (q_valid/q_pop). An SWC request is queued only if
// START is set and its DMA address equals DMA_ID; swc_ready is low while the
// queue is full and the core must hold the instruction. The instruction port
// wins a same-cycle collision; a register write that cannot be queued is held
// in its data phase with wait states. The two programming paths and the FIFOs
// follow the DMA description; the register map is this design's own.
module dma_frontend
  import ahb_pkg::*;
  import nmc_pkg::*;
#(
  parameter int unsigned DEPTH  = 4,
  parameter logic [6:0]  DMA_ID = 7'd0
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction-level port (from swc_unit)
  input  logic        swc_we,
  input  logic [31:0] swc_mem_addr,
  input  logic [31:0] swc_ctrl,
  input  logic [6:0]  swc_dma_addr,
  output logic        swc_ready,
  // register port
  input  ahb_m2s_t    cfg_req,
  input  logic        cfg_hready,
  output ahb_s2m_t    cfg_rsp,
  // request queue towards the controller
  output logic        q_valid,
  output logic [31:0] q_addr,
  output dma_ctrl_t   q_ctrl,
  input  logic        q_pop
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  logic [31:0] r_addr, r_ctrl;
  logic        full, empty;
  logic [CW-1:0] count;

  // register-port data phase
  logic       d_wr, d_rd;
  logic [1:0] d_reg;
  wire accept = cfg_req.hsel && cfg_req.htrans[1] && cfg_hready;

  wire swc_push = swc_we && swc_dma_addr == DMA_ID && swc_ctrl[0];
  wire reg_push_req = d_wr && d_reg == 2'd1 && cfg_req.hwdata[0];
  wire reg_stall = reg_push_req && (full || swc_push);
  wire reg_push  = reg_push_req && !reg_stall;
  wire push      = (swc_push && !full) || reg_push;
  wire [63:0] din = swc_push ? {swc_mem_addr, swc_ctrl} : {r_addr, cfg_req.hwdata};

  assign swc_ready = !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_wr <= 1'b0; d_rd <= 1'b0; d_reg <= '0; r_addr <= '0; r_ctrl <= '0;
    end else begin
      if (d_wr && !reg_stall) begin
        if (d_reg == 2'd0) r_addr <= cfg_req.hwdata;
        if (d_reg == 2'd1) r_ctrl <= cfg_req.hwdata;
      end
      if (cfg_rsp.hready && cfg_hready) begin
        d_wr  <= accept && cfg_req.hwrite;
        d_rd  <= accept && !cfg_req.hwrite;
        d_reg <= cfg_req.haddr[3:2];
      end
    end
  end

  always_comb begin
    cfg_rsp = AHB_S2M_OKAY;
    cfg_rsp.hready = !reg_stall;
    if (d_rd)
      case (d_reg)
        2'd0:    cfg_rsp.hrdata = r_addr;
        2'd1:    cfg_rsp.hrdata = r_ctrl;
        2'd2:    cfg_rsp.hrdata = 32'({full, 4'(count)});
        default: cfg_rsp.hrdata = '0;
      endcase
  end

  // address FIFO and control FIFO, pushed and popped together
  logic [31:0] ctrl_out;
  sync_fifo #(.W(32), .DEPTH(DEPTH)) u_addr_fifo (
    .clk, .rst_n, .push, .din(din[63:32]), .pop(q_pop), .dout(q_addr),
    .full, .empty, .count
  );
  sync_fifo #(.W(32), .DEPTH(DEPTH)) u_ctrl_fifo (
    .clk, .rst_n, .push, .din(din[31:0]), .pop(q_pop), .dout(ctrl_out),
    .full(), .empty(), .count()
  );
  assign q_valid = !empty;
  assign q_ctrl  = dma_ctrl_t'(ctrl_out);
endmodule
