// acc_bridge: AHB-Lite slave that puts the accelerator's native RAM port on
// the DMA's accelerator bus. HADDR[13:12] selects the accelerator memory
// (nmc_pkg::acc_sel_e) and HADDR[11:2] the 16-bit word; bus data uses bits
// [15:0] (reads return them zero-extended).
//
// AHB write data arrives one cycle after its address, while the native port
// wants both together, so the write address and select are delayed by one
// register and the write is made in the data phase. Reads are presented in
// the address phase whenever the port is free, giving read data in the data
// phase with no wait state. A read that meets a write's data phase, or any
// memory access while the accelerator is busy, is held in its data phase with
// HREADYOUT low and made when possible: an inference cannot be read or
// overwritten while it runs. Control-word accesses never wait.
//
// Following the thesis: an AHB-Lite bridge that delays the address so it
// lines up with the write data, and no access to the accelerator's memories
// during an inference. This design's choices: the address bits, deferring a
// colliding read by one cycle, and holding accesses with wait states rather
// than refusing them. Only one accelerator sits behind the bridge, so
// HADDR[15:14] (the DMA's ACC field) is not decoded: all four ACC values
// reach the same accelerator.
module acc_bridge
  import ahb_pkg::*;
  import nmc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  ahb_m2s_t    req,
  input  logic        hready,
  output ahb_s2m_t    rsp,
  // native port to cnn_accel
  output acc_sel_e    acc_sel,
  output logic        acc_ce,
  output logic        acc_we,
  output logic [9:0]  acc_addr,
  output logic [15:0] acc_wdata,
  input  logic [15:0] acc_rdata,
  input  logic        acc_busy
);
  typedef enum logic [1:0] {D_NONE, D_WRITE, D_READ, D_READ_PEND} dphase_e;
  dphase_e    dph;
  acc_sel_e   d_sel;
  logic [9:0] d_addr;

  wire      accept = req.hsel && req.htrans[1] && hready;
  acc_sel_e a_sel;
  assign a_sel = acc_sel_e'(req.haddr[13:12]);
  wire [9:0] a_addr = req.haddr[11:2];

  function automatic logic blocked(acc_sel_e s);
    return acc_busy && s != SEL_CTRL;
  endfunction

  wire w_go   = (dph == D_WRITE) && !blocked(d_sel);
  wire p_go   = (dph == D_READ_PEND) && !blocked(d_sel);
  wire a_go   = accept && !req.hwrite && !blocked(a_sel) && dph != D_WRITE;

  always_comb begin
    acc_ce = 1'b0; acc_we = 1'b0; acc_sel = a_sel; acc_addr = a_addr;
    acc_wdata = req.hwdata[15:0];
    if (w_go) begin
      acc_ce = 1'b1; acc_we = 1'b1; acc_sel = d_sel; acc_addr = d_addr;
    end else if (p_go) begin
      acc_ce = 1'b1; acc_sel = d_sel; acc_addr = d_addr;
    end else if (a_go) begin
      acc_ce = 1'b1;
    end
  end

  // HREADYOUT: a write waits while blocked; a pending read waits until issued
  // and then one more cycle for its data.
  assign rsp.hready = !((dph == D_WRITE && !w_go) || dph == D_READ_PEND);
  assign rsp.hrdata = {16'h0, acc_rdata};
  assign rsp.hresp  = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dph <= D_NONE; d_sel <= SEL_IFM; d_addr <= '0;
    end else if (dph == D_READ_PEND) begin
      if (p_go) dph <= D_READ;
    end else if (hready) begin
      if (!accept)          dph <= D_NONE;
      else if (req.hwrite)  dph <= D_WRITE;
      else if (a_go)        dph <= D_READ;
      else                  dph <= D_READ_PEND;
      if (accept) begin
        d_sel  <= a_sel;
        d_addr <= a_addr;
      end
    end
  end
endmodule
