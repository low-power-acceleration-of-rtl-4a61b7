// ahb_arbiter: lets NM AHB-Lite masters share one slave with a fixed
// priority (port 0 highest). Each master-side port behaves as a slave to its
// master (through that master's decoder).
//
// Every cycle in which the slave is ready, the highest-priority request -
// a request buffered earlier or a new address phase - is forwarded to the
// slave in that same cycle. A new address phase that loses (or arrives while
// the slave is stalling) is captured in the port's buffer; its master has
// already moved on to the data phase and sees HREADYOUT low until the buffered
// transfer has been forwarded and its data phase at the slave has finished.
// Write data is taken from the stalled master's HWDATA during the slave data
// phase. Forwarded transfers are single NONSEQ transfers.
// Following the thesis: strict priority, the winner forwarded in the same
// cycle, and losing requests buffered and forwarded in later cycles. This
// design's choices: one buffer entry per port and the wait-state handshake
// towards the buffered master.
module ahb_arbiter
  import ahb_pkg::*;
#(
  parameter int unsigned NM = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  ahb_m2s_t [NM-1:0]  m_req,
  input  logic     [NM-1:0]  m_hready,
  output ahb_s2m_t [NM-1:0]  m_rsp,
  output ahb_m2s_t           s_req,
  input  ahb_s2m_t           s_rsp
);
  localparam int unsigned IW = (NM > 1) ? $clog2(NM) : 1;

  ahb_m2s_t [NM-1:0] buf_req;
  logic     [NM-1:0] pending;
  logic     [NM-1:0] live, cand;
  logic              gnt_v;
  logic     [IW-1:0] gnt;
  logic              d_v;              // slave data phase owned by d_own
  logic     [IW-1:0] d_own;

  wire s_rdy = s_rsp.hready;

  always_comb begin
    gnt_v = 1'b0; gnt = '0;
    for (int i = 0; i < NM; i++) begin
      live[i] = m_req[i].hsel && m_req[i].htrans[1] && m_hready[i] && !pending[i];
      cand[i] = pending[i] || live[i];
    end
    for (int i = NM - 1; i >= 0; i--)
      if (cand[i]) begin gnt_v = 1'b1; gnt = IW'(i); end
  end

  always_comb begin
    s_req = AHB_M2S_IDLE;
    if (s_rdy && gnt_v) begin
      s_req        = pending[gnt] ? buf_req[gnt] : m_req[gnt];
      s_req.hsel   = 1'b1;
      s_req.htrans = HTRANS_NONSEQ;
    end
    s_req.hwdata = d_v ? m_req[d_own].hwdata : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0; d_v <= 1'b0; d_own <= '0;
      buf_req <= '0;
    end else begin
      for (int i = 0; i < NM; i++) begin
        if (s_rdy && gnt_v && gnt == IW'(i)) pending[i] <= 1'b0;
        else if (live[i]) begin
          pending[i] <= 1'b1;
          buf_req[i] <= m_req[i];
        end
      end
      if (s_rdy) begin
        d_v   <= gnt_v;
        d_own <= gnt;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NM; i++) begin
      if (d_v && d_own == IW'(i)) m_rsp[i] = s_rsp;
      else if (pending[i])        m_rsp[i] = '{hrdata: '0, hready: 1'b0, hresp: 1'b0};
      else                        m_rsp[i] = AHB_S2M_OKAY;
    end
  end

  a_one_pending_per_port: assert property (@(posedge clk) disable iff (!rst_n)
    (pending & live) == '0);
endmodule
