// dma_backend: the DMA's AHB-Lite master. It converts one request from the
// controller (read or write of a 32-bit word) into a single NONSEQ word
// transfer and does not pipeline transfers.
//
// Timing with a zero-wait slave: a request is accepted (req_ready high) in an
// idle cycle and its address phase is driven in that same cycle; the data
// phase follows. A write is then finished, so a new request can be accepted
// every second cycle. A read registers HRDATA at the end of the data phase and
// presents it as rsp_valid/rsp_rdata in the third cycle, so reads run every
// third cycle. The controller must hold a request stable until req_ready.
// These rates are the ones stated for the DMA; the structure is this design's.
module dma_backend
  import ahb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_write,
  input  logic [31:0] req_addr,
  input  logic [31:0] req_wdata,
  output logic        rsp_valid,
  output logic [31:0] rsp_rdata,
  output logic        rsp_err,
  output logic        idle,
  output ahb_m2s_t    m2s,
  input  ahb_s2m_t    s2m
);
  typedef enum logic [1:0] {B_IDLE, B_DATA, B_RESP} state_e;
  state_e      state;
  logic        d_write;
  logic [31:0] d_wdata;

  assign idle      = (state == B_IDLE);
  assign req_ready = idle && s2m.hready;
  assign rsp_valid = (state == B_RESP);

  always_comb begin
    m2s        = AHB_M2S_IDLE;
    m2s.hsel   = 1'b1;
    m2s.haddr  = {req_addr[31:2], 2'b00};
    m2s.hwrite = req_write;
    if (idle && req_valid) m2s.htrans = HTRANS_NONSEQ;
    m2s.hwdata = d_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= B_IDLE; d_write <= 1'b0; d_wdata <= '0; rsp_rdata <= '0; rsp_err <= 1'b0;
    end else begin
      case (state)
        B_IDLE: if (req_valid && s2m.hready) begin
          state   <= B_DATA;
          d_write <= req_write;
          d_wdata <= req_wdata;
        end
        B_DATA: if (s2m.hready) begin
          rsp_err <= s2m.hresp;
          if (d_write) state <= B_IDLE;
          else begin
            rsp_rdata <= s2m.hrdata;
            state     <= B_RESP;
          end
        end
        default: state <= B_IDLE;   // B_RESP
      endcase
    end
  end

  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && !req_ready |=> req_valid && $stable(req_addr) && $stable(req_write));
endmodule
