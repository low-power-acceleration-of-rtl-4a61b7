// ahb_interconnect: the SoC bus matrix. NM masters (0 = core, 1 = DMA memory
// port) each have an ahb_decoder; each of the NS slaves (0 = Memory 1,
// 1 = Memory 2, 2 = DMA register port) has an ahb_arbiter joining the
// masters' paths to it, with master 0 at the highest priority. A master
// whose decoder window does not include a slave never selects it (the DMA
// master's decoder has no window on the DMA register port). Address
// windows: Memory 1 0x0000_0000 (128 kB window, 96 kB fitted), Memory 2
// 0x0002_0000 (32 kB), DMA registers 0x0003_0000 (4 kB).
//
// Following the thesis: two masters, two decoders, and arbiters in front of
// shared slaves, with both memories reachable by both masters. This design's
// choices: the address map, the core first in every arbiter, and placing the
// DMA register port behind an arbiter of its own.
module ahb_interconnect
  import ahb_pkg::*;
#(
  parameter int unsigned NM = 2,
  parameter int unsigned NS = 3,
  parameter logic [NS-1:0][31:0] BASE = {32'h0003_0000, 32'h0002_0000, 32'h0000_0000},
  parameter logic [NS-1:0][31:0] MASK = {32'hFFFF_F000, 32'hFFFF_8000, 32'hFFFE_0000},
  // per master, per slave: 1 when the master may reach the slave
  parameter logic [NM-1:0][NS-1:0] REACH = {3'b011, 3'b111}
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ahb_m2s_t [NM-1:0] m_req,
  output ahb_s2m_t [NM-1:0] m_rsp,
  output ahb_m2s_t [NS-1:0] s_req,
  input  ahb_s2m_t [NS-1:0] s_rsp
);
  ahb_m2s_t [NM-1:0][NS-1:0] x_req;   // decoder m -> arbiter s
  ahb_s2m_t [NM-1:0][NS-1:0] x_rsp;
  ahb_m2s_t [NS-1:0][NM-1:0] a_req;
  ahb_s2m_t [NS-1:0][NM-1:0] a_rsp;
  logic     [NS-1:0][NM-1:0] a_hready;

  for (genvar m = 0; m < NM; m++) begin : g_dec
    ahb_m2s_t [NS-1:0] d_req;
    ahb_decoder #(.NS(NS), .BASE(BASE),
                  .MASK(MASK), .EN(REACH[m])) u_dec (
      .clk, .rst_n, .m_req(m_req[m]), .m_rsp(m_rsp[m]),
      .s_req(d_req), .s_rsp(x_rsp[m])
    );
    assign x_req[m] = d_req;
  end

  for (genvar s = 0; s < NS; s++) begin : g_arb
    for (genvar m = 0; m < NM; m++) begin : g_x
      assign a_req[s][m]    = x_req[m][s];
      assign a_hready[s][m] = m_rsp[m].hready;
      assign x_rsp[m][s]    = a_rsp[s][m];
    end
    ahb_arbiter #(.NM(NM)) u_arb (
      .clk, .rst_n, .m_req(a_req[s]), .m_hready(a_hready[s]), .m_rsp(a_rsp[s]),
      .s_req(s_req[s]), .s_rsp(s_rsp[s])
    );
  end

endmodule
