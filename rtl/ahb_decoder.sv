// ahb_decoder: connects one AHB-Lite master to NS slaves. The address phase
// is broadcast to all slaves with a one-hot HSEL chosen from the slave's
// base/size window; the slave selected in the address phase is remembered so
// that its HRDATA/HREADYOUT/HRESP are returned during the data phase. Every
// slave also receives the master's HREADY. An address that matches no window
// gets the standard two-cycle ERROR response from a built-in default slave.
// The windows are parameters, and EN removes a slave from this master's
// map. A window's size must be a power of two.
//
// Following the thesis: one decoder per master, with the slave chosen by
// address. This design's choices: the window parameters and the default
// slave.
module ahb_decoder
  import ahb_pkg::*;
#(
  parameter int unsigned NS = 3,
  parameter logic [NS-1:0][31:0] BASE = {32'h0003_0000, 32'h0002_0000, 32'h0000_0000},
  parameter logic [NS-1:0][31:0] MASK = {32'hFFFF_F000, 32'hFFFF_8000, 32'hFFFE_0000},
  parameter logic [NS-1:0]       EN   = '1     // slaves this master may reach
) (
  input  logic               clk,
  input  logic               rst_n,
  input  ahb_m2s_t           m_req,
  output ahb_s2m_t           m_rsp,
  output ahb_m2s_t [NS-1:0]  s_req,
  input  ahb_s2m_t [NS-1:0]  s_rsp
);
  localparam int unsigned SW = $clog2(NS + 1);
  logic [NS-1:0] hit;
  logic [SW-1:0] a_sel, d_sel;          // NS = none/default
  logic          d_active;              // data phase of a real transfer
  logic          err_1st, err_2nd;      // default slave ERROR response

  always_comb begin
    a_sel = SW'(NS);
    for (int s = NS - 1; s >= 0; s--) begin
      hit[s] = EN[s] && ((m_req.haddr & MASK[s]) == BASE[s]);
      if (hit[s]) a_sel = SW'(s);
    end
  end

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      s_req[s]      = m_req;
      s_req[s].hsel = (a_sel == SW'(s));
    end
  end

  wire hready = m_rsp.hready;
  wire trans  = m_req.htrans[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_sel <= SW'(NS); d_active <= 1'b0; err_1st <= 1'b0; err_2nd <= 1'b0;
    end else begin
      err_2nd <= err_1st;
      if (err_1st) err_1st <= 1'b0;
      if (hready) begin
        d_sel    <= a_sel;
        d_active <= trans;
        err_1st  <= trans && (a_sel == SW'(NS));
      end
    end
  end

  always_comb begin
    m_rsp = AHB_S2M_OKAY;
    if (err_1st)       m_rsp = '{hrdata: '0, hready: 1'b0, hresp: 1'b1};
    else if (err_2nd)  m_rsp = '{hrdata: '0, hready: 1'b1, hresp: 1'b1};
    else if (d_active && d_sel != SW'(NS)) m_rsp = s_rsp[d_sel];
  end
endmodule
