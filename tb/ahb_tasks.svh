// Single-transfer AHB-Lite master tasks for testbenches. The including module
// must declare clk, m2s (ahb_m2s_t, driven here) and s2m (ahb_s2m_t).
// Signals change at the falling edge; HREADY is sampled just after, once
// combinational paths have settled, and holds until the next rising edge.
task automatic ahb_idle();
  m2s = ahb_pkg::AHB_M2S_IDLE;
endtask

task automatic ahb_xfer(input logic wr, input logic [31:0] a, input logic [31:0] wd,
                        input ahb_pkg::hsize_e sz, output logic [31:0] rd, output logic err);
  @(negedge clk);
  m2s.hsel = 1'b1; m2s.haddr = a; m2s.htrans = ahb_pkg::HTRANS_NONSEQ;
  m2s.hwrite = wr; m2s.hsize = sz;
  #1;
  while (!s2m.hready) @(negedge clk);
  @(negedge clk);                       // data phase
  m2s.htrans = ahb_pkg::HTRANS_IDLE; m2s.hsel = 1'b0; m2s.hwdata = wd;
  #1;
  while (!s2m.hready) @(negedge clk);
  rd = s2m.hrdata; err = s2m.hresp;
endtask

task automatic ahb_write(input logic [31:0] a, input logic [31:0] d);
  logic [31:0] r; logic e;
  ahb_xfer(1'b1, a, d, ahb_pkg::HSIZE_WORD, r, e);
endtask

task automatic ahb_read(input logic [31:0] a, output logic [31:0] d);
  logic e;
  ahb_xfer(1'b0, a, '0, ahb_pkg::HSIZE_WORD, d, e);
endtask
