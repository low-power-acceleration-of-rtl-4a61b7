// Self-checking testbench for ahb_interconnect: core (master 0) and DMA
// (master 1) run random traffic at the same time into Memory 1 and Memory 2
// (small AHB SRAMs here) and the core also reaches a third slave. Each master
// owns its own words, so each checks its reads against its own model. The
// DMA master must get an ERROR for the register-port window it cannot reach.
module tb_ahb_interconnect;
  import ahb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ahb_m2s_t [1:0] m_req; ahb_s2m_t [1:0] m_rsp;
  ahb_m2s_t [2:0] s_req; ahb_s2m_t [2:0] s_rsp;
  int checks = 0, failures = 0;
  ahb_interconnect dut (.clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp);
  for (genvar s = 0; s < 3; s++) begin : g_s
    ahb_sram #(.BYTES(512)) u_s (.clk, .rst_n, .req(s_req[s]), .hready(s_rsp[s].hready), .rsp(s_rsp[s]));
  end
  localparam logic [31:0] BASES [3] = '{32'h0000_0000, 32'h0002_0000, 32'h0003_0000};
  int contention = 0;
  always @(negedge clk) if (rst_n && (!m_rsp[0].hready || !m_rsp[1].hready)) contention++;

  task automatic xfer(input int p, input logic wr, input logic [31:0] a, input logic [31:0] d,
                      output logic [31:0] r, output logic e);
    @(negedge clk);
    m_req[p].hsel = 1; m_req[p].haddr = a; m_req[p].htrans = HTRANS_NONSEQ;
    m_req[p].hwrite = wr; m_req[p].hsize = HSIZE_WORD;
    while (!m_rsp[p].hready) @(negedge clk);
    @(negedge clk);
    m_req[p].htrans = HTRANS_IDLE; m_req[p].hsel = 0; m_req[p].hwdata = d;
    while (!m_rsp[p].hready) @(negedge clk);
    r = m_rsp[p].hrdata; e = m_rsp[p].hresp;
  endtask

  task automatic master(input int p, input int nslaves);
    logic [31:0] model [3][64];
    logic [31:0] r; logic e;
    for (int s = 0; s < nslaves; s++) for (int i = 0; i < 64; i++) begin
      model[s][i] = $urandom;
      xfer(p, 1, BASES[s] + 32'(p*256 + i*4), model[s][i], r, e);
    end
    for (int i = 0; i < 300; i++) begin
      automatic int s = $urandom % nslaves, k = $urandom % 64;
      automatic logic wr = $urandom % 2;
      automatic logic [31:0] d = $urandom;
      xfer(p, wr, BASES[s] + 32'(p*256 + k*4), d, r, e);
      if (wr) model[s][k] = d;
      else begin
        checks++;
        if (r !== model[s][k] || e) begin failures++; $display("m%0d s%0d w%0d got %h exp %h", p, s, k, r, model[s][k]); end
      end
    end
  endtask

  initial begin
    logic [31:0] r; logic e;
    m_req[0] = AHB_M2S_IDLE; m_req[1] = AHB_M2S_IDLE;
    repeat (2) @(negedge clk); rst_n = 1;
    fork master(0, 3); master(1, 2); join
    xfer(1, 0, BASES[2], 0, r, e);
    checks++; if (!e) begin failures++; $display("DMA reached the register window"); end
    checks++; if (contention == 0) begin failures++; $display("no contention seen"); end
    $display("contention cycles=%0d", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
