// Self-checking testbench for ahb_arbiter: two masters share one AHB SRAM.
// Each master runs random single transfers in its own address half and checks
// its read data against its own model. The test counts the cycles in which
// both present an address phase together: then port 0's transfer must be the
// one forwarded to the slave in that cycle, and port 1 must see wait states.
module tb_ahb_arbiter;
  import ahb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ahb_m2s_t [1:0] m_req; ahb_s2m_t [1:0] m_rsp;
  ahb_m2s_t s_req; ahb_s2m_t s_rsp;
  int checks = 0, failures = 0;
  ahb_arbiter #(.NM(2)) dut (.clk, .rst_n, .m_req, .m_hready({m_rsp[1].hready, m_rsp[0].hready}),
                             .m_rsp, .s_req, .s_rsp);
  ahb_sram #(.BYTES(1024)) u_mem (.clk, .rst_n, .req(s_req), .hready(s_rsp.hready), .rsp(s_rsp));

  int both = 0, m1_waits = 0;
  always @(negedge clk) if (rst_n) begin
    if (m_req[0].hsel && m_req[0].htrans[1] && m_req[1].hsel && m_req[1].htrans[1]
        && m_rsp[0].hready && m_rsp[1].hready && s_rsp.hready) begin
      both++; checks++;
      if (s_req.haddr !== m_req[0].haddr) begin failures++; $display("priority violated"); end
    end
    if (!m_rsp[1].hready) m1_waits++;
  end

  // one master process per port
  task automatic master(input int p);
    logic [31:0] model [128];
    for (int i = 0; i < 128; i++) model[i] = 0;
    for (int i = 0; i < 128; i++) begin
      // write everything once
      @(negedge clk);
      m_req[p].hsel = 1; m_req[p].haddr = 32'(p*512 + i*4); m_req[p].htrans = HTRANS_NONSEQ;
      m_req[p].hwrite = 1; m_req[p].hsize = HSIZE_WORD;
      while (!m_rsp[p].hready) @(negedge clk);
      @(negedge clk);
      m_req[p].htrans = HTRANS_IDLE; m_req[p].hsel = 0; model[i] = $urandom; m_req[p].hwdata = model[i];
      while (!m_rsp[p].hready) @(negedge clk);
    end
    for (int i = 0; i < 400; i++) begin
      automatic int k = $urandom % 128;
      automatic logic wr = $urandom % 2;
      automatic logic [31:0] d = $urandom;
      @(negedge clk);
      m_req[p].hsel = 1; m_req[p].haddr = 32'(p*512 + k*4); m_req[p].htrans = HTRANS_NONSEQ;
      m_req[p].hwrite = wr; m_req[p].hsize = HSIZE_WORD;
      while (!m_rsp[p].hready) @(negedge clk);
      @(negedge clk);
      m_req[p].htrans = HTRANS_IDLE; m_req[p].hsel = 0; m_req[p].hwdata = d;
      while (!m_rsp[p].hready) @(negedge clk);
      if (wr) model[k] = d;
      else begin
        checks++;
        if (m_rsp[p].hrdata !== model[k]) begin
          failures++; $display("port %0d word %0d got %h exp %h", p, k, m_rsp[p].hrdata, model[k]);
        end
      end
    end
  endtask

  initial begin
    m_req[0] = AHB_M2S_IDLE; m_req[1] = AHB_M2S_IDLE;
    repeat (2) @(negedge clk); rst_n = 1;
    fork master(0); master(1); join
    checks++; if (both == 0) begin failures++; $display("no simultaneous requests"); end
    checks++; if (m1_waits == 0) begin failures++; $display("no wait state on port 1"); end
    $display("simultaneous=%0d port1 waits=%0d", both, m1_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
