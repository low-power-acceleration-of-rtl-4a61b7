// Self-checking testbench for dma_backend on an AHB SRAM: a stream of
// back-to-back write requests must be accepted every second cycle, a stream
// of reads every third cycle, and the read data must match what was written.
module tb_dma_backend;
  import ahb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_ready, req_write, rsp_valid, rsp_err, idle;
  logic [31:0] req_addr, req_wdata, rsp_rdata;
  ahb_m2s_t m2s; ahb_s2m_t s2m;
  int checks = 0, failures = 0;
  dma_backend dut (.*);
  ahb_sram #(.BYTES(1024)) u_mem (.clk, .rst_n, .req(m2s), .hready(s2m.hready), .rsp(s2m));
  logic [31:0] model [64];
  initial begin
    int last, n;
    req_valid = 0; req_write = 0; req_addr = 0; req_wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // writes
    last = -1;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      req_valid = 1; req_write = 1; req_addr = 32'(i*4); req_wdata = $urandom; model[i] = req_wdata;
      n = 0;
      while (!req_ready) begin @(negedge clk); n++; end
      if (i > 0) begin
        checks++; if (n != 1) begin failures++; $display("write %0d interval %0d", i, n + 1); end
      end
      @(posedge clk);
    end
    @(negedge clk); req_valid = 0;
    @(negedge clk);
    // reads: issue, wait for response
    for (int i = 0; i < 64; i++) begin
      int t;
      req_valid = 1; req_write = 0; req_addr = 32'(i*4);
      while (!req_ready) @(negedge clk);
      @(negedge clk); req_valid = 0;
      t = 1;
      while (!rsp_valid) begin @(negedge clk); t++; end
      checks++; if (rsp_rdata !== model[i]) begin failures++; $display("read %0d got %h", i, rsp_rdata); end
      checks++; if (t != 2) begin failures++; $display("read %0d latency %0d", i, t); end
      checks++; if (req_ready) begin failures++; $display("ready during response"); end
      @(negedge clk);
      checks++; if (!req_ready) begin failures++; $display("not ready 3 cycles after read"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
