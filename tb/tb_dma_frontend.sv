// Self-checking testbench for dma_frontend: requests from the SWC port and
// from the register port are queued in order; SWC strobes for another DMA
// address or without START are ignored; the queue reports full through
// swc_ready and holds a register-port write with wait states until the
// controller pops; the registers and the status word read back.
module tb_dma_frontend;
  import ahb_pkg::*;
  import nmc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic swc_we, swc_ready, q_valid, q_pop;
  logic [31:0] swc_mem_addr, swc_ctrl, q_addr;
  logic [6:0] swc_dma_addr;
  dma_ctrl_t q_ctrl;
  ahb_m2s_t m2s; ahb_s2m_t s2m;
  int checks = 0, failures = 0;
  dma_frontend #(.DEPTH(4), .DMA_ID(7'd0)) dut (.clk, .rst_n, .swc_we, .swc_mem_addr, .swc_ctrl,
    .swc_dma_addr, .swc_ready, .cfg_req(m2s), .cfg_hready(s2m.hready), .cfg_rsp(s2m),
    .q_valid, .q_addr, .q_ctrl, .q_pop);
  `include "ahb_tasks.svh"
  logic [63:0] exp_q[$];
  int waits = 0;
  always @(negedge clk) if (rst_n && !s2m.hready) waits++;

  task automatic swc(input logic [31:0] a, input logic [31:0] c, input logic [6:0] id);
    @(negedge clk); swc_we = 1; swc_mem_addr = a; swc_ctrl = c; swc_dma_addr = id;
    @(negedge clk); swc_we = 0;
  endtask
  task automatic pop_check();
    logic [63:0] e = exp_q.pop_front();
    @(negedge clk);
    checks++;
    if (!q_valid || q_addr != e[63:32] || 32'(q_ctrl) != e[31:0]) begin
      failures++; $display("queue head %h %h exp %h", q_addr, q_ctrl, e);
    end
    q_pop = 1; @(negedge clk); q_pop = 0;
  endtask

  initial begin
    logic [31:0] r;
    swc_we = 0; swc_mem_addr = 0; swc_ctrl = 0; swc_dma_addr = 0; q_pop = 0;
    ahb_idle();
    repeat (2) @(negedge clk); rst_n = 1;
    swc(32'h100, 32'h0000_0081, 0); exp_q.push_back({32'h100, 32'h0000_0081});
    swc(32'h200, 32'h0000_0080, 0);                     // START clear: ignored
    swc(32'h300, 32'h0000_0083, 7'd5);                  // other DMA: ignored
    ahb_write(32'h0, 32'h0002_0000);
    ahb_write(32'h4, 32'h4000_1005); exp_q.push_back({32'h0002_0000, 32'h4000_1005});
    ahb_write(32'h4, 32'h4000_1004);                    // START clear: not queued
    ahb_read(32'h0, r); checks++; if (r != 32'h0002_0000) begin failures++; $display("addr reg %h", r); end
    ahb_read(32'h4, r); checks++; if (r != 32'h4000_1004) begin failures++; $display("ctrl reg %h", r); end
    ahb_read(32'h8, r); checks++; if (r != 32'd2) begin failures++; $display("status %h", r); end
    swc(32'h400, 32'h2000_0003, 0); exp_q.push_back({32'h400, 32'h2000_0003});
    swc(32'h500, 32'h0000_0005, 0); exp_q.push_back({32'h500, 32'h0000_0005});
    checks++; if (swc_ready) begin failures++; $display("not full"); end
    ahb_read(32'h8, r); checks++; if (r != 32'h14) begin failures++; $display("status full %h", r); end
    // register write while full: held until a pop
    fork
      begin ahb_write(32'h4, 32'h0000_0007); end
      begin repeat (10) @(negedge clk); pop_check(); end
    join
    exp_q.push_back({32'h0002_0000, 32'h0000_0007});
    checks++; if (waits < 8) begin failures++; $display("write not held, waits=%0d", waits); end
    while (exp_q.size() > 0) pop_check();
    @(negedge clk); checks++; if (q_valid) begin failures++; $display("queue not empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
