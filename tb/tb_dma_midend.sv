// Self-checking testbench for dma_midend with two real back-ends, each on an
// AHB SRAM (one standing for main memory, one for the accelerators' private
// spaces). Requests are fed as the front-end would: memory->accelerator with
// a stride, accelerator->memory, a trigger, and an undefined mode. Checks the
// moved data, the trigger word, the one-cycle irq after accelerator->memory
// only, and the transfer time of about three cycles per word.
module tb_dma_midend;
  import ahb_pkg::*;
  import nmc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic q_valid, q_pop, busy, irq;
  logic [31:0] q_addr; dma_ctrl_t q_ctrl;
  logic m_valid, m_ready, m_write, m_rvalid, m_idle, a_valid, a_ready, a_write, a_rvalid, a_idle;
  logic [31:0] m_addr, m_wdata, m_rdata, a_addr, a_wdata, a_rdata;
  ahb_m2s_t mm2s, am2s; ahb_s2m_t ms2m, as2m;
  int checks = 0, failures = 0;
  dma_midend dut (.clk, .rst_n, .q_valid, .q_addr, .q_ctrl, .q_pop,
    .mem_req_valid(m_valid), .mem_req_ready(m_ready), .mem_req_write(m_write), .mem_req_addr(m_addr),
    .mem_req_wdata(m_wdata), .mem_rsp_valid(m_rvalid), .mem_rsp_rdata(m_rdata), .mem_idle(m_idle),
    .acc_req_valid(a_valid), .acc_req_ready(a_ready), .acc_req_write(a_write), .acc_req_addr(a_addr),
    .acc_req_wdata(a_wdata), .acc_rsp_valid(a_rvalid), .acc_rsp_rdata(a_rdata), .acc_idle(a_idle),
    .busy, .irq);
  dma_backend u_mbe (.clk, .rst_n, .req_valid(m_valid), .req_ready(m_ready), .req_write(m_write),
    .req_addr(m_addr), .req_wdata(m_wdata), .rsp_valid(m_rvalid), .rsp_rdata(m_rdata), .rsp_err(),
    .idle(m_idle), .m2s(mm2s), .s2m(ms2m));
  dma_backend u_abe (.clk, .rst_n, .req_valid(a_valid), .req_ready(a_ready), .req_write(a_write),
    .req_addr(a_addr), .req_wdata(a_wdata), .rsp_valid(a_rvalid), .rsp_rdata(a_rdata), .rsp_err(),
    .idle(a_idle), .m2s(am2s), .s2m(as2m));
  ahb_sram #(.BYTES(4096))  u_mem (.clk, .rst_n, .req(mm2s), .hready(ms2m.hready), .rsp(ms2m));
  ahb_sram #(.BYTES(65536)) u_acc (.clk, .rst_n, .req(am2s), .hready(as2m.hready), .rsp(as2m));

  int irqs = 0;
  always @(posedge clk) if (rst_n && irq) irqs++;

  function automatic dma_ctrl_t C(logic [2:0] mode, logic [1:0] acc, logic [11:0] aa, logic [2:0] bs, logic [10:0] n);
    return '{mode: mode, acc: acc, acc_addr: aa, bitsh: bs, nrtx: n, start: 1'b1};
  endfunction

  task automatic run(input logic [31:0] a, input dma_ctrl_t c, output int cyc);
    @(negedge clk); q_valid = 1; q_addr = a; q_ctrl = c;
    @(negedge clk); q_valid = 0;
    cyc = 1;
    while (busy) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int cyc;
    q_valid = 0; q_addr = 0; q_ctrl = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1024; i++) u_mem.u_ram.mem[i] = 32'hA000_0000 + 32'(i);
    // memory -> accelerator 2, word 0x040, stride 2 words, 100 words
    run(32'h10, C(MODE_MEM2ACC, 2, 12'h040, 3'd1, 11'd100), cyc);
    for (int i = 0; i < 100; i++) begin
      checks++;
      if (u_acc.u_ram.mem[{2'd2, 12'h040 + 12'(i)}] != 32'hA000_0004 + 32'(2*i)) begin
        failures++; if (failures < 5) $display("m2a word %0d", i);
      end
    end
    checks++; if (cyc > 3*100 + 10 || cyc < 3*100) begin failures++; $display("m2a cycles %0d", cyc); end
    $display("100 words memory->accelerator: %0d cycles", cyc);
    checks++; if (irqs != 0) begin failures++; $display("irq after m2a"); end
    // accelerator -> memory, contiguous
    for (int i = 0; i < 64; i++) u_acc.u_ram.mem[{2'd1, 12'h800 + 12'(i)}] = 32'h5500_0000 + 32'(i);
    run(32'h800, C(MODE_ACC2MEM, 1, 12'h800, 3'd0, 11'd64), cyc);
    for (int i = 0; i < 64; i++) begin
      checks++;
      if (u_mem.u_ram.mem[512 + i] != 32'h5500_0000 + 32'(i)) begin failures++; if (failures < 5) $display("a2m word %0d", i); end
    end
    @(negedge clk);
    checks++; if (irqs != 1) begin failures++; $display("irqs %0d", irqs); end
    $display("64 words accelerator->memory: %0d cycles", cyc);
    // trigger accelerator 3
    u_acc.u_ram.mem[{2'd3, 12'hC00}] = 0;
    run(32'h0, C(MODE_TRIGGER, 3, 12'h000, 3'd0, 11'd0), cyc);
    checks++; if (u_acc.u_ram.mem[{2'd3, 12'hC00}] != 32'd1) begin failures++; $display("no trigger write"); end
    // undefined mode: dropped
    run(32'h0, C(3'b111, 0, 12'h000, 3'd0, 11'd5), cyc);
    checks++; if (cyc > 2) begin failures++; $display("undefined mode ran"); end
    checks++; if (irqs != 1) begin failures++; $display("irq count %0d", irqs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
