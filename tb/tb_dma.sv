// Self-checking testbench for the whole DMA: memory and accelerator sides are
// AHB SRAMs. Three requests are queued back to back through the SWC port
// while the DMA is busy (memory->accelerator, accelerator->memory with a
// 4-word stride, trigger) and one more through the register port; checks the
// data moved, the trigger word, one irq for the transfer back, and that
// swc_ready drops when the queue fills.
module tb_dma;
  import ahb_pkg::*;
  import nmc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic swc_we, swc_ready, busy, irq;
  logic [31:0] swc_mem_addr, swc_ctrl; logic [6:0] swc_dma_addr;
  ahb_m2s_t m2s, mem_m2s, acc_m2s; ahb_s2m_t s2m, mem_s2m, acc_s2m;
  int checks = 0, failures = 0;
  dma dut (.clk, .rst_n, .swc_we, .swc_mem_addr, .swc_ctrl, .swc_dma_addr, .swc_ready,
           .cfg_req(m2s), .cfg_hready(s2m.hready), .cfg_rsp(s2m), .mem_m2s, .mem_s2m,
           .acc_m2s, .acc_s2m, .busy, .irq);
  ahb_sram #(.BYTES(8192))  u_mem (.clk, .rst_n, .req(mem_m2s), .hready(mem_s2m.hready), .rsp(mem_s2m));
  ahb_sram #(.BYTES(16384)) u_acc (.clk, .rst_n, .req(acc_m2s), .hready(acc_s2m.hready), .rsp(acc_s2m));
  `include "ahb_tasks.svh"
  int irqs = 0, not_ready = 0;
  always @(posedge clk) if (rst_n && irq) irqs++;
  always @(posedge clk) if (rst_n && !swc_ready) not_ready++;

  function automatic logic [31:0] C(logic [2:0] mode, logic [11:0] aa, logic [2:0] bs, logic [10:0] n);
    dma_ctrl_t c = '{mode: mode, acc: 2'd0, acc_addr: aa, bitsh: bs, nrtx: n, start: 1'b1};
    return 32'(c);
  endfunction
  task automatic swc(input logic [31:0] a, input logic [31:0] c);
    @(negedge clk);
    while (!swc_ready) @(negedge clk);
    swc_we = 1; swc_mem_addr = a; swc_ctrl = c; swc_dma_addr = 0;
    @(negedge clk); swc_we = 0;
  endtask

  initial begin
    swc_we = 0; swc_mem_addr = 0; swc_ctrl = 0; swc_dma_addr = 0;
    ahb_idle();
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2048; i++) u_mem.u_ram.mem[i] = 32'hC0DE_0000 + 32'(i);
    for (int i = 0; i < 64; i++) u_acc.u_ram.mem[12'h800 + 12'(i)] = 32'h0000_7000 + 32'(i);
    swc(32'h0, C(MODE_MEM2ACC, 12'h000, 0, 11'd200));
    swc(32'h1000, C(MODE_ACC2MEM, 12'h800, 3'd2, 11'd64));
    swc(32'h0, C(MODE_TRIGGER, 12'h000, 0, 11'd0));
    swc(32'h0, C(MODE_MEM2ACC, 12'h100, 0, 11'd1));
    swc(32'h0, C(MODE_MEM2ACC, 12'h101, 0, 11'd1));
    ahb_write(32'h0, 32'h40);
    ahb_write(32'h4, C(MODE_MEM2ACC, 12'h200, 0, 11'd16));
    while (busy) @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      checks++; if (u_acc.u_ram.mem[i] != 32'hC0DE_0000 + 32'(i)) begin failures++; if (failures < 5) $display("m2a %0d", i); end
    end
    for (int i = 0; i < 64; i++) begin
      checks++; if (u_mem.u_ram.mem[1024 + 4*i] != 32'h0000_7000 + 32'(i)) begin failures++; if (failures < 5) $display("a2m %0d", i); end
    end
    checks++; if (u_acc.u_ram.mem[12'hC00] != 32'd1) begin failures++; $display("no trigger"); end
    for (int i = 0; i < 16; i++) begin
      checks++; if (u_acc.u_ram.mem[12'h200 + 12'(i)] != 32'hC0DE_0010 + 32'(i)) begin failures++; $display("reg-port req %0d", i); end
    end
    checks++; if (irqs != 1) begin failures++; $display("irqs %0d", irqs); end
    checks++; if (not_ready == 0) begin failures++; $display("queue never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
