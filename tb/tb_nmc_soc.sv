// End-to-end testbench for nmc_soc at its default sizes, playing the core.
// Two 8x8 images and one set of eight 3x3 filters (the convolution layer of
// the evaluated network) are written into Memory 2. Seven SWC instructions
// then run two inferences: copy image 0 and the weights, start, copy the
// pooled 4x4x8 result to Memory 1, then the same for image 1 (the weights
// stay). While the DMA works the core keeps reading and writing Memory 2
// itself. Each result is compared with the reference model, and the fully
// connected layer (128 -> 10) and maximum-activation classifier of the
// network run on it as MAC instructions through the register file, as the
// core would; the ten sums and the class are checked. Image 0's fully
// connected layer must finish while the accelerator still works on image 1. A transfer programmed
// through the DMA's register port then copies the second result again.
// Last, a 32x32 image with four filters, read from memory at a stride of two
// words, fills the accelerator's input and output memories; its result and
// run time are checked.
// Mechanisms counted (each must occur): SWC stall on a full DMA queue,
// arbiter buffering of the DMA behind the core, accelerator bridge held
// while the accelerator is busy, SRAM write/read collision wait, DMA
// interrupt, register-port request, decoder ERROR for an unmapped address,
// MAC write-back (also back to back), ID-stage hazard stall, strided
// (BITSH) transfer, core computing while the accelerator runs.
module tb_nmc_soc;
  import ahb_pkg::*;
  import nmc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ahb_m2s_t m2s; ahb_s2m_t s2m;
  logic ex_valid; logic [31:0] ex_instr;
  logic gpr_we; logic [4:0] gpr_waddr; logic [31:0] gpr_wdata, gpr_rs1_val, gpr_rs2_val;
  logic swc_stall, dma_irq, dma_busy, acc_busy; logic [2:0] swc_opt1; logic [1:0] swc_opt2;
  logic [31:0] mac_result; logic mac_is_mac; logic [4:0] mac_rd;
  logic hz_id_valid, hz_id_custom, hz_id_uses_rs3, hz_ex_valid, hz_ex_writes_rd, hz_ex_pending, hz_stall_id, hz_stall_fe;
  logic [4:0] hz_id_rs1, hz_id_rs2, hz_id_rs3, hz_ex_rd;
  int checks = 0, failures = 0;

  nmc_soc dut (.clk, .rst_n, .core_m2s(m2s), .core_s2m(s2m), .ex_valid, .ex_instr, .gpr_we, .gpr_waddr,
    .gpr_wdata, .gpr_rs1_val, .gpr_rs2_val, .swc_stall, .swc_opt1, .swc_opt2, .dma_irq, .dma_busy, .acc_busy,
    .mac_is_mac, .mac_rd, .mac_result,
    .hz_id_valid, .hz_id_custom, .hz_id_rs1, .hz_id_rs2, .hz_id_rs3, .hz_id_uses_rs3,
    .hz_ex_valid, .hz_ex_writes_rd, .hz_ex_rd, .hz_ex_pending, .hz_stall_id, .hz_stall_fe);
  `include "ahb_tasks.svh"
  `include "cnn_ref.svh"

  // mechanism counters
  int n_swc_stall = 0, n_arb_buf = 0, n_bridge_hold = 0, n_collide = 0, n_irq = 0;
  int n_regport = 0, n_error = 0, n_mac = 0, n_hazard = 0, n_stride = 0, n_overlap = 0;
  always @(posedge clk) if (rst_n) begin
    if (swc_stall) n_swc_stall++;
    if (dut.u_xbar.g_arb[1].u_arb.pending[1] || dut.u_xbar.g_arb[0].u_arb.pending[1]) n_arb_buf++;
    if (acc_busy && !dut.dma_acc_s2m.hready) n_bridge_hold++;
    if (dut.u_mem1.dph == 2'd3 || dut.u_mem2.dph == 2'd3) n_collide++;
    if (dma_irq) n_irq++;
  end

  localparam logic [31:0] IMG0 = 32'h0002_0000, IMG1 = 32'h0002_0100, WGT = 32'h0002_0400;
  localparam logic [31:0] RES0 = 32'h0000_8000, RES1 = 32'h0000_8400, RES2 = 32'h0000_9000;
  localparam logic [31:0] SCRATCH = 32'h0002_7000, BIG = 32'h0002_1000, RES3 = 32'h0000_A000;
  shortint ifm0 [1024], ifm1 [1024], w [1024], exp0 [1024], exp1 [1024];

  function automatic logic [31:0] ctrl(dma_mode_e m, acc_sel_e s, int n, int sh = 0);
    dma_ctrl_t c = '{mode: m, acc: 2'd0, acc_addr: {s, 10'd0}, bitsh: 3'(sh), nrtx: 11'(n), start: 1'b1};
    return 32'(c);
  endfunction

  // one register write through the core's write-back port
  task automatic gpr_write(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); gpr_we = 1; gpr_waddr = a; gpr_wdata = d;
    @(posedge clk); #1 gpr_we = 0;
  endtask

  // SWC in EX: {DMA address, rs2, rs1, 000, opt1, opt2, custom-0}, with the
  // control word in x10 and the memory address in x11
  task automatic swc(input logic [31:0] mem_addr, input logic [31:0] c);
    gpr_write(5'd10, c);
    gpr_write(5'd11, mem_addr);
    @(negedge clk);
    ex_valid = 1; ex_instr = {7'd0, 5'd11, 5'd10, 3'b000, 3'd5, 2'd2, OPC_SWC};
    #1;
    while (swc_stall) begin @(negedge clk); #1; end
    checks++; if (swc_opt1 != 3'd5 || swc_opt2 != 2'd2) begin failures++; $display("opt fields"); end
    @(negedge clk); ex_valid = 0;
  endtask

  int fc_in [128];
  task automatic check_result(input logic [31:0] base, input shortint e [1024], input string what,
                              input int n = 128);
    logic [31:0] r; int bad = 0;
    for (int i = 0; i < n; i++) begin
      ahb_read(base + 32'(4*i), r);
      if (i < 128) fc_in[i] = int'(r);
      checks++;
      if (r != 32'(e[i])) begin bad++; failures++; if (bad < 4) $display("%s[%0d] got %0d exp %0d", what, i, r, e[i]); end
    end
  endtask

  // MAC x3, rs1, rs2 in EX for one cycle; sum is the expected new x3
  task automatic mac(input logic [4:0] rs1, input logic [4:0] rs2, input int sum);
    @(negedge clk);
    ex_valid = 1; ex_instr = {7'd0, rs2, rs1, 3'd0, 5'd3, OPC_MAC};
    #1 checks++;
    if (!mac_is_mac || mac_rd != 5'd3 || mac_result != 32'(sum)) begin
      failures++; if (failures < 10) $display("MAC got %0d exp %0d", $signed(mac_result), sum);
    end else n_mac++;
  endtask

  // fully connected layer 128 -> 10 and arg-max on the values in fc_in,
  // two products per pair of back-to-back MACs
  shortint fcw [128][10];
  task automatic fc_layer(input string what);
    int sum [10], got [10]; int best_ref = 0, best_got = 0;
    for (int i = 0; i < 10; i++) begin
      gpr_write(5'd3, 0);
      sum[i] = 0;
      for (int j = 0; j < 128; j += 2) begin
        gpr_write(5'd1, 32'(fc_in[j]));   gpr_write(5'd2, 32'(int'(fcw[j][i])));
        gpr_write(5'd4, 32'(fc_in[j+1])); gpr_write(5'd5, 32'(int'(fcw[j+1][i])));
        sum[i] += fc_in[j] * int'(fcw[j][i]);
        mac(5'd1, 5'd2, sum[i]);
        sum[i] += fc_in[j+1] * int'(fcw[j+1][i]);
        mac(5'd4, 5'd5, sum[i]);
        @(negedge clk); ex_valid = 0;
      end
      // read x3 back through the rs1 port (an ADD x0, x3, x0 in EX)
      ex_instr = {7'd0, 5'd0, 5'd3, 3'd0, 5'd0, 7'b0110011};
      #1 got[i] = int'(gpr_rs1_val);
      checks++; if (got[i] != sum[i]) begin failures++; $display("%s FC[%0d] got %0d exp %0d", what, i, got[i], sum[i]); end
      if (sum[i] > sum[best_ref]) best_ref = i;
      if (got[i] > got[best_got]) best_got = i;
    end
    checks++; if (best_got != best_ref) begin failures++; $display("%s class %0d exp %0d", what, best_got, best_ref); end
    $display("%s: class %0d", what, best_got);
  endtask

  initial begin
    logic [31:0] r; logic err; int t0;
    ahb_idle(); ex_valid = 0; ex_instr = 0; gpr_we = 0; gpr_waddr = 0; gpr_wdata = 0;
    {hz_id_valid, hz_id_custom, hz_id_uses_rs3, hz_ex_valid, hz_ex_writes_rd, hz_ex_pending} = '0;
    {hz_id_rs1, hz_id_rs2, hz_id_rs3, hz_ex_rd} = '0;
    repeat (3) @(negedge clk); rst_n = 1;

    for (int i = 0; i < 1024; i++) begin
      ifm0[i] = shortint'($urandom % 512 - 256); ifm1[i] = shortint'($urandom % 512 - 256);
      w[i] = shortint'($urandom % 256 - 128);
    end
    w[0] = 8; w[1] = 1; w[2] = 8; w[3] = 6;
    foreach (fcw[j, i]) fcw[j][i] = shortint'($urandom % 256 - 128);
    cnn_ref(8, 1, 8, 6, ifm0, w, exp0);
    cnn_ref(8, 1, 8, 6, ifm1, w, exp1);
    for (int i = 0; i < 64; i++) ahb_write(IMG0 + 32'(4*i), 32'(ifm0[i]));
    for (int i = 0; i < 64; i++) ahb_write(IMG1 + 32'(4*i), 32'(ifm1[i]));
    for (int i = 0; i < 84; i++) ahb_write(WGT + 32'(4*i), 32'(w[i]));

    t0 = $time;
    fork
      begin   // instruction stream
        swc(IMG0, ctrl(MODE_MEM2ACC, SEL_IFM, 64));
        swc(WGT,  ctrl(MODE_MEM2ACC, SEL_WGT, 84));
        swc(0,    ctrl(MODE_TRIGGER, SEL_CTRL, 0));
        swc(RES0, ctrl(MODE_ACC2MEM, SEL_OFM, 128));
        swc(IMG1, ctrl(MODE_MEM2ACC, SEL_IFM, 64));
        swc(0,    ctrl(MODE_TRIGGER, SEL_CTRL, 0));
        swc(RES1, ctrl(MODE_ACC2MEM, SEL_OFM, 128));
      end
      begin   // the core keeps using Memory 2 meanwhile, with pipelined write->read pairs
        for (int i = 0; i < 300; i++) begin
          @(negedge clk);
          m2s.hsel = 1; m2s.haddr = SCRATCH + 32'(4*(i%64)); m2s.htrans = HTRANS_NONSEQ; m2s.hwrite = 1; m2s.hsize = HSIZE_WORD;
          while (!s2m.hready) @(negedge clk);
          @(negedge clk); m2s.hwrite = 0; m2s.hwdata = 32'(i) * 32'h01010101;
          while (!s2m.hready) @(negedge clk);
          @(negedge clk); m2s.htrans = HTRANS_IDLE; m2s.hsel = 0;
          while (!s2m.hready) @(negedge clk);
          checks++; if (s2m.hrdata != 32'(i) * 32'h01010101) begin failures++; $display("core scratch %0d", i); end
        end
      end
    join
    // image 0's fully connected layer runs while the accelerator is still
    // busy with image 1
    while (n_irq < 1) @(negedge clk);
    check_result(RES0, exp0, "result0");
    fc_layer("image 0");
    checks++; if (n_irq != 1 || !acc_busy) begin failures++; $display("no overlap of FC and inference"); end
    else n_overlap++;
    while (n_irq < 2) @(negedge clk);
    $display("two inferences with transfers, overlapped with the first FC layer: %0d cycles", ($time - t0) / 10);
    check_result(RES1, exp1, "result1");
    fc_layer("image 1");

    // register-port request: copy the OFM again
    ahb_write(32'h0003_0000, RES2);
    ahb_write(32'h0003_0004, ctrl(MODE_ACC2MEM, SEL_OFM, 128));
    n_regport++;
    while (n_irq < 3) @(negedge clk);
    check_result(RES2, exp1, "result2");
    ahb_read(32'h0003_0008, r); checks++; if (r != 0) begin failures++; $display("DMA status %h", r); end

    // largest image: 32x32, one channel, four filters (IFM and OFM full).
    // The image sits in Memory 2 at a stride of two words (BITSH = 1).
    for (int i = 0; i < 1024; i++) ifm0[i] = shortint'($urandom % 512 - 256);
    w[0] = 32; w[1] = 1; w[2] = 4; w[3] = 7;
    cnn_ref(32, 1, 4, 7, ifm0, w, exp0);
    for (int i = 0; i < 1024; i++) begin
      ahb_write(BIG + 32'(8*i), 32'(ifm0[i]));
      ahb_write(BIG + 32'(8*i + 4), 32'hdead_0000 | 32'(i));   // must be skipped
    end
    for (int i = 0; i < 44; i++) ahb_write(WGT + 32'(4*i), 32'(w[i]));
    t0 = $time;
    swc(BIG, ctrl(MODE_MEM2ACC, SEL_IFM, 1024, 1));
    swc(WGT, ctrl(MODE_MEM2ACC, SEL_WGT, 44));
    swc(0,   ctrl(MODE_TRIGGER, SEL_CTRL, 0));
    swc(RES3, ctrl(MODE_ACC2MEM, SEL_OFM, 1024));
    n_stride++;
    while (n_irq < 4) @(negedge clk);
    $display("32x32x1 image, 4 filters, with transfers: %0d cycles", ($time - t0) / 10);
    // 3 cycles per moved word (1024 + 44 + 1024) plus the engine's
    // 6 + 4*16*16*(4*(9+2)+1) cycles, plus a little queue and bus overhead
    checks++;
    if (($time - t0) / 10 < 3 * 2092 + 46086 || ($time - t0) / 10 > 3 * 2092 + 46086 + 60) begin
      failures++; $display("32x32 run time off");
    end
    check_result(RES3, exp0, "result32", 1024);

    // unmapped address
    ahb_xfer(0, 32'h0010_0000, 0, HSIZE_WORD, r, err);
    checks++; if (!err) begin failures++; $display("no ERROR"); end else n_error++;

    // hazard: MAC in ID reads x3 while a load to x3 is in EX
    @(negedge clk);
    {hz_id_valid, hz_id_custom, hz_id_uses_rs3, hz_ex_valid, hz_ex_writes_rd, hz_ex_pending} = '1;
    hz_id_rs1 = 1; hz_id_rs2 = 2; hz_id_rs3 = 3; hz_ex_rd = 3;
    #1 checks++; if (!hz_stall_id || !hz_stall_fe) failures++; else n_hazard++;
    hz_ex_pending = 0;
    #1 checks++; if (hz_stall_id) failures++;

    $display("swc_stall=%0d arbiter_buffered=%0d bridge_held=%0d sram_collisions=%0d irq=%0d regport=%0d error=%0d mac=%0d hazard=%0d strided=%0d overlap=%0d",
             n_swc_stall, n_arb_buf, n_bridge_hold, n_collide, n_irq, n_regport, n_error, n_mac, n_hazard, n_stride, n_overlap);
    if (n_swc_stall == 0) begin failures++; $display("no SWC stall"); end
    if (n_arb_buf == 0) begin failures++; $display("no arbiter buffering"); end
    if (n_bridge_hold == 0) begin failures++; $display("no bridge hold"); end
    if (n_collide == 0) begin failures++; $display("no SRAM collision"); end
    if (n_irq != 4) begin failures++; $display("irq count %0d", n_irq); end
    if (n_regport == 0 || n_error == 0 || n_mac == 0 || n_hazard == 0 || n_stride == 0 || n_overlap == 0) failures++;
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (600000) @(posedge clk);
    failures++; $display("watchdog irq=%0d run=%0d mode=%0d rd=%0d wr=%0d n=%0d accbusy=%0d mstate=%0d astate=%0d qv=%0d", n_irq, dut.u_dma.u_mid.run, dut.u_dma.u_mid.mode, dut.u_dma.u_mid.rd_cnt, dut.u_dma.u_mid.wr_cnt, dut.u_dma.u_mid.nrtx, acc_busy, dut.u_dma.u_mem_be.state, dut.u_dma.u_acc_be.state, dut.u_dma.q_valid); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
