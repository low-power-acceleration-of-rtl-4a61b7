// Self-checking testbench for cnn_engine with testbench memories: random
// images and weights for the 8x8x1, 8-filter case of the evaluated network,
// then 16x16x2 with 4 filters and 32x32x1 with 4 filters, each compared with
// the reference model, and the cycle count checked against
// 6 + F*(N/2)^2*(4*(9C+2)+1).
module tb_cnn_engine;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, ifm_ce, w_ce, ofm_we;
  logic [9:0] ifm_addr, w_addr, ofm_addr;
  logic signed [15:0] ifm_rdata, w_rdata;
  logic [15:0] ofm_wdata;
  int checks = 0, failures = 0;
  cnn_engine dut (.*);
  `include "cnn_ref.svh"
  shortint ifm [1024], w [1024], ofm [1024], exp_ofm [1024];
  always_ff @(posedge clk) begin
    if (ifm_ce) ifm_rdata <= ifm[ifm_addr];
    if (w_ce) w_rdata <= w[w_addr];
    if (ofm_we) ofm[ofm_addr] <= shortint'(ofm_wdata);
  end

  task automatic run(input int n, input int c, input int f, input int sh, input int range);
    int cyc = 0, expc;
    for (int i = 0; i < 1024; i++) begin
      ifm[i] = shortint'($urandom % (2*range) - range);
      w[i] = shortint'($urandom % (2*range) - range);
      ofm[i] = 16'h7777;
    end
    w[0] = shortint'(n); w[1] = shortint'(c); w[2] = shortint'(f); w[3] = shortint'(sh);
    cnn_ref(n, c, f, sh, ifm, w, exp_ofm);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (busy) begin @(negedge clk); cyc++; end
    expc = 6 + f * (n/2) * (n/2) * (4 * (9*c + 2) + 1);
    checks++;
    if (cyc != expc) begin failures++; $display("N=%0d cycles %0d exp %0d", n, cyc, expc); end
    checks++; if (!done) failures++;
    for (int i = 0; i < f*(n/2)*(n/2); i++) begin
      checks++;
      if (ofm[i] != exp_ofm[i]) begin
        failures++; if (failures < 10) $display("N=%0d ofm[%0d]=%0d exp %0d", n, i, ofm[i], exp_ofm[i]);
      end
    end
    $display("N=%0d C=%0d F=%0d: %0d cycles", n, c, f, cyc);
  endtask

  initial begin
    start = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(8, 1, 8, 8, 600);
    run(8, 1, 8, 0, 30000);      // saturation
    run(16, 2, 4, 6, 300);
    run(32, 1, 1, 4, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
