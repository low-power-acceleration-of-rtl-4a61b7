// Self-checking testbench for cnn_accel through its native RAM port: load the
// IFM and weight memories, start through the control word, poll the status
// word, read the OFM and compare with the reference model. Also checks that
// IFM/weight writes during an inference are ignored and that the IFM reads
// back what was written.
module tb_cnn_accel;
  import nmc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  acc_sel_e mem_sel; logic ce, we, busy, done; logic [9:0] addr; logic [15:0] wdata, rdata;
  int checks = 0, failures = 0;
  cnn_accel dut (.*);
  `include "cnn_ref.svh"
  shortint ifm [1024], w [1024], exp_ofm [1024];

  task automatic wr(input acc_sel_e s, input int a, input logic [15:0] d);
    @(negedge clk); mem_sel = s; ce = 1; we = 1; addr = 10'(a); wdata = d;
    @(negedge clk); ce = 0; we = 0;
  endtask
  task automatic rd(input acc_sel_e s, input int a, output logic [15:0] d);
    @(negedge clk); mem_sel = s; ce = 1; we = 0; addr = 10'(a);
    @(negedge clk); ce = 0; d = rdata;
  endtask

  initial begin
    logic [15:0] d; int polls = 0;
    mem_sel = SEL_IFM; ce = 0; we = 0; addr = 0; wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1024; i++) begin ifm[i] = shortint'($urandom % 512 - 256); w[i] = shortint'($urandom % 512 - 256); end
    w[0] = 8; w[1] = 1; w[2] = 8; w[3] = 7;
    cnn_ref(8, 1, 8, 7, ifm, w, exp_ofm);
    for (int i = 0; i < 64; i++) wr(SEL_IFM, i, ifm[i]);
    for (int i = 0; i < 84; i++) wr(SEL_WGT, i, w[i]);
    for (int i = 0; i < 64; i++) begin
      rd(SEL_IFM, i, d); checks++; if (d != ifm[i]) begin failures++; $display("ifm %0d", i); end
    end
    wr(SEL_CTRL, 0, 16'h1);
    checks++; if (!busy) begin failures++; $display("not busy after start"); end
    wr(SEL_IFM, 0, 16'h1234);                    // ignored while busy
    do begin rd(SEL_CTRL, 0, d); polls++; end while (d[0]);
    checks++; if (d[1] != 1'b1) begin failures++; $display("done not set"); end
    for (int i = 0; i < 128; i++) begin
      rd(SEL_OFM, i, d); checks++;
      if (d != exp_ofm[i]) begin failures++; if (failures < 10) $display("ofm %0d got %0d exp %0d", i, d, exp_ofm[i]); end
    end
    rd(SEL_IFM, 0, d); checks++; if (d != ifm[0]) begin failures++; $display("IFM written while busy"); end
    $display("status polls=%0d", polls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
