// Self-checking testbench for acc_bridge driving a cnn_accel: AHB writes and
// reads of the IFM and weight memories (including pipelined write->read
// pairs, which must see one wait state), a start through the control word,
// then an OFM read issued at once: it must be held with wait states until the
// inference has finished and then return the reference result.
module tb_acc_bridge;
  import ahb_pkg::*;
  import nmc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ahb_m2s_t m2s; ahb_s2m_t s2m;
  acc_sel_e acc_sel; logic acc_ce, acc_we, acc_busy, done; logic [9:0] acc_addr; logic [15:0] acc_wdata, acc_rdata;
  int checks = 0, failures = 0;
  acc_bridge dut (.clk, .rst_n, .req(m2s), .hready(s2m.hready), .rsp(s2m),
                  .acc_sel, .acc_ce, .acc_we, .acc_addr, .acc_wdata, .acc_rdata, .acc_busy);
  cnn_accel u_acc (.clk, .rst_n, .mem_sel(acc_sel), .ce(acc_ce), .we(acc_we), .addr(acc_addr),
                   .wdata(acc_wdata), .rdata(acc_rdata), .busy(acc_busy), .done);
  `include "ahb_tasks.svh"
  `include "cnn_ref.svh"
  shortint ifm [1024], w [1024], exp_ofm [1024];
  function automatic logic [31:0] A(acc_sel_e s, int i); return {18'd0, s, 10'(i), 2'b00}; endfunction
  int waits = 0;
  always @(negedge clk) if (rst_n && !s2m.hready) waits++;

  initial begin
    logic [31:0] r; int w0;
    ahb_idle();
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1024; i++) begin ifm[i] = shortint'($urandom % 256 - 128); w[i] = shortint'($urandom % 256 - 128); end
    w[0] = 8; w[1] = 1; w[2] = 8; w[3] = 6;
    cnn_ref(8, 1, 8, 6, ifm, w, exp_ofm);
    for (int i = 0; i < 64; i++) ahb_write(A(SEL_IFM, i), {16'hDEAD, ifm[i]});
    for (int i = 0; i < 84; i++) ahb_write(A(SEL_WGT, i), 32'(w[i]));
    for (int i = 0; i < 64; i += 7) begin
      ahb_read(A(SEL_IFM, i), r); checks++;
      if (r != {16'h0, ifm[i]}) begin failures++; $display("ifm %0d got %h", i, r); end
    end
    // pipelined write then read of the same weight word
    w0 = waits;
    @(negedge clk); m2s.hsel = 1; m2s.haddr = A(SEL_WGT, 900); m2s.htrans = HTRANS_NONSEQ; m2s.hwrite = 1;
    @(negedge clk); m2s.hwrite = 0; m2s.hwdata = 32'h0000_5A5A;
    @(negedge clk); m2s.htrans = HTRANS_IDLE; m2s.hsel = 0;
    while (!s2m.hready) @(negedge clk);
    checks++; if (s2m.hrdata != 32'h5A5A) begin failures++; $display("wr->rd got %h", s2m.hrdata); end
    checks++; if (waits - w0 != 1) begin failures++; $display("wr->rd waits %0d", waits - w0); end
    // start, then read the OFM straight away
    ahb_write(A(SEL_CTRL, 0), 1);
    w0 = waits;
    ahb_read(A(SEL_OFM, 0), r);
    checks++; if (waits - w0 < 5000) begin failures++; $display("OFM read not held: %0d waits", waits - w0); end
    checks++; if (acc_busy) begin failures++; $display("read completed while busy"); end
    checks++; if (r != 32'(exp_ofm[0])) begin failures++; $display("ofm0 got %0d exp %0d", r, exp_ofm[0]); end
    for (int i = 1; i < 128; i++) begin
      ahb_read(A(SEL_OFM, i), r); checks++;
      if (r != 32'(exp_ofm[i])) begin failures++; if (failures < 10) $display("ofm %0d got %0d exp %0d", i, r, exp_ofm[i]); end
    end
    $display("OFM read held for %0d cycles", waits - w0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
