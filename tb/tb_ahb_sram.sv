// Self-checking testbench for ahb_sram: word, halfword and byte writes and
// word reads against a model through single transfers, then back-to-back
// pipelined write->read pairs to the same word, which must return the new
// data with exactly one wait state, and read->read pairs with none.
module tb_ahb_sram;
  import ahb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ahb_m2s_t m2s; ahb_s2m_t s2m;
  int checks = 0, failures = 0;
  ahb_sram #(.BYTES(1024)) dut (.clk, .rst_n, .req(m2s), .hready(s2m.hready), .rsp(s2m));
  `include "ahb_tasks.svh"
  logic [31:0] model [256];
  int waits;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  // write to a then read from b, pipelined; returns read data and wait states
  task automatic wr_rd(input logic [31:0] a, input logic [31:0] d, input logic [31:0] b,
                       output logic [31:0] r, output int w);
    @(negedge clk);
    m2s.hsel = 1; m2s.haddr = a; m2s.htrans = HTRANS_NONSEQ; m2s.hwrite = 1; m2s.hsize = HSIZE_WORD;
    @(negedge clk);
    m2s.haddr = b; m2s.hwrite = 0; m2s.hwdata = d;
    @(negedge clk);
    m2s.htrans = HTRANS_IDLE; m2s.hsel = 0;
    w = 0;
    while (!s2m.hready) begin w++; @(negedge clk); end
    r = s2m.hrdata;
  endtask

  initial begin
    logic [31:0] r; logic e; int w;
    ahb_idle();
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      model[i] = $urandom; ahb_write(32'(i*4), model[i]);
    end
    for (int i = 0; i < 600; i++) begin
      automatic int k = $urandom % 3;
      automatic logic [31:0] a = 32'($urandom % 1024);
      automatic logic [31:0] d = $urandom;
      if (k == 0) begin
        ahb_read(a & ~32'h3, r); check(r, model[a[9:2]], "read");
      end else if (k == 1) begin
        a[0] = 0;
        ahb_xfer(1, a, d, HSIZE_HALF, r, e);
        model[a[9:2]][16*a[1] +: 16] = d[16*a[1] +: 16];
      end else begin
        ahb_xfer(1, a, d, HSIZE_BYTE, r, e);
        model[a[9:2]][8*a[1:0] +: 8] = d[8*a[1:0] +: 8];
      end
    end
    for (int i = 0; i < 20; i++) begin
      automatic logic [31:0] a = 32'(($urandom % 256) * 4);
      automatic logic [31:0] d = $urandom;
      wr_rd(a, d, a, r, w);
      model[a[9:2]] = d;
      check(r, d, "write->read");
      check(32'(w), 32'd1, "collision wait states");
    end
    ahb_idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
