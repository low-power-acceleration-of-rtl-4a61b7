// Self-checking testbench for sync_fifo: random pushes and pops against a
// queue model, checking data order, full/empty/count.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, full, empty;
  logic [7:0] din, dout;
  logic [2:0] count;
  int checks = 0, failures = 0;
  sync_fifo #(.W(8), .DEPTH(4)) dut (.*);
  logic [7:0] q[$];
  int nfull = 0;
  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == 4) || count != 3'(q.size())) begin
        failures++; $display("flag mismatch size=%0d", q.size());
      end
      if (!empty) begin
        checks++;
        if (dout != q[0]) begin failures++; $display("data %h exp %h", dout, q[0]); end
      end
      if (full) nfull++;
      push = ($urandom % 100) < (i < 1000 ? 70 : 30) && !full;
      pop  = ($urandom % 2) && !empty;
      din  = 8'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks++; if (nfull == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
