// Self-checking testbench for sram_sp: random byte-masked writes and reads
// against a model, checking the one-cycle read latency.
module tb_sram_sp;
  logic clk = 0;
  always #5 clk = ~clk;
  logic ce, we; logic [3:0] be; logic [7:0] addr; logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;
  sram_sp #(.DEPTH(256), .DW(32)) dut (.*);
  logic [31:0] model [256];
  initial begin
    ce = 0; we = 0; be = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); ce = 1; we = 1; be = '1; addr = 8'(i); wdata = $urandom; model[i] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ce = 1; we = $urandom % 2; be = 4'($urandom); addr = 8'($urandom); wdata = $urandom;
      if (we) begin
        for (int b = 0; b < 4; b++) if (be[b]) model[addr][8*b +: 8] = wdata[8*b +: 8];
      end else begin
        automatic logic [31:0] exp = model[addr];
        @(negedge clk); ce = 0;
        checks++;
        if (rdata !== exp) begin failures++; $display("addr %0d got %h exp %h", addr, rdata, exp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
