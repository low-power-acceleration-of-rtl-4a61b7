// Self-checking testbench for sram_dp: simultaneous writes on port A and reads
// on port B against a model (a same-address read returns the old word).
module tb_sram_dp;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_we, b_ce; logic [9:0] a_addr, b_addr; logic [15:0] a_wdata, b_rdata;
  int checks = 0, failures = 0;
  sram_dp #(.DEPTH(1024), .DW(16)) dut (.*);
  logic [15:0] model [1024];
  logic [15:0] exp; logic pend;
  initial begin
    a_we = 0; b_ce = 0; a_addr = 0; b_addr = 0; a_wdata = 0; pend = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); a_we = 1; a_addr = 10'(i); a_wdata = 16'($urandom); model[i] = a_wdata;
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (b_rdata !== exp) begin failures++; $display("got %h exp %h", b_rdata, exp); end
      end
      a_we = $urandom % 2; a_addr = 10'($urandom % 64); a_wdata = 16'($urandom);
      b_ce = $urandom % 2; b_addr = 10'($urandom % 64);
      pend = b_ce; exp = model[b_addr];
      if (a_we) model[a_addr] = a_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
