// Testbench for gpr_3r. Random writes go through the write port while all
// three read ports read random registers each cycle. Every read is compared
// with a shadow copy of the registers kept here. Also checked: x0 reads 0
// even after a write to it; a write is visible in the very next cycle on
// every port; all three ports can read the same register at once; reset
// clears everything.
module tb_gpr_3r;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we; logic [4:0] waddr; logic [31:0] wdata;
  logic [2:0][4:0] raddr; logic [2:0][31:0] rdata;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  gpr_3r dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic check_reads(input string what);
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (rdata[k] !== shadow[raddr[k]]) begin
        failures++;
        if (failures < 6) $display("%s port %0d x%0d got %h exp %h", what, k, raddr[k], rdata[k], shadow[raddr[k]]);
      end
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = '0;
    for (int i = 0; i < 32; i++) shadow[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;

    // after reset every register reads 0
    for (int i = 0; i < 32; i++) begin
      raddr = {5'(i), 5'(i), 5'(i)}; #1 check_reads("reset");
    end

    // random traffic
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = ($urandom % 4) != 0; waddr = 5'($urandom); wdata = $urandom;
      for (int k = 0; k < 3; k++) raddr[k] = 5'($urandom);
      #1 check_reads("random");
      @(posedge clk);
      if (we && waddr != 0) shadow[waddr] = wdata;
    end

    // write x0, then read it on all ports
    @(negedge clk); we = 1; waddr = 0; wdata = 32'hdead_beef;
    @(negedge clk); we = 0; raddr = '0; #1 check_reads("x0");

    // write x7 and read it on all three ports in the next cycle
    @(negedge clk); we = 1; waddr = 7; wdata = 32'h1234_5678;
    @(posedge clk); shadow[7] = 32'h1234_5678;
    @(negedge clk); we = 0; raddr = {5'd7, 5'd7, 5'd7}; #1 check_reads("next cycle");

    // port 2 reads a different register from ports 0 and 1
    @(negedge clk); we = 1; waddr = 9; wdata = 32'h0bad_cafe;
    @(posedge clk); shadow[9] = 32'h0bad_cafe;
    @(negedge clk); we = 0; raddr = {5'd9, 5'd7, 5'd7}; #1 check_reads("third port");

    // reset clears the registers again
    rst_n = 0; #1; rst_n = 1;
    for (int i = 0; i < 32; i++) shadow[i] = 0;
    for (int i = 0; i < 32; i++) begin
      raddr = {5'(31-i), 5'(i), 5'((i*7)%32)}; #1 check_reads("second reset");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
