// Self-checking testbench for ahb_decoder: one master, three small AHB SRAM
// slaves at the SoC windows. Data written through each window must read back
// from that window only, and an unmapped address must get an ERROR response.
module tb_ahb_decoder;
  import ahb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ahb_m2s_t m2s; ahb_s2m_t s2m;
  ahb_m2s_t [2:0] s_req; ahb_s2m_t [2:0] s_rsp;
  int checks = 0, failures = 0;
  ahb_decoder #(.NS(3)) dut (.clk, .rst_n, .m_req(m2s), .m_rsp(s2m), .s_req, .s_rsp);
  for (genvar s = 0; s < 3; s++) begin : g_s
    ahb_sram #(.BYTES(256)) u_s (.clk, .rst_n, .req(s_req[s]), .hready(s2m.hready), .rsp(s_rsp[s]));
  end
  `include "ahb_tasks.svh"
  localparam logic [31:0] BASES [3] = '{32'h0000_0000, 32'h0002_0000, 32'h0003_0000};
  initial begin
    logic [31:0] r; logic e;
    ahb_idle();
    repeat (2) @(negedge clk); rst_n = 1;
    for (int s = 0; s < 3; s++) for (int i = 0; i < 16; i++)
      ahb_write(BASES[s] + 32'(i*4), {8'(s), 24'(i)});
    for (int s = 0; s < 3; s++) for (int i = 0; i < 16; i++) begin
      ahb_xfer(0, BASES[s] + 32'(i*4), 0, HSIZE_WORD, r, e);
      checks++;
      if (r !== {8'(s), 24'(i)} || e) begin failures++; $display("slave %0d word %0d got %h", s, i, r); end
    end
    // unmapped
    ahb_xfer(0, 32'h0004_0000, 0, HSIZE_WORD, r, e);
    checks++; if (!e) begin failures++; $display("no ERROR for unmapped"); end
    ahb_xfer(0, 32'h0000_0004, 0, HSIZE_WORD, r, e);
    checks++; if (e || r !== {8'd0, 24'd1}) begin failures++; $display("after error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
