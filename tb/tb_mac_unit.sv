// Self-checking testbench for mac_unit: random operands, result must be
// rd + rs1*rs2 modulo 2^32; only the MAC encoding is recognised.
module tb_mac_unit;
  logic [31:0] instr, rs1_val, rs2_val, rs3_val, result; logic is_mac; logic [4:0] rd;
  int checks = 0, failures = 0;
  mac_unit dut (.*);
  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic m; int a, b, c;
      instr = $urandom;
      if ($urandom % 2) begin instr[6:0] = 7'b0101011; instr[14:12] = 0; instr[31:25] = 0; end
      a = $urandom; b = $urandom; c = $urandom;
      if (i % 3 == 0) begin a = $urandom % 200 - 100; b = $urandom % 200 - 100; end
      rs1_val = a; rs2_val = b; rs3_val = c;
      #1;
      m = instr[6:0] == 7'h2B && instr[14:12] == 0 && instr[31:25] == 0;
      checks++;
      if (is_mac != m || rd != instr[11:7] || result != 32'(c + a * b)) begin
        failures++; $display("%h: %h exp %h", instr, result, 32'(c + a * b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
