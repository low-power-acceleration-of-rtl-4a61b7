// Self-checking testbench for swc_unit: random instructions and operands;
// SWC encodings must drive the DMA port fields as in the instruction table,
// other instructions must not, and a full DMA must turn the strobe into a stall.
module tb_swc_unit;
  import nmc_pkg::*;
  logic ex_valid, dma_ready, is_swc, dma_we, stall;
  logic [31:0] ex_instr, rs1_val, rs2_val, dma_mem_addr, dma_ctrl;
  logic [6:0] dma_addr; logic [2:0] opt1; logic [1:0] opt2;
  int checks = 0, failures = 0, nswc = 0, nstall = 0;
  swc_unit dut (.*);
  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic sw;
      ex_valid = $urandom % 4 != 0; dma_ready = $urandom % 4 != 0;
      rs1_val = $urandom; rs2_val = $urandom; ex_instr = $urandom;
      if ($urandom % 2) begin ex_instr[6:0] = 7'b0001011; ex_instr[14:12] = 3'b000; end
      #1;
      sw = ex_instr[6:0] == 7'h0B && ex_instr[14:12] == 0;
      checks++;
      if (is_swc != sw || dma_we != (sw && ex_valid && dma_ready) || stall != (sw && ex_valid && !dma_ready)) begin
        failures++; $display("decode %h", ex_instr);
      end
      if (dma_we) begin
        nswc++; checks++;
        if (dma_mem_addr != rs2_val || dma_ctrl != rs1_val || dma_addr != ex_instr[31:25]
            || opt1 != ex_instr[11:9] || opt2 != ex_instr[8:7]) begin failures++; $display("fields %h", ex_instr); end
      end
      if (stall) nstall++;
    end
    checks++; if (nswc == 0 || nstall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
