// Self-checking testbench for custom_hazard: random decode/execute states
// compared with the stall rule (custom instruction in ID, unfinished
// register-writing instruction in EX, EX destination not x0 and equal to one
// of the used sources).
module tb_custom_hazard;
  logic id_valid, id_custom, id_uses_rs3, ex_valid, ex_writes_rd, ex_pending, stall_id, stall_fe;
  logic [4:0] id_rs1, id_rs2, id_rs3, ex_rd;
  int checks = 0, failures = 0, nstall = 0;
  custom_hazard dut (.*);
  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic e;
      {id_valid, id_custom, id_uses_rs3, ex_valid, ex_writes_rd, ex_pending} = 6'($urandom) | 6'b110110;
      if ($urandom % 4 == 0) {id_valid, id_custom, ex_valid, ex_writes_rd, ex_pending} = 5'($urandom);
      id_rs1 = 5'($urandom % 6); id_rs2 = 5'($urandom % 6); id_rs3 = 5'($urandom % 6); ex_rd = 5'($urandom % 6);
      #1;
      e = id_valid && id_custom && ex_valid && ex_writes_rd && ex_pending && ex_rd != 0 &&
          (ex_rd == id_rs1 || ex_rd == id_rs2 || (id_uses_rs3 && ex_rd == id_rs3));
      checks++;
      if (stall_id != e || stall_fe != e) begin failures++; $display("mismatch"); end
      if (e) nstall++;
    end
    checks++; if (nstall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
