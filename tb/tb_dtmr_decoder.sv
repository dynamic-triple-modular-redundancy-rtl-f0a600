// tb_dtmr_decoder: decodes one instruction of each RV32IM class built with the
// encoders of rv_asm_pkg and checks the decoded fields against the values the
// instruction was built from (register numbers, immediates, operation flags).
// RV32M instructions must set is_muldiv and keep funct3. Unsupported
// encodings (ECALL, CSR) must decode as a NOP.
module tb_dtmr_decoder;
  import dtmr_pkg::*;
  import rv_asm_pkg::*;

  logic [31:0] instr;
  decoded_t    dec;
  int checks = 0, failures = 0;

  dtmr_decoder dut (.instr_i(instr), .dec_o(dec));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    instr = addi(5, 6, -7); #1;
    check("addi rd", dec.rd, 5); check("addi rs1", dec.rs1, 6); check("addi imm", dec.imm, -7);
    check("addi op", dec.alu_op, ALU_ADD); check("addi we", dec.we, 1); check("addi bimm", dec.src_b_imm, 1);
    instr = sub(1, 2, 3); #1;
    check("sub op", dec.alu_op, ALU_SUB); check("sub rs2", dec.rs2, 3); check("sub bimm", dec.src_b_imm, 0);
    instr = add(0, 2, 3); #1;
    check("rd=x0 no write", dec.we, 0);
    instr = r_type(7'b0100000, 4, 5, 3'b101, 6); #1;
    check("sra op", dec.alu_op, ALU_SRA);
    instr = muldiv(3'b110, 7, 8, 9); #1;
    check("rem muldiv", dec.is_muldiv, 1); check("rem f3", dec.funct3, 3'b110); check("rem we", dec.we, 1);
    check("rem rs1", dec.rs1, 8); check("rem rs2", dec.rs2, 9); check("rem rd", dec.rd, 7);
    instr = add(1, 2, 3); #1;
    check("add not muldiv", dec.is_muldiv, 0);
    instr = i_type(32'h405, 5, 3'b101, 6, 7'b0010011); #1;
    check("srai op", dec.alu_op, ALU_SRA);
    instr = slli(3, 4, 9); #1;
    check("slli op", dec.alu_op, ALU_SLL); check("slli imm", dec.imm[4:0], 9);
    instr = load(3'b100, 8, 9, 2047); #1;
    check("lbu load", dec.is_load, 1); check("lbu imm", dec.imm, 2047); check("lbu f3", dec.funct3, 3'b100);
    instr = store(3'b001, 10, 11, -4); #1;
    check("sh store", dec.is_store, 1); check("sh imm", dec.imm, -4); check("sh we", dec.we, 0);
    check("sh rs2", dec.rs2, 10); check("sh rs1", dec.rs1, 11);
    instr = branch(3'b101, 1, 2, -24); #1;
    check("bge br", dec.is_branch, 1); check("bge imm", dec.imm, -24); check("bge we", dec.we, 0);
    instr = jal(1, 2048); #1;
    check("jal", dec.is_jal, 1); check("jal imm", dec.imm, 2048); check("jal we", dec.we, 1);
    instr = jalr(1, 5, 12); #1;
    check("jalr", dec.is_jalr, 1); check("jalr imm", dec.imm, 12);
    instr = lui(7, 20'hABCDE); #1;
    check("lui imm", dec.imm, 32'hABCDE000); check("lui op", dec.alu_op, ALU_PASS_B);
    instr = auipc(7, 20'h00001); #1;
    check("auipc a=pc", dec.src_a_pc, 1); check("auipc imm", dec.imm, 32'h1000);
    instr = wfi(); #1;
    check("wfi", dec.is_wfi, 1); check("wfi we", dec.we, 0);
    instr = 32'h0000_0073; #1;  // ecall
    check("ecall nop", {dec.we, dec.is_load, dec.is_store, dec.is_branch, dec.is_wfi}, 0);
    instr = 32'h3000_2573; #1;  // csrrs a0, mstatus
    check("csr nop", {dec.we, dec.is_load, dec.is_store, dec.is_branch, dec.is_wfi}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
