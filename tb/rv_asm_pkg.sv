// rv_asm_pkg: RV32I (and RV32M) instruction encoders used by the testbenches to build
// small programs without an external assembler. Each function returns the
// 32-bit machine word of one instruction (standard RISC-V field layout).
package rv_asm_pkg;

  function automatic logic [31:0] r_type(input logic [6:0] f7, input logic [4:0] rs2, rs1,
                                         input logic [2:0] f3, input logic [4:0] rd);
    return {f7, rs2, rs1, f3, rd, 7'b0110011};
  endfunction

  function automatic logic [31:0] i_type(input int imm, input logic [4:0] rs1,
                                         input logic [2:0] f3, input logic [4:0] rd,
                                         input logic [6:0] op);
    logic [11:0] i;
    i = imm[11:0];
    return {i, rs1, f3, rd, op};
  endfunction

  function automatic logic [31:0] addi(input logic [4:0] rd, rs1, input int imm);
    return i_type(imm, rs1, 3'b000, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] slli(input logic [4:0] rd, rs1, input int sh);
    return i_type(sh & 31, rs1, 3'b001, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] add(input logic [4:0] rd, rs1, rs2);
    return r_type(7'b0, rs2, rs1, 3'b000, rd);
  endfunction
  function automatic logic [31:0] sub(input logic [4:0] rd, rs1, rs2);
    return r_type(7'b0100000, rs2, rs1, 3'b000, rd);
  endfunction
  // RV32M: f3 = 0 MUL, 1 MULH, 2 MULHSU, 3 MULHU, 4 DIV, 5 DIVU, 6 REM, 7 REMU
  function automatic logic [31:0] muldiv(input logic [2:0] f3, input logic [4:0] rd, rs1, rs2);
    return r_type(7'b0000001, rs2, rs1, f3, rd);
  endfunction
  function automatic logic [31:0] xor_(input logic [4:0] rd, rs1, rs2);
    return r_type(7'b0, rs2, rs1, 3'b100, rd);
  endfunction
  function automatic logic [31:0] load(input logic [2:0] f3, input logic [4:0] rd, rs1,
                                       input int imm);
    return i_type(imm, rs1, f3, rd, 7'b0000011);
  endfunction
  function automatic logic [31:0] store(input logic [2:0] f3, input logic [4:0] rs2, rs1,
                                        input int imm);
    logic [11:0] i;
    i = imm[11:0];
    return {i[11:5], rs2, rs1, f3, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] branch(input logic [2:0] f3, input logic [4:0] rs1, rs2,
                                         input int off);
    logic [12:0] o;
    o = off[12:0];
    return {o[12], o[10:5], rs2, rs1, f3, o[4:1], o[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] jal(input logic [4:0] rd, input int off);
    logic [20:0] o;
    o = off[20:0];
    return {o[20], o[10:1], o[11], o[19:12], rd, 7'b1101111};
  endfunction
  function automatic logic [31:0] jalr(input logic [4:0] rd, rs1, input int imm);
    return i_type(imm, rs1, 3'b000, rd, 7'b1100111);
  endfunction
  function automatic logic [31:0] lui(input logic [4:0] rd, input logic [19:0] imm);
    return {imm, rd, 7'b0110111};
  endfunction
  function automatic logic [31:0] auipc(input logic [4:0] rd, input logic [19:0] imm);
    return {imm, rd, 7'b0010111};
  endfunction
  function automatic logic [31:0] wfi();
    return 32'h1050_0073;
  endfunction

endpackage
