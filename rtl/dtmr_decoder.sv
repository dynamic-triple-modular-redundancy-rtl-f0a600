// dtmr_decoder: RV32IM instruction decoder of the DECODE stage.
//
// The published core is a RISC-V (RV32) interleaved-multithreading core; its
// decode logic is the unprotected baseline's and is not described. This
// decoder covers the RV32IM instruction set that the rest of this design
// executes: LUI, AUIPC, JAL, JALR, the six branches, LB/LH/LW/LBU/LHU,
// SB/SH/SW, the register-immediate and register-register ALU operations, the
// RV32M multiplications and divisions (is_muldiv, operation in funct3), and
// WFI (which puts the redundant threads to sleep). FENCE, ECALL, EBREAK,
// CSR accesses and every unknown encoding decode as a NOP (no register write,
// no memory access): this design has no CSRs, exceptions or interrupts.
//
// Purely combinational: instr_i -> dec_o.
module dtmr_decoder
  import dtmr_pkg::*;
(
  input  logic [31:0] instr_i,
  output decoded_t    dec_o
);

  logic [6:0] opcode;
  logic [2:0] f3;
  logic [6:0] f7;
  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j;

  assign opcode = instr_i[6:0];
  assign f3     = instr_i[14:12];
  assign f7     = instr_i[31:25];
  assign imm_i  = {{20{instr_i[31]}}, instr_i[31:20]};
  assign imm_s  = {{20{instr_i[31]}}, instr_i[31:25], instr_i[11:7]};
  assign imm_b  = {{19{instr_i[31]}}, instr_i[31], instr_i[7], instr_i[30:25], instr_i[11:8], 1'b0};
  assign imm_u  = {instr_i[31:12], 12'b0};
  assign imm_j  = {{11{instr_i[31]}}, instr_i[31], instr_i[19:12], instr_i[20], instr_i[30:21], 1'b0};

  function automatic alu_op_e alu_from_f3(input logic [2:0] fn3, input logic alt, input logic is_reg);
    unique case (fn3)
      3'b000:  return (is_reg && alt) ? ALU_SUB : ALU_ADD;
      3'b001:  return ALU_SLL;
      3'b010:  return ALU_SLT;
      3'b011:  return ALU_SLTU;
      3'b100:  return ALU_XOR;
      3'b101:  return alt ? ALU_SRA : ALU_SRL;
      3'b110:  return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    dec_o           = '0;
    dec_o.alu_op    = ALU_ADD;
    dec_o.rs1       = instr_i[19:15];
    dec_o.rs2       = instr_i[24:20];
    dec_o.rd        = instr_i[11:7];
    dec_o.funct3    = f3;
    unique case (opcode)
      7'b0110111: begin  // LUI
        dec_o.alu_op = ALU_PASS_B; dec_o.src_b_imm = 1'b1; dec_o.imm = imm_u; dec_o.we = 1'b1;
      end
      7'b0010111: begin  // AUIPC
        dec_o.src_a_pc = 1'b1; dec_o.src_b_imm = 1'b1; dec_o.imm = imm_u; dec_o.we = 1'b1;
      end
      7'b1101111: begin  // JAL
        dec_o.is_jal = 1'b1; dec_o.imm = imm_j; dec_o.we = 1'b1;
      end
      7'b1100111: begin  // JALR
        dec_o.is_jalr = 1'b1; dec_o.imm = imm_i; dec_o.we = 1'b1;
      end
      7'b1100011: begin  // branches
        if (f3 != 3'b010 && f3 != 3'b011) begin
          dec_o.is_branch = 1'b1; dec_o.imm = imm_b;
        end
      end
      7'b0000011: begin  // loads
        if (f3 inside {3'b000, 3'b001, 3'b010, 3'b100, 3'b101}) begin
          dec_o.is_load = 1'b1; dec_o.imm = imm_i; dec_o.src_b_imm = 1'b1; dec_o.we = 1'b1;
        end
      end
      7'b0100011: begin  // stores
        if (f3 inside {3'b000, 3'b001, 3'b010}) begin
          dec_o.is_store = 1'b1; dec_o.imm = imm_s; dec_o.src_b_imm = 1'b1;
        end
      end
      7'b0010011: begin  // ALU immediate
        dec_o.alu_op    = alu_from_f3(f3, instr_i[30] & (f3 == 3'b101), 1'b0);
        dec_o.src_b_imm = 1'b1;
        dec_o.imm       = imm_i;
        dec_o.we        = 1'b1;
      end
      7'b0110011: begin  // ALU register
        if (f7 == 7'b0000000 || f7 == 7'b0100000) begin
          dec_o.alu_op = alu_from_f3(f3, instr_i[30], 1'b1);
          dec_o.we     = 1'b1;
        end else if (f7 == 7'b0000001) begin  // RV32M
          dec_o.is_muldiv = 1'b1;
          dec_o.we        = 1'b1;
        end
      end
      7'b1110011: begin  // SYSTEM: only WFI is executed
        if (instr_i == WFI_INSTR) dec_o.is_wfi = 1'b1;
      end
      default: ;
    endcase
    if (dec_o.rd == 5'd0) dec_o.we = 1'b0;
  end

endmodule
