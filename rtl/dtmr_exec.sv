// dtmr_exec: EXEC-stage integer unit (ALU and branch/jump resolution).
//
// The published core sends every operation except loads and stores to its
// Execution unit and does not describe it further; this is a plain RV32I
// ALU. For each instruction it produces the value to be written to rd
// (ALU result, or PC+4 for JAL/JALR) and the address of the next
// instruction of the same thread (next_pc_o). taken_o is set when next_pc_o
// is not PC+4, so that the PC unit redirects the thread. Both results go to
// the thread's write-back buffer, where the two redundant copies are compared.
//
// Purely combinational.
module dtmr_exec
  import dtmr_pkg::*;
(
  input  decoded_t    dec_i,
  input  logic [31:0] pc_i,
  input  logic [31:0] rs1_i,
  input  logic [31:0] rs2_i,
  output logic [31:0] result_o,
  output logic [31:0] next_pc_o,
  output logic        taken_o
);

  logic [31:0] a, b, alu;
  logic        cond;

  assign a = dec_i.src_a_pc  ? pc_i      : rs1_i;
  assign b = dec_i.src_b_imm ? dec_i.imm : rs2_i;

  always_comb begin
    unique case (dec_i.alu_op)
      ALU_ADD:    alu = a + b;
      ALU_SUB:    alu = a - b;
      ALU_SLL:    alu = a << b[4:0];
      ALU_SLT:    alu = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU:   alu = {31'b0, a < b};
      ALU_XOR:    alu = a ^ b;
      ALU_SRL:    alu = a >> b[4:0];
      ALU_SRA:    alu = $unsigned($signed(a) >>> b[4:0]);
      ALU_OR:     alu = a | b;
      ALU_AND:    alu = a & b;
      ALU_PASS_B: alu = b;
      default:    alu = a + b;
    endcase
  end

  always_comb begin
    unique case (dec_i.funct3)
      3'b000:  cond = (rs1_i == rs2_i);
      3'b001:  cond = (rs1_i != rs2_i);
      3'b100:  cond = ($signed(rs1_i) <  $signed(rs2_i));
      3'b101:  cond = ($signed(rs1_i) >= $signed(rs2_i));
      3'b110:  cond = (rs1_i <  rs2_i);
      3'b111:  cond = (rs1_i >= rs2_i);
      default: cond = 1'b0;
    endcase
  end

  always_comb begin
    result_o  = alu;
    next_pc_o = pc_i + 32'd4;
    if (dec_i.is_jal) begin
      result_o  = pc_i + 32'd4;
      next_pc_o = pc_i + dec_i.imm;
    end else if (dec_i.is_jalr) begin
      result_o  = pc_i + 32'd4;
      next_pc_o = (rs1_i + dec_i.imm) & ~32'd1;
    end else if (dec_i.is_branch && cond) begin
      next_pc_o = pc_i + dec_i.imm;
    end
    if (dec_i.is_load || dec_i.is_store) result_o = '0;
    taken_o = (next_pc_o != pc_i + 32'd4);
  end

endmodule
