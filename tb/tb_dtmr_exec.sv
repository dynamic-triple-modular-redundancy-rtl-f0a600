// tb_dtmr_exec: random operands through every ALU operation and every branch
// condition, plus JAL/JALR; results and next PCs are compared with a
// reference model written here.
module tb_dtmr_exec;
  import dtmr_pkg::*;

  decoded_t    dec;
  logic [31:0] pc, rs1, rs2, result, next_pc;
  logic        taken;
  int checks = 0, failures = 0;

  dtmr_exec dut (.dec_i(dec), .pc_i(pc), .rs1_i(rs1), .rs2_i(rs2),
                 .result_o(result), .next_pc_o(next_pc), .taken_o(taken));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] ref_alu(input alu_op_e op, input logic [31:0] a, b);
    case (op)
      ALU_ADD:  return a + b;
      ALU_SUB:  return a - b;
      ALU_SLL:  return a << (b % 32);
      ALU_SLT:  return (int'(a) < int'(b)) ? 1 : 0;
      ALU_SLTU: return (a < b) ? 1 : 0;
      ALU_XOR:  return a ^ b;
      ALU_SRL:  return a >> (b % 32);
      ALU_SRA:  return 32'(int'(a) >>> (b % 32));
      ALU_OR:   return a | b;
      ALU_AND:  return a & b;
      default:  return b;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 300; n++) begin
      alu_op_e op;
      op  = alu_op_e'(n % 11);
      dec = '0; dec.alu_op = op;
      pc  = $urandom() & ~32'd3;
      rs1 = (n % 7 == 0) ? rs2 : $urandom();
      rs2 = $urandom();
      #1;
      check("alu", result, ref_alu(op, rs1, rs2));
      check("alu next", next_pc, pc + 4);
      check("alu taken", taken, 0);
      // branches
      dec = '0; dec.is_branch = 1'b1; dec.imm = -32'd16;
      for (int f = 0; f < 8; f++) begin
        logic c;
        if (f == 2 || f == 3) continue;
        dec.funct3 = 3'(f);
        #1;
        case (f)
          0: c = rs1 == rs2;
          1: c = rs1 != rs2;
          4: c = int'(rs1) < int'(rs2);
          5: c = int'(rs1) >= int'(rs2);
          6: c = rs1 < rs2;
          default: c = rs1 >= rs2;
        endcase
        check("branch next", next_pc, c ? pc - 16 : pc + 4);
        check("branch taken", taken, c);
      end
    end
    dec = '0; dec.is_jal = 1'b1; dec.imm = 32'd100; pc = 32'h40; #1;
    check("jal link", result, 32'h44); check("jal target", next_pc, 32'h40 + 100); check("jal taken", taken, 1);
    dec = '0; dec.is_jalr = 1'b1; dec.imm = 32'd3; rs1 = 32'h200; #1;
    check("jalr link", result, 32'h44); check("jalr target", next_pc, 32'h202);
    dec = '0; dec.src_a_pc = 1'b1; dec.src_b_imm = 1'b1; dec.imm = 32'h1000; #1;
    check("auipc", result, 32'h1040);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
