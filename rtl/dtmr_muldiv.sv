// dtmr_muldiv: RV32M multiply / divide unit of the EXEC stage.
//
// Multiplications (MUL, MULH, MULHSU, MULHU) are single-cycle: the 64-bit
// product of the sign- or zero-extended operands is formed combinationally
// and result_o is valid in the same cycle, with no stall. Divisions (DIV,
// DIVU, REM, REMU) are long-latency operations: a restoring divider works on
// the operands' magnitudes, one quotient bit per cycle for 32 cycles, and
// the signs are applied at the end (quotient negative if the operand signs
// differ, remainder with the sign of the dividend). Division by zero gives
// an all-ones quotient and the dividend as remainder; the signed overflow
// case (-2^31 / -1) gives -2^31 and 0, as RISC-V requires.
//
// Each thread's copy of a division runs on its own (Thread 2's, then Thread
// 1's, and Thread 0's in Restore mode); the results are compared and voted
// in the write-back buffers like every other result. The published design
// names integer division as its example of a long-latency operation whose
// faults are handled by flushing and re-executing; the divider's structure,
// its latency and the single-cycle multiplier are this design's choices.
//
// Interface and timing: start_i is high while a valid M instruction is in
// EXEC. For a division the unit raises stall_o in the cycle it starts and
// keeps it high for the 32 iteration cycles (33 stall cycles in all); in
// the following cycle (state DONE) stall_o is low, result_o holds the result
// and the instruction leaves EXEC. flush_i abandons a division. Asynchronous
// active-low reset.
module dtmr_muldiv
  import dtmr_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        start_i,   // valid M-extension instruction in EXEC
  input  logic [2:0]  funct3_i,
  input  logic [31:0] a_i,       // rs1
  input  logic [31:0] b_i,       // rs2
  input  logic        flush_i,
  output logic        stall_o,
  output logic [31:0] result_o
);

  typedef enum logic [1:0] { MD_IDLE, MD_BUSY, MD_DONE } md_state_e;

  md_state_e   state_q;
  logic [5:0]  count_q;
  logic [31:0] rem_q;     // partial remainder (always below the divisor)
  logic [31:0] quo_q;     // dividend shifting out, quotient shifting in
  logic [31:0] div_q;     // divisor magnitude
  logic        neg_q_q, neg_r_q, by_zero_q, want_rem_q;
  logic [31:0] a_q;       // dividend as given (for division by zero)
  logic [31:0] div_result;
  logic [31:0] mul_result;

  logic is_div, a_signed, b_signed;
  assign is_div   = funct3_i[2];
  // MULH: both signed; MULHSU: rs1 signed; DIV/REM: both signed
  assign a_signed = is_div ? !funct3_i[0] : (funct3_i[1:0] != 2'b11);
  assign b_signed = is_div ? !funct3_i[0] : (funct3_i[1:0] == 2'b01);

  // ------------------------------------------------------------ multiply
  always_comb begin
    logic signed [32:0] sa, sb;
    logic signed [65:0] p;
    sa = {a_signed & a_i[31], a_i};
    sb = {b_signed & b_i[31], b_i};
    p  = sa * sb;  // bits 65:64 only repeat the sign
    mul_result = (funct3_i[1:0] == 2'b00) ? p[31:0] : p[63:32];
  end

  // -------------------------------------------------------------- divide
  logic [32:0] rem_shift;
  logic [32:0] rem_sub;
  assign rem_shift = {rem_q, quo_q[31]};
  assign rem_sub   = rem_shift - {1'b0, div_q};

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q    <= MD_IDLE;
      count_q    <= '0;
      rem_q      <= '0;
      quo_q      <= '0;
      div_q      <= '0;
      neg_q_q    <= 1'b0;
      neg_r_q    <= 1'b0;
      by_zero_q  <= 1'b0;
      want_rem_q <= 1'b0;
      a_q        <= '0;
    end else if (flush_i) begin
      state_q <= MD_IDLE;
    end else begin
      unique case (state_q)
        MD_IDLE: if (start_i && is_div) begin
          state_q    <= MD_BUSY;
          count_q    <= 6'd32;
          rem_q      <= '0;
          quo_q      <= (a_signed && a_i[31]) ? -a_i : a_i;
          div_q      <= (b_signed && b_i[31]) ? -b_i : b_i;
          neg_q_q    <= a_signed && (a_i[31] ^ b_i[31]);
          neg_r_q    <= a_signed && a_i[31];
          by_zero_q  <= (b_i == 32'd0);
          want_rem_q <= funct3_i[1];
          a_q        <= a_i;
        end
        MD_BUSY: begin
          if (!rem_sub[32]) begin
            rem_q <= rem_sub[31:0];
            quo_q <= {quo_q[30:0], 1'b1};
          end else begin
            rem_q <= rem_shift[31:0];
            quo_q <= {quo_q[30:0], 1'b0};
          end
          count_q <= count_q - 6'd1;
          if (count_q == 6'd1) state_q <= MD_DONE;
        end
        default: state_q <= MD_IDLE;  // MD_DONE: the instruction leaves EXEC
      endcase
    end
  end

  always_comb begin
    if (want_rem_q) div_result = by_zero_q ? a_q : (neg_r_q ? -rem_q : rem_q);
    else            div_result = by_zero_q ? 32'hffff_ffff : (neg_q_q ? -quo_q : quo_q);
  end

  assign stall_o  = (state_q == MD_BUSY) || (state_q == MD_IDLE && start_i && is_div && !flush_i);
  assign result_o = is_div ? div_result : mul_result;

endmodule
