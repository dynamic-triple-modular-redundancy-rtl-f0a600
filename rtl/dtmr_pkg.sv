// dtmr_pkg: types, constants and helper functions shared by the dynamic-TMR
// interleaved-multithreading core.
//
// The core runs three hardware threads (harts). Thread 2 and Thread 1 execute
// the same program in an interleaved fashion (dual modular redundancy);
// Thread 0 is the auxiliary thread that is only woken up to re-execute one
// instruction when the two copies disagree. The numbering of the threads and
// the role of Thread 0 follow the published design; the encodings of the
// structs below are this implementation's own choice.
//
// The ECC helpers implement a (39,32) single-error-correcting,
// double-error-detecting Hamming code: 32 data bits and 6 Hamming parity bits
// in codeword positions 1..38 (parity bits at positions 1,2,4,8,16,32) plus an
// overall parity bit stored in bit 0.
package dtmr_pkg;

  localparam int unsigned XLEN      = 32;
  localparam int unsigned NTHREADS  = 3;
  localparam int unsigned ECC_W     = 39;

  // hardware thread identifiers (harc = hardware thread counter)
  typedef logic [1:0] harc_t;
  localparam harc_t HARC_T0 = 2'd0;  // auxiliary / checkpoint thread
  localparam harc_t HARC_T1 = 2'd1;
  localparam harc_t HARC_T2 = 2'd2;

  // operating mode of the core
  typedef enum logic [1:0] {
    MODE_NORMAL      = 2'd0,  // detection: Threads 2 and 1 interleaved
    MODE_RESTORE     = 2'd1,  // Thread 0 re-executes the faulty instruction
    MODE_END_RESTORE = 2'd2   // vote, write back, reload PCs of Threads 2/1
  } mode_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR,
    ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_PASS_B
  } alu_op_e;

  // decoded instruction
  typedef struct packed {
    alu_op_e     alu_op;
    logic        src_a_pc;   // operand A is the PC (AUIPC)
    logic        src_b_imm;  // operand B is the immediate
    logic [31:0] imm;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [4:0]  rd;
    logic        we;         // writes rd
    logic        is_branch;
    logic        is_jal;
    logic        is_jalr;
    logic        is_load;
    logic        is_store;
    logic        is_wfi;
    logic        is_muldiv;  // RV32M: result from the multiply/divide unit
    logic [2:0]  funct3;
  } decoded_t;

  // one entry of a thread's write-back buffer: everything an instruction
  // leaves behind, so that two (or three) copies can be compared or voted
  typedef struct packed {
    logic [31:0] pc;
    logic [31:0] next_pc;
    logic        we;
    logic [4:0]  rd;
    logic [31:0] value;    // ALU / link result (0 for loads: see LS_WB)
    logic        is_load;
    logic        is_wfi;
  } wb_entry_t;

  // a load/store request as buffered by the LSU for one thread
  typedef struct packed {
    logic        is_load;
    logic        is_store;
    logic [31:0] addr;
    logic [31:0] wdata;
    logic [3:0]  be;
    logic [2:0]  funct3;
  } ls_req_t;

  localparam logic [31:0] NOP_INSTR = 32'h0000_0013;  // addi x0,x0,0
  localparam logic [31:0] WFI_INSTR = 32'h1050_0073;

  // ---------------------------------------------------------------- ECC
  // Codeword bit p (1..38) is a parity bit when p is a power of two,
  // otherwise the next data bit in ascending order. Bit 0 is overall parity.
  function automatic logic [ECC_W-1:0] ecc_encode(input logic [31:0] d);
    logic [ECC_W-1:0] cw;
    int unsigned      k;
    cw = '0;
    k  = 0;
    for (int unsigned p = 1; p < ECC_W; p++) begin
      if ((p & (p - 1)) != 0) begin
        cw[p] = d[k];
        k++;
      end
    end
    for (int unsigned i = 0; i < 6; i++) begin
      logic par;
      par = 1'b0;
      for (int unsigned p = 1; p < ECC_W; p++)
        if (((p >> i) & 1) == 1 && p != (1 << i)) par ^= cw[p];
      cw[1 << i] = par;
    end
    cw[0] = ^cw[ECC_W-1:1];
    return cw;
  endfunction

  // raw data bits of a codeword, without correction
  function automatic logic [31:0] ecc_data(input logic [ECC_W-1:0] cw);
    logic [31:0] d;
    int unsigned k;
    d = '0;
    k = 0;
    for (int unsigned p = 1; p < ECC_W; p++) begin
      if ((p & (p - 1)) != 0) begin
        d[k] = cw[p];
        k++;
      end
    end
    return d;
  endfunction

  // bitwise two-out-of-three majority
  function automatic logic [31:0] maj32(input logic [31:0] a, b, c);
    return (a & b) | (a & c) | (b & c);
  endfunction

endpackage
