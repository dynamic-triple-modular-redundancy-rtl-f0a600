// dtmr_lsu: dynamic-TMR load-store unit.
//
// Replaying a memory access once per thread would repeat side effects on
// memory-mapped devices and would let the last store win unchecked. This unit
// therefore buffers the whole request of the Thread 2 copy (address, write
// data, byte enables, load/store flags), buffers the Thread 1 copy when it
// arrives, compares the two in a dedicated voting cycle and performs a single
// memory access only if they agree. On a mismatch it raises
// restore_fault_lsu_o for one cycle and makes no access; the buffers keep
// their contents so that, in Restore mode, the auxiliary Thread 0 copy can be
// buffered as a third request and the access is made with the bitwise
// two-out-of-three vote of the three buffers. The loaded value goes to the
// single LS_WB register, which is not replicated (a load is performed once).
//
// FSM (after Algorithm 1 of the published design, with its
// data_valid_waiting state split in two):
//   NORMAL       idle; a Thread 2 request is buffered -> WAIT_T1,
//                a Thread 1 or Thread 0 request is buffered -> VOTING
//   WAIT_T1      Thread 2 buffered (load_valid/store_valid high), waiting for
//                the Thread 1 copy -> VOTING
//   VOTING       compare (or vote); data_req_o high until data_gnt_i
//                -> DATA_VALID_WAITING, or mismatch -> NORMAL
//   DATA_VALID_WAITING  waits for data_rvalid_i, captures LS_WB -> DONE
//   DONE         releases the pipeline -> NORMAL
// stall_o (busy_LS) holds the EXEC stage while a Thread 1 / Thread 0 request
// is being voted and executed. A Thread 1 load or store therefore stays four
// cycles in EXEC with a memory that grants at once and answers one cycle
// later. The memory interface is a request/grant/response-valid handshake;
// loads and stores both receive a data_rvalid_i. Misaligned accesses are not
// handled (the low address bits select bytes, word accesses ignore them).
module dtmr_lsu
  import dtmr_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  // instruction in EXEC
  input  logic        ls_valid_i,     // a valid load or store is in EXEC
  input  harc_t       harc_i,
  input  logic        is_load_i,
  input  logic        is_store_i,
  input  logic [2:0]  funct3_i,
  input  logic [31:0] imm_i,
  input  logic [31:0] rs1_i,
  input  logic [31:0] rs2_i,
  input  logic        flush_i,        // restore started by another detector
  output logic        stall_o,
  output logic        restore_fault_lsu_o,
  output logic        load_valid_o,   // Thread 2 load buffered
  output logic        store_valid_o,  // Thread 2 store buffered
  output logic [31:0] ls_wb_o,        // LS_WB: aligned, extended load result
  output logic        ls_wb_en_o,     // LS_WB written this cycle
  // data memory
  output logic        data_req_o,
  input  logic        data_gnt_i,
  input  logic        data_rvalid_i,
  output logic        data_we_o,
  output logic [3:0]  data_be_o,
  output logic [31:0] data_addr_o,
  output logic [31:0] data_wdata_o,
  input  logic [31:0] data_rdata_i
);

  typedef enum logic [2:0] {
    LS_NORMAL, LS_WAIT_T1, LS_VOTING, LS_DATA_VALID_WAITING, LS_DONE
  } ls_state_e;

  ls_state_e state_q, state_d;
  ls_req_t   buf_q [NTHREADS];
  ls_req_t   cur_req, act, voted;
  harc_t     vote_harc_q;   // thread whose arrival started the vote
  logic      mismatch;

  // ---------------------------------------------- request of the EXEC copy
  always_comb begin
    logic [31:0] addr;
    addr             = rs1_i + imm_i;
    cur_req          = '0;
    cur_req.is_load  = is_load_i;
    cur_req.is_store = is_store_i;
    cur_req.funct3   = funct3_i;
    unique case (funct3_i[1:0])
      2'b00: begin
        cur_req.addr  = addr;
        cur_req.be    = 4'b0001 << addr[1:0];
        cur_req.wdata = {4{rs2_i[7:0]}};
      end
      2'b01: begin
        cur_req.addr  = {addr[31:1], 1'b0};
        cur_req.be    = addr[1] ? 4'b1100 : 4'b0011;
        cur_req.wdata = {2{rs2_i[15:0]}};
      end
      default: begin
        cur_req.addr  = {addr[31:2], 2'b00};
        cur_req.be    = 4'b1111;
        cur_req.wdata = rs2_i;
      end
    endcase
  end

  // ---------------------------------------------------- compare and vote
  assign mismatch = (buf_q[2] != buf_q[1]);
  assign voted    = ls_req_t'((buf_q[2] & buf_q[1]) | (buf_q[2] & buf_q[0]) |
                               (buf_q[1] & buf_q[0]));

  // ------------------------------------------------------------------ FSM
  always_comb begin
    state_d             = state_q;
    stall_o             = 1'b0;
    restore_fault_lsu_o = 1'b0;
    data_req_o          = 1'b0;
    unique case (state_q)
      LS_NORMAL, LS_WAIT_T1: begin
        if (ls_valid_i && !flush_i) begin
          if (harc_i == HARC_T2) state_d = LS_WAIT_T1;
          else begin
            state_d = LS_VOTING;
            stall_o = 1'b1;
          end
        end else if (flush_i) state_d = LS_NORMAL;
      end
      LS_VOTING: begin
        stall_o = 1'b1;
        if (vote_harc_q != HARC_T0 && mismatch) begin
          restore_fault_lsu_o = 1'b1;  // data retained in the buffers
          state_d             = LS_NORMAL;
        end else begin
          data_req_o = 1'b1;
          if (data_gnt_i) state_d = LS_DATA_VALID_WAITING;
        end
      end
      LS_DATA_VALID_WAITING: begin
        stall_o = 1'b1;
        if (data_rvalid_i) state_d = LS_DONE;
      end
      default: state_d = LS_NORMAL;  // LS_DONE: EXEC advances this cycle
    endcase
  end

  // request presented to memory: agreed Thread 1 copy, or the vote in Restore
  always_comb begin
    act = (vote_harc_q == HARC_T0) ? voted : buf_q[1];
  end
  assign data_we_o    = act.is_store;
  assign data_be_o    = act.be;
  assign data_addr_o  = act.addr;
  assign data_wdata_o = act.wdata;

  assign load_valid_o  = (state_q == LS_WAIT_T1) && buf_q[2].is_load;
  assign store_valid_o = (state_q == LS_WAIT_T1) && buf_q[2].is_store;

  // ------------------------------------------------------ load alignment
  function automatic logic [31:0] align_load(input logic [31:0] w, input logic [2:0] f3,
                                             input logic [1:0] off);
    logic [31:0] sh;
    sh = w >> (8 * off);
    unique case (f3)
      3'b000:  return {{24{sh[7]}}, sh[7:0]};
      3'b001:  return {{16{sh[15]}}, sh[15:0]};
      3'b100:  return {24'b0, sh[7:0]};
      3'b101:  return {16'b0, sh[15:0]};
      default: return w;
    endcase
  endfunction

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q     <= LS_NORMAL;
      vote_harc_q <= HARC_T1;
      for (int i = 0; i < NTHREADS; i++) buf_q[i] <= '0;
      ls_wb_o     <= '0;
      ls_wb_en_o  <= 1'b0;
    end else begin
      state_q    <= state_d;
      ls_wb_en_o <= 1'b0;
      if ((state_q == LS_NORMAL || state_q == LS_WAIT_T1) && ls_valid_i && !flush_i) begin
        buf_q[harc_i] <= cur_req;
        vote_harc_q   <= harc_i;
      end
      if (state_q == LS_DATA_VALID_WAITING && data_rvalid_i && act.is_load) begin
        ls_wb_o    <= align_load(data_rdata_i, act.funct3, act.addr[1:0]);
        ls_wb_en_o <= 1'b1;
      end
    end
  end

endmodule
