// dtmr_core: interleaved-multithreading RV32IM core with dynamic triple
// modular redundancy, together with its ECC-protected program and data
// memories.
//
// Two identical hardware threads, Thread 2 and Thread 1, run the same program
// and alternate cycle by cycle in a four-stage in-order pipeline
// (FETCH, DECODE, EXEC / LOAD-STORE, WRITE-BACK). Each thread has its own PC
// and register file. Results are held in per-thread write-back buffers and
// committed only when the Thread 1 copy agrees with the Thread 2 copy, so the
// architectural state is never corrupted. On a disagreement (write-back
// buffers, PCs, or load/store requests), the pipeline is flushed and the
// auxiliary Thread 0 re-executes the one uncommitted instruction from the
// Checkpoint-PC (Thread 0's PC); its copy is voted against the two retained
// ones, the voted result is committed and Threads 2 and 1 resume from the
// voted next address. Memory words are SEC-DED codewords decoded on every
// read.
//
// Pipeline (each stage holds one instruction; T2 and T1 alternate):
//   FETCH      PC unit issues pc[harc] to the program memory (1-cycle read)
//   DECODE     ECC decode, instruction decode, register read with bypass
//   EXEC       ALU / branch (redirects its own thread and kills that thread's
//              instruction being fetched), multiply/divide (a division
//              stalls the pipeline for 33 cycles), or load-store unit (stalls the
//              pipeline while the Thread 1 / Thread 0 request is voted and
//              executed); the result goes to the thread's write-back buffer
//   WRITE-BACK compare (Thread 1 copy) and commit, or vote (Thread 0 copy)
// A committed WFI puts Threads 2 and 1 to sleep until wake_i.
//
// What follows the published design: the three threads and their roles, the
// Checkpoint-PC in Thread 0's PC updated at every agreed instruction, the
// per-thread write-back and load-store buffers with comparison in Normal mode
// and voting in Restore mode, the single load-store access, bypass from the
// write-back buffers, and the three modes. This design's own choices: the
// RV32IM subset (no CSRs, interrupts or exceptions), the divider's latency, the
// memory sizes and interfaces, the comparison of the PCs in write-back, and
// the exact cycle counts that follow from them.
//
// Ports: clock, active-low asynchronous reset, boot address, fetch enable,
// wake-up; a host port loads the program memory (host_sel_i = 0) or the data
// memory (host_sel_i = 1) and reads the data memory; status outputs report
// the mode, sleep and restore/ECC event counts.
module dtmr_core
  import dtmr_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic [31:0] boot_addr_i,
  input  logic        fetch_enable_i,
  input  logic        wake_i,
  // host access to the memories
  input  logic        host_we_i,
  input  logic        host_sel_i,
  input  logic [31:0] host_addr_i,
  input  logic [31:0] host_wdata_i,
  output logic [31:0] host_rdata_o,
  // status
  output mode_e       mode_o,
  output logic        sleep_o,
  output logic [31:0] restore_count_o,
  output logic [31:0] ecc_corrected_count_o,
  output logic        ecc_double_err_o
);

  // --------------------------------------------------------------- signals
  logic        fetch_req;
  logic [31:0] fetch_addr;
  harc_t       fetch_harc;
  logic [ECC_W-1:0] instr_cw;

  logic        id_valid_q;
  harc_t       id_harc_q;
  logic [31:0] id_pc_q;
  logic [31:0] id_instr;
  logic        id_ecc_single, id_ecc_double;
  decoded_t    id_dec;
  logic [31:0] id_rs1, id_rs2;
  logic        rs1_bypass, rs2_bypass;

  logic        ie_valid_q;
  harc_t       ie_harc_q;
  logic [31:0] ie_pc_q;
  decoded_t    ie_dec_q;
  logic [31:0] ie_rs1_q, ie_rs2_q;
  logic [31:0] ie_result, ie_next_pc;
  logic        ie_taken;
  wb_entry_t   ie_entry;

  logic        wb_valid_q;
  harc_t       wb_harc_q;

  mode_e       mode;
  logic        flush_fault, t0_fetch, end_restore;
  logic        stall, lsu_stall, md_stall;
  logic [31:0] md_result;
  logic        restore_fault_pc, restore_fault_rf, restore_fault_lsu, fault_any;
  logic        wb_cmp, commit, wfi_commit, flush;
  logic        redirect;
  logic        sleep;
  wb_entry_t   buf_t2, buf_t1, buf_t0, voted;
  logic [31:0] pc_voted, checkpoint_pc;

  logic        lsu_req, lsu_gnt, lsu_rvalid, lsu_we;
  logic [3:0]  lsu_be;
  logic [31:0] lsu_addr, lsu_wdata, lsu_rdata, ls_wb;
  logic [ECC_W-1:0] data_cw;
  logic        ls_wb_en, load_valid, store_valid;
  logic        d_ecc_single, d_ecc_double;

  // --------------------------------------------------------- detection
  assign wb_cmp     = wb_valid_q && (wb_harc_q == HARC_T1);
  assign fault_any  = restore_fault_pc || restore_fault_rf || restore_fault_lsu;
  assign commit     = wb_cmp && !restore_fault_pc && !restore_fault_rf && (mode != MODE_RESTORE);
  assign wfi_commit = commit && buf_t1.is_wfi;
  assign flush      = flush_fault || wfi_commit;

  dtmr_restore_ctrl u_restore (
    .clk_i, .rst_ni,
    .fault_i         (fault_any),
    .t0_in_wb_i      (wb_valid_q && (wb_harc_q == HARC_T0)),
    .mode_o          (mode),
    .flush_o         (flush_fault),
    .t0_fetch_o      (t0_fetch),
    .end_restore_o   (end_restore),
    .restore_count_o (restore_count_o)
  );
  assign mode_o = mode;

  // ----------------------------------------------------------------- FETCH
  assign redirect = ie_valid_q && !stall && ie_taken && !flush;

  dtmr_pc_unit u_pc (
    .clk_i, .rst_ni,
    .boot_addr_i,
    .fetch_enable_i,
    .mode_i             (mode),
    .t0_fetch_i         (t0_fetch),
    .end_restore_i      (end_restore),
    .stall_i            (stall),
    .fetch_req_o        (fetch_req),
    .fetch_addr_o       (fetch_addr),
    .fetch_harc_o       (fetch_harc),
    .redirect_i         (redirect),
    .redirect_harc_i    (ie_harc_q),
    .redirect_pc_i      (ie_next_pc),
    .wb_cmp_i           (wb_cmp && mode != MODE_RESTORE),
    .pc_t2_i            (buf_t2.pc),
    .next_pc_t2_i       (buf_t2.next_pc),
    .pc_t1_i            (buf_t1.pc),
    .next_pc_t1_i       (buf_t1.next_pc),
    .next_pc_t0_i       (buf_t0.next_pc),
    .commit_i           (commit),
    .wfi_i              (end_restore ? voted.is_wfi : buf_t1.is_wfi),
    .wake_i,
    .restore_fault_pc_o (restore_fault_pc),
    .pc_voted_o         (pc_voted),
    .checkpoint_pc_o    (checkpoint_pc),
    .harc_sleep_o       (sleep)
  );
  assign sleep_o = sleep;

  dtmr_imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk_i,
    .req_i        (fetch_req),
    .addr_i       (fetch_addr),
    .rdata_o      (instr_cw),
    .host_we_i    (host_we_i && !host_sel_i),
    .host_addr_i,
    .host_wdata_i
  );

  // IF/ID: the fetched instruction is killed by a flush or by a taken branch
  // of the same thread in EXEC
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      id_valid_q <= 1'b0;
      id_harc_q  <= HARC_T2;
      id_pc_q    <= '0;
    end else if (flush || (fetch_req && redirect && fetch_harc == ie_harc_q)) begin
      id_valid_q <= 1'b0;
    end else if (!stall) begin
      id_valid_q <= fetch_req;
      id_harc_q  <= fetch_harc;
      id_pc_q    <= fetch_addr;
    end
  end

  // ---------------------------------------------------------------- DECODE
  dtmr_ecc_dec u_ecc_instr (
    .cw_i         (instr_cw),
    .data_o       (id_instr),
    .single_err_o (id_ecc_single),
    .double_err_o (id_ecc_double)
  );

  dtmr_decoder u_dec (
    .instr_i (id_instr),
    .dec_o   (id_dec)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ie_valid_q <= 1'b0;
      ie_harc_q  <= HARC_T2;
      ie_pc_q    <= '0;
      ie_dec_q   <= '0;
      ie_rs1_q   <= '0;
      ie_rs2_q   <= '0;
    end else if (flush || (redirect && id_harc_q == ie_harc_q)) begin
      ie_valid_q <= 1'b0;
    end else if (!stall) begin
      ie_valid_q <= id_valid_q;
      ie_harc_q  <= id_harc_q;
      ie_pc_q    <= id_pc_q;
      ie_dec_q   <= id_dec;
      ie_rs1_q   <= id_rs1;
      ie_rs2_q   <= id_rs2;
    end
  end

  // ------------------------------------------------------------------ EXEC
  dtmr_exec u_exec (
    .dec_i     (ie_dec_q),
    .pc_i      (ie_pc_q),
    .rs1_i     (ie_rs1_q),
    .rs2_i     (ie_rs2_q),
    .result_o  (ie_result),
    .next_pc_o (ie_next_pc),
    .taken_o   (ie_taken)
  );

  dtmr_lsu u_lsu (
    .clk_i, .rst_ni,
    .ls_valid_i          (ie_valid_q && (ie_dec_q.is_load || ie_dec_q.is_store)),
    .harc_i              (ie_harc_q),
    .is_load_i           (ie_dec_q.is_load),
    .is_store_i          (ie_dec_q.is_store),
    .funct3_i            (ie_dec_q.funct3),
    .imm_i               (ie_dec_q.imm),
    .rs1_i               (ie_rs1_q),
    .rs2_i               (ie_rs2_q),
    .flush_i             (flush),
    .stall_o             (lsu_stall),
    .restore_fault_lsu_o (restore_fault_lsu),
    .load_valid_o        (load_valid),
    .store_valid_o       (store_valid),
    .ls_wb_o             (ls_wb),
    .ls_wb_en_o          (ls_wb_en),
    .data_req_o          (lsu_req),
    .data_gnt_i          (lsu_gnt),
    .data_rvalid_i       (lsu_rvalid),
    .data_we_o           (lsu_we),
    .data_be_o           (lsu_be),
    .data_addr_o         (lsu_addr),
    .data_wdata_o        (lsu_wdata),
    .data_rdata_i        (lsu_rdata)
  );

  // long-latency multiply/divide; each thread's copy is executed separately
  dtmr_muldiv u_md (
    .clk_i, .rst_ni,
    .start_i  (ie_valid_q && ie_dec_q.is_muldiv),
    .funct3_i (ie_dec_q.funct3),
    .a_i      (ie_rs1_q),
    .b_i      (ie_rs2_q),
    .flush_i  (flush),
    .stall_o  (md_stall),
    .result_o (md_result)
  );
  assign stall = lsu_stall || md_stall;

  dtmr_ecc_dec u_ecc_data (
    .cw_i         (data_cw),
    .data_o       (lsu_rdata),
    .single_err_o (d_ecc_single),
    .double_err_o (d_ecc_double)
  );

  dtmr_dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk_i, .rst_ni,
    .data_req_i    (lsu_req),
    .data_gnt_o    (lsu_gnt),
    .data_rvalid_o (lsu_rvalid),
    .data_we_i     (lsu_we),
    .data_be_i     (lsu_be),
    .data_addr_i   (lsu_addr),
    .data_wdata_i  (lsu_wdata),
    .data_rdata_o  (data_cw),
    .host_we_i     (host_we_i && host_sel_i),
    .host_addr_i,
    .host_wdata_i,
    .host_rdata_o
  );

  always_comb begin
    ie_entry         = '0;
    ie_entry.pc      = ie_pc_q;
    ie_entry.next_pc = ie_next_pc;
    ie_entry.we      = ie_dec_q.we;
    ie_entry.rd      = ie_dec_q.rd;
    ie_entry.value   = ie_dec_q.is_muldiv ? md_result : ie_result;
    ie_entry.is_load = ie_dec_q.is_load;
    ie_entry.is_wfi  = ie_dec_q.is_wfi;
  end

  // ------------------------------------------------------------ WRITE-BACK
  // The EXEC copy enters its buffer when it leaves EXEC; on a load/store
  // mismatch the Thread 1 copy is kept in its buffer for the later vote.
  dtmr_wb_rf u_wb (
    .clk_i, .rst_ni,
    .id_harc_i          (id_harc_q),
    .rs1_i              (id_dec.rs1),
    .rs2_i              (id_dec.rs2),
    .rs1_data_o         (id_rs1),
    .rs2_data_o         (id_rs2),
    .rs1_bypass_o       (rs1_bypass),
    .rs2_bypass_o       (rs2_bypass),
    .buf_we_i           (ie_valid_q && ((!stall && !flush) || restore_fault_lsu)),
    .buf_harc_i         (ie_harc_q),
    .buf_entry_i        (ie_entry),
    .wb_cmp_i           (wb_cmp && mode != MODE_RESTORE),
    .commit_i           (commit),
    .end_restore_i      (end_restore),
    .ls_wb_i            (ls_wb),
    .restore_fault_rf_o (restore_fault_rf),
    .buf_t2_o           (buf_t2),
    .buf_t1_o           (buf_t1),
    .buf_t0_o           (buf_t0),
    .voted_o            (voted)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wb_valid_q <= 1'b0;
      wb_harc_q  <= HARC_T2;
    end else begin
      wb_valid_q <= ie_valid_q && !stall && !flush;
      wb_harc_q  <= ie_harc_q;
    end
  end

  // ---------------------------------------------------------- ECC events
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ecc_corrected_count_o <= '0;
      ecc_double_err_o      <= 1'b0;
    end else begin
      if ((id_valid_q && !stall && id_ecc_single) || (lsu_rvalid && !lsu_we && d_ecc_single))
        ecc_corrected_count_o <= ecc_corrected_count_o + 32'd1;
      if ((id_valid_q && id_ecc_double) || (lsu_rvalid && !lsu_we && d_ecc_double))
        ecc_double_err_o <= 1'b1;
    end
  end

endmodule
