// dtmr_pc_unit: program counter update and restore unit.
//
// Holds one program counter per hardware thread. PC(2) and PC(1) are the
// fetch addresses of the two redundant threads; PC(0), the auxiliary
// thread's PC, is the Checkpoint-PC: the address of the oldest instruction
// that has not been committed yet. As in the published design, PC(0) is
// updated every two cycles in Normal mode, each time the Thread 1 copy of an
// instruction reaches write-back and its PCs agree with the Thread 2 copy.
//
// Blocks inside (named after the published unit):
//  * PC updating logic: sequential increment on fetch, redirect on a taken
//    branch or jump resolved in EXEC, reload at the end of a restore.
//  * Thread sleeping logic: a committed WFI suspends Threads 2 and 1 (their
//    PCs point after the WFI) until wake_i. Thread 0 sleeps except for its
//    single fetch in Restore mode.
//  * PC voting & restoring block: compares the PC and next-PC of the Thread
//    2 and Thread 1 copies in write-back (restore_fault_pc_o on mismatch) and,
//    at the end of a restore, votes the three copies' next-PC (pc_voted_o)
//    and loads it into PC(2), PC(1) and PC(0).
// The comparison point (write-back, on the buffered PCs) and the
// Thread 2 / Thread 1 alternation with no gap are this design's choices.
//
// Timing: fetch_req_o/fetch_addr_o/fetch_harc_o are combinational; all PC
// updates take effect at the next rising edge. Reset is asynchronous, active
// low; all PCs start at boot_addr_i.
module dtmr_pc_unit
  import dtmr_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic [31:0] boot_addr_i,
  input  logic        fetch_enable_i,
  // mode control
  input  mode_e       mode_i,
  input  logic        t0_fetch_i,      // Restore: Thread 0 fetches now
  input  logic        end_restore_i,   // End-of-Restore vote cycle
  input  logic        stall_i,         // pipeline frozen (load/store in progress)
  // fetch
  output logic        fetch_req_o,
  output logic [31:0] fetch_addr_o,
  output harc_t       fetch_harc_o,
  // redirect from EXEC
  input  logic        redirect_i,
  input  harc_t       redirect_harc_i,
  input  logic [31:0] redirect_pc_i,
  // buffered PCs of the copies in write-back
  input  logic        wb_cmp_i,        // Thread 1 copy in write-back, Normal mode
  input  logic [31:0] pc_t2_i,
  input  logic [31:0] next_pc_t2_i,
  input  logic [31:0] pc_t1_i,
  input  logic [31:0] next_pc_t1_i,
  input  logic [31:0] next_pc_t0_i,
  input  logic        commit_i,        // Thread 1 copy committed (no fault anywhere)
  input  logic        wfi_i,           // committed (or voted) instruction is a WFI
  input  logic        wake_i,
  output logic        restore_fault_pc_o,
  output logic [31:0] pc_voted_o,
  output logic [31:0] checkpoint_pc_o,
  output logic        harc_sleep_o     // Threads 2 and 1 asleep
);

  logic [31:0] pc_q [NTHREADS];
  harc_t       next_harc_q;
  logic        sleep_q;
  logic        normal_fetch;

  // ------------------------------------------------ PC voting & restoring
  assign restore_fault_pc_o = wb_cmp_i && ((pc_t2_i != pc_t1_i) || (next_pc_t2_i != next_pc_t1_i));
  assign pc_voted_o         = maj32(next_pc_t2_i, next_pc_t1_i, next_pc_t0_i);
  assign checkpoint_pc_o    = pc_q[0];

  // ------------------------------------------------------------ fetching
  assign normal_fetch = fetch_enable_i && !sleep_q && !stall_i &&
                        (mode_i == MODE_NORMAL ||
                         (mode_i == MODE_END_RESTORE && !end_restore_i));

  always_comb begin
    fetch_req_o  = 1'b0;
    fetch_harc_o = next_harc_q;
    if (t0_fetch_i) begin
      fetch_req_o  = 1'b1;
      fetch_harc_o = HARC_T0;
    end else if (normal_fetch) begin
      fetch_req_o  = 1'b1;
    end
    fetch_addr_o = pc_q[fetch_harc_o];
  end

  // ------------------------------------------------------ PC updating
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < NTHREADS; i++) pc_q[i] <= boot_addr_i;
      next_harc_q <= HARC_T2;
      sleep_q     <= 1'b0;
    end else begin
      if (normal_fetch) begin
        pc_q[next_harc_q] <= pc_q[next_harc_q] + 32'd4;
        next_harc_q       <= (next_harc_q == HARC_T2) ? HARC_T1 : HARC_T2;
      end
      if (redirect_i && redirect_harc_i != HARC_T0)
        pc_q[redirect_harc_i] <= redirect_pc_i;
      if (commit_i) begin
        pc_q[0] <= next_pc_t1_i;  // checkpoint: agreed address of the next instruction
        if (wfi_i) begin
          pc_q[2]     <= next_pc_t1_i;
          pc_q[1]     <= next_pc_t1_i;
          next_harc_q <= HARC_T2;
          sleep_q     <= 1'b1;
        end
      end
      if (end_restore_i) begin
        pc_q[2]     <= pc_voted_o;
        pc_q[1]     <= pc_voted_o;
        pc_q[0]     <= pc_voted_o;
        next_harc_q <= HARC_T2;
        if (wfi_i) sleep_q <= 1'b1;
      end
      if (wake_i) sleep_q <= 1'b0;
    end
  end

  assign harc_sleep_o = sleep_q;

endmodule
