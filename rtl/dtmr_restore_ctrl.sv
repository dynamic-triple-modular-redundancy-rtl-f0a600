// dtmr_restore_ctrl: operating-mode controller ("restore" block).
//
// The core works in one of three modes. In Normal (detection) mode Threads 2
// and 1 run the same instructions. When any detector raises a restore_
// signal (PC comparison, write-back comparison or load/store comparison),
// the pipeline is flushed and the core enters Restore mode: the auxiliary
// Thread 0 is woken up and fetches once, from its PC, which holds the address
// of the last uncommitted instruction (the checkpoint), while Threads 2 and 1
// are stalled. When Thread 0's copy reaches write-back, the core is in
// End-of-Restore mode: in its first cycle the three copies are voted (the
// result goes to the vote register of the write-back unit) and the voted
// next address is loaded into the PCs of Threads 2 and 1; in its second
// cycle the voted result is written to the register files and Thread 2
// fetches again (the pipeline already runs as in Normal mode), and Normal
// mode follows.
//
// The three modes and their order follow the published design. How long
// each lasts here is a result of this pipeline: Restore lasts from the cycle
// after detection until Thread 0's instruction reaches write-back (3 cycles
// for an ALU instruction, 6 for a load/store, 36 for a division),
// End-of-Restore 2 cycles as in the published design.
// A fault reported while not in Normal mode is ignored, as the design
// assumes no second fault during a restore.
//
// Interface: fault_i is sampled every cycle; flush_o is high in the
// detection cycle (combinational); t0_fetch_o is high for exactly one cycle
// at the start of Restore; t0_in_wb_i tells that Thread 0's instruction is in
// write-back. restore_count_o counts completed restores.
module dtmr_restore_ctrl
  import dtmr_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        fault_i,        // OR of all restore_fault_* signals
  input  logic        t0_in_wb_i,     // Thread 0's re-executed instruction is in WB
  output mode_e       mode_o,
  output logic        flush_o,        // detection: kill younger instructions
  output logic        t0_fetch_o,     // Thread 0 fetches this cycle
  output logic        end_restore_o,  // vote / write back / reload PCs now
  output logic [31:0] restore_count_o
);

  mode_e mode_q, mode_d;
  logic  t0_fetched_q;

  // flush and end-of-restore are kept out of the next-mode logic so that
  // neither depends on the other's inputs
  assign flush_o       = (mode_q == MODE_NORMAL)  && fault_i;
  assign end_restore_o = (mode_q == MODE_RESTORE) && t0_in_wb_i;

  always_comb begin
    unique case (mode_q)
      MODE_NORMAL:  mode_d = flush_o ? MODE_RESTORE : MODE_NORMAL;
      MODE_RESTORE: mode_d = end_restore_o ? MODE_END_RESTORE : MODE_RESTORE;
      default:      mode_d = MODE_NORMAL;  // second End-of-Restore cycle
    endcase
  end

  // Thread 0 is fetched in the first Restore cycle only
  assign t0_fetch_o = (mode_q == MODE_RESTORE) && !t0_fetched_q;
  assign mode_o     = end_restore_o ? MODE_END_RESTORE : mode_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      mode_q          <= MODE_NORMAL;
      t0_fetched_q    <= 1'b0;
      restore_count_o <= '0;
    end else begin
      mode_q <= mode_d;
      if (mode_q != MODE_RESTORE) t0_fetched_q <= 1'b0;
      else if (t0_fetch_o)        t0_fetched_q <= 1'b1;
      if (end_restore_o) restore_count_o <= restore_count_o + 32'd1;
    end
  end

endmodule
