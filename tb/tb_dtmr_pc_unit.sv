// tb_dtmr_pc_unit: checks the program counter unit on its own.
//  * Normal mode: fetches alternate Thread 2 / Thread 1 with sequential
//    addresses; a stall holds fetching.
//  * A redirect from EXEC changes only that thread's PC.
//  * Commit of an agreed instruction loads its next PC into the
//    Checkpoint-PC (Thread 0's PC).
//  * Differing PCs of the Thread 2 / Thread 1 copies raise restore_fault_pc.
//  * In Restore mode Thread 0 fetches from the Checkpoint-PC; at the end of
//    the restore the 2-of-3 voted next PC is loaded into all PCs and fetching
//    resumes with Thread 2.
//  * A committed WFI puts the threads to sleep, wake_i resumes them.
module tb_dtmr_pc_unit;
  import dtmr_pkg::*;

  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_NORMAL;
  logic t0_fetch = 0, end_restore = 0, stall = 0, redirect = 0, wb_cmp = 0, commit = 0, wfi = 0, wake = 0;
  harc_t redirect_harc = HARC_T2;
  logic [31:0] redirect_pc = 0, pc_t2 = 0, npc_t2 = 0, pc_t1 = 0, npc_t1 = 0, npc_t0 = 0;
  logic fetch_req, fault_pc, sleep;
  logic [31:0] fetch_addr, pc_voted, checkpoint;
  harc_t fetch_harc;
  int checks = 0, failures = 0;

  dtmr_pc_unit dut (
    .clk_i(clk), .rst_ni(rst_n), .boot_addr_i(32'h80), .fetch_enable_i(1'b1),
    .mode_i(mode), .t0_fetch_i(t0_fetch), .end_restore_i(end_restore), .stall_i(stall),
    .fetch_req_o(fetch_req), .fetch_addr_o(fetch_addr), .fetch_harc_o(fetch_harc),
    .redirect_i(redirect), .redirect_harc_i(redirect_harc), .redirect_pc_i(redirect_pc),
    .wb_cmp_i(wb_cmp), .pc_t2_i(pc_t2), .next_pc_t2_i(npc_t2), .pc_t1_i(pc_t1),
    .next_pc_t1_i(npc_t1), .next_pc_t0_i(npc_t0), .commit_i(commit), .wfi_i(wfi), .wake_i(wake),
    .restore_fault_pc_o(fault_pc), .pc_voted_o(pc_voted), .checkpoint_pc_o(checkpoint),
    .harc_sleep_o(sleep));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic expect_fetch(input string what, input harc_t h, input logic [31:0] a);
    #1;
    check({what, " req"}, fetch_req, 1);
    check({what, " harc"}, fetch_harc, h);
    check({what, " addr"}, fetch_addr, a);
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check("checkpoint at boot", checkpoint, 32'h80);
    expect_fetch("f0", HARC_T2, 32'h80);
    expect_fetch("f1", HARC_T1, 32'h80);
    expect_fetch("f2", HARC_T2, 32'h84);
    stall = 1; #1;
    check("stall holds fetch", fetch_req, 0);
    @(negedge clk); stall = 0;
    expect_fetch("f3", HARC_T1, 32'h84);
    // redirect Thread 2 while it fetches
    redirect = 1; redirect_harc = HARC_T2; redirect_pc = 32'h200;
    expect_fetch("f4", HARC_T2, 32'h88);
    redirect = 0;
    expect_fetch("f5", HARC_T1, 32'h88);
    expect_fetch("f6 redirected", HARC_T2, 32'h200);
    // agreed commit updates the checkpoint
    wb_cmp = 1; pc_t2 = 32'h84; pc_t1 = 32'h84; npc_t2 = 32'h88; npc_t1 = 32'h88; #1;
    check("no pc fault when equal", fault_pc, 0);
    commit = 1;
    @(negedge clk); commit = 0;
    check("checkpoint updated", checkpoint, 32'h88);
    npc_t2 = 32'h8c; #1;
    check("pc fault on next-pc mismatch", fault_pc, 1);
    npc_t2 = 32'h88; pc_t1 = 32'h80; #1;
    check("pc fault on pc mismatch", fault_pc, 1);
    wb_cmp = 0; #1;
    check("no pc fault without compare", fault_pc, 0);
    // restore
    mode = MODE_RESTORE; t0_fetch = 1; #1;
    check("t0 fetch harc", fetch_harc, HARC_T0);
    check("t0 fetch addr = checkpoint", fetch_addr, 32'h88);
    @(negedge clk); t0_fetch = 0; #1;
    check("no fetch in restore", fetch_req, 0);
    npc_t2 = 32'h8c; npc_t1 = 32'h300; npc_t0 = 32'h8c;
    mode = MODE_END_RESTORE; end_restore = 1; #1;
    check("voted pc", pc_voted, 32'h8c);
    check("no fetch in vote cycle", fetch_req, 0);
    @(negedge clk); end_restore = 0;
    check("checkpoint after restore", checkpoint, 32'h8c);
    expect_fetch("r0", HARC_T2, 32'h8c);
    mode = MODE_NORMAL;
    expect_fetch("r1", HARC_T1, 32'h8c);
    // WFI
    wb_cmp = 1; pc_t2 = 32'h8c; pc_t1 = 32'h8c; npc_t2 = 32'h90; npc_t1 = 32'h90;
    commit = 1; wfi = 1;
    @(negedge clk); commit = 0; wfi = 0; wb_cmp = 0; #1;
    check("asleep", sleep, 1);
    check("no fetch asleep", fetch_req, 0);
    @(negedge clk); wake = 1;
    @(negedge clk); wake = 0;
    expect_fetch("after wake", HARC_T2, 32'h90);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
