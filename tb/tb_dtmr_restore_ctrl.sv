// tb_dtmr_restore_ctrl: drives the mode controller through two restores.
// Checks, cycle by cycle: flush in the detection cycle, Restore mode on the
// next edge with a single Thread 0 fetch, End-of-Restore for two cycles
// starting when Thread 0 reaches write-back, Normal afterwards, faults ignored
// during a restore, and the restore counter.
module tb_dtmr_restore_ctrl;
  import dtmr_pkg::*;

  logic clk = 0, rst_n = 0, fault = 0, t0_in_wb = 0;
  mode_e mode;
  logic flush, t0_fetch, end_restore;
  logic [31:0] count;
  int checks = 0, failures = 0;

  dtmr_restore_ctrl dut (.clk_i(clk), .rst_ni(rst_n), .fault_i(fault), .t0_in_wb_i(t0_in_wb),
                         .mode_o(mode), .flush_o(flush), .t0_fetch_o(t0_fetch),
                         .end_restore_o(end_restore), .restore_count_o(count));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic one_restore(input int wait_cycles, input int n);
    @(negedge clk);
    check("normal before", mode, MODE_NORMAL);
    fault = 1; #1;
    check("flush in detection cycle", flush, 1);
    @(negedge clk); fault = 0; #1;
    check("restore mode", mode, MODE_RESTORE);
    check("t0 fetch once (1st)", t0_fetch, 1);
    @(negedge clk); #1;
    check("t0 fetch once (2nd)", t0_fetch, 0);
    fault = 1; #1;
    check("fault ignored in restore", flush, 0);
    fault = 0;
    repeat (wait_cycles) @(negedge clk);
    t0_in_wb = 1; #1;
    check("end restore pulse", end_restore, 1);
    check("end restore mode (1st cycle)", mode, MODE_END_RESTORE);
    @(negedge clk); t0_in_wb = 0; #1;
    check("end restore mode (2nd cycle)", mode, MODE_END_RESTORE);
    check("no pulse in 2nd cycle", end_restore, 0);
    @(negedge clk); #1;
    check("back to normal", mode, MODE_NORMAL);
    check("count", count, 32'(n));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset mode", mode, MODE_NORMAL);
    check("no flush idle", flush, 0);
    one_restore(1, 1);
    one_restore(4, 2);
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
