// tb_dtmr_wb_rf: checks write-back buffers, comparison, voting, bypass and
// the three register files.
//  * A Thread 2 result is only buffered; DECODE of Thread 2 gets it through
//    the bypass, Thread 1 does not see it.
//  * Agreeing Thread 1 copy + commit writes all three register files.
//  * Differing copies raise restore_fault_rf; with the Thread 0 copy the
//    2-of-3 vote is held in WB_buf_voted for one cycle, then written.
//  * Loads write LS_WB, and bypass forwards LS_WB; x0 stays zero.
// Expected register contents are kept in a model array here.
module tb_dtmr_wb_rf;
  import dtmr_pkg::*;

  logic clk = 0, rst_n = 0;
  harc_t id_harc = HARC_T2;
  logic [4:0] rs1 = 0, rs2 = 0;
  logic [31:0] rs1_data, rs2_data, ls_wb = 0;
  logic rs1_byp, rs2_byp;
  logic buf_we = 0, wb_cmp = 0, commit = 0, end_restore = 0;
  harc_t buf_harc = HARC_T2;
  wb_entry_t entry = '0, b2, b1, b0, voted;
  logic fault;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  dtmr_wb_rf dut (
    .clk_i(clk), .rst_ni(rst_n), .id_harc_i(id_harc), .rs1_i(rs1), .rs2_i(rs2),
    .rs1_data_o(rs1_data), .rs2_data_o(rs2_data), .rs1_bypass_o(rs1_byp), .rs2_bypass_o(rs2_byp),
    .buf_we_i(buf_we), .buf_harc_i(buf_harc), .buf_entry_i(entry), .wb_cmp_i(wb_cmp),
    .commit_i(commit), .end_restore_i(end_restore), .ls_wb_i(ls_wb),
    .restore_fault_rf_o(fault), .buf_t2_o(b2), .buf_t1_o(b1), .buf_t0_o(b0), .voted_o(voted));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic wb_entry_t mk(input logic [4:0] rd, input logic [31:0] v, input logic ld);
    wb_entry_t e;
    e = '0; e.pc = 32'h100; e.next_pc = 32'h104; e.we = (rd != 0); e.rd = rd; e.value = v; e.is_load = ld;
    return e;
  endfunction

  task automatic put(input harc_t h, input wb_entry_t e);
    @(negedge clk);
    buf_we = 1; buf_harc = h; entry = e;
    @(negedge clk);
    buf_we = 0;
  endtask

  task automatic read_all(input string what, input logic [4:0] r);
    for (int t = 0; t < 3; t++) begin
      id_harc = harc_t'(t); rs1 = r; rs2 = r; #1;
      check({what, " rs1"}, rs1_data, model[r]);
      check({what, " rs2"}, rs2_data, model[r]);
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      logic [4:0] rd;
      logic [31:0] v;
      rd = 5'($urandom_range(0, 31)); v = $urandom();
      put(HARC_T2, mk(rd, v, 0));
      id_harc = HARC_T2; rs1 = rd; rs2 = 5'(rd + 1); #1;
      if (rd != 0) begin
        check("bypass T2 flag", rs1_byp, 1);
        check("bypass T2 value", rs1_data, v);
      end else check("no bypass of x0", rs1_byp, 0);
      id_harc = HARC_T1; #1;
      check("no bypass to T1", rs1_byp, 0);
      check("T1 reads old value", rs1_data, model[rd]);
      put(HARC_T1, mk(rd, v, 0));
      wb_cmp = 1; #1;
      check("no fault when equal", fault, 0);
      commit = 1;
      @(negedge clk); commit = 0; wb_cmp = 0;
      if (rd != 0) model[rd] = v;
      read_all("after commit", rd);
      check("bypass off after commit", rs1_byp, 0);
    end
    // mismatch and vote
    put(HARC_T2, mk(7, 32'hAAAA_0000, 0));
    put(HARC_T1, mk(7, 32'hAAAA_0400, 0));
    wb_cmp = 1; #1;
    check("fault on mismatch", fault, 1);
    @(negedge clk); wb_cmp = 0;
    id_harc = HARC_T0; rs1 = 7; #1;  // Thread 0 has nothing pending: reads its file
    check("mismatch not written", rs1_data, model[7]);
    put(HARC_T0, mk(7, 32'hAAAA_0000, 0));
    end_restore = 1; #1;
    check("voted value", voted.value, 32'hAAAA_0000);
    @(negedge clk); end_restore = 0;
    id_harc = HARC_T0; rs1 = 7; #1;  // held in WB_buf_voted for one cycle
    check("voted value not yet written", rs1_data, model[7]);
    @(negedge clk);
    model[7] = 32'hAAAA_0000;
    read_all("voted written", 7);
    // load
    ls_wb = 32'h5555_1234;
    put(HARC_T2, mk(9, 0, 1));
    id_harc = HARC_T2; rs2 = 9; #1;
    check("load bypass", rs2_data, 32'h5555_1234);
    check("load bypass flag", rs2_byp, 1);
    put(HARC_T1, mk(9, 0, 1));
    wb_cmp = 1; commit = 1;
    @(negedge clk); wb_cmp = 0; commit = 0;
    model[9] = 32'h5555_1234;
    read_all("load written", 9);
    read_all("x0", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
