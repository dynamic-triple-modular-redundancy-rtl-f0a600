// tb_dtmr_core: end-to-end test of the dynamic-TMR core at its default sizes.
//
// Loads a small RV32IM program through the host port: it sums an 8-word
// array (load followed at once by a dependent add, so the load result is
// bypassed), stores twice each element, exercises byte/half-word stores and
// loads, a taken jump and a loop branch, divides, takes the remainder and
// multiplies back (RV32M, the divisions stall the pipeline), and ends with WFI. While it runs,
// single-event upsets are injected by flipping register bits between clock
// edges:
//   1. a bit of the Thread 2 write-back buffer   -> write-back mismatch
//   2. a bit of Thread 2's program counter        -> PC mismatch
//   3. a bit of the buffered Thread 2 store data  -> load/store mismatch
//   4. a bit of the Thread 2 result of the SUB just before the first
//      division -> mismatch found while Thread 2's division waits in EXEC;
//      the division is flushed before it starts
//   5. a bit of the quotient while Thread 2's division is running (the SUB
//      before it has committed) -> write-back mismatch on a long-latency
//      operation; Thread 0 re-executes the whole division during Restore
//   6. one bit in a stored instruction and one in a stored data word
//      -> corrected by the ECC decoders
// Every fault must be detected and recovered: the final memory contents are
// compared with values computed here, five restores must have happened, and
// the Restore mode of an ALU instruction must last 3 cycles. Each mechanism
// (bypass, branch redirect, load/store stall, divider stall, each kind of
// restore, ECC correction, sleep) is counted and must occur at least once.
module tb_dtmr_core;
  import dtmr_pkg::*;
  import rv_asm_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        fetch_enable = 1'b0;
  logic        host_we = 1'b0, host_sel = 1'b0;
  logic [31:0] host_addr = '0, host_wdata = '0, host_rdata;
  mode_e       mode;
  logic        sleep;
  logic [31:0] restore_count, ecc_count;
  logic        ecc_double;

  int checks = 0, failures = 0;
  int cycle = 0;

  dtmr_core dut (
    .clk_i                 (clk),
    .rst_ni                (rst_n),
    .boot_addr_i           (32'h0),
    .fetch_enable_i        (fetch_enable),
    .wake_i                (1'b0),
    .host_we_i             (host_we),
    .host_sel_i            (host_sel),
    .host_addr_i           (host_addr),
    .host_wdata_i          (host_wdata),
    .host_rdata_o          (host_rdata),
    .mode_o                (mode),
    .sleep_o               (sleep),
    .restore_count_o       (restore_count),
    .ecc_corrected_count_o (ecc_count),
    .ecc_double_err_o      (ecc_double)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ program
  logic [31:0] prog [40];
  logic [31:0] a_vals [8];
  int          nprog;

  task automatic build_program();
    int n;
    n = 0;
    prog[n++] = addi(1, 0, 32'h100);          //  0 x1 = &A
    prog[n++] = addi(2, 0, 8);                //  4 x2 = 8
    prog[n++] = addi(3, 0, 0);                //  8 x3 = sum
    prog[n++] = addi(4, 0, 0);                // 12 x4 = i
    prog[n++] = load(3'b010, 5, 1, 0);        // 16 loop: lw x5,0(x1)
    prog[n++] = add(3, 3, 5);                 // 20 sum += x5 (bypassed load)
    prog[n++] = slli(6, 5, 1);                // 24
    prog[n++] = store(3'b010, 6, 1, 64);      // 28 sw x6,64(x1)
    prog[n++] = addi(1, 1, 4);                // 32
    prog[n++] = addi(4, 4, 1);                // 36
    prog[n++] = branch(3'b001, 4, 2, -24);    // 40 bne x4,x2,loop
    prog[n++] = store(3'b010, 3, 0, 32'h200); // 44 sw sum
    prog[n++] = lui(7, 20'h12345);            // 48
    prog[n++] = addi(7, 7, 32'h678);          // 52 x7 = 0x12345678
    prog[n++] = store(3'b000, 7, 0, 32'h204); // 56 sb
    prog[n++] = store(3'b001, 7, 0, 32'h206); // 60 sh
    prog[n++] = load(3'b100, 8, 0, 32'h204);  // 64 lbu -> 0x78
    prog[n++] = load(3'b001, 9, 0, 32'h206);  // 68 lh  -> 0x5678
    prog[n++] = add(10, 8, 9);                // 72
    prog[n++] = store(3'b010, 10, 0, 32'h208);// 76
    prog[n++] = jal(11, 8);                   // 80 -> 88, x11 = 84
    prog[n++] = addi(10, 0, 1);               // 84 skipped
    prog[n++] = store(3'b010, 11, 0, 32'h20c);// 88
    prog[n++] = sub(12, 0, 3);                // 92 x12 = -sum
    prog[n++] = muldiv(3'd4, 13, 12, 2);      // 96 div  x13 = -sum / 8
    prog[n++] = muldiv(3'd6, 14, 12, 2);      // 100 rem  x14 = -sum % 8
    prog[n++] = muldiv(3'd0, 15, 13, 2);      // 104 mul  x15 = x13 * 8
    prog[n++] = add(15, 15, 14);              // 108 x15 = -sum again
    prog[n++] = store(3'b010, 12, 0, 32'h210);// 112
    prog[n++] = store(3'b010, 13, 0, 32'h214);// 116
    prog[n++] = store(3'b010, 14, 0, 32'h218);// 120
    prog[n++] = store(3'b010, 15, 0, 32'h21c);// 124
    prog[n++] = wfi();                        // 128
    nprog = n;
  endtask

  task automatic host_write(input logic sel, input logic [31:0] addr, input logic [31:0] data);
    @(negedge clk);
    host_we = 1'b1; host_sel = sel; host_addr = addr; host_wdata = data;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic check_mem(input string what, input logic [31:0] addr, input logic [31:0] exp);
    @(negedge clk);
    host_addr = addr;
    #1;
    check(what, host_rdata, exp);
  endtask

  // ------------------------------------------------------ event counting
  int n_bypass = 0, n_redirect = 0, n_stall = 0, n_rst_rf = 0, n_rst_pc = 0, n_rst_lsu = 0;
  int n_end_restore = 0, n_load = 0, n_store = 0, n_md_stall = 0;
  int restore_len = 0, first_restore_len = -1;

  always @(posedge clk) if (rst_n) begin
    if (dut.id_valid_q && !dut.stall && !dut.flush && (dut.rs1_bypass || dut.rs2_bypass)) n_bypass++;
    if (dut.redirect) n_redirect++;
    if (dut.stall) n_stall++;
    if (dut.md_stall) n_md_stall++;
    if (dut.flush_fault && dut.restore_fault_rf)  n_rst_rf++;
    if (dut.flush_fault && dut.restore_fault_pc)  n_rst_pc++;
    if (dut.flush_fault && dut.restore_fault_lsu) n_rst_lsu++;
    if (dut.end_restore) n_end_restore++;
    if (dut.lsu_req && dut.lsu_gnt && !dut.lsu_we) n_load++;
    if (dut.lsu_req && dut.lsu_gnt &&  dut.lsu_we) n_store++;
    if (mode == MODE_RESTORE) restore_len++;
    if (dut.end_restore) begin
      if (first_restore_len < 0) first_restore_len = restore_len;
      restore_len = 0;
    end
  end

  // ------------------------------------------------------ fault injection
  int inj_wb = 0, inj_pc = 0, inj_lsu = 0, inj_sub = 0, inj_div = 0;
  int start = 0;

  initial begin
    wait (fetch_enable);
    start = cycle;
    // 1. write-back buffer of Thread 2, on an ALU result waiting for Thread 1
    do @(negedge clk);
    while (!(cycle > start + 30 && dut.wb_valid_q && dut.wb_harc_q == HARC_T2 &&
             dut.u_wb.buf_q[2].we && !dut.u_wb.buf_q[2].is_load && mode == MODE_NORMAL));
    dut.u_wb.buf_q[2].value[3] = ~dut.u_wb.buf_q[2].value[3];
    inj_wb++;
    // 2. Thread 2 program counter
    do @(negedge clk);
    while (!(mode == MODE_NORMAL && dut.u_pc.pc_q[2] == 32'd48 && !dut.stall));
    dut.u_pc.pc_q[2][3] = ~dut.u_pc.pc_q[2][3];
    inj_pc++;
    // 3. buffered store data of Thread 2 in the load-store unit, once the
    //    PC fault has been recovered
    wait (restore_count == 32'd2);
    do @(negedge clk);
    while (!(mode == MODE_NORMAL &&
             dut.u_lsu.state_q == 3'd1 && dut.u_lsu.buf_q[2].is_store));
    dut.u_lsu.buf_q[2].wdata[0] = ~dut.u_lsu.buf_q[2].wdata[0];
    inj_lsu++;
    // 4. Thread 2 result of the SUB before the first division, pending
    wait (restore_count == 32'd3);
    do @(negedge clk);
    while (!(mode == MODE_NORMAL && dut.wb_valid_q && dut.wb_harc_q == HARC_T2 &&
             dut.u_wb.buf_q[2].pc == 32'd92));
    dut.u_wb.buf_q[2].value[5] = ~dut.u_wb.buf_q[2].value[5];
    inj_sub++;
    // 5. quotient of Thread 2's first division, half-way through
    wait (restore_count == 32'd4);
    do @(negedge clk);
    while (!(mode == MODE_NORMAL && dut.u_md.state_q == 2'd1 && dut.u_md.count_q == 6'd16 &&
             dut.ie_harc_q == HARC_T2));
    dut.u_md.quo_q[0] = ~dut.u_md.quo_q[0];
    inj_div++;
  end

  // ---------------------------------------------------------- main test
  initial begin
    logic [31:0] sum;
    build_program();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 64; i++) host_write(1'b0, 32'(4 * i), (i < nprog) ? prog[i] : NOP_INSTR);
    sum = 0;
    for (int i = 0; i < 8; i++) begin
      a_vals[i] = $urandom() & 32'h00ff_ffff;
      sum += a_vals[i];
      host_write(1'b1, 32'h100 + 32'(4 * i), a_vals[i]);
    end
    host_write(1'b1, 32'h204, 32'h0);
    // upsets in the memories: one bit of the 'add' instruction, one of A[3]
    dut.u_imem.mem_q[5][20] = ~dut.u_imem.mem_q[5][20];
    dut.u_dmem.mem_q[(32'h100 >> 2) + 3][7] = ~dut.u_dmem.mem_q[(32'h100 >> 2) + 3][7];

    @(negedge clk);
    fetch_enable = 1'b1;
    wait (sleep);
    repeat (4) @(negedge clk);

    for (int i = 0; i < 8; i++)
      check_mem($sformatf("B[%0d]", i), 32'h140 + 32'(4 * i), a_vals[i] << 1);
    check_mem("sum", 32'h200, sum);
    check_mem("sb/sh word", 32'h204, 32'h5678_0078);
    check_mem("lbu+lh", 32'h208, 32'h0000_56f0);
    check_mem("jal link", 32'h20c, 32'd84);
    check_mem("-sum", 32'h210, -sum);
    check_mem("div", 32'h214, 32'(-$signed(sum) / 8));
    check_mem("rem", 32'h218, 32'(-$signed(sum) % 8));
    check_mem("mul+rem", 32'h21c, -sum);
    check("restores",   restore_count, 32'd5);
    check("upsets injected", 32'(inj_wb + inj_pc + inj_lsu + inj_sub + inj_div), 32'd5);
    check("restore cycles (ALU instruction)", 32'(first_restore_len), 32'd3);
    check("no double ECC error", {31'b0, ecc_double}, 32'd0);
    check("ECC corrections >= 2", {31'b0, ecc_count >= 2}, 32'd1);
    check("checkpoint PC after WFI", dut.u_pc.checkpoint_pc_o, 32'd132);

    // every mechanism must have happened
    check("bypass used",          {31'b0, n_bypass   > 0}, 1);
    check("branch redirect",      {31'b0, n_redirect > 0}, 1);
    check("load/store stall",     {31'b0, n_stall    > 0}, 1);
    // two divisions, two thread copies each, 33 stall cycles per copy, and
    // Thread 0's re-execution of the corrupted one
    check("divider stall cycles", 32'(n_md_stall), 32'd165);
    check("loads",                {31'b0, n_load     > 0}, 1);
    check("stores",               {31'b0, n_store    > 0}, 1);
    check("WB restore",           {31'b0, n_rst_rf   > 0}, 1);
    check("PC restore",           {31'b0, n_rst_pc   > 0}, 1);
    check("LSU restore",          {31'b0, n_rst_lsu  > 0}, 1);
    check("end of restore",       32'(n_end_restore), 5);
    check("sleep",                {31'b0, sleep}, 1);
    $display("events: bypass=%0d redirect=%0d stall=%0d div-stall=%0d loads=%0d stores=%0d restores rf/pc/lsu=%0d/%0d/%0d ecc=%0d cycles=%0d",
             n_bypass, n_redirect, n_stall, n_md_stall, n_load, n_store, n_rst_rf, n_rst_pc, n_rst_lsu,
             ecc_count, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
