// tb_dtmr_workloads: three benchmark kernels on the dynamic-TMR core under a
// steady stream of single-event upsets.
//
// Kernels (each loaded through the host port after a reset, run until WFI,
// and checked against a result computed here):
//   CRC32  reflected CRC-32 (polynomial 0xEDB88320, initial value and final
//          XOR 0xFFFFFFFF) of NBYTES random bytes, bit by bit, with byte
//          loads, shifts, XORs and two nested loops;
//   FIR    NOUT outputs of a TAPS-tap FIR filter on random 8-bit samples and
//          coefficients; the products come from a shift-and-add subroutine
//          called with JAL and left with JALR (exercises calls and returns);
//   CONV2  3x3 convolution of a W x W image of random 8-bit pixels with
//          random signed coefficients (-4..4); every output is the sum of
//          products (MUL) divided by a random signed divisor (DIV).
// The core runs at its default sizes; the whole program memory is written
// (program, then NOPs) so that a fetch from a corrupted PC never reads an
// uninitialised word.
//
// At most every 30 to 40 cycles, while the core is in Normal mode and no
// earlier upset is still outstanding, one bit of one randomly chosen state element is flipped
// between clock edges:
//   - the Thread 2 or Thread 1 write-back buffer holding an uncommitted copy,
//   - the program counter of Thread 2 or Thread 1,
//   - the buffered Thread 2 request in the load-store unit,
//   - the partial remainder or quotient of a running division (CONV2 only),
//   - a register of the Thread 2 or Thread 1 register file (each register
//     number at most once per kernel). A flipped register stays flipped
//     until it is overwritten, and is caught and outvoted on every read; no
//     other upset is injected meanwhile, and if the program has not
//     overwritten it after 300 cycles the testbench repairs it.
//   - a program-memory or data-memory word (each word at most once, so that
//     no word ever holds two flipped bits).
// LS_WB is left alone: it is not replicated.
// Each kernel passes if its results equal the values computed here; overall,
// no uncorrectable ECC error may be seen, upsets of every kind must have
// been injected and led to restores and ECC corrections, no Restore mode may
// last more than 8 cycles and every End-of-Restore must last 2, the bounds
// given for the published design. A Restore in which Thread 0 re-executes a
// division is allowed the divider's 33 extra cycles (this design's divider;
// the published bound does not cover it here). The 30-40 cycle
// spacing follows the published fault-injection campaign; the kernels' code
// and data sizes are this testbench's own.
module tb_dtmr_workloads;
  import dtmr_pkg::*;
  import rv_asm_pkg::*;

  localparam int NBYTES = 48;  // CRC32 input bytes
  localparam int TAPS   = 8;   // FIR taps
  localparam int NOUT   = 12;  // FIR outputs
  localparam int W      = 8;   // CONV2 image width and height
  localparam int WO     = W - 2;  // CONV2 output width and height

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
  function automatic logic [31:0] andi(input logic [4:0] rd, rs1, input int imm);
    return i_type(imm, rs1, 3'b111, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] srli(input logic [4:0] rd, rs1, input int sh);
    return i_type(sh, rs1, 3'b101, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] xori(input logic [4:0] rd, rs1, input int imm);
    return i_type(imm, rs1, 3'b100, rd, 7'b0010011);
  endfunction

  logic [31:0] prog [40];
  int          nprog;

  task automatic build_crc32();
    int n;
    n = 0;
    prog[n++] = addi(1, 0, 32'h100);           //  0 x1 = &data
    prog[n++] = addi(2, 0, NBYTES);            //  4 x2 = bytes left
    prog[n++] = addi(3, 0, -1);                //  8 x3 = crc
    prog[n++] = lui(6, 20'hEDB88);             // 12
    prog[n++] = addi(6, 6, 32'h320);           // 16 x6 = polynomial
    prog[n++] = load(3'b100, 4, 1, 0);         // 20 byte: lbu x4,0(x1)
    prog[n++] = xor_(3, 3, 4);                 // 24
    prog[n++] = addi(5, 0, 8);                 // 28 x5 = bits left
    prog[n++] = andi(7, 3, 1);                 // 32 bit:
    prog[n++] = srli(3, 3, 1);                 // 36
    prog[n++] = branch(3'b000, 7, 0, 8);       // 40 beq x7,x0,skip
    prog[n++] = xor_(3, 3, 6);                 // 44
    prog[n++] = addi(5, 5, -1);                // 48 skip:
    prog[n++] = branch(3'b001, 5, 0, -20);     // 52 bne x5,x0,bit
    prog[n++] = addi(1, 1, 1);                 // 56
    prog[n++] = addi(2, 2, -1);                // 60
    prog[n++] = branch(3'b001, 2, 0, -44);     // 64 bne x2,x0,byte
    prog[n++] = xori(3, 3, -1);                // 68
    prog[n++] = store(3'b010, 3, 0, 32'h200);  // 72
    prog[n++] = wfi();                         // 76
    nprog = n;
  endtask

  // x[] at 0x100, h[] at 0x180, y[] at 0x200, one 32-bit word each
  task automatic build_fir();
    int n;
    n = 0;
    prog[n++] = addi(20, 0, 32'h100);          //  0 x20 = &x[n]
    prog[n++] = addi(21, 0, 32'h180);          //  4 x21 = &h
    prog[n++] = addi(22, 0, 32'h200);          //  8 x22 = &y[n]
    prog[n++] = addi(23, 0, NOUT);             // 12 outputs left
    prog[n++] = addi(24, 0, 0);                // 16 outer: acc = 0
    prog[n++] = addi(25, 0, 0);                // 20 k*4
    prog[n++] = addi(26, 0, TAPS * 4);         // 24
    prog[n++] = add(27, 20, 25);               // 28 inner:
    prog[n++] = load(3'b010, 10, 27, 0);       // 32 x10 = x[n+k]
    prog[n++] = add(27, 21, 25);               // 36
    prog[n++] = load(3'b010, 11, 27, 0);       // 40 x11 = h[k]
    prog[n++] = jal(1, 40);                    // 44 call mul (84)
    prog[n++] = add(24, 24, 12);               // 48 acc += x12
    prog[n++] = addi(25, 25, 4);               // 52
    prog[n++] = branch(3'b001, 25, 26, -28);   // 56 bne -> inner
    prog[n++] = store(3'b010, 24, 22, 0);      // 60 y[n] = acc
    prog[n++] = addi(22, 22, 4);               // 64
    prog[n++] = addi(20, 20, 4);               // 68
    prog[n++] = addi(23, 23, -1);              // 72
    prog[n++] = branch(3'b001, 23, 0, -60);    // 76 bne -> outer
    prog[n++] = wfi();                         // 80
    prog[n++] = addi(12, 0, 0);                // 84 mul: x12 = x10 * x11
    prog[n++] = andi(13, 11, 1);               // 88 mloop:
    prog[n++] = branch(3'b000, 13, 0, 8);      // 92 beq -> 100
    prog[n++] = add(12, 12, 10);               // 96
    prog[n++] = slli(10, 10, 1);               // 100
    prog[n++] = srli(11, 11, 1);               // 104
    prog[n++] = branch(3'b001, 11, 0, -20);    // 108 bne -> mloop
    prog[n++] = jalr(0, 1, 0);                 // 112 return
    nprog = n;
  endtask

  // image at 0x100 (row stride W words), coefficients at 0x200, divisor at
  // 0x240, outputs at 0x300
  task automatic build_conv2();
    int n;
    n = 0;
    prog[n++] = addi(20, 0, 32'h100);          //  0 x20 = &img[r][0]
    prog[n++] = addi(22, 0, 32'h300);          //  4 x22 = &out
    prog[n++] = addi(23, 0, WO);               //  8 rows left
    prog[n++] = addi(24, 0, WO);               // 12 row: columns left
    prog[n++] = addi(21, 20, 0);               // 16 x21 = window corner
    prog[n++] = addi(5, 0, 0);                 // 20 col: acc = 0
    prog[n++] = addi(6, 0, 32'h200);           // 24 x6 = &coef
    prog[n++] = addi(7, 21, 0);                // 28 x7 = window row
    prog[n++] = addi(8, 0, 3);                 // 32
    prog[n++] = addi(9, 0, 3);                 // 36 ky:
    prog[n++] = addi(10, 7, 0);                // 40
    prog[n++] = load(3'b010, 11, 10, 0);       // 44 kx: pixel
    prog[n++] = load(3'b010, 12, 6, 0);        // 48 coefficient
    prog[n++] = muldiv(3'd0, 13, 11, 12);      // 52 mul
    prog[n++] = add(5, 5, 13);                 // 56
    prog[n++] = addi(10, 10, 4);               // 60
    prog[n++] = addi(6, 6, 4);                 // 64
    prog[n++] = addi(9, 9, -1);                // 68
    prog[n++] = branch(3'b001, 9, 0, -28);     // 72 bne -> kx
    prog[n++] = addi(7, 7, W * 4);             // 76 next image row
    prog[n++] = addi(8, 8, -1);                // 80
    prog[n++] = branch(3'b001, 8, 0, -48);     // 84 bne -> ky
    prog[n++] = load(3'b010, 14, 0, 32'h240);  // 88 divisor
    prog[n++] = muldiv(3'd4, 15, 5, 14);       // 92 div
    prog[n++] = store(3'b010, 15, 22, 0);      // 96
    prog[n++] = addi(22, 22, 4);               // 100
    prog[n++] = addi(21, 21, 4);               // 104
    prog[n++] = addi(24, 24, -1);              // 108
    prog[n++] = branch(3'b001, 24, 0, -92);    // 112 bne -> col
    prog[n++] = addi(20, 20, W * 4);           // 116
    prog[n++] = addi(23, 23, -1);              // 120
    prog[n++] = branch(3'b001, 23, 0, -112);   // 124 bne -> row
    prog[n++] = wfi();                         // 128
    nprog = n;
  endtask

  task automatic host_write(input logic sel, input logic [31:0] addr, input logic [31:0] data);
    @(negedge clk);
    host_we = 1'b1; host_sel = sel; host_addr = addr; host_wdata = data;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  // ------------------------------------------------------ fault injection
  int n_inj_wb = 0, n_inj_pc = 0, n_inj_lsu = 0, n_inj_imem = 0, n_inj_dmem = 0, n_inj_div = 0, n_inj_rf = 0;
  bit rf_hit [32];
  int rf_flip_cycle = 0;
  bit has_div = 0;  // the running kernel divides
  bit imem_hit [64];
  bit dmem_hit [1024];
  int dmem_lo, dmem_n;  // data words of the running kernel that may be hit
  bit running = 0;

  task automatic inject_one();
    int kind, b, w;
    kind = int'($urandom_range(0, 6));
    if (kind == 5 && !has_div) kind = 6;
    unique case (kind)
      0: begin  // write-back buffer of an uncommitted copy
        if (dut.u_wb.pending_q[2]) begin
          b = int'($urandom_range(0, $bits(wb_entry_t) - 1));
          dut.u_wb.buf_q[2][b] = ~dut.u_wb.buf_q[2][b];
          n_inj_wb++;
        end else if (dut.wb_valid_q && dut.wb_harc_q == HARC_T1) begin
          b = int'($urandom_range(0, $bits(wb_entry_t) - 1));
          dut.u_wb.buf_q[1][b] = ~dut.u_wb.buf_q[1][b];
          n_inj_wb++;
        end
      end
      1: begin  // program counter of a redundant thread
        b = int'($urandom_range(0, 31));
        if ($urandom_range(0, 1) == 0) dut.u_pc.pc_q[2][b] = ~dut.u_pc.pc_q[2][b];
        else                           dut.u_pc.pc_q[1][b] = ~dut.u_pc.pc_q[1][b];
        n_inj_pc++;
      end
      2: begin  // buffered Thread 2 request waiting for its Thread 1 copy
        // that state lasts one cycle: wait for the next one
        while (running && !(dut.u_lsu.state_q == 3'd1 && mode == MODE_NORMAL && !dut.fault_any))
          @(negedge clk);
        if (running) begin
          b = int'($urandom_range(0, $bits(ls_req_t) - 1));
          dut.u_lsu.buf_q[2][b] = ~dut.u_lsu.buf_q[2][b];
          n_inj_lsu++;
        end
      end
      3: begin  // program memory word
        w = int'($urandom_range(0, nprog - 1));
        if (!imem_hit[w]) begin
          imem_hit[w] = 1'b1;
          b = int'($urandom_range(0, ECC_W - 1));
          dut.u_imem.mem_q[w][b] = ~dut.u_imem.mem_q[w][b];
          n_inj_imem++;
        end
      end
      5: begin  // running division, Thread 2 or Thread 1 copy
        while (running && !(dut.u_md.state_q == 2'd1 && mode == MODE_NORMAL && !dut.fault_any))
          @(negedge clk);
        if (running) begin
          b = int'($urandom_range(0, 31));
          if ($urandom_range(0, 1) == 0) dut.u_md.quo_q[b] = ~dut.u_md.quo_q[b];
          else                           dut.u_md.rem_q[b] = ~dut.u_md.rem_q[b];
          n_inj_div++;
        end
      end
      6: begin  // register of a redundant thread
        w = int'($urandom_range(1, 31));
        if (!rf_hit[w]) begin
          rf_hit[w] = 1'b1;
          b = int'($urandom_range(0, 31));
          if ($urandom_range(0, 1) == 0) dut.u_wb.rf_q[2][w][b] = ~dut.u_wb.rf_q[2][w][b];
          else                           dut.u_wb.rf_q[1][w][b] = ~dut.u_wb.rf_q[1][w][b];
          rf_flip_cycle = cycle;
          n_inj_rf++;
        end
      end
      default: begin  // data memory word of the kernel's input
        w = dmem_lo + int'($urandom_range(0, dmem_n - 1));
        if (!dmem_hit[w]) begin
          dmem_hit[w] = 1'b1;
          b = int'($urandom_range(0, ECC_W - 1));
          dut.u_dmem.mem_q[w][b] = ~dut.u_dmem.mem_q[w][b];
          n_inj_dmem++;
        end
      end
    endcase
  endtask

  // the three register files hold the same values (no flipped register)
  function automatic bit rf_agree();
    for (int r = 1; r < 32; r++)
      if (dut.u_wb.rf_q[2][r] != dut.u_wb.rf_q[0][r] || dut.u_wb.rf_q[1][r] != dut.u_wb.rf_q[0][r])
        return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    int gap;
    forever begin
      wait (running);
      gap = int'($urandom_range(30, 40));
      repeat (gap) @(negedge clk);
      // one fault at a time: only while nothing is being detected or restored,
      // and with the divider idle, since a corrupted Thread 2 division is
      // only compared after the Thread 1 copy has run too
      while (!(mode == MODE_NORMAL && !dut.fault_any && !dut.stall && !sleep &&
               dut.u_md.state_q == 2'd0 && rf_agree()) && running) begin
        // a flipped register the program has not overwritten within 300
        // cycles is repaired here, so that the next upset is again a single
        // fault
        if (!rf_agree() && cycle - rf_flip_cycle > 300 && mode == MODE_NORMAL && !dut.fault_any)
          for (int r = 1; r < 32; r++) begin
            dut.u_wb.rf_q[2][r] = dut.u_wb.rf_q[0][r];
            dut.u_wb.rf_q[1][r] = dut.u_wb.rf_q[0][r];
          end
        @(negedge clk);
      end
      if (!running) continue;
      inject_one();
    end
  end

  // ------------------------------------------------ restore durations
  // published bounds: Restore mode never longer than 8 cycles,
  // End-of-Restore mode 2 cycles. A Restore in which Thread 0 re-executes a
  // division is longer by the divider's 33 stall cycles; it is bounded
  // separately.
  int len_restore = 0, len_end = 0, max_restore = 0, max_restore_div = 0, bad_end = 0, n_end = 0;
  bit restore_div = 0;
  always @(posedge clk) if (rst_n) begin
    if (mode == MODE_RESTORE) begin
      len_restore++;
      if (dut.md_stall) restore_div = 1'b1;
    end else if (len_restore > 0) begin
      if (restore_div) begin
        if (len_restore > max_restore_div) max_restore_div = len_restore;
      end else if (len_restore > max_restore) max_restore = len_restore;
      len_restore = 0;
      restore_div = 1'b0;
    end
    if (mode == MODE_END_RESTORE) len_end++;
    else if (len_end > 0) begin
      n_end++;
      if (len_end != 2) bad_end++;
      len_end = 0;
    end
  end

  // ---------------------------------------------------------- kernels
  int total_restores = 0, total_ecc = 0;

  // reset the core, load the program (rest of the memory: NOPs), start it
  task automatic start_kernel();
    rst_n        = 1'b0;
    fetch_enable = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1024; i++) host_write(1'b0, 32'(4 * i), (i < nprog) ? prog[i] : NOP_INSTR);
    for (int i = 0; i < 64; i++) imem_hit[i] = 1'b0;
    for (int i = 0; i < 1024; i++) dmem_hit[i] = 1'b0;
    for (int i = 0; i < 32; i++) rf_hit[i] = 1'b0;
  endtask

  task automatic run_kernel(input string name);
    int start;
    @(negedge clk);
    start        = cycle;
    fetch_enable = 1'b1;
    running      = 1'b1;
    wait (sleep);
    running = 1'b0;
    repeat (4) @(negedge clk);
    total_restores += int'(restore_count);
    total_ecc      += int'(ecc_count);
    check({name, ": no uncorrectable ECC error"}, {31'b0, ecc_double}, 32'd0);
    check({name, ": back in Normal mode"}, {30'b0, mode}, {30'b0, MODE_NORMAL});
    $display("%s: %0d cycles, %0d restores, %0d ECC corrections", name, cycle - start,
             restore_count, ecc_count);
  endtask

  task automatic read_check(input string what, input logic [31:0] addr, input logic [31:0] exp);
    @(negedge clk);
    host_addr = addr;
    #1;
    check(what, host_rdata, exp);
  endtask

  initial begin
    logic [7:0]  data [NBYTES];
    logic [31:0] crc, word;
    logic [31:0] xs [NOUT + TAPS - 1];
    logic [31:0] hs [TAPS];
    logic [31:0] y;
    logic [31:0] img [W * W];
    logic [31:0] cf [9];
    logic [31:0] dv;
    logic signed [31:0] acc;

    // ---------------- CRC32
    build_crc32();
    start_kernel();
    crc = 32'hffff_ffff;
    for (int i = 0; i < NBYTES; i++) begin
      data[i] = 8'($urandom());
      crc ^= {24'b0, data[i]};
      for (int k = 0; k < 8; k++) crc = crc[0] ? ((crc >> 1) ^ 32'hEDB8_8320) : (crc >> 1);
    end
    crc = ~crc;
    for (int i = 0; i < NBYTES / 4; i++) begin
      word = {data[4*i+3], data[4*i+2], data[4*i+1], data[4*i]};
      host_write(1'b1, 32'h100 + 32'(4 * i), word);
    end
    host_write(1'b1, 32'h200, 32'h0);
    dmem_lo = 32'h100 >> 2;
    dmem_n  = NBYTES / 4;
    run_kernel("CRC32");
    read_check("CRC32 result", 32'h200, crc);

    // ---------------- FIR
    build_fir();
    start_kernel();
    for (int i = 0; i < NOUT + TAPS - 1; i++) begin
      xs[i] = 32'($urandom_range(0, 255));
      host_write(1'b1, 32'h100 + 32'(4 * i), xs[i]);
    end
    for (int k = 0; k < TAPS; k++) begin
      hs[k] = 32'($urandom_range(0, 255));
      host_write(1'b1, 32'h180 + 32'(4 * k), hs[k]);
    end
    dmem_lo = 32'h100 >> 2;
    dmem_n  = (32'h180 >> 2) + TAPS - dmem_lo;  // samples, gap and coefficients
    run_kernel("FIR");
    for (int n = 0; n < NOUT; n++) begin
      y = 0;
      for (int k = 0; k < TAPS; k++) y += xs[n + k] * hs[k];
      read_check($sformatf("FIR y[%0d]", n), 32'h200 + 32'(4 * n), y);
    end

    // ---------------- CONV2
    build_conv2();
    start_kernel();
    for (int i = 0; i < W * W; i++) begin
      img[i] = 32'($urandom_range(0, 255));
      host_write(1'b1, 32'h100 + 32'(4 * i), img[i]);
    end
    for (int k = 0; k < 9; k++) begin
      cf[k] = 32'($signed(int'($urandom_range(0, 8)) - 4));
      host_write(1'b1, 32'h200 + 32'(4 * k), cf[k]);
    end
    dv = 32'($urandom_range(1, 16));
    if ($urandom_range(0, 1) == 1) dv = -dv;
    host_write(1'b1, 32'h240, dv);
    dmem_lo = 32'h100 >> 2;
    dmem_n  = (32'h240 >> 2) + 1 - dmem_lo;  // image, coefficients, divisor
    has_div = 1'b1;
    run_kernel("CONV2");
    has_div = 1'b0;
    for (int r = 0; r < WO; r++)
      for (int c = 0; c < WO; c++) begin
        acc = 0;
        for (int ky = 0; ky < 3; ky++)
          for (int kx = 0; kx < 3; kx++)
            acc += $signed(img[(r + ky) * W + c + kx]) * $signed(cf[ky * 3 + kx]);
        read_check($sformatf("CONV2 out[%0d][%0d]", r, c), 32'h300 + 32'(4 * (r * WO + c)),
                   32'(acc / $signed(dv)));
      end

    // ---------------- every kind of upset was injected and handled
    check("write-back upsets injected", {31'b0, n_inj_wb  > 0}, 1);
    check("PC upsets injected",         {31'b0, n_inj_pc  > 0}, 1);
    check("load-store upsets injected", {31'b0, n_inj_lsu > 0}, 1);
    check("divider upsets injected",    {31'b0, n_inj_div > 0}, 1);
    check("register-file upsets injected", {31'b0, n_inj_rf > 0}, 1);
    check("memory upsets injected",     {31'b0, (n_inj_imem + n_inj_dmem) > 0}, 1);
    check("restores happened",          {31'b0, total_restores > 0}, 1);
    check("ECC corrections happened",   {31'b0, total_ecc > 0}, 1);
    check("Restore mode at most 8 cycles", {31'b0, max_restore <= 8}, 1);
    check("Restore of a division at most 8 + 33 cycles", {31'b0, max_restore_div <= 8 + 33}, 1);
    check("a division was restored",    {31'b0, max_restore_div > 0}, 1);
    check("every End-of-Restore 2 cycles", 32'(bad_end), 0);
    check("End-of-Restore seen for every restore", 32'(n_end), 32'(total_restores));
    $display("upsets injected: wb=%0d pc=%0d lsu=%0d div=%0d rf=%0d imem=%0d dmem=%0d; restores=%0d, longest Restore mode %0d cycles",
             n_inj_wb, n_inj_pc, n_inj_lsu, n_inj_div, n_inj_rf, n_inj_imem, n_inj_dmem, total_restores, max_restore);
    $display("longest Restore mode with a division: %0d cycles", max_restore_div);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
