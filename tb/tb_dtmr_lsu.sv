// tb_dtmr_lsu: checks the dynamic-TMR load-store unit against a small memory
// model (grant after a random 0-2 cycle wait, response one cycle after the
// grant).
//  * Thread 2 then Thread 1 copy of a store: one memory write only, with the
//    right address, data and byte enables; Thread 2's copy does not stall,
//    Thread 1's stays in EXEC for 4 cycles when the grant is immediate.
//  * Loads of every width: LS_WB holds the aligned, sign/zero-extended value.
//  * Copies that differ: restore_fault_lsu pulses and no access is made; the
//    Thread 0 copy then gets the 2-of-3 vote performed.
//  * flush_i drops a buffered Thread 2 copy.
module tb_dtmr_lsu;
  import dtmr_pkg::*;

  logic clk = 0, rst_n = 0;
  logic ls_valid = 0, is_load = 0, is_store = 0, flush = 0;
  harc_t harc = HARC_T2;
  logic [2:0] f3 = 0;
  logic [31:0] imm = 0, rs1 = 0, rs2 = 0;
  logic stall, fault, load_valid, store_valid, ls_wb_en;
  logic [31:0] ls_wb;
  logic req, gnt, rvalid, we;
  logic [3:0] be;
  logic [31:0] addr, wdata, rdata;
  int checks = 0, failures = 0;

  dtmr_lsu dut (
    .clk_i(clk), .rst_ni(rst_n), .ls_valid_i(ls_valid), .harc_i(harc), .is_load_i(is_load),
    .is_store_i(is_store), .funct3_i(f3), .imm_i(imm), .rs1_i(rs1), .rs2_i(rs2), .flush_i(flush),
    .stall_o(stall), .restore_fault_lsu_o(fault), .load_valid_o(load_valid),
    .store_valid_o(store_valid), .ls_wb_o(ls_wb), .ls_wb_en_o(ls_wb_en),
    .data_req_o(req), .data_gnt_i(gnt), .data_rvalid_i(rvalid), .data_we_o(we),
    .data_be_o(be), .data_addr_o(addr), .data_wdata_o(wdata), .data_rdata_i(rdata));

  always #5 clk = ~clk;

  // ------------------------------------------------------ memory model
  logic [31:0] mem [64];
  int          n_access = 0, n_fault = 0;
  int          gnt_wait = 0;
  logic        grant_now;
  assign grant_now = req && (gnt_wait == 0);
  assign gnt = grant_now;
  always @(posedge clk) begin
    rvalid <= 1'b0;
    if (req && !grant_now) gnt_wait <= gnt_wait - 1;
    if (grant_now) begin
      n_access++;
      rvalid  <= 1'b1;
      rdata   <= mem[addr[7:2]];
      if (we) for (int b = 0; b < 4; b++) if (be[b]) mem[addr[7:2]][8*b +: 8] <= wdata[8*b +: 8];
      gnt_wait <= $urandom_range(0, 2);
    end
    if (fault) n_fault++;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // present one copy in EXEC until the unit lets it go; returns EXEC cycles
  task automatic issue(input harc_t h, input logic ld, input logic [2:0] fn3,
                       input logic [31:0] base, input logic [31:0] off, input logic [31:0] data,
                       output int cycles);
    logic s;
    @(negedge clk);
    ls_valid = 1; harc = h; is_load = ld; is_store = !ld; f3 = fn3; rs1 = base; imm = off; rs2 = data;
    cycles = 0;
    forever begin
      #1 s = stall && !fault;  // a detected mismatch flushes the copy from EXEC
      @(posedge clk);
      cycles++;
      if (!s) break;
    end
    @(negedge clk);
    ls_valid = 0;
  endtask

  int cyc, acc0;

  initial begin
    for (int i = 0; i < 64; i++) mem[i] = 32'h1111_1111 * (i % 15);
    repeat (2) @(negedge clk);
    rst_n = 1;
    gnt_wait = 0;
    // --- store word, agreeing copies
    acc0 = n_access;
    issue(HARC_T2, 0, 3'b010, 32'h40, 32'h8, 32'hCAFE_F00D, cyc);
    check("T2 store does not stall", cyc, 1);
    #1 check("store_valid after T2 copy", store_valid, 1);
    check("no access before T1 copy", n_access, acc0);
    issue(HARC_T1, 0, 3'b010, 32'h40, 32'h8, 32'hCAFE_F00D, cyc);
    check("T1 store cycles in EXEC", cyc, 4);
    check("one access per store", n_access, acc0 + 1);
    check("stored word", mem[32'h48 >> 2], 32'hCAFE_F00D);
    // --- byte and half stores, random grant delays from now on
    issue(HARC_T2, 0, 3'b000, 32'h40, 32'h9, 32'h0000_0055, cyc);
    issue(HARC_T1, 0, 3'b000, 32'h40, 32'h9, 32'h0000_0055, cyc);
    check("sb", mem[32'h48 >> 2], 32'hCAFE_550D);
    issue(HARC_T2, 0, 3'b001, 32'h40, 32'hA, 32'h0000_8123, cyc);
    issue(HARC_T1, 0, 3'b001, 32'h40, 32'hA, 32'h0000_8123, cyc);
    check("sh", mem[32'h48 >> 2], 32'h8123_550D);
    // --- loads of each width
    issue(HARC_T2, 1, 3'b010, 32'h48, 0, 0, cyc);
    #1 check("load_valid after T2 copy", load_valid, 1);
    issue(HARC_T1, 1, 3'b010, 32'h48, 0, 0, cyc);
    check("lw", ls_wb, 32'h8123_550D);
    issue(HARC_T2, 1, 3'b000, 32'h48, 3, 0, cyc);
    issue(HARC_T1, 1, 3'b000, 32'h48, 3, 0, cyc);
    check("lb sign", ls_wb, 32'hFFFF_FF81);
    issue(HARC_T2, 1, 3'b100, 32'h48, 3, 0, cyc);
    issue(HARC_T1, 1, 3'b100, 32'h48, 3, 0, cyc);
    check("lbu", ls_wb, 32'h0000_0081);
    issue(HARC_T2, 1, 3'b001, 32'h48, 2, 0, cyc);
    issue(HARC_T1, 1, 3'b001, 32'h48, 2, 0, cyc);
    check("lh", ls_wb, 32'hFFFF_8123);
    issue(HARC_T2, 1, 3'b101, 32'h48, 0, 0, cyc);
    issue(HARC_T1, 1, 3'b101, 32'h48, 0, 0, cyc);
    check("lhu", ls_wb, 32'h0000_550D);
    // --- mismatch: Thread 1 copy has a corrupted address
    acc0 = n_access;
    issue(HARC_T2, 0, 3'b010, 32'h40, 32'h10, 32'h1234_5678, cyc);
    issue(HARC_T1, 0, 3'b010, 32'h40, 32'h14, 32'h1234_5678, cyc);
    check("fault raised", n_fault, 1);
    check("no access on mismatch", n_access, acc0);
    check("T1 copy released after 2 cycles", cyc, 2);
    // Thread 0 copy: vote of T2, T1 and T0 -> address 0x50
    issue(HARC_T0, 0, 3'b010, 32'h40, 32'h10, 32'h1234_5678, cyc);
    check("voted access made", n_access, acc0 + 1);
    check("voted store", mem[32'h50 >> 2], 32'h1234_5678);
    check("corrupted address untouched", mem[32'h54 >> 2], 32'h1111_1111 * 6);
    // --- flush drops a buffered Thread 2 copy: a lone Thread 1 load follows
    issue(HARC_T2, 0, 3'b010, 32'h40, 32'h0, 32'hDEAD_BEEF, cyc);
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    #1 check("flush returns to idle", store_valid, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
