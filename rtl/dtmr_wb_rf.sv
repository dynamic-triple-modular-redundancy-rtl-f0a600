// dtmr_wb_rf: write-back buffers, fault detection, majority voting, bypass
// and the three per-thread register files.
//
// Every instruction leaving EXEC is stored in the write-back buffer of its
// thread (WB_RD_buf(2), (1), (0)) together with its PC, next PC and
// destination. Nothing is written to a register file when the Thread 2 copy
// arrives. When the Thread 1 copy is in write-back, the two buffers are
// compared: if they agree (and the PC unit saw no PC mismatch) the result is
// written to all three register files, so that the auxiliary Thread 0 always
// sees the committed state; if they disagree, restore_fault_rf_o starts a
// restore and both buffers are kept. In End-of-Restore the Thread 0 copy has
// been added as a third buffer and the bitwise majority of the three (the
// voted entry) is captured in the WB_buf_voted register in the first
// End-of-Restore cycle and written to the register files in the second
// (WB_EN_buf). Loads carry no value in their buffers: the value
// written is the single LS_WB register of the load-store unit.
//
// Because a result reaches the register file only after both copies exist,
// an instruction in DECODE can need a value still held in its own thread's
// buffer; the bypass logic then forwards it (rs1_bypass_o / rs2_bypass_o).
//
// Buffers, comparison, vote, the three register files and the bypass follow
// the published unit, as do the WB_buf_voted register and its write enable.
// Writing all three register files on every commit and the "pending" flag
// per buffer are this design's choices.
//
// Timing: register reads and bypass are combinational; buffer writes and
// register-file writes happen at the rising edge. A commit is written at the
// edge that ends the compare cycle; a voted result one edge after the
// end_restore_i cycle (voted_o itself is combinational).
// A voted load takes its value from LS_WB, which holds it until then. Asynchronous active-low
// reset clears buffers and registers.
module dtmr_wb_rf
  import dtmr_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  // DECODE-stage read
  input  harc_t       id_harc_i,
  input  logic [4:0]  rs1_i,
  input  logic [4:0]  rs2_i,
  output logic [31:0] rs1_data_o,
  output logic [31:0] rs2_data_o,
  output logic        rs1_bypass_o,
  output logic        rs2_bypass_o,
  // buffer write from EXEC
  input  logic        buf_we_i,
  input  harc_t       buf_harc_i,
  input  wb_entry_t   buf_entry_i,
  // write-back stage
  input  logic        wb_cmp_i,       // Thread 1 copy in write-back
  input  logic        commit_i,       // no fault anywhere: write the agreed result
  input  logic        end_restore_i,  // write the voted result
  input  logic [31:0] ls_wb_i,        // LS_WB: load result
  output logic        restore_fault_rf_o,
  output wb_entry_t   buf_t2_o,
  output wb_entry_t   buf_t1_o,
  output wb_entry_t   buf_t0_o,
  output wb_entry_t   voted_o
);

  logic [31:0] rf_q [NTHREADS][32];
  wb_entry_t   buf_q [NTHREADS];
  logic        pending_q [NTHREADS];

  assign buf_t2_o = buf_q[2];
  assign buf_t1_o = buf_q[1];
  assign buf_t0_o = buf_q[0];
  assign voted_o  = wb_entry_t'((buf_q[2] & buf_q[1]) | (buf_q[2] & buf_q[0]) |
                                (buf_q[1] & buf_q[0]));

  // ------------------------------------------------- fault control block
  // compare everything except the PCs, which the PC unit compares
  assign restore_fault_rf_o = wb_cmp_i &&
      ((buf_q[2].we      != buf_q[1].we)    || (buf_q[2].rd     != buf_q[1].rd) ||
       (buf_q[2].value   != buf_q[1].value) || (buf_q[2].is_load != buf_q[1].is_load) ||
       (buf_q[2].is_wfi  != buf_q[1].is_wfi));

  // ------------------------------------------------------ bypass logic
  function automatic logic bypass_hit(input wb_entry_t e, input logic pend, input logic [4:0] rs);
    return pend && e.we && (e.rd == rs) && (rs != 5'd0);
  endfunction

  always_comb begin
    wb_entry_t e;
    logic [31:0] fwd;
    e            = buf_q[id_harc_i];
    fwd          = e.is_load ? ls_wb_i : e.value;
    rs1_bypass_o = bypass_hit(e, pending_q[id_harc_i], rs1_i);
    rs2_bypass_o = bypass_hit(e, pending_q[id_harc_i], rs2_i);
    rs1_data_o   = rs1_bypass_o ? fwd : rf_q[id_harc_i][rs1_i];
    rs2_data_o   = rs2_bypass_o ? fwd : rf_q[id_harc_i][rs2_i];
  end

  // ------------------------------------------- write-back buffer control
  wb_entry_t wr_entry;
  logic      wr_en;
  wb_entry_t voted_q;     // WB_buf_voted
  logic      voted_we_q;  // WB_EN_buf

  always_comb begin
    wr_en    = 1'b0;
    wr_entry = buf_q[1];
    if (commit_i) begin
      wr_en    = buf_q[1].we;
      wr_entry = buf_q[1];
    end else if (voted_we_q) begin
      wr_en    = 1'b1;
      wr_entry = voted_q;
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      voted_q    <= '0;
      voted_we_q <= 1'b0;
      for (int t = 0; t < NTHREADS; t++) begin
        buf_q[t]     <= '0;
        pending_q[t] <= 1'b0;
        for (int r = 0; r < 32; r++) rf_q[t][r] <= '0;
      end
    end else begin
      if (commit_i) begin
        pending_q[2] <= 1'b0;
        pending_q[1] <= 1'b0;
      end
      voted_we_q <= end_restore_i && voted_o.we;
      if (end_restore_i) begin
        voted_q <= voted_o;
        for (int t = 0; t < NTHREADS; t++) pending_q[t] <= 1'b0;
      end
      if (buf_we_i) begin
        buf_q[buf_harc_i]     <= buf_entry_i;
        pending_q[buf_harc_i] <= 1'b1;
      end
      if (wr_en && wr_entry.rd != 5'd0) begin
        for (int t = 0; t < NTHREADS; t++)
          rf_q[t][wr_entry.rd] <= wr_entry.is_load ? ls_wb_i : wr_entry.value;
      end
    end
  end

endmodule
