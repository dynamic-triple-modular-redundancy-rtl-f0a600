// tb_dtmr_dmem: random word, half-word and byte stores and loads through the
// request/grant/response-valid port against a byte-level model; checks the
// grant in the request cycle, the response one cycle later, the host port
// read-back and that every stored word is a valid codeword.
module tb_dtmr_dmem;
  import dtmr_pkg::*;

  logic clk = 0, rst_n = 0, req = 0, we = 0, hwe = 0;
  logic [3:0] be = 0;
  logic [31:0] addr = 0, wdata = 0, haddr = 0, hdata = 0, hrdata;
  logic gnt, rvalid;
  logic [ECC_W-1:0] rdata;
  logic [31:0] model [64];
  int checks = 0, failures = 0;

  dtmr_dmem #(.WORDS(64)) dut (
    .clk_i(clk), .rst_ni(rst_n), .data_req_i(req), .data_gnt_o(gnt), .data_rvalid_o(rvalid),
    .data_we_i(we), .data_be_i(be), .data_addr_i(addr), .data_wdata_i(wdata), .data_rdata_o(rdata),
    .host_we_i(hwe), .host_addr_i(haddr), .host_wdata_i(hdata), .host_rdata_o(hrdata));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      model[i] = $urandom();
      @(negedge clk); hwe = 1; haddr = 32'(4 * i); hdata = model[i];
    end
    @(negedge clk); hwe = 0;
    for (int n = 0; n < 300; n++) begin
      int i;
      i = $urandom_range(0, 63);
      req = 1; addr = 32'(4 * i); we = $urandom_range(0, 1); wdata = $urandom();
      be = 4'($urandom_range(1, 15));
      #1 check("grant with request", gnt, 1);
      @(negedge clk);
      req = 0;
      check("response valid", rvalid, 1);
      check("read data (old word)", ecc_data(rdata), model[i]);
      if (we) for (int b = 0; b < 4; b++) if (be[b]) model[i][8*b +: 8] = wdata[8*b +: 8];
      haddr = 32'(4 * i); #1;
      check("host read-back", hrdata, model[i]);
      check("stored codeword", {7'b0, dut.mem_q[i]} == {7'b0, ecc_encode(model[i])}, 1);
      @(negedge clk);
      check("response one cycle only", rvalid, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
