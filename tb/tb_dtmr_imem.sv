// tb_dtmr_imem: writes random words through the host port and fetches them
// back; the fetched codeword must decode (with the package's data
// extraction and an independent parity check) to the written word, arrive
// one cycle after the request and hold while no request is made.
module tb_dtmr_imem;
  import dtmr_pkg::*;

  logic clk = 0, req = 0, hwe = 0;
  logic [31:0] addr = 0, haddr = 0, hdata = 0;
  logic [ECC_W-1:0] rdata;
  logic [31:0] model [64];
  int checks = 0, failures = 0;

  dtmr_imem #(.WORDS(64)) dut (.clk_i(clk), .req_i(req), .addr_i(addr), .rdata_o(rdata),
                               .host_we_i(hwe), .host_addr_i(haddr), .host_wdata_i(hdata));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) begin
      model[i] = $urandom();
      @(negedge clk); hwe = 1; haddr = 32'(4 * i); hdata = model[i];
    end
    @(negedge clk); hwe = 0;
    for (int n = 0; n < 100; n++) begin
      int i;
      i = $urandom_range(0, 63);
      req = 1; addr = 32'(4 * i);
      @(negedge clk);
      req = 0; addr = 32'(4 * ((i + 1) % 64));
      check("fetched data", ecc_data(rdata), model[i]);
      check("codeword parity", {31'b0, ^rdata}, 0);
      @(negedge clk);
      check("held without request", ecc_data(rdata), model[i]);
    end
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
