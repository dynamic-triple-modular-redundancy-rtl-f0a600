// tb_dtmr_ecc_dec: checks the SEC-DED decoder. Random 32-bit words are
// encoded, then presented unchanged, with every single bit flipped (must be
// corrected and flagged single) and with random pairs of bits flipped (must
// be flagged double). Expected data is the original word.
module tb_dtmr_ecc_dec;
  import dtmr_pkg::*;

  logic [ECC_W-1:0] cw;
  logic [31:0]      data;
  logic             single_err, double_err;
  int checks = 0, failures = 0;

  dtmr_ecc_dec dut (.cw_i(cw), .data_o(data), .single_err_o(single_err), .double_err_o(double_err));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 200; n++) begin
      logic [31:0] d;
      logic [ECC_W-1:0] c;
      int a, b;
      d = (n == 0) ? 32'h0 : (n == 1) ? 32'hffff_ffff : $urandom();
      c = ecc_encode(d);
      cw = c; #1;
      check("clean data", data, d);
      check("clean flags", {30'b0, single_err, double_err}, 0);
      for (int i = 0; i < ECC_W; i++) begin
        cw = c ^ (39'd1 << i); #1;
        check("single data", data, d);
        check("single flags", {30'b0, single_err, double_err}, 32'b10);
      end
      a = $urandom_range(0, ECC_W - 1);
      b = (a + 1 + $urandom_range(0, ECC_W - 2)) % ECC_W;
      cw = c ^ (39'd1 << a) ^ (39'd1 << b); #1;
      check("double flags", {30'b0, single_err, double_err}, 32'b01);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
