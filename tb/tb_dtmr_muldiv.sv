// tb_dtmr_muldiv: checks the RV32M multiply/divide unit against results
// computed here with SystemVerilog arithmetic.
//  * MUL, MULH, MULHSU, MULHU: random and corner-case operands; the result
//    must be valid in the same cycle with no stall.
//  * DIV, DIVU, REM, REMU: random and corner-case operands (division by zero,
//    -2^31 / -1, negative operands); the stall must last exactly 33 cycles and
//    the result must be valid in the cycle after.
//  * A flush during a division abandons it: stall is low in the next cycle
//    and the following division takes the full 33 cycles again.
module tb_dtmr_muldiv;
  import dtmr_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start = 1'b0, flush = 1'b0;
  logic [2:0]  f3 = '0;
  logic [31:0] a = '0, b = '0;
  logic        stall;
  logic [31:0] result;
  int checks = 0, failures = 0;

  dtmr_muldiv dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .funct3_i(f3), .a_i(a), .b_i(b),
    .flush_i(flush), .stall_o(stall), .result_o(result)
  );

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] model(input logic [2:0] op, input logic [31:0] x, input logic [31:0] y);
    logic signed [63:0] ss;
    logic [63:0]        uu;
    logic signed [64:0] su;
    unique case (op)
      3'd0: return x * y;
      3'd1: begin ss = $signed({{32{x[31]}}, x}) * $signed({{32{y[31]}}, y}); return ss[63:32]; end
      3'd2: begin su = $signed({{33{x[31]}}, x}) * $signed({33'b0, y}); return su[63:32]; end
      3'd3: begin uu = {32'b0, x} * {32'b0, y}; return uu[63:32]; end
      3'd4: return (y == 0) ? 32'hffff_ffff :
                   (x == 32'h8000_0000 && y == 32'hffff_ffff) ? 32'h8000_0000 :
                   32'($signed(x) / $signed(y));
      3'd5: return (y == 0) ? 32'hffff_ffff : x / y;
      3'd6: return (y == 0) ? x :
                   (x == 32'h8000_0000 && y == 32'hffff_ffff) ? 32'h0 :
                   32'($signed(x) % $signed(y));
      default: return (y == 0) ? x : x % y;
    endcase
  endfunction

  task automatic run(input logic [2:0] op, input logic [31:0] x, input logic [31:0] y);
    int n;
    @(negedge clk);
    f3 = op; a = x; b = y; start = 1'b1;
    #1;
    n = 0;
    while (stall) begin
      @(negedge clk);
      #1;
      n++;
      if (n > 100) break;
    end
    check($sformatf("op%0d %h,%h", op, x, y), result, model(op, x, y));
    check($sformatf("op%0d stall cycles", op), 32'(n), op[2] ? 32'd33 : 32'd0);
    @(negedge clk);  // the instruction has left EXEC
    start = 1'b0;
  endtask

  logic [31:0] corner [6];

  initial begin
    corner = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'd7};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 8; op++) begin
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++) run(3'(op), corner[i], corner[j]);
      for (int k = 0; k < 40; k++) run(3'(op), $urandom(), (k % 4 == 0) ? $urandom_range(1, 300) : $urandom());
    end
    // flush abandons a division
    @(negedge clk);
    f3 = 3'd4; a = 32'd100; b = 32'd7; start = 1'b1;
    repeat (5) @(negedge clk);
    flush = 1'b1; start = 1'b0;
    @(negedge clk);
    flush = 1'b0;
    #1;
    check("idle after flush", {31'b0, stall}, 0);
    run(3'd5, 32'd100, 32'd7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
