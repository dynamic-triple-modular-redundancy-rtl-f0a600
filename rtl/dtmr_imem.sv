// dtmr_imem: program memory holding ECC codewords.
//
// A single-port synchronous memory of WORDS 39-bit words. Each word is a
// (39,32) SEC-DED codeword of dtmr_pkg, so that the core's ECC decoder can
// correct a single upset in a stored instruction. The fetch port reads the
// word at addr_i[...:2] when req_i is high and presents it on rdata_o in the
// next cycle; when req_i is low rdata_o keeps its value. A separate host
// port writes 32-bit words (encoded here) to load a program while the core
// is held idle; a host write and a fetch in the same cycle are both served.
// The published design shows a program memory with ECC but gives neither
// its size nor its interface: both are this design's choices.
module dtmr_imem
  import dtmr_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic             clk_i,
  input  logic             req_i,
  input  logic [31:0]      addr_i,
  output logic [ECC_W-1:0] rdata_o,
  input  logic             host_we_i,
  input  logic [31:0]      host_addr_i,
  input  logic [31:0]      host_wdata_i
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [ECC_W-1:0] mem_q [WORDS];

  always_ff @(posedge clk_i) begin
    if (host_we_i) mem_q[host_addr_i[AW+1:2]] <= ecc_encode(host_wdata_i);
    if (req_i)     rdata_o <= mem_q[addr_i[AW+1:2]];
  end

endmodule
