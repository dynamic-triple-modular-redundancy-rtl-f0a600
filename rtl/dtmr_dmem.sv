// dtmr_dmem: data memory holding ECC codewords.
//
// WORDS 39-bit words, each a (39,32) SEC-DED codeword of dtmr_pkg. The core
// side uses a request/grant/response-valid handshake: a request is granted in
// the cycle it is made, and data_rvalid_o follows one cycle later for loads
// and stores alike, with the stored codeword on data_rdata_o (the core
// decodes it). A store with partial byte enables merges the new bytes into
// the stored data bits and re-encodes the word. A host port writes whole
// words and reads back the stored data bits (uncorrected) so that memory can
// be initialised and inspected. Size and interface are this design's
// choices; the published design only shows a data memory behind an ECC
// block.
module dtmr_dmem
  import dtmr_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             data_req_i,
  output logic             data_gnt_o,
  output logic             data_rvalid_o,
  input  logic             data_we_i,
  input  logic [3:0]       data_be_i,
  input  logic [31:0]      data_addr_i,
  input  logic [31:0]      data_wdata_i,
  output logic [ECC_W-1:0] data_rdata_o,
  input  logic             host_we_i,
  input  logic [31:0]      host_addr_i,
  input  logic [31:0]      host_wdata_i,
  output logic [31:0]      host_rdata_o
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [ECC_W-1:0] mem_q [WORDS];
  logic [31:0]      old_d, merged;
  logic [AW-1:0]    widx;

  assign data_gnt_o   = data_req_i;
  assign widx         = data_addr_i[AW+1:2];
  assign old_d        = ecc_data(mem_q[widx]);
  assign host_rdata_o = ecc_data(mem_q[host_addr_i[AW+1:2]]);

  always_comb begin
    for (int b = 0; b < 4; b++)
      merged[8*b +: 8] = data_be_i[b] ? data_wdata_i[8*b +: 8] : old_d[8*b +: 8];
  end

  always_ff @(posedge clk_i) begin
    if (host_we_i) mem_q[host_addr_i[AW+1:2]] <= ecc_encode(host_wdata_i);
    if (data_req_i) begin
      if (data_we_i) mem_q[widx] <= ecc_encode(merged);
      data_rdata_o <= mem_q[widx];
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) data_rvalid_o <= 1'b0;
    else         data_rvalid_o <= data_req_i;
  end

endmodule
