// dtmr_ecc_dec: single-error-correcting, double-error-detecting decoder for
// the (39,32) Hamming code of dtmr_pkg.
//
// The published core places an "ECC" block on every value read from the
// program memory and from the data memory; it does not say which code is
// used. This design uses an extended Hamming code: the 6-bit syndrome gives
// the position (1..38) of a flipped bit, and the overall parity bit (bit 0)
// separates single errors (corrected) from double errors (flagged).
//
// Purely combinational: cw_i -> data_o, single_err_o, double_err_o in the
// same cycle.
module dtmr_ecc_dec
  import dtmr_pkg::*;
(
  input  logic [ECC_W-1:0] cw_i,
  output logic [31:0]      data_o,
  output logic             single_err_o,  // one bit flipped, corrected
  output logic             double_err_o   // two bits flipped, not correctable
);

  logic [5:0]       syndrome;
  logic             overall;
  logic [ECC_W-1:0] fixed;

  always_comb begin
    syndrome = '0;
    for (int unsigned i = 0; i < 6; i++) begin
      logic s;
      s = 1'b0;
      for (int unsigned p = 1; p < ECC_W; p++)
        if (((p >> i) & 1) == 1) s ^= cw_i[p];
      syndrome[i] = s;
    end
    overall = ^cw_i;

    fixed        = cw_i;
    single_err_o = 1'b0;
    double_err_o = 1'b0;
    if (overall) begin
      // odd number of flips: assume one, at position 'syndrome' (0 = bit 0)
      single_err_o = 1'b1;
      if (int'(syndrome) < ECC_W) fixed[syndrome] = ~cw_i[syndrome];
    end else if (syndrome != '0) begin
      double_err_o = 1'b1;
    end
    data_o = ecc_data(fixed);
  end

endmodule
