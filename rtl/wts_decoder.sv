// wts_decoder: one-symbol decoder of the improved (2^2)/4 WTS code.
//
// Every 4-bit pattern is a codeword C_m of exactly one information word,
// d = m mod 4, so decoding is a 16-entry look-up that needs no knowledge of
// which alternative was written. The table is the improved WTS table; the
// inverse look-up is built here by comparing the stored word against all
// sixteen table entries, which synthesises to the same 16 x 2 ROM.
//
// Purely combinational.
//   cw  codeword read from four cells
//   d   information word it carries
module wts_decoder
  import wts_pkg::*;
(
  input  cw_t   cw,
  output info_t d
);

  always_comb begin
    d = '0;
    for (int unsigned m = 0; m < NCW; m++)
      if (CW_TABLE[m] == cw) d = info_t'(m % (1 << K));
  end

endmodule
