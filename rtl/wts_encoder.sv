// wts_encoder: one-symbol encoder of the improved (2^2)/4 WTS code.
//
// Given the 2-bit information word d and the 4-bit codeword c' now held by
// the four cells, it picks which of d's four codewords to write. The
// candidates are tried from the lightest (rank j = 0) to the heaviest
// (j = 3); the first one that turns no stored 1 into a 0, i.e. that needs no
// SET pulse, is taken. If every candidate needs a SET, the lightest one is
// taken. Rule and codeword table are those of the improved WTS scheme.
//
// As in the scheme's encoder, the choice is a table look-up addressed by the
// information word and the stored codeword: a 64-entry table (wts_pkg::
// ENC_LUT) filled at elaboration from the selection rule. The table's entry
// layout is this design's own.
//
// Purely combinational; the result is valid in the same cycle as its inputs.
//   d          information word to store
//   prev_cw    codeword currently in the cells (c')
//   cw         codeword to write
//   sel        rank j of the chosen codeword C_(4j+d)
//   needs_set  1 when the chosen codeword still needs a SET pulse
module wts_encoder
  import wts_pkg::*;
(
  input  info_t      d,
  input  cw_t        prev_cw,
  output cw_t        cw,
  output logic [1:0] sel,
  output logic       needs_set
);

  enc_entry_t entry;

  always_comb begin
    entry     = enc_entry_t'(ENC_LUT[{d, prev_cw}]);
    cw        = entry.cw;
    sel       = entry.sel;
    needs_set = entry.needs_set;
  end

endmodule
