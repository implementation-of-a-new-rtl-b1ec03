// wts_line_encoder: encodes a whole memory line with the improved WTS code.
//
// A line of DATA_BITS information bits is cut into DATA_BITS/2 symbols of two
// bits; symbol s occupies data bits [2s+1:2s] and codeword bits [4s+3:4s].
// Each symbol has its own wts_encoder, fed with the codeword its four cells
// hold now, so the line's codeword is chosen symbol by symbol and the line
// needs twice as many cells as data bits. The default line is the 64-byte
// line of the evaluated memory system; the symbol layout is this design's own.
//
// Purely combinational.
//   data       new line contents
//   prev_cw    codeword line now stored (read before the write)
//   cw         codeword line to write
//   set_syms   number of symbols whose chosen codeword still needs a SET
module wts_line_encoder
  import wts_pkg::*;
#(
  parameter int unsigned DATA_BITS = 512
) (
  input  logic [DATA_BITS-1:0]           data,
  input  logic [DATA_BITS*N/K-1:0]       prev_cw,
  output logic [DATA_BITS*N/K-1:0]       cw,
  output logic [$clog2(DATA_BITS/K+1)-1:0] set_syms
);

  localparam int unsigned NSYM = DATA_BITS / K;

  logic [NSYM-1:0] sym_set;

  for (genvar s = 0; s < NSYM; s++) begin : g_sym
    logic [1:0] sel_unused;
    wts_encoder u_enc (
      .d         (data[s*K +: K]),
      .prev_cw   (prev_cw[s*N +: N]),
      .cw        (cw[s*N +: N]),
      .sel       (sel_unused),
      .needs_set (sym_set[s])
    );
  end

  assign set_syms = $bits(set_syms)'($countones(sym_set));

  initial assert (DATA_BITS % K == 0)
    else $error("DATA_BITS must be a multiple of %0d", K);

endmodule
