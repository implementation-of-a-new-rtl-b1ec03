// wts_line_decoder: recovers a memory line from its improved-WTS codewords.
//
// The codeword line holds DATA_BITS/2 four-bit codewords; codeword bits
// [4s+3:4s] decode through their own wts_decoder to data bits [2s+1:2s].
// Purely combinational.
//   cw    codeword line read from the cells
//   data  decoded line
module wts_line_decoder
  import wts_pkg::*;
#(
  parameter int unsigned DATA_BITS = 512
) (
  input  logic [DATA_BITS*N/K-1:0] cw,
  output logic [DATA_BITS-1:0]     data
);

  localparam int unsigned NSYM = DATA_BITS / K;

  for (genvar s = 0; s < NSYM; s++) begin : g_sym
    wts_decoder u_dec (
      .cw (cw[s*N +: N]),
      .d  (data[s*K +: K])
    );
  end

endmodule
