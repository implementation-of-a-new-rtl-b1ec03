// wts_pkg: constants and the codeword table shared by the improved
// Write-Time-Speed-up (WTS) coding blocks.
//
// The (2^2)/4 code maps every 2-bit information word d_i onto one of four
// 4-bit codewords C_(4*j+i), j = 0..3. The sixteen codewords C_0..C_15 are
// every 4-bit pattern, ordered by Hamming weight, so a lower j is never a
// heavier codeword. The order inside one weight class is the one the improved
// table fixes; it is what makes this code differ from the plain WTS code.
//
// Bit convention (negative logic): a stored 1 is the amorphous (RESET) state,
// a stored 0 the crystalline (SET) state, and every cell starts at 0. A bit
// that goes 1 -> 0 therefore needs the slow SET pulse, a bit that goes 0 -> 1
// the fast RESET pulse, and an unchanged bit is not written at all
// (differential write). The per-bit energies and pulse latencies below are the
// cell figures of the evaluated PCM; the pulse latencies are expressed in
// cycles of an 800 MHz memory-controller clock (1.25 ns), the clock of the
// LPDDR3-1600 style PCM interface. The clock choice is this design's own.
package wts_pkg;

  localparam int unsigned K = 2;               // information-word bits
  localparam int unsigned N = 4;               // codeword bits
  localparam int unsigned NCW = 1 << N;        // codewords in the table
  localparam int unsigned NALT = 1 << (N - K); // codewords per information word

  typedef logic [K-1:0] info_t;
  typedef logic [N-1:0] cw_t;

  // Improved WTS table, indexed by codeword number C_0..C_15.
  // Information word of C_m is m mod 4; its rank among the alternatives is m div 4.
  localparam cw_t CW_TABLE [NCW] = '{
    4'b0000, 4'b0010, 4'b0100, 4'b0001,   // C0..C3   (j = 0)
    4'b1000, 4'b0011, 4'b1001, 4'b0110,   // C4..C7   (j = 1)
    4'b0101, 4'b1100, 4'b1010, 4'b0111,   // C8..C11  (j = 2)
    4'b1101, 4'b1110, 4'b1011, 4'b1111    // C12..C15 (j = 3)
  };

  // Codeword number j of information word d.
  function automatic cw_t codeword(input info_t d, input int unsigned j);
    return CW_TABLE[(j << K) + int'(d)];
  endfunction

  // Encoder look-up table, addressed by {d, c'}: one entry per information
  // word and stored codeword. Each entry holds the codeword to write, its
  // rank j and whether it still needs a SET. It is filled at elaboration by
  // the selection rule of the improved WTS code: the lowest-rank codeword of
  // d that turns no stored 1 into a 0, or rank 0 if every codeword does.
  typedef struct packed {
    logic       needs_set;
    logic [1:0] sel;
    cw_t        cw;
  } enc_entry_t;

  localparam int unsigned ENC_LUT_SIZE = 1 << (K + N);
  typedef logic [$bits(enc_entry_t)-1:0] enc_lut_t [ENC_LUT_SIZE];

  function automatic enc_lut_t build_enc_lut();
    enc_lut_t lut;
    for (int unsigned a = 0; a < ENC_LUT_SIZE; a++) begin
      info_t      d;
      cw_t        prev;
      bit         found;
      enc_entry_t e;
      d     = info_t'(a >> N);
      prev  = cw_t'(a);
      found = 1'b0;
      e     = '{needs_set: 1'b1, sel: 2'd0, cw: codeword(d, 0)};
      for (int unsigned j = 0; j < NALT; j++)
        if (!found && (prev & ~codeword(d, j)) == '0) begin
          e     = '{needs_set: 1'b0, sel: 2'(j), cw: codeword(d, j)};
          found = 1'b1;
        end
      lut[a] = e;
    end
    return lut;
  endfunction

  localparam enc_lut_t ENC_LUT = build_enc_lut();

  // Energy per programmed bit, in units of 0.1 pJ.
  localparam int unsigned E_SET_DPJ   = 225;   // 22.5 pJ per SET bit
  localparam int unsigned E_RESET_DPJ = 297;   // 29.7 pJ per RESET bit

  // Operation latencies in controller cycles (1.25 ns each).
  localparam int unsigned T_SET_CYC   = 120;   // 150 ns SET pulse
  localparam int unsigned T_RESET_CYC = 40;    // 50 ns RESET pulse
  localparam int unsigned T_READ_CYC  = 100;   // 125 ns SLC line read

  // Host command of the line controller.
  typedef enum logic {
    CMD_READ  = 1'b0,
    CMD_WRITE = 1'b1
  } cmd_e;

endpackage
