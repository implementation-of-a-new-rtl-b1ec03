// pcm_diff_write: differential-write mask generator for a PCM line.
//
// It compares the codeword line now stored with the one to be written and
// splits the bits into three groups: bits that go 1 -> 0 and need a SET
// pulse, bits that go 0 -> 1 and need a RESET pulse, and unchanged bits,
// which are not written at all. It also counts the bits of each kind, which
// both sets the length of the write (a line with any SET bit needs the long
// SET pulse) and feeds the write statistics. The SET/RESET polarity follows
// the negative-logic convention of the WTS code; skipping unchanged bits is
// the differential write of the evaluated memory system.
//
// Purely combinational.
//   old_cw, new_cw   stored and new codeword lines
//   set_mask         bits to SET (drive to 0)
//   reset_mask       bits to RESET (drive to 1)
//   set_cnt, reset_cnt  population counts of the two masks
//   has_set, has_reset  masks non-empty
module pcm_diff_write #(
  parameter int unsigned W = 1024
) (
  input  logic [W-1:0]           old_cw,
  input  logic [W-1:0]           new_cw,
  output logic [W-1:0]           set_mask,
  output logic [W-1:0]           reset_mask,
  output logic [$clog2(W+1)-1:0] set_cnt,
  output logic [$clog2(W+1)-1:0] reset_cnt,
  output logic                   has_set,
  output logic                   has_reset
);

  always_comb begin
    set_mask   = old_cw & ~new_cw;
    reset_mask = ~old_cw & new_cw;
    set_cnt    = $bits(set_cnt)'($countones(set_mask));
    reset_cnt  = $bits(reset_cnt)'($countones(reset_mask));
    has_set    = |set_mask;
    has_reset  = |reset_mask;
  end

endmodule
