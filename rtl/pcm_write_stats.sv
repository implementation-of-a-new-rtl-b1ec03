// pcm_write_stats: counters for the PCM write figures the WTS code is judged by.
//
// Each line write reports, in one cycle with stat_valid, how many bits it
// SETs and RESETs. The block accumulates the number of line writes, of writes
// that needed no SET pulse at all (the fast ones), of SET bits, of RESET bits,
// and the write energy, using the per-bit cell energies of the evaluated PCM
// (22.5 pJ per SET bit, 29.7 pJ per RESET bit) in units of 0.1 pJ. The
// counter widths and the synchronous clear are this design's own choices.
//
// Timing: counters update on the clock edge after stat_valid; clear wins over
// a same-cycle update. Reset is asynchronous, active low.
module pcm_write_stats
  import wts_pkg::*;
#(
  parameter int unsigned CNT_W = 16,        // width of the per-write bit counts
  parameter int unsigned ACC_W = 48         // width of the accumulators
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             stat_valid,
  input  logic [CNT_W-1:0] set_bits,
  input  logic [CNT_W-1:0] reset_bits,
  output logic [ACC_W-1:0] n_writes,
  output logic [ACC_W-1:0] n_setfree_writes,
  output logic [ACC_W-1:0] n_set_bits,
  output logic [ACC_W-1:0] n_reset_bits,
  output logic [ACC_W-1:0] energy_dpj
);

  logic [ACC_W-1:0] e_write;

  always_comb
    e_write = ACC_W'(set_bits) * ACC_W'(E_SET_DPJ)
            + ACC_W'(reset_bits) * ACC_W'(E_RESET_DPJ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_writes         <= '0;
      n_setfree_writes <= '0;
      n_set_bits       <= '0;
      n_reset_bits     <= '0;
      energy_dpj       <= '0;
    end else if (clear) begin
      n_writes         <= '0;
      n_setfree_writes <= '0;
      n_set_bits       <= '0;
      n_reset_bits     <= '0;
      energy_dpj       <= '0;
    end else if (stat_valid) begin
      n_writes         <= n_writes + 1'b1;
      n_setfree_writes <= n_setfree_writes + ACC_W'(set_bits == '0);
      n_set_bits       <= n_set_bits + ACC_W'(set_bits);
      n_reset_bits     <= n_reset_bits + ACC_W'(reset_bits);
      energy_dpj       <= energy_dpj + e_write;
    end
  end

endmodule
