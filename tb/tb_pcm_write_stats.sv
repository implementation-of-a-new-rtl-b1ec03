// tb_pcm_write_stats: feeds random per-write SET/RESET counts, some of them
// zero, with gaps and a clear in the middle, and compares every counter and
// the energy (22.5 pJ per SET bit, 29.7 pJ per RESET bit, in 0.1 pJ) with a
// running model after each cycle.
module tb_pcm_write_stats;
  localparam int CNT_W = 11, ACC_W = 48;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, stat_valid = 1'b0;
  logic [CNT_W-1:0] set_bits = '0, reset_bits = '0;
  logic [ACC_W-1:0] n_writes, n_setfree_writes, n_set_bits, n_reset_bits, energy_dpj;
  longint m_w, m_f, m_s, m_r, m_e;
  int checks = 0, failures = 0;

  pcm_write_stats #(.CNT_W(CNT_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_w = 0; m_f = 0; m_s = 0; m_r = 0; m_e = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      stat_valid = ($urandom % 4) != 0;
      clear      = (t == 500);
      set_bits   = ($urandom % 3 == 0) ? '0 : CNT_W'($urandom % 1025);
      reset_bits = CNT_W'($urandom % 1025);
      @(posedge clk);
      #1;
      if (clear) begin
        m_w = 0; m_f = 0; m_s = 0; m_r = 0; m_e = 0;
      end else if (stat_valid) begin
        m_w++;
        if (set_bits == 0) m_f++;
        m_s += set_bits;
        m_r += reset_bits;
        m_e += 225 * longint'(set_bits) + 297 * longint'(reset_bits);
      end
      checks++;
      if (n_writes != ACC_W'(m_w) || n_setfree_writes != ACC_W'(m_f) || n_set_bits != ACC_W'(m_s)
          || n_reset_bits != ACC_W'(m_r) || energy_dpj != ACC_W'(m_e)) begin
        failures++;
        $display("FAIL t=%0d: got %0d %0d %0d %0d %0d expected %0d %0d %0d %0d %0d", t,
                 n_writes, n_setfree_writes, n_set_bits, n_reset_bits, energy_dpj,
                 m_w, m_f, m_s, m_r, m_e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
