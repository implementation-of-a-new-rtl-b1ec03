// tb_pcm_diff_write: random stored/new line pairs, checked bit by bit: a
// 1 -> 0 bit must be in the SET mask only, a 0 -> 1 bit in the RESET mask
// only, an unchanged bit in neither; counts and flags must match.
module tb_pcm_diff_write;
  localparam int W = 1024;

  logic [W-1:0] old_cw, new_cw, set_mask, reset_mask;
  logic [$clog2(W+1)-1:0] set_cnt, reset_cnt;
  logic has_set, has_reset;
  int checks = 0, failures = 0;

  pcm_diff_write dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int ns, nr, bad;
      for (int w = 0; w < W / 32; w++) begin
        old_cw[w*32 +: 32] = $urandom;
        new_cw[w*32 +: 32] = $urandom;
      end
      if (t == 1) new_cw = old_cw;                 // unchanged line
      if (t == 2) begin old_cw = '0; new_cw = '0; new_cw[7] = 1'b1; end  // one RESET only
      if (t == 3) begin old_cw = '0; old_cw[900] = 1'b1; new_cw = '0; end  // one SET only
      #1;
      ns = 0; nr = 0; bad = 0;
      for (int b = 0; b < W; b++) begin
        bit s, r;
        s = old_cw[b] && !new_cw[b];
        r = !old_cw[b] && new_cw[b];
        ns += int'(s); nr += int'(r);
        if (set_mask[b] != s || reset_mask[b] != r) bad++;
      end
      check(bad == 0, $sformatf("masks, vector %0d, %0d bad bits", t, bad));
      check(int'(set_cnt) == ns && int'(reset_cnt) == nr,
            $sformatf("counts, vector %0d: %0d/%0d expected %0d/%0d", t, set_cnt, reset_cnt, ns, nr));
      check(has_set == (ns != 0) && has_reset == (nr != 0), $sformatf("flags, vector %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
