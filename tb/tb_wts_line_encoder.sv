// tb_wts_line_encoder: random lines through the line encoder at the full
// 512-bit line width. Each 4-bit group of the output is compared with the
// reference encoding of its symbol against its own stored group, and the
// count of symbols that still need a SET is compared with the reference.
module tb_wts_line_encoder;
  import tb_wts_ref_pkg::*;

  localparam int DB = 512;
  localparam int CB = 2 * DB;

  logic [DB-1:0] data;
  logic [CB-1:0] prev_cw, cw;
  logic [$clog2(DB/2+1)-1:0] set_syms;
  int checks = 0, failures = 0;

  wts_line_encoder dut (.data(data), .prev_cw(prev_cw), .cw(cw), .set_syms(set_syms));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev_cw = '0;
    for (int t = 0; t < 200; t++) begin
      int exp_sets, bad;
      for (int w = 0; w < DB / 32; w++) data[w*32 +: 32] = $urandom;
      if (t % 3 == 0)       // sometimes a random stored line, not only a reachable one
        for (int w = 0; w < CB / 32; w++) prev_cw[w*32 +: 32] = $urandom;
      #1;
      exp_sets = 0; bad = 0;
      for (int s = 0; s < DB / 2; s++) begin
        logic [3:0] e;
        e = ref_encode(data[2*s +: 2], prev_cw[4*s +: 4]);
        if (cw[4*s +: 4] != e) bad++;
        if (set_bits4(prev_cw[4*s +: 4], e) != 0) exp_sets++;
      end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL line %0d: %0d symbols encoded wrongly", t, bad);
      end
      checks++;
      if (int'(set_syms) != exp_sets) begin
        failures++;
        $display("FAIL line %0d: set_syms %0d expected %0d", t, set_syms, exp_sets);
      end
      prev_cw = cw;         // next write goes over this one
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
