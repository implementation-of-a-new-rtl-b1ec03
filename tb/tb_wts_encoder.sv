// tb_wts_encoder: exhaustive check of the one-symbol WTS encoder.
// All 64 (information word, stored codeword) pairs are compared with the
// reference model, and the worked example 00 -> 01 -> 11 -> 10 from an
// erased cell group is checked against its known codewords 0000, 0010,
// 0110, 0100 with a SET needed only in the last step.
module tb_wts_encoder;
  import tb_wts_ref_pkg::*;

  logic [1:0] d;
  logic [3:0] prev_cw, cw;
  logic [1:0] sel;
  logic       needs_set;
  int checks = 0, failures = 0;

  wts_encoder dut (.d(d), .prev_cw(prev_cw), .cw(cw), .sel(sel), .needs_set(needs_set));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: d=%b prev=%b cw=%b sel=%0d needs_set=%b", what, d, prev_cw, cw, sel, needs_set);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp_cw;
    for (int p = 0; p < 16; p++)
      for (int i = 0; i < 4; i++) begin
        d = 2'(i); prev_cw = 4'(p);
        #1;
        exp_cw = ref_encode(d, prev_cw);
        check(cw == exp_cw, "codeword");
        check(ALT[d][sel] == cw, "rank");
        check(needs_set == (set_bits4(prev_cw, exp_cw) != 0), "needs_set");
        check(ref_decode(cw) == d, "decodes back");
      end
    // worked example
    prev_cw = 4'b0000;
    d = 2'b00; #1; check(cw == 4'b0000 && !needs_set, "example d0"); prev_cw = cw;
    d = 2'b01; #1; check(cw == 4'b0010 && !needs_set, "example d1"); prev_cw = cw;
    d = 2'b11; #1; check(cw == 4'b0110 && !needs_set && sel == 2'd1, "example d3"); prev_cw = cw;
    d = 2'b10; #1; check(cw == 4'b0100 && needs_set && sel == 2'd0, "example d2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
