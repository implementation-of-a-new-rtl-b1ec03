// tb_wts_transactions: symbol-level workload of 1000 random writes to one
// 4-cell group, the size of the transaction study the coding scheme was
// evaluated with. Every step is checked against the reference encoder and
// decoded back. The SET bits of each transaction d_a -> d_b are tallied for
// the improved code and, from the reference model, for the plain WTS code;
// the improved code must need fewer SET bits in total, and transaction
// 11 -> 00 must be the one with most SETs.
module tb_wts_transactions;
  import tb_wts_ref_pkg::*;

  localparam int NWRITES = 1000;

  logic [1:0] d, dd;
  logic [3:0] prev_cw, cw;
  logic [1:0] sel;
  logic       needs_set;
  int checks = 0, failures = 0;
  int tally_impr [4][4];
  int tally_plain [4][4];

  wts_encoder u_enc (.d(d), .prev_cw(prev_cw), .cw(cw), .sel(sel), .needs_set(needs_set));
  wts_decoder u_dec (.cw(cw), .d(dd));

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
    logic [3:0] plain_cw, nxt_plain;
    logic [1:0] dprev;
    int tot_i, tot_p, mx, mxa, mxb;
    foreach (tally_impr[a, b]) begin
      tally_impr[a][b] = 0;
      tally_plain[a][b] = 0;
    end
    prev_cw = 4'b0000; plain_cw = 4'b0000; dprev = 2'b00;
    for (int t = 0; t < NWRITES; t++) begin
      d = 2'($urandom);
      #1;
      check(cw == ref_encode(d, prev_cw), $sformatf("write %0d encoding", t));
      check(dd == d, $sformatf("write %0d decodes back", t));
      tally_impr[dprev][d] += set_bits4(prev_cw, cw);
      nxt_plain = ref_encode(d, plain_cw, 1'b1);
      tally_plain[dprev][d] += set_bits4(plain_cw, nxt_plain);
      plain_cw = nxt_plain;
      prev_cw = cw;
      dprev = d;
    end
    tot_i = 0; tot_p = 0; mx = -1; mxa = 0; mxb = 0;
    $display("SET bits per transaction (improved / plain WTS):");
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        $display("  %b -> %b : %4d / %4d", 2'(a), 2'(b), tally_impr[a][b], tally_plain[a][b]);
        tot_i += tally_impr[a][b];
        tot_p += tally_plain[a][b];
        if (tally_impr[a][b] > mx) begin mx = tally_impr[a][b]; mxa = a; mxb = b; end
      end
    $display("total SET bits: improved %0d, plain WTS %0d", tot_i, tot_p);
    check(tot_i < tot_p, "improved code needs fewer SET bits");
    check(mxa == 3 && mxb == 0, "transaction 11 -> 00 has most SET bits");
    check(tally_impr[0][0] == 0 && tally_impr[1][1] == 0 && tally_impr[2][2] == 0
          && tally_impr[3][3] == 0, "repeating a word never needs a SET");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
