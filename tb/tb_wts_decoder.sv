// tb_wts_decoder: checks the one-symbol decoder on all sixteen codewords
// against the reference table, arranged by information word.
module tb_wts_decoder;
  import tb_wts_ref_pkg::*;

  logic [3:0] cw;
  logic [1:0] d;
  int checks = 0, failures = 0;

  wts_decoder dut (.cw(cw), .d(d));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        cw = ALT[i][j];
        #1;
        checks++;
        if (d != 2'(i)) begin
          failures++;
          $display("FAIL cw=%b decoded %b expected %0d", cw, d, i);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
