// tb_wts_line_decoder: builds random 512-bit lines, encodes each symbol with
// a random alternative of the reference table and checks that the line
// decoder returns the original data.
module tb_wts_line_decoder;
  import tb_wts_ref_pkg::*;

  localparam int DB = 512;

  logic [2*DB-1:0] cw;
  logic [DB-1:0]   data, exp;
  int checks = 0, failures = 0;

  wts_line_decoder dut (.cw(cw), .data(data));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int s = 0; s < DB / 2; s++) begin
        exp[2*s +: 2] = 2'($urandom);
        cw[4*s +: 4]  = ALT[exp[2*s +: 2]][$urandom % 4];
      end
      #1;
      checks++;
      if (data != exp) begin
        failures++;
        $display("FAIL line %0d decoded wrongly", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
