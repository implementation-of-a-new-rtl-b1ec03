// tb_wts_ref_pkg: reference model of the improved (2^2)/4 WTS code for the
// testbenches. It is written from the code table arranged by information
// word (one row per d, alternatives lightest first), independently of the
// RTL package's codeword-number ordering.
package tb_wts_ref_pkg;

  // ALT[d][j]: j-th codeword of information word d.
  localparam logic [3:0] ALT [4][4] = '{
    '{4'b0000, 4'b1000, 4'b0101, 4'b1101},   // d = 00
    '{4'b0010, 4'b0011, 4'b1100, 4'b1110},   // d = 01
    '{4'b0100, 4'b1001, 4'b1010, 4'b1011},   // d = 10
    '{4'b0001, 4'b0110, 4'b0111, 4'b1111}    // d = 11
  };

  // Plain WTS code of the earlier scheme (codeword C_m carries m mod 4),
  // used only to compare SET counts.
  localparam logic [3:0] ALT_PLAIN [4][4] = '{
    '{4'b0000, 4'b1000, 4'b1001, 4'b1011},
    '{4'b0001, 4'b0011, 4'b1010, 4'b1101},
    '{4'b0010, 4'b0101, 4'b1100, 4'b1110},
    '{4'b0100, 4'b0110, 4'b0111, 4'b1111}
  };

  function automatic int popcnt4(input logic [3:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]);
  endfunction

  // Greedy selection: first alternative with no 1 -> 0 bit, else the first.
  function automatic logic [3:0] ref_encode(input logic [1:0] d, input logic [3:0] prev,
                                            input bit plain = 1'b0);
    logic [3:0] c;
    for (int j = 0; j < 4; j++) begin
      c = plain ? ALT_PLAIN[d][j] : ALT[d][j];
      if ((prev & ~c) == 4'b0000) return c;
    end
    return plain ? ALT_PLAIN[d][0] : ALT[d][0];
  endfunction

  function automatic logic [1:0] ref_decode(input logic [3:0] c);
    for (int d = 0; d < 4; d++)
      for (int j = 0; j < 4; j++)
        if (ALT[d][j] == c) return 2'(d);
    return 2'b00;
  endfunction

  // SET bits (1 -> 0) of a transition.
  function automatic int set_bits4(input logic [3:0] prev, input logic [3:0] next);
    return popcnt4(prev & ~next);
  endfunction

endpackage
