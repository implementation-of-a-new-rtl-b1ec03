// tb_wts_pcm_controller: end-to-end test of the PCM line controller at its
// default size (512-bit data lines, 1024-bit codeword lines, 120/40/100
// cycle SET/RESET/read latencies) over a behavioural PCM array of 8 lines.
//
// A reference model keeps, per line, the codewords the improved WTS code must
// leave in the cells. Each operation is checked for its response data, its
// latency in cycles, the length of its programming window, the SET-free flag,
// the cell contents afterwards and the running statistics and energy.
// The test counts how often each mechanism occurs and fails if one never
// does: line read, write needing a SET pulse, write with RESETs only,
// unchanged write skipped, a symbol falling back to a SET codeword, a
// request held back while the controller is busy, and a statistics clear.
module tb_wts_pcm_controller;
  import wts_pkg::*;
  import tb_wts_ref_pkg::*;

  localparam int DB = 512, CB = 1024, AW = 27, DEPTH = 8;
  localparam int TR = 100, TS = 120, TRS = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid = 1'b0, req_ready;
  cmd_e req_cmd = CMD_READ;
  logic [AW-1:0] req_addr = '0;
  logic [DB-1:0] req_wdata = '0;
  logic resp_valid, resp_set_free;
  cmd_e resp_cmd;
  logic [DB-1:0] resp_rdata;
  logic pcm_rd_en, pcm_wr_en;
  logic [AW-1:0] pcm_addr;
  logic [CB-1:0] pcm_rdata, pcm_wdata, pcm_set_mask, pcm_reset_mask;
  logic stats_clear = 1'b0;
  logic [47:0] n_writes, n_setfree_writes, n_set_bits, n_reset_bits, energy_dpj;
  logic [$clog2(DB/2+1)-1:0] last_set_syms;
  int mask_errors;

  wts_pcm_controller dut (.*);

  pcm_array_model #(.CW_BITS(CB), .ADDR_W(AW), .DEPTH(DEPTH)) u_pcm (
    .clk(clk), .rd_en(pcm_rd_en), .wr_en(pcm_wr_en), .addr(pcm_addr), .rdata(pcm_rdata),
    .wdata(pcm_wdata), .set_mask(pcm_set_mask), .reset_mask(pcm_reset_mask),
    .mask_errors(mask_errors));

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // reference state
  logic [CB-1:0] ref_cw [DEPTH];
  longint m_w = 0, m_f = 0, m_s = 0, m_r = 0, m_e = 0;

  // mechanism counters
  int n_read = 0, n_setw = 0, n_resetw = 0, n_same = 0, n_fallback = 0, n_stall = 0, n_clear = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One operation, presented at the current negedge; waits for the response.
  // With early = 1 the task returns in the response cycle, so the next
  // request is presented while the controller is still busy.
  task automatic do_op(input cmd_e cmd, input logic [AW-1:0] addr, input logic [DB-1:0] data,
                       input bit early);
    int a, r, win, idx, exp_lat, ns, nr, fb;
    logic [CB-1:0] newcw;
    logic [DB-1:0] exp_data;
    bit stalled;
    idx = int'(addr) % DEPTH;
    req_valid = 1'b1; req_cmd = cmd; req_addr = addr; req_wdata = data;
    stalled = 1'b0;
    while (!req_ready) begin
      stalled = 1'b1;
      @(negedge clk);
    end
    if (stalled) n_stall++;
    a = cyc;
    @(negedge clk);
    req_valid = 1'b0; req_wdata = '0;
    // expected result
    ns = 0; nr = 0; fb = 0;
    for (int s = 0; s < DB / 2; s++) begin
      newcw[4*s +: 4] = ref_encode(data[2*s +: 2], ref_cw[idx][4*s +: 4]);
      ns += set_bits4(ref_cw[idx][4*s +: 4], newcw[4*s +: 4]);
      nr += popcnt4(~ref_cw[idx][4*s +: 4] & newcw[4*s +: 4]);
      if (set_bits4(ref_cw[idx][4*s +: 4], newcw[4*s +: 4]) != 0) fb++;
      exp_data[2*s +: 2] = ref_decode(ref_cw[idx][4*s +: 4]);
    end
    if (cmd == CMD_READ) exp_lat = TR + 1;
    else if (ns != 0)    exp_lat = TR + 2 + TS;
    else if (nr != 0)    exp_lat = TR + 2 + TRS;
    else                 exp_lat = TR + 2;
    // wait for the response, measuring the programming window
    win = 0;
    while (!resp_valid) begin
      if (pcm_wr_en) win++;
      @(negedge clk);
    end
    r = cyc;
    check(r - a == exp_lat, $sformatf("latency %0d expected %0d", r - a, exp_lat));
    check(resp_cmd == cmd, "response command");
    if (cmd == CMD_READ) begin
      n_read++;
      check(resp_rdata == exp_data, $sformatf("read data of line %0d", idx));
    end else begin
      check(win == exp_lat - TR - 2, $sformatf("write window %0d", win));
      check(resp_set_free == (ns == 0), "set-free flag");
      check(int'(last_set_syms) == fb, "symbols needing SET");
      if (ns != 0) n_setw++; else if (nr != 0) n_resetw++; else n_same++;
      if (fb != 0) n_fallback++;
      ref_cw[idx] = newcw;
      m_w++; if (ns == 0) m_f++;
      m_s += longint'(ns); m_r += longint'(nr); m_e += longint'(225 * ns + 297 * nr);
      check(u_pcm.mem[idx] == ref_cw[idx], $sformatf("cells of line %0d", idx));
      check(n_writes == 48'(m_w) && n_setfree_writes == 48'(m_f) && n_set_bits == 48'(m_s)
            && n_reset_bits == 48'(m_r) && energy_dpj == 48'(m_e), "statistics");
    end
    // early: the next request is presented in the response cycle and stalls
    if (!early) @(negedge clk);
  endtask

  function automatic logic [DB-1:0] rand_line();
    logic [DB-1:0] v;
    for (int w = 0; w < DB / 32; w++) v[w*32 +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [AW-1:0] rand_addr(input int line);
    return {AW'($urandom) & ~AW'(DEPTH - 1)} | AW'(line);
  endfunction

  initial begin
    logic [DB-1:0] v;
    for (int i = 0; i < DEPTH; i++) ref_cw[i] = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // fresh cells read as zero data
    do_op(CMD_READ, rand_addr(0), '0, 1'b0);
    // first writes from erased cells need RESETs only
    v = rand_line();
    do_op(CMD_WRITE, rand_addr(1), v, 1'b0);
    do_op(CMD_READ, rand_addr(1), '0, 1'b1);
    // the same data again changes nothing
    do_op(CMD_WRITE, rand_addr(1), v, 1'b0);
    // a worked sequence on one line: every symbol 00 -> 01 -> 11 -> 10
    do_op(CMD_WRITE, rand_addr(2), {256{2'b00}}, 1'b0);
    do_op(CMD_WRITE, rand_addr(2), {256{2'b01}}, 1'b0);
    do_op(CMD_WRITE, rand_addr(2), {256{2'b11}}, 1'b0);
    do_op(CMD_WRITE, rand_addr(2), {256{2'b10}}, 1'b1);
    check(u_pcm.mem[2] == {256{4'b0100}}, "worked sequence ends in 0100 codewords");
    do_op(CMD_READ, rand_addr(2), '0, 1'b0);
    // random traffic, some requests presented while busy
    for (int t = 0; t < 60; t++) begin
      int line;
      line = $urandom % DEPTH;
      if ($urandom % 3 == 0) do_op(CMD_READ, rand_addr(line), '0, ($urandom % 2) == 1);
      else                   do_op(CMD_WRITE, rand_addr(line), rand_line(), ($urandom % 2) == 1);
    end
    for (int line = 0; line < DEPTH; line++) do_op(CMD_READ, rand_addr(line), '0, 1'b1);
    // clear the statistics
    @(negedge clk);
    stats_clear = 1'b1;
    @(negedge clk);
    stats_clear = 1'b0;
    n_clear++;
    check(n_writes == 0 && n_set_bits == 0 && n_reset_bits == 0 && energy_dpj == 0
          && n_setfree_writes == 0, "statistics cleared");
    check(mask_errors == 0, "PCM saw overlapping masks or wrong write data");
    $display("mechanisms: reads=%0d set_writes=%0d reset_only_writes=%0d unchanged_writes=%0d",
             n_read, n_setw, n_resetw, n_same);
    $display("            writes_with_set_symbols=%0d stalled_requests=%0d stats_clears=%0d",
             n_fallback, n_stall, n_clear);
    check(n_read > 0, "no read happened");
    check(n_setw > 0, "no write needing SET happened");
    check(n_resetw > 0, "no RESET-only write happened");
    check(n_same > 0, "no unchanged write happened");
    check(n_fallback > 0, "no symbol fallback happened");
    check(n_stall > 0, "no stalled request happened");
    check(n_clear > 0, "no statistics clear happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
