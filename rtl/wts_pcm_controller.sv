// wts_pcm_controller: PCM line controller that writes through the improved
// WTS code.
//
// Every line write is a read-modify-write. The controller first reads the
// codeword line now in the cells, lets the line encoder choose for each
// 2-bit symbol the lightest codeword that turns no stored 1 into a 0, and
// then programs only the bits that change: 1 -> 0 bits get a SET pulse,
// 0 -> 1 bits a RESET pulse. The pulse window is as long as the slowest bit
// needs: T_SET cycles if any bit is SET, T_RESET cycles if only RESETs are
// needed, and none at all if the line does not change. Because the code
// avoids SETs where it can, many writes finish in the short RESET time. A
// line read decodes the stored codewords back to data. Per-write SET/RESET
// counts and the write energy are accumulated in pcm_write_stats, and
// last_set_syms reports how many symbols of the last write had no SET-free
// codeword.
//
// The coding scheme, the SET/RESET polarity, the 64-byte line and the cell
// latencies and energies follow the evaluated system. The host handshake, the
// PCM port timing, the one-request-at-a-time sequencing and the 800 MHz cycle
// base of the latency parameters are this design's own choices.
//
// Host side: valid/ready request (req_cmd, req_addr, req_wdata), accepted
// when both are high; one resp_valid pulse per request, carrying the decoded
// line for a read and resp_set_free (no SET pulse needed) for a write.
// PCM side: pcm_rd_en is held for T_READ cycles and pcm_rdata is sampled in
// the last of them. pcm_wr_en is held for the pulse window with pcm_addr,
// pcm_wdata, pcm_set_mask and pcm_reset_mask stable; the cells apply the
// masks and leave all other bits alone.
// Latency from the accepting edge to resp_valid: read T_READ+1 cycles,
// unchanged write T_READ+2, other writes T_READ+2+T_SET or T_READ+2+T_RESET.
// Reset is asynchronous, active low.
module wts_pcm_controller
  import wts_pkg::*;
#(
  parameter int unsigned DATA_BITS   = 512,          // 64-byte line
  parameter int unsigned ADDR_W      = 27,           // 8 GB of 64-byte lines
  parameter int unsigned T_READ      = T_READ_CYC,
  parameter int unsigned T_SET       = T_SET_CYC,
  parameter int unsigned T_RESET     = T_RESET_CYC,
  parameter int unsigned ACC_W       = 48,
  localparam int unsigned CW_BITS    = DATA_BITS * N / K,
  localparam int unsigned CNT_W      = $clog2(CW_BITS + 1),
  localparam int unsigned SYM_W      = $clog2(DATA_BITS / K + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host request
  input  logic                 req_valid,
  output logic                 req_ready,
  input  cmd_e                 req_cmd,
  input  logic [ADDR_W-1:0]    req_addr,
  input  logic [DATA_BITS-1:0] req_wdata,
  // host response
  output logic                 resp_valid,
  output cmd_e                 resp_cmd,
  output logic [DATA_BITS-1:0] resp_rdata,
  output logic                 resp_set_free,
  // PCM array
  output logic                 pcm_rd_en,
  output logic                 pcm_wr_en,
  output logic [ADDR_W-1:0]    pcm_addr,
  input  logic [CW_BITS-1:0]   pcm_rdata,
  output logic [CW_BITS-1:0]   pcm_wdata,
  output logic [CW_BITS-1:0]   pcm_set_mask,
  output logic [CW_BITS-1:0]   pcm_reset_mask,
  // statistics
  input  logic                 stats_clear,
  output logic [ACC_W-1:0]     n_writes,
  output logic [ACC_W-1:0]     n_setfree_writes,
  output logic [ACC_W-1:0]     n_set_bits,
  output logic [ACC_W-1:0]     n_reset_bits,
  output logic [ACC_W-1:0]     energy_dpj,
  output logic [SYM_W-1:0]     last_set_syms     // symbols of the last write that needed a SET
);

  localparam int unsigned TMAX  = (T_READ > T_SET) ? ((T_READ > T_RESET) ? T_READ : T_RESET)
                                                   : ((T_SET > T_RESET) ? T_SET : T_RESET);
  localparam int unsigned TCNT_W = $clog2(TMAX + 1);

  typedef enum logic [2:0] {
    S_IDLE,
    S_READ,
    S_ENC,
    S_WRITE,
    S_RESP
  } state_e;

  state_e               state;
  logic [TCNT_W-1:0]    tcnt;
  cmd_e                 cmd_q;
  logic [ADDR_W-1:0]    addr_q;
  logic [DATA_BITS-1:0] wdata_q;
  logic [CW_BITS-1:0]   old_q;       // codeword line read from the cells
  logic [CW_BITS-1:0]   new_q;       // codeword line being written
  logic [CW_BITS-1:0]   set_q, reset_q;
  logic                 set_free_q;

  // Encoding and differential-write datapath, fed from registers.
  logic [CW_BITS-1:0]   enc_cw;
  logic [SYM_W-1:0]     enc_set_syms;
  logic [CW_BITS-1:0]   dw_set, dw_reset;
  logic [CNT_W-1:0]     dw_set_cnt, dw_reset_cnt;
  logic                 dw_has_set, dw_has_reset;

  wts_line_encoder #(.DATA_BITS(DATA_BITS)) u_enc (
    .data     (wdata_q),
    .prev_cw  (old_q),
    .cw       (enc_cw),
    .set_syms (enc_set_syms)
  );

  pcm_diff_write #(.W(CW_BITS)) u_dw (
    .old_cw     (old_q),
    .new_cw     (enc_cw),
    .set_mask   (dw_set),
    .reset_mask (dw_reset),
    .set_cnt    (dw_set_cnt),
    .reset_cnt  (dw_reset_cnt),
    .has_set    (dw_has_set),
    .has_reset  (dw_has_reset)
  );

  wts_line_decoder #(.DATA_BITS(DATA_BITS)) u_dec (
    .cw   (old_q),
    .data (resp_rdata)
  );

  pcm_write_stats #(.CNT_W(CNT_W), .ACC_W(ACC_W)) u_stats (
    .clk              (clk),
    .rst_n            (rst_n),
    .clear            (stats_clear),
    .stat_valid       (state == S_ENC && cmd_q == CMD_WRITE),
    .set_bits         (dw_set_cnt),
    .reset_bits       (dw_reset_cnt),
    .n_writes         (n_writes),
    .n_setfree_writes (n_setfree_writes),
    .n_set_bits       (n_set_bits),
    .n_reset_bits     (n_reset_bits),
    .energy_dpj       (energy_dpj)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      tcnt          <= '0;
      cmd_q         <= CMD_READ;
      addr_q        <= '0;
      wdata_q       <= '0;
      old_q         <= '0;
      new_q         <= '0;
      set_q         <= '0;
      reset_q       <= '0;
      set_free_q    <= 1'b0;
      last_set_syms <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req_valid) begin
          cmd_q   <= req_cmd;
          addr_q  <= req_addr;
          wdata_q <= req_wdata;
          tcnt    <= TCNT_W'(T_READ - 1);
          state   <= S_READ;
        end
        S_READ: begin
          if (tcnt == '0) begin
            old_q <= pcm_rdata;
            state <= (cmd_q == CMD_WRITE) ? S_ENC : S_RESP;
          end else begin
            tcnt <= tcnt - 1'b1;
          end
        end
        S_ENC: begin
          new_q         <= enc_cw;
          set_q         <= dw_set;
          reset_q       <= dw_reset;
          set_free_q    <= !dw_has_set;
          last_set_syms <= enc_set_syms;
          if (dw_has_set) begin
            tcnt  <= TCNT_W'(T_SET - 1);
            state <= S_WRITE;
          end else if (dw_has_reset) begin
            tcnt  <= TCNT_W'(T_RESET - 1);
            state <= S_WRITE;
          end else begin
            state <= S_RESP;                 // line unchanged: nothing to program
          end
        end
        S_WRITE: begin
          if (tcnt == '0) begin
            old_q <= new_q;                  // cells now hold the new codewords
            state <= S_RESP;
          end else begin
            tcnt <= tcnt - 1'b1;
          end
        end
        S_RESP: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign req_ready      = (state == S_IDLE);
  assign resp_valid     = (state == S_RESP);
  assign resp_cmd       = cmd_q;
  assign resp_set_free  = set_free_q;
  assign pcm_rd_en      = (state == S_READ);
  assign pcm_wr_en      = (state == S_WRITE);
  assign pcm_addr       = addr_q;
  assign pcm_wdata      = new_q;
  assign pcm_set_mask   = set_q;
  assign pcm_reset_mask = reset_q;

  // A request must hold still until it is accepted.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && !req_ready |=> req_valid && $stable(req_cmd) && $stable(req_addr)
                                && $stable(req_wdata));
  // A bit is never both SET and RESET in one write.
  a_masks_disjoint: assert property (@(posedge clk) disable iff (!rst_n)
    pcm_wr_en |-> (pcm_set_mask & pcm_reset_mask) == '0);

  initial assert (T_READ > 0 && T_SET > 0 && T_RESET > 0)
    else $error("latency parameters must be at least one cycle");

endmodule
