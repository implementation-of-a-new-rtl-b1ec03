// pcm_array_model: behavioural model of the PCM array behind the line
// controller, for simulation only. It holds DEPTH codeword lines (the line
// address is taken modulo DEPTH), all cells starting in the 0 state. Reads
// are combinational from the addressed line. While wr_en is high the masks
// are applied on every clock edge: SET bits go to 0, RESET bits go to 1,
// every other bit keeps its value. It also counts programming windows and
// checks that a window's masks never overlap and that wdata agrees with
// the result.
module pcm_array_model #(
  parameter int unsigned CW_BITS = 1024,
  parameter int unsigned ADDR_W  = 27,
  parameter int unsigned DEPTH   = 8
) (
  input  logic               clk,
  input  logic               rd_en,
  input  logic               wr_en,
  input  logic [ADDR_W-1:0]  addr,
  output logic [CW_BITS-1:0] rdata,
  input  logic [CW_BITS-1:0] wdata,
  input  logic [CW_BITS-1:0] set_mask,
  input  logic [CW_BITS-1:0] reset_mask,
  output int                 mask_errors
);

  logic [CW_BITS-1:0] mem [DEPTH];
  int unsigned idx;

  assign idx   = 32'(addr) % DEPTH;
  assign rdata = mem[idx];

  initial mask_errors = 0;

  // Cells start erased: every line is cleared on the first clock edge and
  // written only through the masks afterwards.
  bit started = 1'b0;

  always @(posedge clk) begin
    if (!started) begin
      started <= 1'b1;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (wr_en) begin
      logic [CW_BITS-1:0] nxt;
      nxt = (mem[idx] & ~set_mask) | reset_mask;
      if ((set_mask & reset_mask) != '0 || nxt != wdata) mask_errors++;
      mem[idx] <= nxt;
    end
  end

  // rd_en carries no data of its own in this model
  logic unused_rd;
  assign unused_rd = rd_en;

endmodule
