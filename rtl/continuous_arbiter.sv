// continuous_arbiter: four-channel arbiter that drains one FIFO at a time.
//
// The arbiter reads four FIFOs (first-word-fall-through, one empty flag each)
// into one output. In state Read_k it reads channel k once per clock for as
// long as that FIFO is not empty, so a channel is emptied completely before
// another one is served. When the current channel is found empty, the arbiter
// moves on to the next non-empty channel in the order 0, 1, 2, 3, 0, ... and
// when all four are empty it returns to IDLE and stops searching. From IDLE it
// starts at the first non-empty channel counting from channel 0.
//
// Interface: rd[k] pops channel k; out_valid/out_data carry the word popped in
// the same cycle, with the channel number written into out_data.col at
// TAG_LSB. out_ready low (the downstream FIFO is full) holds the arbiter in
// its state without reading. Moving to a new channel costs one cycle without
// a read; otherwise the throughput is one word per clock.
//
// The states IDLE and Read_0..Read_3, staying in Read_k while Empty[k]=0,
// going to IDLE when Empty=4'b1111 and the channel order follow the design's
// state diagram. That the arbiter jumps past several empty channels in one
// cycle, goes from Read_3 back to Read_0, and waits for out_ready are this
// design's own choices.
module continuous_arbiter
  import mpgd_pkg::*;
#(
  parameter int unsigned TAG_LSB = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] empty,
  input  hit_word_t  data [4],
  input  logic       out_ready,
  output logic [3:0] rd,
  output logic       out_valid,
  output hit_word_t  out_data
);

  arb_state_t state, state_nxt;
  logic [1:0] cur;

  assign cur = state[1:0];

  always_comb begin
    rd        = '0;
    out_valid = 1'b0;
    out_data  = data[cur];
    out_data.col[TAG_LSB +: 2] = cur;
    if (state != ARB_IDLE && !empty[cur] && out_ready) begin
      rd[cur]   = 1'b1;
      out_valid = 1'b1;
    end
  end

  always_comb begin
    state_nxt = state;
    if (&empty)
      state_nxt = ARB_IDLE;
    else if (state == ARB_IDLE)
      state_nxt = arb_state_t'({1'b0, next_nonempty(empty, 2'd0)});
    else if (empty[cur])
      state_nxt = arb_state_t'({1'b0, next_nonempty(empty, cur + 2'd1)});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= ARB_IDLE;
    else        state <= state_nxt;
  end

  a_rd_onehot:   assert property (@(posedge clk) disable iff (!rst_n) $onehot0(rd));
  a_rd_nonempty: assert property (@(posedge clk) disable iff (!rst_n) (rd & empty) == '0);

endmodule
