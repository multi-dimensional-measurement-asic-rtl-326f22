// cyclic_arbiter: four-channel round-robin arbiter, one word per visit.
//
// The arbiter reads four FIFO-like channels (first-word-fall-through, one
// empty flag each) into one output. In state Read_k it reads one word from
// channel k, if that channel is not empty, and then moves on to the next
// non-empty channel in the order 0, 1, 2, 3, 0, ... When only channel k holds
// data it stays on k. When all four channels are empty it returns to IDLE and
// stops searching; from IDLE it starts at the first non-empty channel counting
// from channel 0. With all channels busy it reads channels 0,1,2,3,0,... one
// word per clock.
//
// Interface: rd[k] pops channel k; out_valid/out_data carry the word popped in
// the same cycle, with the channel number written into out_data.col at
// TAG_LSB. out_ready low holds the arbiter in Read_k without reading.
//
// IDLE, Read_0..Read_3, the transitions Read_k -> Read_k+1, Read_3 -> Read_0
// and Read_k -> IDLE on Empty=4'b1111 follow the design's state diagram. That
// the arbiter jumps past several empty channels in one cycle, and stays on a
// channel that is the only one with data, are this design's own choices.
module cyclic_arbiter
  import mpgd_pkg::*;
#(
  parameter int unsigned TAG_LSB = 4
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
    else if (empty[cur] || out_ready)
      state_nxt = arb_state_t'({1'b0, next_nonempty(empty, cur + 2'd1)});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= ARB_IDLE;
    else        state <= state_nxt;
  end

  a_rd_onehot:   assert property (@(posedge clk) disable iff (!rst_n) $onehot0(rd));
  a_rd_nonempty: assert property (@(posedge clk) disable iff (!rst_n) (rd & empty) == '0);

endmodule
