// mpgd_readout_top: digital readout of a 1024 x 1024 pixel array for
// micro-pattern gas detectors.
//
// Every pixel delivers a Hit level (its analogue front end is outside this
// RTL). Sixteen pixels form a cluster that measures, for the first pixel hit,
// its 4-bit position, its arrival time and its time over threshold (energy)
// at 5 ns resolution. 256 clusters of a super column (4 columns x 1024 rows)
// are read out by a token ring into the super column's bottom FIFO; four
// super columns form a column block whose continuous arbiter moves their
// words into the column block FIFO; the readout controller merges the 64
// column blocks with a tree of cyclic (round-robin) arbiters into one hit word
// per clock. The chip clock is 200 MHz; the free-running time counter that
// all TDCs sample lives here and advances once per clock.
//
// Interface: hit[r][c] is the level of the pixel in row r, column c, sampled
// on clk. Each output word (out_data) holds the pixel's row and column,
// arrival time (toa, in clocks) and time over threshold (tot, in clocks); it
// is transferred when out_valid and out_ready are both high.
//
// ROWS must be a multiple of 4 and COLS/16 a power of four. The defaults are
// the array size of the design description; the output handshake, FIFO
// depths and time-stamp widths are this design's own choice.
module mpgd_readout_top
  import mpgd_pkg::*;
#(
  parameter int unsigned ROWS      = 1024,
  parameter int unsigned COLS      = 1024,
  parameter int unsigned SCC_DEPTH = 16,
  parameter int unsigned CBC_DEPTH = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [ROWS-1:0][COLS-1:0] hit,
  output logic                      out_valid,
  input  logic                      out_ready,
  output hit_word_t                 out_data,
  output logic [TOA_W-1:0]          time_now
);

  localparam int unsigned CB_COLS = CB_SC * SC_COLS;
  localparam int unsigned NUM_CB  = COLS / CB_COLS;

  logic [NUM_CB-1:0] cb_empty, cb_rd;
  hit_word_t         cb_data [NUM_CB];

  always_ff @(posedge clk) begin
    if (!rst_n) time_now <= '0;
    else        time_now <= time_now + 1'b1;
  end

  for (genvar b = 0; b < NUM_CB; b++) begin : g_cb
    logic [ROWS-1:0][CB_COLS-1:0] cb_hit;
    always_comb
      for (int r = 0; r < ROWS; r++) cb_hit[r] = hit[r][CB_COLS*b +: CB_COLS];
    column_block #(.ROWS(ROWS), .SCC_DEPTH(SCC_DEPTH), .CBC_DEPTH(CBC_DEPTH)) u_cb (
      .clk, .rst_n, .hit(cb_hit), .time_now,
      .rd_en(cb_rd[b]), .empty(cb_empty[b]), .rd_data(cb_data[b])
    );
  end

  readout_controller #(.NUM_CB(NUM_CB)) u_ro (
    .clk, .rst_n, .cb_empty, .cb_data, .cb_rd,
    .out_valid, .out_ready, .out_data
  );

endmodule
