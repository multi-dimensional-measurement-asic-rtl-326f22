// column_block: sixteen pixel columns, i.e. four super columns, and their CBC.
//
// The four super columns each read their clusters out through a token ring
// into a bottom FIFO; the column block controller (CBC) merges the four FIFOs
// with its continuous arbiter into the CBC FIFO. Column c of the block
// (0..15) belongs to super column c/4.
//
// Interface: hit[r][c] is the level of pixel (r, c) of this block; the read
// side of the CBC FIFO goes to the readout controller.
//
// Four super columns per column block follows the design description.
module column_block
  import mpgd_pkg::*;
#(
  parameter int unsigned ROWS      = 1024,
  parameter int unsigned SCC_DEPTH = 16,
  parameter int unsigned CBC_DEPTH = 16
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [ROWS-1:0][CB_SC*SC_COLS-1:0]   hit,
  input  logic [TOA_W-1:0]                     time_now,
  input  logic                                 rd_en,
  output logic                                 empty,
  output hit_word_t                            rd_data
);

  logic [3:0] sc_empty, sc_rd;
  hit_word_t  sc_data [4];

  for (genvar s = 0; s < CB_SC; s++) begin : g_sc
    logic [ROWS-1:0][SC_COLS-1:0] sc_hit;
    always_comb
      for (int r = 0; r < ROWS; r++) sc_hit[r] = hit[r][SC_COLS*s +: SC_COLS];
    super_column #(.ROWS(ROWS), .SCC_DEPTH(SCC_DEPTH)) u_sc (
      .clk, .rst_n, .hit(sc_hit), .time_now,
      .rd_en(sc_rd[s]), .empty(sc_empty[s]), .rd_data(sc_data[s])
    );
  end

  cbc #(.DEPTH(CBC_DEPTH)) u_cbc (
    .clk, .rst_n, .sc_empty, .sc_data, .sc_rd,
    .rd_en, .empty, .rd_data
  );

endmodule
