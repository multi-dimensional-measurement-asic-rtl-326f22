// cbc: column block controller.
//
// The CBC collects the hits of the four super columns of a column block. Its
// continuous arbiter drains the super columns' bottom FIFOs one at a time and
// writes the words into the CBC FIFO, the second FIFO level of the readout,
// whose read side goes to the round-robin arbitration of the readout
// controller. The arbiter writes the super column number into column bits
// [3:2] of each word. It stops reading while the CBC FIFO is full, so no word
// is lost.
//
// Interface: sc_empty/sc_data/sc_rd are the read sides of the four bottom
// FIFOs; rd_en/empty/rd_data the read side of the CBC FIFO.
//
// A continuous arbiter followed by a FIFO follows the design description; the
// FIFO depth is this design's own choice.
module cbc
  import mpgd_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] sc_empty,
  input  hit_word_t  sc_data [4],
  output logic [3:0] sc_rd,
  input  logic       rd_en,
  output logic       empty,
  output hit_word_t  rd_data
);

  logic      full, wr_en;
  hit_word_t wr_data;

  continuous_arbiter #(.TAG_LSB(2)) u_arb (
    .clk, .rst_n, .empty(sc_empty), .data(sc_data), .out_ready(!full),
    .rd(sc_rd), .out_valid(wr_en), .out_data(wr_data)
  );

  sync_fifo #(.T(hit_word_t), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en, .wr_data, .full,
    .rd_en, .rd_data, .empty, .count()
  );

endmodule
