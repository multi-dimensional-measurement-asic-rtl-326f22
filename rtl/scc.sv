// scc: super column controller.
//
// The SCC receives the word that the token ring puts on the super column bus,
// holds it for one cycle in its register (SCR) while turning it into a full
// hit word, and then writes it into the bottom FIFO of the super column, from
// which the column block's continuous arbiter reads. In the hit word the row
// is {cluster index, pixel row in cluster} and the two low column bits are the
// pixel column in the cluster; the upper column bits are left zero and are
// filled in by the arbiters further down.
//
// Flow control: in_ready tells the token ring that a word can be taken. It is
// high while the FIFO count plus a word waiting in the SCR is below DEPTH,
// so the SCR never has to stall and no word is lost.
//
// The SCR and the FIFO as parts of the SCC follow the design description;
// the meaning given to the SCR, the word layout and the FIFO depth are this
// design's own choice.
module scc
  import mpgd_pkg::*;
#(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned IDX_W  = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // token ring bus
  input  logic             in_valid,
  input  logic [IDX_W-1:0] in_idx,
  input  cluster_data_t    in_data,
  output logic             in_ready,
  // bottom FIFO read side
  input  logic             rd_en,
  output logic             empty,
  output hit_word_t        rd_data
);

  logic                       scr_valid;
  hit_word_t                  scr;
  logic                       full;
  logic [$clog2(DEPTH+1)-1:0] count;

  assign in_ready = (32'(count) + 32'(scr_valid)) < DEPTH;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      scr_valid <= 1'b0;
      scr       <= '0;
    end else begin
      scr_valid <= in_valid && in_ready;
      if (in_valid && in_ready) begin
        scr.row <= ROW_W'({in_idx, paddr_row(in_data.paddr)});
        scr.col <= COL_W'(paddr_col(in_data.paddr));
        scr.toa <= in_data.toa;
        scr.tot <= in_data.tot;
      end
    end
  end

  sync_fifo #(.T(hit_word_t), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(scr_valid), .wr_data(scr), .full,
    .rd_en, .rd_data, .empty, .count
  );

  // The room reserved by in_ready means a word in the SCR always fits.
  a_scr_fits: assert property (@(posedge clk) disable iff (!rst_n) scr_valid |-> !full);

endmodule
