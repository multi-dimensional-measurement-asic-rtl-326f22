// readout_controller: round-robin arbitration of all column blocks.
//
// The readout controller merges the FIFOs of NUM_CB column blocks into the
// single chip output. It is a tree of four-channel cyclic arbiters: the first
// level reads groups of four column block FIFOs, every further level reads
// four nodes of the level above, and the last node drives the output. For the
// 64 column blocks of the full array this is 16 + 4 + 1 arbiters in three
// levels; with the continuous arbitration inside the column blocks the hit
// passes four arbitration levels in all. Arbiter level l writes its channel
// number into column bits [5+2l:4+2l], so the column of the hit is complete
// when it leaves the tree.
//
// Each tree node holds the word it read in a one-word output register, which
// it offers to the next level as a non-empty FIFO; a node reads again in the
// cycle its register is taken, so the tree passes one word per clock.
//
// Interface: cb_* are the read sides of the column block FIFOs. The output is
// a valid/ready pair: a word moves when out_valid and out_ready are both high.
// Latency from a column block FIFO to the output is one clock per level.
//
// Round-robin arbitration in the readout controller and four-channel cyclic
// arbiters follow the design description. The tree arrangement, the node
// registers and the output handshake are this design's own reading of it.
// NUM_CB must be a power of four, at least 4.
module readout_controller
  import mpgd_pkg::*;
#(
  parameter int unsigned NUM_CB = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_CB-1:0] cb_empty,
  input  hit_word_t         cb_data [NUM_CB],
  output logic [NUM_CB-1:0] cb_rd,
  output logic              out_valid,
  input  logic              out_ready,
  output hit_word_t         out_data
);

  localparam int unsigned LEVELS = $clog2(NUM_CB) / 2;

  // lv_* [l] are the channels read by level l; level LEVELS is the output.
  logic [NUM_CB-1:0] lv_empty [LEVELS+1];
  logic [NUM_CB-1:0] lv_rd    [LEVELS+1];
  hit_word_t         lv_data  [LEVELS+1][NUM_CB];

  assign lv_empty[0] = cb_empty;
  assign lv_data[0]  = cb_data;
  assign cb_rd       = lv_rd[0];

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned NODES = NUM_CB >> (2 * (l + 1));
    for (genvar n = 0; n < NODES; n++) begin : g_node
      hit_word_t in_data [4];
      hit_word_t arb_data, node_q;
      logic      arb_valid, node_valid, take;

      for (genvar i = 0; i < 4; i++) begin : g_in
        assign in_data[i] = lv_data[l][4*n + i];
      end

      assign take = lv_rd[l+1][n];

      cyclic_arbiter #(.TAG_LSB(4 + 2*l)) u_arb (
        .clk, .rst_n,
        .empty(lv_empty[l][4*n +: 4]), .data(in_data),
        .out_ready(!node_valid || take),
        .rd(lv_rd[l][4*n +: 4]), .out_valid(arb_valid), .out_data(arb_data)
      );

      always_ff @(posedge clk) begin
        if (!rst_n) begin
          node_valid <= 1'b0;
          node_q     <= '0;
        end else if (arb_valid) begin
          node_valid <= 1'b1;
          node_q     <= arb_data;
        end else if (take) begin
          node_valid <= 1'b0;
        end
      end

      assign lv_empty[l+1][n] = !node_valid;
      assign lv_data[l+1][n]  = node_q;
    end

    // Unused upper entries of the next level.
    for (genvar n = NODES; n < NUM_CB; n++) begin : g_unused
      assign lv_empty[l+1][n] = 1'b1;
      assign lv_data[l+1][n]  = '0;
    end
    for (genvar n = 4 * NODES; n < NUM_CB; n++) begin : g_unused_rd
      assign lv_rd[l][n] = 1'b0;
    end
  end

  assign out_valid            = !lv_empty[LEVELS][0];
  assign out_data             = lv_data[LEVELS][0];
  assign lv_rd[LEVELS][0]     = out_valid && out_ready;
  assign lv_rd[LEVELS][NUM_CB-1:1] = '0;

  initial assert (NUM_CB >= 4 && (1 << (2 * LEVELS)) == NUM_CB)
    else $error("readout_controller: NUM_CB must be a power of four");

endmodule
