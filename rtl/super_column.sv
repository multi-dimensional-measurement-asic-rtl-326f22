// super_column: four pixel columns of the full height with their readout.
//
// A super column is ROWS rows x 4 columns, cut into ROWS/4 clusters of 4 x 4
// pixels. Cluster k covers rows 4k..4k+3. Inside a cluster pixel a sits in row
// 4k + a/4 and, in serpentine order, column a%4 (even cluster rows) or
// 3 - a%4 (odd cluster rows). The clusters' requests are served by one token
// ring, whose bus feeds the super column controller (SCC) with its bottom FIFO.
// The chip time counter is shared by all TDCs.
//
// Interface: hit[r][c] is the level of the pixel in row r, column c of this
// super column. The read side of the bottom FIFO (rd_en/empty/rd_data) goes
// to the column block controller.
//
// ROWS defaults to the 1024 rows of the design, giving 256 clusters per
// super column as in the design description.
module super_column
  import mpgd_pkg::*;
#(
  parameter int unsigned ROWS      = 1024,
  parameter int unsigned SCC_DEPTH = 16
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [ROWS-1:0][SC_COLS-1:0]   hit,
  input  logic [TOA_W-1:0]               time_now,
  input  logic                           rd_en,
  output logic                           empty,
  output hit_word_t                      rd_data
);

  localparam int unsigned NCL   = ROWS / 4;
  localparam int unsigned IDX_W = $clog2(NCL);

  logic [NCL-1:0] req, grant;
  cluster_data_t  cl_data [NCL];
  logic           bus_valid, bus_ready;
  logic [IDX_W-1:0] bus_idx;
  cluster_data_t  bus_data;

  for (genvar k = 0; k < NCL; k++) begin : g_cl
    cluster u_cluster (
      .clk, .rst_n, .hit_rc(hit[4*k +: 4]), .time_now,
      .grant(grant[k]), .req(req[k]), .data(cl_data[k])
    );
  end

  token_ring #(.N(NCL)) u_ring (
    .clk, .rst_n, .req, .data(cl_data), .ready(bus_ready), .grant,
    .out_valid(bus_valid), .out_idx(bus_idx), .out_data(bus_data)
  );

  scc #(.DEPTH(SCC_DEPTH), .IDX_W(IDX_W)) u_scc (
    .clk, .rst_n,
    .in_valid(bus_valid), .in_idx(bus_idx), .in_data(bus_data), .in_ready(bus_ready),
    .rd_en, .empty, .rd_data
  );

endmodule
