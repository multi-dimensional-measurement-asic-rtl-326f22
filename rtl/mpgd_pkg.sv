// mpgd_pkg: types and constants shared by the pixel readout chain.
//
// The array is 1024 rows x 1024 columns. Sixteen pixels (4 rows x 4 columns)
// form a cluster that shares one discriminator (SDU), one address coder (ACU)
// and one TDC. A hit leaves its cluster as a cluster_data_t (4-bit pixel
// address, arrival time, time over threshold) and is widened to a hit_word_t,
// which carries the full 10-bit row and 10-bit column, by the super column
// controller and the arbiters below it. Each arbitration level writes the
// 2-bit number of the channel it read into its slice of the column field.
//
// The array size, the 4-column super column, the 16-pixel cluster, the 4-bit
// pixel address and the 5 ns time bin (one 200 MHz clock) follow the design
// description. The time-stamp widths (16-bit arrival time, 8-bit time over
// threshold) and the word layout are this design's own choice.
package mpgd_pkg;

  localparam int unsigned ROW_W   = 10;  // 1024 rows
  localparam int unsigned COL_W   = 10;  // 1024 columns
  localparam int unsigned PADDR_W = 4;   // pixel address inside a cluster
  localparam int unsigned TOA_W   = 16;  // arrival time, 5 ns per count
  localparam int unsigned TOT_W   = 8;   // time over threshold, 5 ns per count
  localparam int unsigned CL_PIX  = 16;  // pixels per cluster
  localparam int unsigned SC_COLS = 4;   // columns per super column
  localparam int unsigned CB_SC   = 4;   // super columns per column block

  // What a cluster hands to the token ring.
  typedef struct packed {
    logic [PADDR_W-1:0] paddr;
    logic [TOA_W-1:0]   toa;
    logic [TOT_W-1:0]   tot;
  } cluster_data_t;

  // What leaves the chip: pixel position, arrival time and energy.
  typedef struct packed {
    logic [ROW_W-1:0] row;
    logic [COL_W-1:0] col;
    logic [TOA_W-1:0] toa;
    logic [TOT_W-1:0] tot;
  } hit_word_t;

  // States shared by the continuous and the cyclic arbiter.
  typedef enum logic [2:0] {
    ARB_IDLE  = 3'd4,
    ARB_READ0 = 3'd0,
    ARB_READ1 = 3'd1,
    ARB_READ2 = 3'd2,
    ARB_READ3 = 3'd3
  } arb_state_t;

  // Pixels of a cluster are numbered in a serpentine: 0..3 left to right in
  // the first row, 4..7 right to left in the second, and so on, so that the
  // last row reads 15 14 13 12 from the left.
  function automatic logic [1:0] paddr_row(input logic [PADDR_W-1:0] a);
    return a[3:2];
  endfunction

  function automatic logic [1:0] paddr_col(input logic [PADDR_W-1:0] a);
    return a[1:0] ^ {2{a[2]}};
  endfunction

  // Position of the lowest set bit of a 16-bit vector (0 when none is set):
  // isolate the lowest one (v & -v), then encode the one-hot result.
  function automatic logic [PADDR_W-1:0] first_of16(input logic [CL_PIX-1:0] v);
    logic [CL_PIX-1:0] low;
    low = v & (~v + 1'b1);
    return {|(low & 16'hFF00), |(low & 16'hF0F0), |(low & 16'hCCCC), |(low & 16'hAAAA)};
  endfunction

  // First channel at or after 'start' (cyclic over 4) whose empty flag is low.
  function automatic logic [1:0] next_nonempty(input logic [3:0] empty,
                                               input logic [1:0] start);
    logic [1:0] ch;
    logic [1:0] pick;
    pick = start;
    for (int i = 3; i >= 0; i--) begin
      ch = start + 2'(i);
      if (!empty[ch]) pick = ch;
    end
    return pick;
  endfunction

endpackage
