// cluster: the shared digital logic of 16 pixels (4 rows x 4 columns).
//
// The cluster keeps the previous cycle's 16 pixel Hit levels to form their
// rising edges. Its SDU passes the first pixel's pulse on as 1_hit, its ACU
// stores the 4-bit position of that pixel and its TDC measures arrival time
// and time over threshold of 1_hit. When the measurement is complete the
// cluster raises req towards the token ring and holds its data; grant (the
// cycle in which the token ring takes the data) frees the TDC, and the cluster
// accepts a new hit from the next cycle on. Hits that arrive while the cluster
// is busy are not recorded: this is the cluster's dead time.
//
// Interface: hit_rc[i][j] is the Hit level of the pixel in row i, column j
// of the cluster (row 0 at the lower row number).
//
// Timing: a pulse high for n sampled cycles starting in cycle t gives
// toa = time_now(t) and tot = n; req rises in cycle t+n+1.
//
// The sharing of SDU, ACU and TDC by 16 pixels follows the design
// description. The edge register and the busy/arm handshake are this
// design's own choice.
module cluster
  import mpgd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0][3:0]   hit_rc,
  input  logic [TOA_W-1:0]  time_now,
  input  logic              grant,
  output logic              req,
  output cluster_data_t     data
);

  logic [CL_PIX-1:0] hit, hit_q, rise;
  logic              arm, busy, one_hit, addr_valid;
  logic [PADDR_W-1:0] first;

  // Pixel a sits in cluster row a/4; the rows are numbered in a serpentine,
  // left to right in even rows and right to left in odd rows.
  assign hit = {hit_rc[3][0], hit_rc[3][1], hit_rc[3][2], hit_rc[3][3],
                hit_rc[2],
                hit_rc[1][0], hit_rc[1][1], hit_rc[1][2], hit_rc[1][3],
                hit_rc[0]};

  always_ff @(posedge clk) begin
    if (!rst_n) hit_q <= '0;
    else        hit_q <= hit;
  end

  // Rising edge: high now, low in the previous cycle. The pixel levels are
  // treated as synchronous to clk.
  assign rise = hit & ~hit_q;
  assign arm  = !busy;

  sdu u_sdu (
    .clk, .rst_n, .hit, .rise, .arm, .first, .one_hit
  );

  acu u_acu (
    .clk, .rst_n, .rise, .arm, .addr_valid, .addr(data.paddr), .first
  );

  tdc u_tdc (
    .clk, .rst_n, .one_hit, .time_now, .clear(grant),
    .busy, .done(req), .toa(data.toa), .tot(data.tot)
  );

  a_req_has_addr: assert property (@(posedge clk) disable iff (!rst_n) req |-> addr_valid);

endmodule
