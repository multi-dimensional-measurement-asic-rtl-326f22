// token_ring: token ring control unit (TRCU) of one super column.
//
// N clusters share one data bus to the super column controller. Exactly one
// cluster holds the token (ptr). When the holder requests and the controller
// can take a word (ready), the holder's data is driven onto the bus and
// granted in that cycle, and in the same cycle the token is passed straight
// to the next requesting cluster in ring order (ptr+1, ptr+2, ... wrapping
// around). If the holder does not request, the token moves to the next
// requesting cluster without a transfer. If nobody else requests, the token
// stays where it is. With continuous requests one cluster is read per clock.
//
// Interface: req/grant are one bit per cluster; grant is one-hot and valid in
// the cycle of the transfer, out_valid/out_idx/out_data describe the word on
// the bus in that same cycle (combinational from the token register).
//
// Reading only the token holder and handing the token on to the next queued
// cluster follow the design description; passing the token to the next
// requester in a single cycle, rather than hop by hop, is this design's own
// choice.
module token_ring
  import mpgd_pkg::*;
#(
  parameter int unsigned N = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  cluster_data_t        data [N],
  input  logic                 ready,
  output logic [N-1:0]         grant,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_idx,
  output cluster_data_t        out_data
);

  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] ptr, nxt;
  logic [N-1:0]  pending, above;
  logic          fire;

  assign fire      = req[ptr] && ready;
  assign out_valid = fire;
  assign out_idx   = ptr;
  assign out_data  = data[ptr];

  always_comb begin
    grant = '0;
    if (fire) grant[ptr] = 1'b1;
  end

  // Next owner: the first requester above ptr, else the first from 0.
  always_comb begin
    pending = req & ~grant;
    for (int i = 0; i < N; i++) above[i] = pending[i] && (IW'(i) > ptr);
    nxt = ptr;
    for (int i = N - 1; i >= 0; i--)
      if (pending[i]) nxt = IW'(i);
    for (int i = N - 1; i >= 0; i--)
      if (above[i]) nxt = IW'(i);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                ptr <= '0;
    else if (fire || !req[ptr]) ptr <= nxt;
  end

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_grant_req:    assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);

endmodule
