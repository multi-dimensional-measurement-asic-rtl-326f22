// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used at both FIFO levels of the readout: the bottom FIFO of each super
// column controller and the FIFO of each column block controller. The word at
// the head is always visible on rd_data while empty is low; rd_en pops it at
// the clock edge. A write and a read may happen in the same cycle. count
// gives the number of stored words so that a producer with a pipeline stage
// in front of the FIFO can reserve room.
//
// The design description names the two FIFO levels but gives neither their
// depth nor their protocol: the depth default of 16 and the show-ahead read
// are this design's own choice. DEPTH must be a power of two.
module sync_fifo #(
  parameter type         T     = mpgd_pkg::hit_word_t,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  T                           wr_data,
  output logic                       full,
  input  logic                       rd_en,
  output T                           rd_data,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  T              mem [DEPTH];
  logic [AW:0]   wptr, rptr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wr_en && !full)  wptr <= wptr + 1'b1;
      if (rd_en && !empty) rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (wr_en && !full) mem[wptr[AW-1:0]] <= wr_data;

  assign count   = ($clog2(DEPTH+1))'(wptr - rptr);
  assign empty   = (wptr == rptr);
  assign full    = (wptr[AW-1:0] == rptr[AW-1:0]) && (wptr[AW] != rptr[AW]);
  assign rd_data = mem[rptr[AW-1:0]];

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("sync_fifo: DEPTH must be a power of two");

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

endmodule
