// sdu: signal discrimination unit of one 16-pixel cluster.
//
// The SDU turns the 16 pixel Hit levels of a cluster into the single 1_hit
// level that drives the cluster's TDC. While armed, the first pixel that
// rises is selected (lowest number on a tie) and 1_hit rises in that same
// cycle. From the next cycle 1_hit follows the selected pixel alone, so its
// falling edge marks the end of that pixel's pulse; Hits of the other 15
// pixels do not reach the TDC. After the fall 1_hit stays low until the
// cluster is armed again.
//
// Interface: hit is the registered pixel level vector, rise its rising edges,
// arm is high while the TDC is free, first is the position of the first
// rising pixel as found by the cluster's ACU. one_hit is combinational from these and
// the internal selection register.
//
// Passing on only the first hit and its falling edge follows the design
// description; the tie-break and the re-arming rule are this design's own.
module sdu
  import mpgd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CL_PIX-1:0] hit,
  input  logic [CL_PIX-1:0] rise,
  input  logic              arm,
  input  logic [PADDR_W-1:0] first,
  output logic              one_hit
);

  logic               locked;
  logic [PADDR_W-1:0] sel;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      locked <= 1'b0;
      sel    <= '0;
    end else if (arm) begin
      locked <= |rise;
      if (|rise) sel <= first;
    end
  end

  assign one_hit = arm ? (|rise) : (locked && hit[sel]);

endmodule
