// acu: address coding unit of one 16-pixel cluster.
//
// While the cluster is armed (its TDC is free), the first clock cycle in which
// any pixel of the cluster shows a rising edge of its Hit level makes the ACU
// store that pixel's 4-bit position; addr_valid then stays high and the
// address is held until the cluster is armed again, which happens once its
// data has been read out. Rising edges while not armed are ignored.
//
// Interface: rise is the per-pixel rising-edge vector computed by the cluster
// from its registered pixel levels; arm is high while the cluster may accept
// a new hit. addr and addr_valid change one clock after the edge; first is
// the combinational position of the first rising pixel in the current cycle,
// which the SDU of the cluster uses to select the same pixel.
//
// The 4-bit address of the first pixel follows the design description. When
// several pixels rise in the same cycle, the lowest-numbered one wins: this
// tie-break is this design's own choice.
module acu
  import mpgd_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [CL_PIX-1:0]  rise,
  input  logic               arm,
  output logic               addr_valid,
  output logic [PADDR_W-1:0] addr,
  output logic [PADDR_W-1:0] first
);

  assign first = first_of16(rise);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr_valid <= 1'b0;
      addr       <= '0;
    end else if (arm) begin
      addr_valid <= |rise;
      if (|rise) addr <= first;
    end
  end

endmodule
