// tdc: time-to-digital converter of one cluster.
//
// The TDC measures a hit's arrival time and its energy, the latter as time
// over threshold. Both are taken from a free-running chip time counter that
// advances once per 200 MHz clock, which gives the 5 ns resolution of the
// design. When 1_hit is high while the TDC is free, the current time is stored
// as the arrival time (ToA) and the TDC starts measuring. The first cycle in
// which 1_hit is low again ends the measurement: the time over threshold (ToT)
// is the number of cycles 1_hit was high, saturated at 2**TOT_W-1, and done is
// raised. done holds the result until clear, which the token ring gives when
// it has taken the data; the TDC is free again from the next cycle.
//
// Interface: busy = measuring or holding a result; the cluster uses !busy as
// its arm signal. toa/tot are valid while done is high.
//
// Arrival time and energy from the 1_hit edges at 5 ns follow the design
// description; the counter-sampling structure and the widths are this
// design's own choice.
module tdc
  import mpgd_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             one_hit,
  input  logic [TOA_W-1:0] time_now,
  input  logic             clear,
  output logic             busy,
  output logic             done,
  output logic [TOA_W-1:0] toa,
  output logic [TOT_W-1:0] tot
);

  logic             meas;
  logic [TOA_W-1:0] elapsed;

  assign elapsed = time_now - toa;
  assign busy    = meas || done;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      meas <= 1'b0;
      done <= 1'b0;
      toa  <= '0;
      tot  <= '0;
    end else if (!busy) begin
      if (one_hit) begin
        meas <= 1'b1;
        toa  <= time_now;
      end
    end else if (meas) begin
      if (!one_hit) begin
        meas <= 1'b0;
        done <= 1'b1;
        tot  <= (elapsed > TOA_W'({TOT_W{1'b1}})) ? {TOT_W{1'b1}} : elapsed[TOT_W-1:0];
      end
    end else if (clear) begin
      done <= 1'b0;
    end
  end

endmodule
