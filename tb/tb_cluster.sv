// tb_cluster: pulses on random pixels of one cluster, with a second pixel
// firing while the cluster is busy; checks the request latency (t+n+1),
// the stored pixel address, arrival time and time over threshold, and that
// the late pixel is dropped.
module tb_cluster;
  import mpgd_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] hit;          // by pixel number
  logic [3:0][3:0] hit_rc;   // by row and column inside the cluster
  logic [TOA_W-1:0] time_now;
  logic grant, req;
  cluster_data_t data;
  int checks = 0, failures = 0;

  cluster dut (.clk, .rst_n, .hit_rc, .time_now, .grant, .req, .data);

  // Serpentine numbering: row a/4; column a%4 in even rows, 3-a%4 in odd rows.
  always_comb
    for (int a = 0; a < 16; a++)
      hit_rc[a / 4][((a / 4) % 2 == 0) ? a % 4 : 3 - a % 4] = hit[a];
  always #5 clk = ~clk;
  always_ff @(posedge clk) time_now <= rst_n ? time_now + 1'b1 : '0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int p, q2, len, wait_c; logic [TOA_W-1:0] t0;
    hit = 0; grant = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int it = 0; it < 200; it++) begin
      p = $urandom_range(0, 15);
      q2 = (p + 1 + $urandom_range(0, 14)) % 16;
      len = $urandom_range(1, 20);
      hit[p] = 1; t0 = time_now;
      @(negedge clk); hit[q2] = 1;
      for (int c = 1; c < len; c++) @(negedge clk);
      hit[p] = 0;
      checks++; if (req) begin failures++; $display("req early"); end
      @(negedge clk);
      checks++;
      if (!req || data.paddr != 4'(p) || data.toa != t0 || data.tot != 8'(len)) begin
        failures++; $display("p %0d len %0d: req %0b paddr %0d toa %0d/%0d tot %0d", p, len, req, data.paddr, data.toa, t0, data.tot);
      end
      hit = 0;
      wait_c = $urandom_range(0, 3);
      repeat (wait_c) @(negedge clk);
      checks++; if (!req) begin failures++; $display("req dropped"); end
      grant = 1;
      @(negedge clk); grant = 0;
      checks++; if (req) begin failures++; $display("req not cleared"); end
      @(negedge clk);
      checks++; if (req) begin failures++; $display("late pixel was recorded"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
