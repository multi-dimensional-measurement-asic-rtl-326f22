// tb_tdc: pulses of random length on 1_hit; checks the arrival time, the
// time over threshold (in 5 ns clocks, saturating at 255), the busy/done
// handshake and that clear frees the TDC.
module tb_tdc;
  import mpgd_pkg::*;
  logic clk = 0, rst_n = 0;
  logic one_hit, clear, busy, done;
  logic [TOA_W-1:0] time_now, toa;
  logic [TOT_W-1:0] tot;
  int checks = 0, failures = 0, n_sat = 0;

  tdc dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) time_now <= rst_n ? time_now + 1'b1 : 16'hFF00;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int len; logic [TOA_W-1:0] t0;
    one_hit = 0; clear = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 120; it++) begin
      len = (it % 10 == 9) ? $urandom_range(256, 400) : $urandom_range(1, 40);
      @(negedge clk); one_hit = 1; t0 = time_now;
      repeat (len) @(negedge clk);
      one_hit = 0;
      checks++; if (!busy || done) begin failures++; $display("not measuring"); end
      @(negedge clk);
      checks++;
      if (!done || toa != t0 || tot != ((len > 255) ? 8'd255 : 8'(len))) begin
        failures++; $display("len %0d: done %0b toa %0d exp %0d tot %0d", len, done, toa, t0, tot);
      end
      if (len > 255) n_sat++;
      one_hit = 1;                                 // ignored while done
      @(negedge clk);
      checks++; if (!done || toa != t0) begin failures++; $display("restarted while done"); end
      one_hit = 0; clear = 1;
      @(negedge clk); clear = 0;
      checks++; if (busy) begin failures++; $display("not freed"); end
    end
    checks++; if (n_sat == 0) begin failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
