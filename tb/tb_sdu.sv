// tb_sdu: applies overlapping pulses on several pixels of a cluster and
// checks that 1_hit follows only the first pixel that rose while armed,
// rising in the cycle of its edge and falling with it.
module tb_sdu;
  import mpgd_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] hit, hit_q, rise;
  logic arm, one_hit;
  logic [3:0] first;
  int checks = 0, failures = 0;

  sdu dut (.*);
  always #5 clk = ~clk;
  assign rise  = hit & ~hit_q;
  always_comb begin
    first = 0;
    for (int i = 15; i >= 0; i--) if (rise[i]) first = 4'(i);
  end
  always_ff @(posedge clk) hit_q <= rst_n ? hit : '0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_one(logic e, string what);
    checks++;
    if (one_hit !== e) begin failures++; $display("%s: one_hit %0b exp %0b at %0t", what, one_hit, e, $time); end
  endtask

  initial begin
    int p, q2, len;
    hit = 0; arm = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      p = $urandom_range(0, 15);
      q2 = (p + 1 + $urandom_range(0, 14)) % 16;
      len = $urandom_range(1, 6);
      @(negedge clk); arm = 1; hit = 0; hit[p] = 1;
      #1 expect_one(1, "rise");
      @(negedge clk); arm = 0; hit[q2] = 1;          // second pixel while locked
      for (int c = 1; c < len; c++) begin
        #1 expect_one(1, "follow first");
        @(negedge clk);
      end
      hit[p] = 0;                                   // first pixel falls, second still high
      #1 expect_one(0, "fall of first");
      @(negedge clk);
      #1 expect_one(0, "stays low");
      hit = 0;
      @(negedge clk); arm = 1;                      // re-arm with nothing rising
      #1 expect_one(0, "armed idle");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
