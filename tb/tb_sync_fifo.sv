// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, empty/full/count, and that a full FIFO refuses nothing it reports
// as accepted. DEPTH is reduced to 4 so that full is reached often.
module tb_sync_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, full, empty;
  logic [7:0] wr_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, n_full = 0;
  logic [7:0] q[$];

  sync_fifo #(.T(logic [7:0]), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH) || count != q.size()) begin
        failures++; $display("flags wrong: size %0d empty %0b full %0b count %0d", q.size(), empty, full, count);
      end
      if (q.size() > 0) begin
        checks++;
        if (rd_data != q[0]) begin failures++; $display("data %h exp %h", rd_data, q[0]); end
      end
      if (full) n_full++;
      wr_en   = !full && ($urandom_range(0, 99) < (i < 1000 ? 70 : 30));
      rd_en   = !empty && ($urandom_range(0, 99) < (i < 1000 ? 30 : 70));
      wr_data = 8'($urandom);
      @(posedge clk);
      #1;
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FIFO never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
