// tb_readout_controller: sixteen column block FIFOs (queues) feed the tree of
// cyclic arbiters (two levels at this size). Checks that every word leaves
// once, in order per column block, with the column block number in column
// bits [7:4]; that output backpressure loses nothing; and that with all
// FIFOs full the output carries one word per clock.
module tb_readout_controller;
  import mpgd_pkg::*;
  localparam int NCB = 16;
  logic clk = 0, rst_n = 0;
  logic [NCB-1:0] cb_empty, cb_rd;
  hit_word_t cb_data [NCB];
  logic out_valid, out_ready;
  hit_word_t out_data;
  hit_word_t q[NCB][$];
  hit_word_t exp_q[NCB][$];
  int checks = 0, failures = 0, n_words = 0, n_bp = 0;

  readout_controller #(.NUM_CB(NCB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic drive();
    for (int k = 0; k < NCB; k++) begin
      cb_empty[k] = (q[k].size() == 0);
      cb_data[k]  = cb_empty[k] ? '0 : q[k][0];
    end
  endtask

  task automatic push(int k);
    hit_word_t w;
    w = hit_word_t'({$urandom, $urandom});
    w.col[7:4] = 4'b0;
    q[k].push_back(w);
    w.col[7:4] = 4'(k);
    exp_q[k].push_back(w);
  endtask

  initial begin
    int ch, run, best_run; logic [NCB-1:0] rd_s;
    out_ready = 0; drive();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: random traffic and random backpressure
    // phase 2: every FIFO holds 8 words, output always ready
    run = 0; best_run = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (i < 2500) begin
        for (int k = 0; k < NCB; k++) if ($urandom_range(0, 19) == 0) push(k);
      end else if (i == 3000) begin
        for (int k = 0; k < NCB; k++) repeat (8) push(k);
      end
      drive();
      out_ready = (i >= 3000) || ($urandom_range(0, 3) != 0);
      #1;
      if (out_valid && !out_ready) n_bp++;
      if (out_valid && out_ready) begin
        ch = int'(out_data.col[7:4]);
        checks++; n_words++;
        if (exp_q[ch].size() == 0 || out_data != exp_q[ch][0]) begin
          failures++; $display("word %h unexpected", out_data);
        end else void'(exp_q[ch].pop_front());
        if (i > 3000) begin run++; if (run > best_run) best_run = run; end
      end else run = 0;
      rd_s = cb_rd;
      @(posedge clk);
      for (int k = 0; k < NCB; k++) if (rd_s[k]) void'(q[k].pop_front());
    end
    for (int k = 0; k < NCB; k++) begin
      checks++;
      if (exp_q[k].size() != 0) begin failures++; $display("block %0d lost %0d words", k, exp_q[k].size()); end
    end
    checks++; if (best_run < NCB * 8 - 4) begin failures++; $display("burst of only %0d words", best_run); end
    checks++; if (n_bp == 0) begin failures++; $display("no backpressure seen"); end
    $display("words %0d longest back-to-back run %0d backpressure cycles %0d", n_words, best_run, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
