// tb_cbc: four super column FIFOs (modelled as queues) feed the column block
// controller while its FIFO is read at random, with long pauses so that the
// CBC FIFO fills. Checks that every word arrives once, in order per super
// column, with the super column number in column bits [3:2], and that a
// full CBC FIFO stalls the continuous arbiter without loss.
module tb_cbc;
  import mpgd_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] sc_empty, sc_rd;
  hit_word_t sc_data [4];
  logic rd_en, empty;
  hit_word_t rd_data;
  hit_word_t q[4][$];
  hit_word_t exp_q[4][$];
  int checks = 0, failures = 0, n_full = 0, n_words = 0;

  cbc #(.DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic drive();
    for (int k = 0; k < 4; k++) begin
      sc_empty[k] = (q[k].size() == 0);
      sc_data[k]  = sc_empty[k] ? '0 : q[k][0];
    end
  endtask

  initial begin
    hit_word_t w; int ch; logic [3:0] rd_s;
    rd_en = 0; drive();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (i < 3000)
        for (int k = 0; k < 4; k++)
          if ($urandom_range(0, 9) == 0) begin
            w = hit_word_t'({$urandom, $urandom});
            w.col[3:2] = 2'b00;
            q[k].push_back(w);
            w.col[3:2] = 2'(k);
            exp_q[k].push_back(w);
          end
      drive();
      rd_en = !empty && ((i / 150) % 2 == 1 || i >= 3000);
      #1;
      if (dut.full && !(&sc_empty)) n_full++;
      if (rd_en) begin
        ch = int'(rd_data.col[3:2]);
        checks++; n_words++;
        if (exp_q[ch].size() == 0 || rd_data != exp_q[ch][0]) begin
          failures++; $display("word %h unexpected", rd_data);
        end else void'(exp_q[ch].pop_front());
      end
      rd_s = sc_rd;
      @(posedge clk);
      for (int k = 0; k < 4; k++) if (rd_s[k]) void'(q[k].pop_front());
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (exp_q[k].size() != 0 || q[k].size() != 0) begin failures++; $display("channel %0d lost %0d words", k, exp_q[k].size()); end
    end
    checks++; if (n_full == 0) begin failures++; $display("CBC FIFO never full"); end
    $display("words %0d full-stall cycles %0d", n_words, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
