// tb_continuous_arbiter: four channel queues filled at random, with random
// backpressure. A reference model of the state diagram (IDLE, Read_0..3,
// stay on a channel until it is empty, then the next non-empty one in the
// order 0,1,2,3) predicts every read; the test also checks the channel tag in
// the output word, the order of words per channel, and counts channel
// switches, continuous runs, idles and stalls.
module tb_continuous_arbiter;
  import mpgd_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] empty, rd;
  hit_word_t data [4];
  logic out_ready, out_valid;
  hit_word_t out_data;
  hit_word_t q[4][$];
  int checks = 0, failures = 0;
  int s;                       // model state: -1 idle, else channel
  int n_switch = 0, n_stay = 0, n_idle = 0, n_stall = 0, n_words = 0;

  continuous_arbiter #(.TAG_LSB(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int first_from(logic [3:0] e, int from);
    for (int i = 0; i < 4; i++) if (!e[(from + i) % 4]) return (from + i) % 4;
    return -1;
  endfunction

  // Drive the FIFO view of the queues.
  task automatic drive();
    for (int k = 0; k < 4; k++) begin
      empty[k] = (q[k].size() == 0);
      data[k]  = empty[k] ? '0 : q[k][0];
    end
  endtask

  initial begin
    logic [3:0] exp_rd; hit_word_t w; int ns, prev_ch;
    out_ready = 0; s = -1; prev_ch = -1;
    drive();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // bursts of pushes, with quiet phases so the arbiter goes idle
      if ((i / 100) % 3 != 2)
        for (int k = 0; k < 4; k++)
          if ($urandom_range(0, 9) < 2) begin
            w = hit_word_t'({$urandom, $urandom});
            w.col[3:2] = 2'b00;
            q[k].push_back(w);
          end
      out_ready = $urandom_range(0, 9) != 0;
      drive();
      #1;
      exp_rd = (s >= 0 && !empty[s] && out_ready) ? 4'(1 << s) : 4'b0;
      checks++;
      if (rd != exp_rd || out_valid != (exp_rd != 0)) begin
        failures++; $display("cycle %0d: rd %b exp %b (state %0d, empty %b)", i, rd, exp_rd, s, empty);
      end
      if (exp_rd != 0) begin
        w = q[s][0]; w.col[3:2] = 2'(s);
        checks++;
        if (out_data != w) begin failures++; $display("data %h exp %h", out_data, w); end
        if (prev_ch == s) n_stay++; else if (prev_ch >= 0) n_switch++;
        prev_ch = s; n_words++;
      end
      if (s >= 0 && !empty[s] && !out_ready) n_stall++;
      if (&empty) ns = -1;
      else if (s < 0) ns = first_from(empty, 0);
      else if (empty[s]) ns = first_from(empty, s + 1);
      else ns = s;
      if (ns < 0 && s >= 0) n_idle++;
      @(posedge clk);
      if (exp_rd != 0) void'(q[s].pop_front());
      #1 drive();
      s = ns;
    end
    checks++; if (n_switch == 0 || n_stay == 0 || n_idle == 0 || n_stall == 0) begin
      failures++; $display("mechanism missing: switch %0d stay %0d idle %0d stall %0d", n_switch, n_stay, n_idle, n_stall);
    end
    $display("words %0d switches %0d stays %0d idles %0d stalls %0d", n_words, n_switch, n_stay, n_idle, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
