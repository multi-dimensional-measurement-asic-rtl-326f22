// tb_scc: random words from the token ring side with the FIFO read side
// stalled for long stretches; checks the hit word layout (row, column,
// times), that in_ready keeps every accepted word and that the order is kept.
module tb_scc;
  import mpgd_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, rd_en, empty;
  logic [7:0] in_idx;
  cluster_data_t in_data;
  hit_word_t rd_data;
  hit_word_t q[$];
  int checks = 0, failures = 0, n_stall = 0, n_out = 0;

  scc #(.DEPTH(DEPTH), .IDX_W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic hit_word_t expect_word(logic [7:0] idx, cluster_data_t d);
    hit_word_t w;
    int r, c;
    r = d.paddr / 4;
    c = (r % 2 == 0) ? d.paddr % 4 : 3 - d.paddr % 4;   // serpentine numbering
    w.row = 10'(idx * 4 + r);
    w.col = 10'(c);
    w.toa = d.toa;
    w.tot = d.tot;
    return w;
  endfunction

  initial begin
    in_valid = 0; rd_en = 0; in_idx = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 1);
      in_idx   = 8'($urandom);
      in_data  = cluster_data_t'({4'($urandom), 16'($urandom), 8'($urandom)});
      rd_en    = !empty && (((i / 200) % 2) == 1) && $urandom_range(0, 3) != 0;
      #1;
      if (in_valid && !in_ready) n_stall++;
      if (rd_en) begin
        checks++; n_out++;
        if (q.size() == 0 || rd_data != q[0]) begin
          failures++; $display("word %h exp %h", rd_data, q.size() ? q[0] : '0);
        end else void'(q.pop_front());
      end
      if (in_valid && in_ready) q.push_back(expect_word(in_idx, in_data));
    end
    checks++; if (n_stall == 0) begin failures++; $display("never stalled"); end
    checks++; if (n_out < 100) begin failures++; $display("few words"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
