// tb_super_column: random pulses on the pixels of a 16-row super column
// (4 clusters); a second pixel fired while its cluster still measures must be
// dropped, and a few pulses are long enough to saturate the time over
// threshold. The bottom FIFO is read with long pauses so that the token ring
// stalls on a full FIFO. Every recorded hit must come out once with the right
// row, column, arrival time and time over threshold.
module tb_super_column;
  import mpgd_pkg::*;
  localparam int R = 16;
  localparam int C = 4;
  localparam int NCL = R * C / 16;
  logic clk = 0, rst_n = 0;
  logic [R-1:0][C-1:0] hit;
  logic [TOA_W-1:0] time_now;
  logic rd_en, empty;
  hit_word_t rd_data;
  super_column #(.ROWS(R), .SCC_DEPTH(2)) dut (.clk, .rst_n, .hit, .time_now, .rd_en, .empty, .rd_data);
  always_ff @(posedge clk) time_now <= rst_n ? time_now + 1'b1 : '0;

  int checks = 0, failures = 0;
  int left [R][C];
  int cl_busy [NCL];
  int cl_main_r [NCL], cl_main_c [NCL], cl_start [NCL];
  int cyc = 0;
  hit_word_t exp_q[$];
  int n_words = 0, n_dead = 0, n_sat = 0, n_pulses = 0;
  int n_pass = 0, n_bus_stall = 0, n_cbc_full = 0, n_cont_stay = 0, n_cont_switch = 0;
  int n_cyc_switch = 0, n_out_bp = 0;
  logic [3:0] last_cont_rd;
  logic [3:0] last_cyc_rd;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int cl_of(int r, int c);
    return (r / 4) * (C / 4) + c / 4;
  endfunction

  // Start a pulse of len cycles on pixel (r, c).
  task automatic pulse(int r, int c, int len, bit expected);
    hit_word_t w;
    left[r][c] = len;
    n_pulses++;
    if (expected) begin
      w.row = 10'(r); w.col = 10'(c); w.toa = time_now; w.tot = (len > 255) ? 8'd255 : 8'(len);
      exp_q.push_back(w);
      if (len > 255) n_sat++;
    end
  endtask

  task automatic try_main(int len);
    int k, r, c;
    k = $urandom_range(0, NCL - 1);
    if (cl_busy[k] != 0) return;
    r = (k / (C / 4)) * 4 + $urandom_range(0, 3);
    c = (k % (C / 4)) * 4 + $urandom_range(0, 3);
    if (left[r][c] != 0 || hit[r][c]) return;
    cl_busy[k] = 1; cl_main_r[k] = r; cl_main_c[k] = c; cl_start[k] = cyc;
    pulse(r, c, len, 1);
  endtask

  // A second pixel in a cluster that is still measuring: must be dropped.
  task automatic try_dead();
    int k, r, c;
    k = $urandom_range(0, NCL - 1);
    if (cl_busy[k] == 0 || cl_start[k] == cyc || left[cl_main_r[k]][cl_main_c[k]] < 2) return;
    r = (k / (C / 4)) * 4 + $urandom_range(0, 3);
    c = (k % (C / 4)) * 4 + $urandom_range(0, 3);
    if (left[r][c] != 0 || hit[r][c]) return;
    n_dead++;
    pulse(r, c, $urandom_range(1, 8), 0);
  endtask

  task automatic apply_hits();
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        hit[r][c] = left[r][c] > 0;
        if (left[r][c] > 0) left[r][c]--;
      end
  endtask

  task automatic check_word(hit_word_t w);
    int idx;
    idx = -1;
    foreach (exp_q[i]) if (idx < 0 && exp_q[i] == w) idx = i;
    checks++; n_words++;
    if (idx < 0) begin
      failures++; $display("unexpected word row %0d col %0d toa %0d tot %0d", w.row, w.col, w.toa, w.tot);
    end else begin
      exp_q.delete(idx);
      cl_busy[cl_of(int'(w.row), int'(w.col))] = 0;
    end
  endtask

  // Mechanism counters on the first super column / column block.
  always @(negedge clk) if (rst_n) begin
    if (dut.u_ring.fire && |(dut.u_ring.req & ~dut.u_ring.grant)) n_pass++;
    if (dut.u_ring.req[dut.u_ring.ptr] && !dut.bus_ready) n_bus_stall++;
  end

  initial begin
    hit = '0; rd_en = 0;
    foreach (left[r, c]) left[r][c] = 0;
    foreach (cl_busy[k]) cl_busy[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000 + 3000; i++) begin
      @(negedge clk);
      cyc = i;
      if (i < 6000) begin
        if ($urandom_range(0, 99) < 30) try_main(($urandom_range(0, 199) == 0) ? 300 : $urandom_range(1, 12));
        if ($urandom_range(0, 9) == 0) try_dead();
      end
      apply_hits();
      rd_en = !empty && ((i / 400) % 2 == 1 || i >= 6000 || $urandom_range(0, 9) == 0);
      #1;
      if (!empty && !rd_en) n_out_bp++;
      if (!empty && rd_en) check_word(rd_data);
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d hits never read out", exp_q.size()); end
    $display("pulses %0d words %0d dead-time drops %0d tot-saturated %0d token passes %0d bus stalls %0d",
             n_pulses, n_words, n_dead, n_sat, n_pass, n_bus_stall);
    $display("cbc-full %0d continuous stays %0d continuous switches %0d cyclic switches %0d output backpressure %0d",
             n_cbc_full, n_cont_stay, n_cont_switch, n_cyc_switch, n_out_bp);
    checks++; if (n_dead == 0) begin failures++; $display("mechanism never seen: n_dead"); end
    checks++; if (n_sat == 0) begin failures++; $display("mechanism never seen: n_sat"); end
    checks++; if (n_pass == 0) begin failures++; $display("mechanism never seen: n_pass"); end
    checks++; if (n_bus_stall == 0) begin failures++; $display("mechanism never seen: n_bus_stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
