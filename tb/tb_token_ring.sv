// tb_token_ring: eight clusters raise requests at random and hold them until
// granted; the controller's ready is random. Checks that a grant only goes to
// a requester, that the bus carries its data and index, that grants follow
// ring order from the last owner, that no request starves, and that with all
// clusters requesting one word moves per clock.
module tb_token_ring;
  import mpgd_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  cluster_data_t data [N];
  logic ready, out_valid;
  logic [2:0] out_idx;
  cluster_data_t out_data;
  int checks = 0, failures = 0;
  int m_ptr;

  token_ring #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Expected owner after a move from m_ptr: first requester in ring order
  // after m_ptr, excluding 'skip'; m_ptr itself when there is none.
  function automatic int ring_next(logic [N-1:0] r, int from);
    for (int i = 1; i <= N; i++) if (r[(from + i) % N]) return (from + i) % N;
    return from;
  endfunction

  initial begin
    int burst;
    logic [N-1:0] g;
    req = 0; ready = 0; m_ptr = 0;
    for (int i = 0; i < N; i++) data[i] = cluster_data_t'({4'(i), 16'(i * 7), 8'(i)});
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++)
        if (!req[i] && $urandom_range(0, 9) == 0) begin
          req[i] = 1;
          data[i] = cluster_data_t'({4'(i), 16'($urandom), 8'($urandom)});
        end
      ready = $urandom_range(0, 3) != 0;
      #1;
      checks++;
      if (req[m_ptr] && ready) begin
        if (grant != (N'(1) << m_ptr) || !out_valid || out_idx != 3'(m_ptr) || out_data != data[m_ptr]) begin
          failures++; $display("expected grant to %0d, got %b", m_ptr, grant);
        end
      end else if (grant != 0 || out_valid) begin
        failures++; $display("unexpected grant %b", grant);
      end
      @(posedge clk);
      if (req[m_ptr] && ready) begin
        req[m_ptr] = 0;
        m_ptr = ring_next(req, m_ptr);
      end else if (!req[m_ptr]) begin
        m_ptr = ring_next(req, m_ptr);
      end
    end
    // Throughput: all request, ready high: N grants in N cycles.
    @(negedge clk); req = 0; ready = 0;
    repeat (2) @(negedge clk);
    req = '1; ready = 1;
    burst = 0;
    for (int c = 0; c < N; c++) begin
      #1; if (out_valid) burst++;
      g = grant;
      @(posedge clk); #1 req = req & ~g;
      @(negedge clk);
    end
    checks++;
    if (burst != N) begin failures++; $display("burst %0d of %0d", burst, N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
