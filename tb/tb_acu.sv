// tb_acu: drives random rising-edge vectors with the arm signal on and off
// and checks the stored address (lowest rising pixel) and its valid flag
// against a model.
module tb_acu;
  import mpgd_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] rise;
  logic arm, addr_valid;
  logic [3:0] addr, first;
  int checks = 0, failures = 0;
  logic       m_valid;
  logic [3:0] m_addr;

  acu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [3:0] lowest(logic [15:0] v);
    for (int i = 0; i < 16; i++) if (v[i]) return 4'(i);
    return 4'd0;
  endfunction

  initial begin
    rise = 0; arm = 0; m_valid = 0; m_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      arm  = $urandom_range(0, 2) != 0;
      case ($urandom_range(0, 3))
        0: rise = '0;
        1: rise = 16'(1) << $urandom_range(0, 15);
        default: rise = 16'($urandom) & 16'($urandom);
      endcase
      #1;
      if (rise != 0) begin
        checks++;
        if (first != lowest(rise)) begin failures++; $display("first %0d for %h", first, rise); end
      end
      @(posedge clk);
      if (arm) begin m_valid = |rise; if (|rise) m_addr = lowest(rise); end
      #1;
      checks++;
      if (addr_valid != m_valid || (m_valid && addr != m_addr)) begin
        failures++; $display("acu: valid %0b addr %0d exp %0b %0d", addr_valid, addr, m_valid, m_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
