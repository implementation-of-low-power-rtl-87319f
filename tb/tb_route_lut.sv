// tb_route_lut: self-checking test of route_lut against a reference array.
//
// After reset no destination may hit. Random writes and reads on both ports
// and invalidations are then compared every cycle with a model kept in the
// testbench; a write must be visible from the following cycle on, and wins
// over an invalidation of the same entry in the same cycle.
module tb_route_lut;
  import wsn_pkg::*;

  logic clk = 0, rst, we, inv, hit_a, hit_b;
  addr_t wr_dst, wr_next, inv_dst, rd_dst_a, rd_dst_b, next_a, next_b;
  logic  m_valid [16];
  addr_t m_next  [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  route_lut dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    rst = 1; we = 0; inv = 0; inv_dst = 0; wr_dst = 0; wr_next = 0; rd_dst_a = 0; rd_dst_b = 0;
    for (int i = 0; i < 16; i++) begin m_valid[i] = 0; m_next[i] = 0; end
    @(posedge clk); @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 16; i++) begin
      rd_dst_a = addr_t'(i); rd_dst_b = addr_t'(15 - i); #1;
      check("empty after reset", !hit_a && !hit_b);
    end
    for (int n = 0; n < 1000; n++) begin
      we = ($urandom_range(3, 0) == 0);
      inv = ($urandom_range(4, 0) == 0);
      inv_dst = (n % 7 == 0) ? wr_dst : addr_t'($urandom);
      wr_dst = addr_t'($urandom); wr_next = addr_t'($urandom);
      if (n % 11 == 0) inv_dst = wr_dst;
      rd_dst_a = addr_t'($urandom); rd_dst_b = addr_t'($urandom);
      #1;
      check("port a hit", hit_a == m_valid[rd_dst_a]);
      if (m_valid[rd_dst_a]) check("port a next", next_a == m_next[rd_dst_a]);
      check("port b hit", hit_b == m_valid[rd_dst_b]);
      if (m_valid[rd_dst_b]) check("port b next", next_b == m_next[rd_dst_b]);
      @(posedge clk);
      if (inv) m_valid[inv_dst] = 0;
      if (we) begin m_valid[wr_dst] = 1; m_next[wr_dst] = wr_next; end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
