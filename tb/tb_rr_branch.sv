// tb_rr_branch: round-robin branch against a counter-based reference.
//
// The testbench models the source place and the K output places itself and
// fills / drains them at random. The reference for the pointer is a plain
// counter modulo K: the branch must fire into output `ptr` exactly when the
// source is FULL and that output is EMPTY, never into any other output, and
// the counter advances on each firing. The run must see the pointer wrap
// and must see the branch wait on a FULL output while another is EMPTY
// (items never skip ahead out of turn).
module tb_rr_branch;
  localparam int K = 4;

  logic clk = 0, rst_n = 0;
  logic src_full = 0;
  logic [K-1:0] dst_full = '0;
  logic [K-1:0] fire, token;
  logic src_drain;
  int checks = 0, failures = 0;
  int fires = 0, wraps = 0, waits = 0;

  rr_branch #(.K(K)) dut (.clk, .rst_n, .src_full, .dst_full, .fire, .src_drain, .token);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [K-1:0] got, input logic [K-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ptr;
    logic [K-1:0] exp_fire;
    logic m_src;
    logic [K-1:0] m_dst;
    ptr = 0;
    m_src = 0;
    m_dst = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      src_full = m_src;
      dst_full = m_dst;
      // environment: refill the source, drain outputs at random
      if (!src_full && $urandom_range(0, 3) != 0) src_full = 1;
      m_src = src_full;
      for (int i = 0; i < K; i++)
        if (dst_full[i] && $urandom_range(0, 4) == 0) dst_full[i] = 0;
      m_dst = dst_full;
      #1;
      exp_fire = (src_full && !dst_full[ptr]) ? K'(1) << ptr : '0;
      if (src_full && dst_full[ptr] && (dst_full != '1)) waits++;
      check("token", token, K'(1) << ptr);
      check("fire", fire, exp_fire);
      check("src_drain", K'(src_drain), K'(exp_fire != '0));
      @(posedge clk);
      if (exp_fire != '0) begin
        m_src = 0;
        m_dst[ptr] = 1;
        fires++;
        if (ptr == K - 1) wraps++;
        ptr = (ptr + 1) % K;
      end
    end
    checks++;
    if (fires < 100 || wraps == 0 || waits == 0) begin
      failures++;
      $display("FAIL coverage: fires=%0d wraps=%0d waits=%0d", fires, wraps, waits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
