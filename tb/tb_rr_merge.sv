// tb_rr_merge: round-robin merge against a counter-based reference.
//
// The testbench models the K input places and the destination place and
// fills / drains them at random. The reference pointer is a counter modulo
// K: the merge must take from input `ptr` exactly when that input is FULL
// and the destination is EMPTY, must report `ptr` on `sel`, and must leave
// every other FULL input alone. The run must see the pointer wrap and must
// see the merge wait for input `ptr` while another input is already FULL.
module tb_rr_merge;
  localparam int K = 5;
  localparam int SW = $clog2(K);

  logic clk = 0, rst_n = 0;
  logic [K-1:0] src_full = '0;
  logic dst_full = 0;
  logic [K-1:0] fire, token;
  logic dst_fill;
  logic [SW-1:0] sel;
  int checks = 0, failures = 0;
  int fires = 0, wraps = 0, waits = 0;

  rr_merge #(.K(K)) dut (.clk, .rst_n, .src_full, .dst_full, .fire, .dst_fill, .sel, .token);

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
    logic [K-1:0] m_src;
    logic m_dst;
    ptr = 0;
    m_src = '0;
    m_dst = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      src_full = m_src;
      dst_full = m_dst;
      for (int i = 0; i < K; i++)
        if (!src_full[i] && $urandom_range(0, 5) == 0) src_full[i] = 1;
      m_src = src_full;
      if (dst_full && $urandom_range(0, 2) != 0) dst_full = 0;
      m_dst = dst_full;
      #1;
      exp_fire = (src_full[ptr] && !dst_full) ? K'(1) << ptr : '0;
      if (!src_full[ptr] && src_full != '0 && !dst_full) waits++;
      check("token", token, K'(1) << ptr);
      check("fire", fire, exp_fire);
      check("dst_fill", K'(dst_fill), K'(exp_fire != '0));
      if (exp_fire != '0) check("sel", K'(sel), K'(ptr));
      @(posedge clk);
      if (exp_fire != '0) begin
        m_src[ptr] = 0;
        m_dst = 1;
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
