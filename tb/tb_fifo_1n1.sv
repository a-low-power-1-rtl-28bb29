// tb_fifo_1n1: end-to-end test of the 1-n-1 FIFO at ten stages and eight-bit data.
//
// A scoreboard queue is the reference: every item accepted at the input must
// come out, in order, with the same data. On top of that the test measures
// what the design promises:
//   * latency: a lone item accepted in clock t shows on out_valid in t+3;
//   * capacity / overflow: with the output blocked the FIFO takes exactly
//     N_STAGES items and then holds in_ready low;
//   * rate: while streaming, and while draining a full FIFO, one item moves
//     every two clocks;
//   * round robin: the j-th item written into the middle row goes to middle
//     stage j mod (N_STAGES-2); the scoreboard shows the merge takes them
//     back in the same order;
//   * constant work: each item opens exactly three stage latches (S1, one
//     middle stage, Sn), whatever the depth.
// Mechanisms counted, each of which must occur: overflow stall, empty output,
// output back-pressure, branch pointer wrap, merge pointer wrap, and
// several items parked side by side in the middle row.
module tb_fifo_1n1;
  import gasp_pkg::*;
  localparam int N = 10;  // the ten-stage configuration
  localparam int W = 8;   // wider than one bit so that ordering errors show
  localparam int K = N - 2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_ready = 0;
  logic [W-1:0] in_data = '0;
  logic in_ready, out_valid;
  logic [W-1:0] out_data;
  logic [N-1:0] latch_en;

  fifo_1n1 #(.N_STAGES(N), .WIDTH(W)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .latch_en
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  logic [W-1:0] sb [$];
  int accepted = 0, delivered = 0, latch_pulses = 0;
  int mid_writes = 0, mid_reads = 0;
  int n_overflow = 0, n_empty = 0, n_backpressure = 0;
  int n_branch_wrap = 0, n_merge_wrap = 0, n_mid_wait = 0;
  longint last_accept = -1, last_deliver = -1;
  longint accept_cycle [$];

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d: got %0d expected %0d", what, cycle, got, exp);
    end
  endtask

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: sampled just before each rising edge.
  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    latch_pulses += $countones(latch_en);
    for (int i = 0; i < K; i++) begin
      if (latch_en[1 + i]) begin
        check("branch target", i, mid_writes % K);
        if (i == K - 1) n_branch_wrap++;
        mid_writes++;
      end
    end
    if (mid_writes - mid_reads >= 2) n_mid_wait++;
    if (latch_en[N - 1]) begin
      // the merge takes from middle stage mid_reads % K
      if (mid_reads % K == K - 1) n_merge_wrap++;
      mid_reads++;
    end
    if (in_valid && !in_ready) n_overflow++;
    if (out_ready && !out_valid) n_empty++;
    if (out_valid && !out_ready) n_backpressure++;
    if (in_valid && in_ready) begin
      sb.push_back(in_data);
      accept_cycle.push_back(cycle);
      accepted++;
      last_accept = cycle;
    end
    if (out_valid && out_ready) begin
      logic [W-1:0] exp;
      checks++;
      if (sb.size() == 0) begin
        failures++;
        $display("FAIL output with nothing accepted at cycle %0d", cycle);
      end else begin
        exp = sb.pop_front();
        void'(accept_cycle.pop_front());
        if (out_data !== exp) begin
          failures++;
          if (failures < 20) $display("FAIL data at cycle %0d: got %h expected %h", cycle, out_data, exp);
        end
      end
      delivered++;
      last_deliver = cycle;
    end
  end

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  initial begin
    longint t0;
    int got;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    tick();
    check("reset in_ready", in_ready, 1);
    check("reset out_valid", out_valid, 0);

    // ---- latency of a lone item -----------------------------------------
    in_valid = 1; in_data = W'($urandom); out_ready = 1;
    tick();                      // accepted at this edge
    in_valid = 0;
    t0 = cycle - 1;
    while (!out_valid) tick();
    check("latency", cycle - t0, 3);
    tick();
    repeat (4) tick();

    // ---- fill until overflow ---------------------------------------------
    out_ready = 0;
    got = 0;
    for (int t = 0; t < 4 * N + 10; t++) begin
      in_valid = 1; in_data = W'($urandom);
      @(posedge clk);
      if (in_ready) got++;
      #1;
    end
    in_valid = 0;
    check("capacity", got, N);
    check("in_ready when full", in_ready, 0);
    check("out_valid when full", out_valid, 1);

    // ---- drain at full rate ---------------------------------------------
    out_ready = 1;
    t0 = -1;
    got = 0;
    while (got < N) begin
      @(posedge clk);
      if (out_valid) begin
        if (t0 < 0) t0 = cycle;
        got++;
      end
      #1;
    end
    check("drain rate (clocks for N items)", last_deliver - t0, 2 * (N - 1));
    repeat (4) tick();
    check("empty after drain", out_valid, 0);

    // ---- streaming rate --------------------------------------------------
    begin
      longint first, prev;
      int intervals_bad;
      int stream_n;
      stream_n = 6 * N;
      first = -1; prev = -1; intervals_bad = 0; got = 0;
      in_valid = 1; out_ready = 1;
      while (got < stream_n) begin
        in_data = W'($urandom);
        @(posedge clk);
        if (in_ready) begin
          if (prev >= 0 && cycle - prev != 2) intervals_bad++;
          if (first < 0) first = cycle;
          prev = cycle;
          got++;
        end
        #1;
      end
      in_valid = 0;
      check("streaming accept interval != 2", intervals_bad, 0);
      check("streaming clocks for items", prev - first, 2 * (stream_n - 1));
    end
    repeat (8) tick();

    // ---- random traffic --------------------------------------------------
    for (int t = 0; t < 20000; t++) begin
      in_valid  = ($urandom_range(0, 3) != 0);
      in_data   = W'($urandom);
      out_ready = ($urandom_range(0, 2) == 0) || (t > 20000 - 200 && t % 2 == 0);
      tick();
    end
    in_valid = 0; out_ready = 1;
    repeat (4 * N + 10) tick();

    // ---- totals ------------------------------------------------------------
    check("all items delivered", delivered, accepted);
    check("scoreboard empty", sb.size(), 0);
    check("three latch openings per item", latch_pulses, 3 * accepted);
    check("middle-row writes", mid_writes, accepted);
    checks++;
    if (n_overflow == 0 || n_empty == 0 || n_backpressure == 0 ||
        n_branch_wrap == 0 || n_merge_wrap == 0 || n_mid_wait == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("items=%0d overflow=%0d empty=%0d backpressure=%0d branch_wrap=%0d merge_wrap=%0d mid_parallel=%0d",
             accepted, n_overflow, n_empty, n_backpressure, n_branch_wrap, n_merge_wrap, n_mid_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
