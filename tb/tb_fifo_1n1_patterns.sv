// tb_fifo_1n1_patterns: the measured workloads, run on both depths.
//
// The design was characterised at ten and eighteen stages of one-bit data,
// with the input offered a new item as fast as the FIFO takes it, under
// three input patterns: requests with constant data, "monotonous" data (long
// runs of all 0 or all 1) and varied (random) data. This testbench streams
// each pattern through a 10-stage and an 18-stage FIFO side by side with
// the output always ready, and checks for each run:
//   * every item comes out in order with its data (scoreboard per FIFO);
//   * the sustained rate is one item per two clocks;
//   * each item opens exactly three stage latches, at both depths, which is
//     the constant per-item activity the 1-n-1 structure is built for;
//   * the number of output data toggles matches the toggles of the input
//     stream (a one-bit FIFO passes the pattern through unchanged).
module tb_fifo_1n1_patterns;
  import gasp_pkg::*;
  localparam int NA = 10;
  localparam int NB = 18;
  localparam int ITEMS = 2000;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_ready = 1;
  logic in_data = 0;
  logic a_in_ready, a_out_valid, a_out_data;
  logic b_in_ready, b_out_valid, b_out_data;
  logic [NA-1:0] a_latch_en;
  logic [NB-1:0] b_latch_en;

  fifo_1n1 #(.N_STAGES(NA), .WIDTH(1)) u_a (
    .clk, .rst_n, .in_valid, .in_ready(a_in_ready), .in_data,
    .out_valid(a_out_valid), .out_ready, .out_data(a_out_data), .latch_en(a_latch_en)
  );
  fifo_1n1 #(.N_STAGES(NB), .WIDTH(1)) u_b (
    .clk, .rst_n, .in_valid, .in_ready(b_in_ready), .in_data,
    .out_valid(b_out_valid), .out_ready, .out_data(b_out_data), .latch_en(b_latch_en)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic sb_a [$], sb_b [$];
  int a_acc, b_acc, a_out, b_out, a_lat, b_lat, a_tog, b_tog;
  logic a_prev, b_prev;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Both FIFOs see the same input; each has its own scoreboard and counters.
  always @(posedge clk) if (rst_n) begin
    a_lat += $countones(a_latch_en);
    b_lat += $countones(b_latch_en);
    if (in_valid && a_in_ready) begin sb_a.push_back(in_data); a_acc++; end
    if (in_valid && b_in_ready) begin sb_b.push_back(in_data); b_acc++; end
    if (a_out_valid && out_ready) begin
      checks++;
      if (sb_a.size() == 0 || sb_a.pop_front() !== a_out_data) failures++;
      if (a_out > 0 && a_out_data != a_prev) a_tog++;
      a_prev = a_out_data;
      a_out++;
    end
    if (b_out_valid && out_ready) begin
      checks++;
      if (sb_b.size() == 0 || sb_b.pop_front() !== b_out_data) failures++;
      if (b_out > 0 && b_out_data != b_prev) b_tog++;
      b_prev = b_out_data;
      b_out++;
    end
  end

  // Pattern generator: 0 = constant data, 1 = runs of 64, 2 = random.
  function automatic logic pattern_bit(int pat, int k);
    case (pat)
      0:       return 1'b0;
      1:       return k[6];
      default: return 1'($urandom);
    endcase
  endfunction

  initial begin
    string names [3] = '{"constant data", "monotonous runs", "varied data"};
    for (int pat = 0; pat < 3; pat++) begin
      int sent_a, sent_b, in_tog, k;
      longint first, last, cyc;
      logic prev_in;
      rst_n = 0;
      sb_a.delete(); sb_b.delete();
      a_acc = 0; b_acc = 0; a_out = 0; b_out = 0; a_lat = 0; b_lat = 0; a_tog = 0; b_tog = 0;
      repeat (3) @(posedge clk);
      #1 rst_n = 1;
      sent_a = 0; sent_b = 0; in_tog = 0; k = 0; first = -1; last = -1; cyc = 0; prev_in = 0;
      in_data = pattern_bit(pat, 0);
      // Both depths accept in lock-step (S1 behaves the same), so one
      // stream drives both.
      in_valid = 1;
      while (sent_a < ITEMS) begin
        @(posedge clk);
        cyc++;
        if (a_in_ready) begin
          if (first < 0) first = cyc;
          last = cyc;
          if (sent_a > 0 && in_data != prev_in) in_tog++;
          prev_in = in_data;
          sent_a++;
          k++;
        end
        if (b_in_ready) sent_b++;
        #1 in_data = pattern_bit(pat, k);
      end
      in_valid = 0;
      repeat (4 * NB) @(posedge clk);
      #1;
      $display("%s: items %0d/%0d, latch openings %0d/%0d, output toggles %0d/%0d, input toggles %0d",
               names[pat], a_out, b_out, a_lat, b_lat, a_tog, b_tog, in_tog);
      check("10-stage and 18-stage accept in lock-step", sent_b, sent_a);
      check("sustained rate, 10/18 stages", last - first, 2 * (ITEMS - 1));
      check("10-stage items out", a_out, ITEMS);
      check("18-stage items out", b_out, ITEMS);
      check("10-stage latch openings = 3 per item", a_lat, 3 * ITEMS);
      check("18-stage latch openings = 3 per item", b_lat, 3 * ITEMS);
      check("10-stage output toggles", a_tog, in_tog);
      check("18-stage output toggles", b_tog, in_tog);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
