// tb_gasp_place: a place driven by random legal fill/drain pulses.
//
// A reference model of the place (one state bit and one data word) is kept
// in the testbench. Each clock the testbench fires the feeding path when the
// model says EMPTY, or the draining path when it says FULL, each with some
// probability, and then compares the state conductor (including its LO=FULL
// polarity), the full flag and the latched data with the model. It also
// checks that the latch holds while `d` changes outside a fill.
module tb_gasp_place;
  import gasp_pkg::*;
  localparam int W = 8;

  logic clk = 0, rst_n = 0;
  logic fill = 0, drain = 0;
  logic [W-1:0] d = '0, q;
  gasp_state_e state;
  logic full;
  int checks = 0, failures = 0;
  int fills = 0, drains = 0;

  gasp_place #(.WIDTH(W)) dut (.clk, .rst_n, .fill, .drain, .d, .q, .state, .full);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic         m_full;
    logic [W-1:0] m_data;
    m_full = 0;
    m_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset state", W'(state), W'(1'b1));  // HI = EMPTY
    check("reset full", W'(full), '0);
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      d     = W'($urandom);
      fill  = !m_full && ($urandom_range(0, 2) != 0);
      drain =  m_full && ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (fill) begin m_full = 1; m_data = d; fills++; end
      else if (drain) begin m_full = 0; drains++; end
      @(negedge clk);
      fill = 0; drain = 0;
      d = ~d;
      #1;
      check("full", W'(full), W'(m_full));
      check("state level", W'(state), W'(!m_full));  // LO = FULL
      if (m_full) check("data", q, m_data);
    end
    checks++;
    if (fills < 100 || drains < 100) begin
      failures++;
      $display("FAIL too few events: fills=%0d drains=%0d", fills, drains);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
