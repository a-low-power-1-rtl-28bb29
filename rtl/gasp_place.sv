// gasp_place: a GasP PLACE, i.e. a state conductor plus its data latch.
//
// The state conductor records whether the latch holds an item. It is set
// (FULL) by the path that feeds the place and reset (EMPTY) by the path that
// drains it; the stored level uses GasP's polarity, HI = EMPTY, LO = FULL.
// When the feeding path fires, the latch is made transparent for that round
// and captures `d`; at all other times it holds. No data is ever moved
// backwards: draining only changes the state bit.
//
// Interface: `fill` and `drain` are one-cycle fire pulses from the
// neighbouring GasP modules; `full` / `state` report the conductor; `q` is the
// latch output. Both take effect at the next clock edge. A feeding path may
// fire only into an EMPTY place and a draining path only from a FULL one;
// assertions check this, as GasP's firing rule guarantees it. Reset makes
// the place EMPTY and clears the latch (reset values are this design's
// choice; GasP only asks that every state be initialised).
module gasp_place
  import gasp_pkg::*;
#(
  parameter int unsigned WIDTH = DEFAULT_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             fill,   // feeding path fires: capture d, become FULL
  input  logic             drain,  // draining path fires: become EMPTY
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output gasp_state_e      state,
  output logic             full
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= GASP_EMPTY;
    end else if (fill) begin
      state <= GASP_FULL;
    end else if (drain) begin
      state <= GASP_EMPTY;
    end
  end

  // Data latch, transparent only during the round in which `fill` fires.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (fill) q <= d;
  end

  assign full = (state == GASP_FULL);

  // A path never fills a FULL place nor drains an EMPTY one, and a place is
  // never filled and drained in the same round.
  a_no_overfill:  assert property (@(posedge clk) disable iff (!rst_n) fill  |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) drain |-> full);
  a_not_both:     assert property (@(posedge clk) disable iff (!rst_n) !(fill && drain));

endmodule
