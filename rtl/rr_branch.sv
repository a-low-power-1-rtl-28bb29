// rr_branch: round-robin branch from one place into K parallel places.
//
// This is the control of the first stage of a 1-n-1 FIFO (and of any branch
// in a tree of such stages). There is one GasP module per output. Module i
// has three self-resetting input pins: the source place is FULL, output
// place i is EMPTY, and the pointer token sits at module i. When all three
// are set it fires: the item moves from the source into output place i and
// the token moves on to module i+1 (module K-1 hands it back to module 0).
// The pointer is thus a ring of state conductors with exactly one token,
// which is how data items are dealt out in strict rotation and how the merge
// on the far side can take them back in order.
//
// Interface: `src_full` and `dst_full` are the state conductors of the
// places around the branch. `fire` is one-hot (or zero) for one clock and
// goes to the places: `|fire` drains the source, `fire[i]` fills output i
// and opens its latch. `token` shows where the pointer is. All effects land
// at the next clock edge. After reset the token is at output 0, matching
// the "first item goes to the first middle stage" order of the design. The
// clocked firing round is this design's abstraction of the self-timed
// circuit.
module rr_branch #(
  parameter int unsigned K = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         src_full,  // source place holds an item
  input  logic [K-1:0] dst_full,  // state of each output place
  output logic [K-1:0] fire,      // module i fires this round
  output logic         src_drain, // source place becomes EMPTY
  output logic [K-1:0] token      // pointer token position (one-hot)
);

  logic [K-1:0] tok_set, tok_clr;

  for (genvar i = 0; i < K; i++) begin : g_mod
    logic [2:0] pin_reset;
    gasp_module #(.NIN(3), .SELF_RESET(3'b111)) u_mod (
      .pin_set   ({token[i], !dst_full[i], src_full}),
      .fire      (fire[i]),
      .pin_reset (pin_reset),
      .out_set   (tok_set[(i + 1) % K])
    );
    assign tok_clr[i] = pin_reset[2];
  end

  assign src_drain = |fire;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) token <= K'(1);
    else        token <= (token & ~tok_clr) | tok_set;
  end

  a_token_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(token));
  a_fire_onehot:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(fire));

endmodule
