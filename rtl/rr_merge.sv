// rr_merge: round-robin merge from K parallel places into one place.
//
// This is the control of the last stage of a 1-n-1 FIFO. There is one GasP
// module per input. Module i has three self-resetting input pins: input
// place i is FULL, the destination place is EMPTY, and the pointer token
// sits at module i. When all three are set it fires: the item of input place
// i moves into the destination and the token moves on to module i+1 (module
// K-1 hands it back to module 0). Because the branch deals items out in the
// same rotation, the merge collects them in their arrival order; an item
// that is already waiting in another input place is left there until the
// token reaches it.
//
// Interface: `src_full` and `dst_full` are the state conductors around the
// merge. `fire` is one-hot (or zero) for one clock: `fire[i]` drains input
// place i, `dst_fill` fills the destination, and `sel` (the index of the
// firing module) steers the destination latch's input. All effects land at
// the next clock edge. After reset the token is at input 0. The clocked
// firing round is this design's abstraction of the self-timed circuit.
module rr_merge #(
  parameter int unsigned K    = 16,
  localparam int unsigned SELW = (K > 1) ? $clog2(K) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [K-1:0]         src_full,  // state of each input place
  input  logic                 dst_full,  // destination place holds an item
  output logic [K-1:0]         fire,      // module i fires this round
  output logic                 dst_fill,  // destination place becomes FULL
  output logic [SELW-1:0]      sel,       // index of the firing module
  output logic [K-1:0]         token      // pointer token position (one-hot)
);

  logic [K-1:0] tok_set, tok_clr;

  for (genvar i = 0; i < K; i++) begin : g_mod
    logic [2:0] pin_reset;
    gasp_module #(.NIN(3), .SELF_RESET(3'b111)) u_mod (
      .pin_set   ({token[i], !dst_full, src_full[i]}),
      .fire      (fire[i]),
      .pin_reset (pin_reset),
      .out_set   (tok_set[(i + 1) % K])
    );
    assign tok_clr[i] = pin_reset[2];
  end

  assign dst_fill = |fire;

  always_comb begin
    sel = '0;
    for (int i = 0; i < K; i++) begin
      if (fire[i]) sel = SELW'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) token <= K'(1);
    else        token <= (token & ~tok_clr) | tok_set;
  end

  a_token_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(token));
  a_fire_onehot:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(fire));

endmodule
