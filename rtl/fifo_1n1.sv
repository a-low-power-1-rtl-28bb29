// fifo_1n1: a 1-n-1 FIFO built from GasP-style places and modules.
//
// The FIFO has N_STAGES one-item stages arranged as 1 + (N_STAGES-2) + 1:
// an input stage S1, a row of N_STAGES-2 middle stages side by side, and an
// output stage Sn. Every item makes exactly three stage moves (into S1, into
// one middle stage, into Sn), however deep the FIFO is, so the switching
// activity per item stays constant instead of growing with the depth as in a
// linear FIFO. Order is kept by two round-robin pointer tokens: the branch
// after S1 deals items out to the middle stages in rotation and the merge
// before Sn collects them in the same rotation.
//
// Control is GasP: a module fires when its predecessor place is FULL, its
// successor place is EMPTY and, for branch and merge modules, it holds the
// pointer token. There are 2*N_STAGES-2 modules: one input module, N-2
// branch modules, N-2 merge modules and one output module.
//
// This RTL evaluates every module once per clock; a clock period stands for
// one firing round of the self-timed circuit. A place cannot be filled and
// drained in the same round, so S1 and Sn each pass at most one item every
// two clocks: the peak rate is one item per two clocks. An item accepted in
// clock t is visible at the output (out_valid) in clock t+3 if the stages
// ahead of it are empty. The FIFO holds N_STAGES items; with all of them
// inside, in_ready stays low (the overflow condition) until one leaves.
//
// Interface: in_valid/in_ready/in_data and out_valid/out_ready/out_data
// follow a valid/ready handshake; an item moves when both are high at a
// clock edge. latch_en shows, for each stage (S1 first, Sn last), the rounds
// in which its data latch is transparent, i.e. every data move. The handshake
// style, the clocked abstraction and the reset values are this design's
// choices; the structure, the firing rule and the round-robin order are the
// 1-n-1 design's.
module fifo_1n1
  import gasp_pkg::*;
#(
  parameter int unsigned N_STAGES = DEFAULT_N_STAGES,
  parameter int unsigned WIDTH    = DEFAULT_WIDTH
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [WIDTH-1:0]    in_data,
  output logic                out_valid,
  input  logic                out_ready,
  output logic [WIDTH-1:0]    out_data,
  output logic [N_STAGES-1:0] latch_en
);

  localparam int unsigned K = N_STAGES - 2;  // middle stages
  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1;

  // ---- state conductors and latches --------------------------------------
  logic             s1_full, sn_full;
  logic [WIDTH-1:0] s1_q, sn_q;
  gasp_state_e      s1_state, sn_state;
  logic [K-1:0]     mid_full;
  logic [WIDTH-1:0] mid_q [K];

  // ---- module fire pulses --------------------------------------------------
  logic         in_fire, out_fire;
  logic [K-1:0] br_fire, mg_fire;
  logic         br_drain, mg_fill;
  logic [SW-1:0] mg_sel;
  logic [K-1:0] br_token, mg_token;

  // Input module: environment offers an item and S1 is EMPTY.
  gasp_module #(.NIN(2), .SELF_RESET(2'b11)) u_in_mod (
    .pin_set   ({!s1_full, in_valid}),
    .fire      (in_fire),
    .pin_reset (),
    .out_set   ()
  );

  gasp_place #(.WIDTH(WIDTH)) u_s1 (
    .clk, .rst_n,
    .fill  (in_fire),
    .drain (br_drain),
    .d     (in_data),
    .q     (s1_q),
    .state (s1_state),
    .full  (s1_full)
  );

  rr_branch #(.K(K)) u_branch (
    .clk, .rst_n,
    .src_full  (s1_full),
    .dst_full  (mid_full),
    .fire      (br_fire),
    .src_drain (br_drain),
    .token     (br_token)
  );

  for (genvar i = 0; i < K; i++) begin : g_mid
    gasp_state_e st;
    gasp_place #(.WIDTH(WIDTH)) u_place (
      .clk, .rst_n,
      .fill  (br_fire[i]),
      .drain (mg_fire[i]),
      .d     (s1_q),
      .q     (mid_q[i]),
      .state (st),
      .full  (mid_full[i])
    );
  end

  rr_merge #(.K(K)) u_merge (
    .clk, .rst_n,
    .src_full (mid_full),
    .dst_full (sn_full),
    .fire     (mg_fire),
    .dst_fill (mg_fill),
    .sel      (mg_sel),
    .token    (mg_token)
  );

  gasp_place #(.WIDTH(WIDTH)) u_sn (
    .clk, .rst_n,
    .fill  (mg_fill),
    .drain (out_fire),
    .d     (mid_q[mg_sel]),
    .q     (sn_q),
    .state (sn_state),
    .full  (sn_full)
  );

  // Output module: Sn is FULL and the environment takes the item.
  gasp_module #(.NIN(2), .SELF_RESET(2'b11)) u_out_mod (
    .pin_set   ({out_ready, sn_full}),
    .fire      (out_fire),
    .pin_reset (),
    .out_set   ()
  );

  assign in_ready  = (s1_state == GASP_EMPTY);
  assign out_valid = (sn_state == GASP_FULL);
  assign out_data  = sn_q;
  assign latch_en  = {mg_fill, br_fire, in_fire};

  // Order invariant: the FULL middle stages are exactly the run that starts
  // at the merge token and ends just before the branch token (all of them
  // when the two tokens meet and the row is full).
  logic [K-1:0] mid_expected;
  always_comb begin
    int unsigned br_idx, mg_idx, span;
    br_idx = 0;
    mg_idx = 0;
    for (int unsigned i = 0; i < K; i++) begin
      if (br_token[i]) br_idx = i;
      if (mg_token[i]) mg_idx = i;
    end
    span = (br_idx + K - mg_idx) % K;
    for (int unsigned i = 0; i < K; i++)
      mid_expected[i] = (((i + K - mg_idx) % K) < span) ||
                        (span == 0 && mid_full[mg_idx]);
  end

  a_mid_order: assert property (@(posedge clk) disable iff (!rst_n) mid_full == mid_expected);

endmodule
