// gasp_module: one GasP module (the firing element between places).
//
// A GasP module watches a set of input pins. A pin is "set" when the state
// it watches allows the module to act: the predecessor place is FULL, the
// successor place is EMPTY, or a round-robin pointer token is present. When
// every pin is set the module fires. Firing does three things at once: it
// makes the data latches it controls transparent for a moment, it resets its
// self-resetting input pins (the predecessor becomes EMPTY, the token is
// consumed) and it sets its output pins (the successor becomes FULL, the
// token is handed on).
//
// In this RTL the module is evaluated once per clock, which stands for one
// firing round of the self-timed circuit: `fire` is a one-cycle pulse that
// depends only on the current states. `pin_reset` tells the owners of the
// self-resetting pins (mask SELF_RESET) to clear them, `out_set` tells the
// owners of the output states to set them. Which pins are self-resetting is
// given by the parameter, as the shaded/unshaded triangles do in a GasP
// drawing. The clocked one-round abstraction is a choice of this design; the
// firing rule itself (fire only when every input is set) is GasP's.
module gasp_module #(
  parameter int unsigned       NIN        = 3,
  parameter logic [NIN-1:0]    SELF_RESET = '1
) (
  input  logic [NIN-1:0] pin_set,    // 1: that input pin is set
  output logic           fire,       // module fires this round
  output logic [NIN-1:0] pin_reset,  // clear these input states
  output logic           out_set     // set the output state(s)
);

  always_comb begin
    fire      = &pin_set;
    pin_reset = fire ? SELF_RESET : '0;
    out_set   = fire;
  end

endmodule
