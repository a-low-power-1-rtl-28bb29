// tb_gasp_module: exhaustive check of the GasP firing rule.
//
// A three-pin module with pins 0 and 2 self-resetting and pin 1 not is
// driven through all eight pin combinations. It must fire only when every
// pin is set, and then clear exactly the self-resetting pins and set its
// output; otherwise it must do nothing. The expected values are computed
// here from the rule, not taken from the module.
module tb_gasp_module;
  localparam logic [2:0] MASK = 3'b101;

  logic [2:0] pin_set, pin_reset;
  logic       fire, out_set;
  int checks = 0, failures = 0;

  gasp_module #(.NIN(3), .SELF_RESET(MASK)) dut (
    .pin_set, .fire, .pin_reset, .out_set
  );

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: pins=%b got %b expected %b", what, pin_set, got, exp);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic all_set;
      pin_set = 3'(v);
      all_set = (v == 7);
      #1;
      check("fire", fire, all_set);
      check("out_set", out_set, all_set);
      for (int b = 0; b < 3; b++)
        check("pin_reset", pin_reset[b], all_set && MASK[b]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
