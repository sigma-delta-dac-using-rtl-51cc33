// tb_iv_converter: self-checking testbench of the current-to-voltage
// converter model.
//
// Constant input currents are applied and the outputs checked after
// settling: the differential output must be (i_p - i_n) * 2 R_F and the
// outputs must sit symmetrically around V_REF. A small step must settle
// with the closed-loop time constant (about 63 % of the step after one
// time constant), a large step must be slew-rate limited (its rise over
// 1 ns equals the slew rate), and a current too large for the output swing
// must clip at +/- V_SWING. A watchdog ends a run that hangs.
`timescale 1ns / 1ps
module tb_iv_converter;

  localparam real R_F     = 2.5e3;
  localparam real V_REF   = 1.65;
  localparam real V_SWING = 3.0;
  localparam real TAU     = 2.0;
  localparam real SLEW    = 0.5;

  real i_p, i_n, v_outp, v_outn;

  int checks   = 0;
  int failures = 0;

  iv_converter #(
    .R_F(R_F), .V_REF(V_REF), .V_SWING(V_SWING), .TAU_NS(TAU),
    .SLEW_V_PER_NS(SLEW), .TSTEP_NS(0.005)
  ) dut (
    .i_p(i_p), .i_n(i_n), .v_outp(v_outp), .v_outn(v_outn)
  );

  task automatic check(input string what, input real got, input real want,
                       input real tol);
    checks++;
    if (got - want > tol || want - got > tol) begin
      failures++;
      $display("%s: %f V, expected %f V", what, got, want);
    end
  endtask

  task automatic settle_and_check(input real ip, input real in_);
    real want;
    i_p = ip;
    i_n = in_;
    #(40.0 * TAU);
    want = (ip - in_) * 2.0 * R_F;
    if (want > V_SWING) want = V_SWING;
    if (want < -V_SWING) want = -V_SWING;
    check("differential output", v_outp - v_outn, want, 1.0e-3);
    check("common mode", 0.5 * (v_outp + v_outn), V_REF, 1.0e-6);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v0, v1;
    i_p = 0.0;
    i_n = 0.0;
    #10;
    settle_and_check(0.0, 0.0);
    settle_and_check(80.0e-6, 80.0e-6);
    settle_and_check(120.0e-6, 40.0e-6);
    settle_and_check(10.0e-6, 150.0e-6);
    settle_and_check(160.0e-6, 0.0);

    // Small step: linear settling, 1 - 1/e after one time constant.
    settle_and_check(80.0e-6, 80.0e-6);
    v0 = v_outp - v_outn;
    i_p = 82.0e-6;
    i_n = 78.0e-6;
    #(TAU);
    v1 = v_outp - v_outn;
    check("small step after one time constant", v1 - v0,
          (4.0e-6 * 2.0 * R_F) * (1.0 - $exp(-1.0)), 2.0e-3);

    // Large step: slew-rate limited.
    settle_and_check(0.0, 160.0e-6);
    v0 = v_outp - v_outn;
    i_p = 160.0e-6;
    i_n = 0.0;
    #1.0;
    v1 = v_outp - v_outn;
    check("large step over 1 ns", v1 - v0, SLEW * 1.0, 1.0e-2);

    // Output swing limit.
    settle_and_check(1.0e-3, 0.0);
    settle_and_check(0.0, 1.0e-3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
