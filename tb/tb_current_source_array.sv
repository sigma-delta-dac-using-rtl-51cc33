// tb_current_source_array: self-checking testbench of the current-cell
// array model.
//
// Sixteen cells get currents of 10 uA with a known spread. For a series of
// thermometer codes the testbench computes the expected currents itself:
// each cell delivers I * R_CS / (R_CS + R_ON) into i_p when its line is 1
// and into i_n when it is 0. It checks the settled currents long after each
// change, the current one time constant after a change (cells already on
// settled, cells just switched at 1 - 1/e of their current), and that the
// total current is conserved. A watchdog ends a run that hangs.
`timescale 1ns / 1ps
module tb_current_source_array;

  localparam int  NL    = 16;
  localparam real R_CS  = 1.0e6;
  localparam real R_ON  = 1.0e3;
  localparam real C_CS  = 1.0e-12;
  localparam real GAIN  = R_CS / (R_CS + R_ON);
  localparam real TAU   = (R_CS * R_ON / (R_CS + R_ON)) * C_CS * 1.0e9;  // ns

  logic [NL-1:0] sw;
  real           cell_current [NL];
  real           i_p, i_n;

  int checks   = 0;
  int failures = 0;

  current_source_array #(
    .NL(NL), .R_CS(R_CS), .R_ON(R_ON), .C_CS(C_CS), .TSTEP_NS(0.01)
  ) dut (
    .sw(sw), .cell_current(cell_current), .i_p(i_p), .i_n(i_n)
  );

  function automatic real sum_on(input logic [NL-1:0] code, input bit side);
    real s = 0.0;
    for (int i = 0; i < NL; i++)
      if (code[i] == side) s += GAIN * cell_current[i];
    return s;
  endfunction

  function automatic bit close(input real a, input real b, input real rel);
    real d = a - b;
    if (d < 0.0) d = -d;
    return d <= rel * 10.0e-6 * NL;
  endfunction

  task automatic check(input string what, input real got, input real want,
                       input real rel);
    checks++;
    if (!close(got, want, rel)) begin
      failures++;
      $display("%s: %e A, expected %e A", what, got, want);
    end
  endtask

  task automatic apply(input logic [NL-1:0] code);
    logic [NL-1:0] old = sw;
    real stay_p, new_p, stay_n, new_n;
    stay_p = 0.0; new_p = 0.0; stay_n = 0.0; new_n = 0.0;
    for (int i = 0; i < NL; i++) begin
      if (code[i] && old[i])        stay_p += GAIN * cell_current[i];
      else if (code[i])             new_p  += GAIN * cell_current[i];
      else if (!old[i])             stay_n += GAIN * cell_current[i];
      else                          new_n  += GAIN * cell_current[i];
    end
    sw = code;
    #(TAU);
    check("i_p one time constant after switching", i_p,
          stay_p + new_p * (1.0 - $exp(-1.0)), 2.0e-3);
    check("i_n one time constant after switching", i_n,
          stay_n + new_n * (1.0 - $exp(-1.0)), 2.0e-3);
    #(20.0 * TAU);
    check("settled i_p", i_p, sum_on(code, 1'b1), 1.0e-4);
    check("settled i_n", i_n, sum_on(code, 1'b0), 1.0e-4);
    check("current conserved", i_p + i_n, sum_on(code, 1'b1) + sum_on(code, 1'b0),
          1.0e-4);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NL; i++)
      cell_current[i] = 10.0e-6 * (1.0 + 0.01 * real'(i - NL / 2) / NL);
    sw = '0;
    #(5.0 * TAU);
    check("all off, i_p", i_p, 0.0, 1.0e-4);
    apply(16'h00ff);
    apply(16'h0fff);
    apply(16'hfff0);
    apply(16'h0001);
    apply(16'hffff);
    apply(16'h0000);
    for (int n = 0; n < 30; n++) apply(NL'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
