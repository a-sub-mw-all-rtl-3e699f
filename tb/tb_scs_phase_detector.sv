// Testbench of the phase detector: two 100 MHz clocks, branch 1 shifted by
// a chosen amount (0.26 to 9.76 ns) against branch 2; `up` must be set when branch 1 leads
// (shift in the second half of the period) and `down` when it lags.
`timescale 1ns/1ps
module tb_scs_phase_detector;
  logic s1, s2;
  logic rst_n, up, down;

  scs_phase_detector dut (.s1, .s2, .rst_n, .up, .down);

  int checks = 0, failures = 0;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // branch 2 rises at 5 + 10n ns; branch 1 is the same clock shifted by `shift`
  real delta = 0.0;
  always #0.05 begin
    real t2, t1;
    t2 = ($realtime - 5.0) / 10.0;
    t1 = ($realtime - 5.0 - delta) / 10.0;
    s2 = (t2 - $floor(t2)) < 0.5;
    s1 = (t1 - $floor(t1)) < 0.5;
  end

  initial begin
    rst_n = 1'b0;
    #1 rst_n = 1'b1;
    for (int i = 1; i < 40; i++) begin
      // branch 1 rises at 5 + delta (mod 10) in each period, branch 2 at 5
      delta = 0.25 * i + 0.01;
      repeat (4) @(posedge s2);
      #1;
      checks++;
      // branch 1 edge at delta after s2 (mod 10): lags if delta < 5
      if ((delta < 5.0) ? (up || !down) : (!up || down)) begin
        failures++;
        $display("FAIL delta=%f up=%0d down=%0d", delta, up, down);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
