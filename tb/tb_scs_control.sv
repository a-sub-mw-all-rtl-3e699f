// Testbench of the DCPS calibration controller.
//
// The two delay lines and the phase detector are replaced by an ideal
// model: delay = c*Tc + f*Tf, and the detector reports branch 1 leading when
// (d1 - d2) mod T lies in the second half of the period. The controller is
// run at the three measured corners (fast, typical, slow unit delays) and
// its result is checked against values worked out here from the corner's
// delays: c_full = smallest c with c*Tc >= T, beta = smallest f with
// f*Tf > Tc, and the fine sweep; also that the stored (C(M), F(M)) delay is
// within two coarse steps of 255/256 of a period, that the PVT write happens
// once, and that the calibration takes the expected number of clocks.
`timescale 1ns/1ps
module tb_scs_control;
  import scs_pkg::*;

  localparam real T_IF = 10.0;
  localparam int  SETTLE = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic up, down;
  dcps_code_t code1, code2;
  logic sel_cal, pvt_we, done;
  pvt_t pvt_wdata;

  scs_control #(.SETTLE(SETTLE)) dut (.clk, .rst_n, .up, .down,
    .cal_code1(code1), .cal_code2(code2), .sel_cal, .pvt_we, .pvt_wdata, .done);

  always #10 clk = ~clk;

  int checks = 0, failures = 0;
  real tc, tf;

  initial begin
    #3_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ideal delay lines and detector
  always_comb begin
    real d, ph;
    d  = (code1.c * tc + code1.f * tf) - (code2.c * tc + code2.f * tf);
    ph = d / T_IF - $floor(d / T_IF);
    up   = (ph > 0.5);
    down = !up;
  end

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d, want %0d", what, got, want);
    end
  endtask

  task automatic run_corner(input real tc_ns, input real tf_ns);
    int cf, b, ff, n, dm, cyc, writes, steps;
    real dly;
    tc = tc_ns;  tf = tf_ns;
    // expected result
    cf = 1;  while (cf * tc < T_IF) cf++;
    b  = 1;  while (!(b * tf > tc) && b < 31) b++;
    ff = 0;  while ((cf - 1) * tc + ff * tf < T_IF && ff < 31) ff++;
    n  = (cf - 1) * b + ff;
    dm = n - (n + 128) / 256;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    cyc = 0;  writes = 0;
    while (!done && cyc < 20000) begin
      @(posedge clk);
      cyc++;
      if (pvt_we) writes++;
    end
    repeat (5) begin @(posedge clk); if (pvt_we) writes++; end
    expect_eq("beta", int'(pvt_wdata.beta), b);
    expect_eq("C(M)", int'(pvt_wdata.cm), dm / b);
    expect_eq("F(M)", int'(pvt_wdata.fm), dm % b);
    expect_eq("PVT writes", writes, 1);
    expect_eq("sel_cal after done", int'(sel_cal), 0);
    // sweep steps: coarse 1..cf, beta 0..b, fine 0..ff, each SETTLE+1 clocks
    steps = cf + (b + 1) + (ff + 1);
    checks++;
    if (cyc < steps * (SETTLE + 1) || cyc > steps * (SETTLE + 1) + 8) begin
      failures++;
      $display("FAIL calibration took %0d clocks, expected about %0d", cyc, steps * (SETTLE + 1));
    end
    dly = pvt_wdata.cm * tc + pvt_wdata.fm * tf;
    checks++;
    if (dly < T_IF * 255.0 / 256.0 - 2 * tc || dly > T_IF * 255.0 / 256.0 + 2 * tc) begin
      failures++;
      $display("FAIL C(M),F(M) delay %f ns", dly);
    end
    $display("corner Tc=%f Tf=%f: c_full=%0d beta=%0d C(M)=%0d F(M)=%0d delay=%f ns in %0d clocks",
             tc, tf, cf, pvt_wdata.beta, pvt_wdata.cm, pvt_wdata.fm, dly, cyc);
  endtask

  initial begin
    rst_n = 1'b0;
    tc = 0.03776;  tf = 0.00421;
    run_corner(0.02951, 0.00306);   // fast
    run_corner(0.03776, 0.00421);   // typical
    run_corner(0.04385, 0.00542);   // slow
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
