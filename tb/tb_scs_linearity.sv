// Codeword-to-delay linearity of the phase-modulation path (mapper + DCPS) at
// the three process corners, all parameters at their defaults.
//
// For each corner (fast, typical, slow unit delays) the calibration result
// (C(M), F(M), beta) is worked out here from the unit delays, the same way the
// calibration controller finds it: the shortest coarse code that covers one IF
// period, beta as the first fine count longer than a coarse step, then the
// fine sweep on top of one coarse code less, and 255/256 of that count. The
// mapper and a DCPS with that corner's delays then get every phase codeword
// P = 0..255 at a 100 MHz IF clock. The delay of each output edge beyond the
// constant delay T0 is measured in time and compared with P*T/256:
//   * largest error at most two fine steps,
//   * RMS error below 9.33 ps (the chip's measured figure; the model has no
//     cell mismatch, so it should do far better),
//   * one step of the phase-compensation offset moves the edge by one fine
//     step (0.15 degrees at 100 MHz in the typical corner).
`timescale 1ns/1ps
module tb_scs_linearity;
  import scs_pkg::*;

  localparam real T_IF = 10.0;
  localparam real T0_NS [3] = '{3.27, 3.63, 4.22};
  localparam real TC_NS [3] = '{0.02951, 0.03776, 0.04385};
  localparam real TF_NS [3] = '{0.00306, 0.00421, 0.00542};
  localparam real RMS_LIMIT = 0.00933;

  logic clk = 1'b0;
  logic rst_n;
  logic [W_P-1:0]   p;
  logic [W_PHC-1:0] phc;
  logic [W_C-1:0]    cm   [3];
  logic [W_F-1:0]    fm   [3];
  logic [W_BETA-1:0] beta [3];
  logic [W_C-1:0]    c    [3];
  logic [W_F-1:0]    f    [3];
  logic              out  [3];

  always #(T_IF / 2) clk = ~clk;   // rises at T_IF/2 + n*T_IF

  for (genvar g = 0; g < 3; g++) begin : g_corner
    scs_mapper u_map (.clk, .rst_n, .p, .phc, .cm(cm[g]), .fm(fm[g]),
                      .beta(beta[g]), .c(c[g]), .f(f[g]));
    scs_dcps #(.T0_PS(T0_NS[g] * 1000.0), .TC_PS(TC_NS[g] * 1000.0),
               .TF_PS(TF_NS[g] * 1000.0))
      u_dcps (.clk_in(clk), .c(c[g]), .f(f[g]), .clk_out(out[g]));
  end

  int checks = 0, failures = 0;

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real wrap(input real x);   // into [-T_IF/2, T_IF/2)
    return x - T_IF * $floor(x / T_IF + 0.5);
  endfunction

  // time of the first rising edge of out[g] after the present time
  task automatic edge_time(input int g, output realtime t);
    case (g)
      0: @(posedge out[0]);
      1: @(posedge out[1]);
      default: @(posedge out[2]);
    endcase
    t = $realtime;
  endtask

  // phase error (ns) of each corner's output for the codeword now applied
  task automatic measure(input int k, output real err [3]);
    realtime t;
    repeat (4) @(posedge clk);   // mapper latency and delay-line settling
    for (int g = 0; g < 3; g++) begin
      edge_time(g, t);
      err[g] = wrap(t - T_IF / 2 - T0_NS[g] - k * T_IF / 256.0);
    end
  endtask

  initial begin
    int cf, b, ff, np, dm;
    real err [3], e0 [3], sum2 [3], emax [3];

    rst_n = 1'b1;  p = '0;  phc = '0;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;

    for (int g = 0; g < 3; g++) begin
      cf = 1;  while (cf * TC_NS[g] < T_IF) cf++;
      b  = 1;  while (!(b * TF_NS[g] > TC_NS[g])) b++;
      ff = 0;  while ((cf - 1) * TC_NS[g] + ff * TF_NS[g] < T_IF) ff++;
      np = (cf - 1) * b + ff;
      dm = np - (np + 128) / 256;
      cm[g] = W_C'(dm / b);  fm[g] = W_F'(dm % b);  beta[g] = W_BETA'(b);
      sum2[g] = 0.0;  emax[g] = 0.0;
      $display("corner %0d: C(M)=%0d F(M)=%0d beta=%0d", g, dm / b, dm % b, b);
    end

    // codeword sweep
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      p = W_P'(k);
      measure(k, err);
      for (int g = 0; g < 3; g++) begin
        sum2[g] += err[g] * err[g];
        if (err[g] > emax[g])  emax[g] = err[g];
        if (-err[g] > emax[g]) emax[g] = -err[g];
        checks++;
        if (err[g] > 2.0 * TF_NS[g] || -err[g] > 2.0 * TF_NS[g]) begin
          failures++;
          $display("FAIL corner %0d P=%0d: delay error %0.2f ps", g, k, err[g] * 1000.0);
        end
      end
    end
    for (int g = 0; g < 3; g++) begin
      real rms;
      rms = $sqrt(sum2[g] / 256.0);
      $display("corner %0d: 256 codewords, RMS error %0.2f ps (%0.3f deg), largest %0.2f ps",
               g, rms * 1000.0, rms / T_IF * 360.0, emax[g] * 1000.0);
      checks++;
      if (rms > RMS_LIMIT) begin
        failures++;
        $display("FAIL corner %0d: RMS error %0.2f ps", g, rms * 1000.0);
      end
    end

    // phase-compensation offset: one fine step
    @(negedge clk);
    p = 8'd100;
    measure(100, e0);
    @(negedge clk);
    phc = W_PHC'(1);
    measure(100, err);
    for (int g = 0; g < 3; g++) begin
      real step;
      step = err[g] - e0[g];
      checks++;
      if (step < TF_NS[g] - 0.0005 || step > TF_NS[g] + 0.0005) begin
        failures++;
        $display("FAIL corner %0d: one offset step moved the edge %0.2f ps", g, step * 1000.0);
      end
      $display("corner %0d: offset step %0.2f ps = %0.3f deg", g, step * 1000.0,
               step / T_IF * 360.0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
