// Self-checking testbench of the phase calculator.
//
// Drives random and directed samples at one per clock and, four register
// stages later, rebuilds the two outphased vectors from the codewords:
// V1*e^{-j*2*pi*p1/256} + V2*e^{-j*2*pi*p2/256}. That sum is compared with the
// same sum formed from the exact angles (real-number atan2/acos of the
// separation equations, with the opposite-vector and clipping rules), relative
// to V1 + V2, sample by sample and as an RMS over all samples. With Gc = 1 it also checks p1 + p2 = -2*theta directly, and that
// a zero sample gives two branches half a turn apart.
`timescale 1ns/1ps
module tb_scs_phase_calc;
  import scs_pkg::*;

  localparam real PI  = 3.14159265358979;
  localparam int  N   = 4000;
  localparam int  LAT = 4;
  localparam real TOL = 0.08;     // any one sample, relative to V1 + V2
  localparam real RMS_TOL = 0.012; // over all samples

  logic clk = 1'b0;
  logic rst_n;
  logic signed [7:0] si, sq;
  logic [7:0] amax;
  logic [9:0] gc;
  logic [7:0] p1, p2;

  scs_phase_calc dut (.clk, .rst_n, .si, .sq, .amax, .gc, .p1, .p2);

  always #10 clk = ~clk;

  int checks = 0, failures = 0;
  int n_opp = 0, n_clip = 0, n_zero = 0;
  real max_err = 0.0, sum_sq = 0.0;
  int  n_err = 0;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real acos_clip(input real x);
    if (x >= 1.0)  return 0.0;
    if (x <= -1.0) return PI;
    return $acos(x);
  endfunction

  // Exact target of the separation for one sample; returns its kind.
  task automatic target(input int i, input int q, input int am, input int g,
                        output real tr, output real ti, output int kind);
    real a, th, v1, v2, f1, f2;
    v1 = am;  v2 = am * g / 512.0;
    a  = $sqrt(real'(i*i + q*q));
    th = (i == 0 && q == 0) ? 0.0 : $atan2(real'(q), real'(i));
    kind = 0;
    if (2*a < ((v2 > v1) ? v2 - v1 : v1 - v2)) begin
      kind = 1;
      f1 = (v2 > v1) ? PI : 0.0;
      f2 = (v2 > v1) ? 0.0 : PI;
    end else if (a == 0.0) begin
      kind = 3;
      f1 = PI / 2;  f2 = PI / 2;
    end else begin
      f1 = acos_clip((v1*v1 + 4*a*a - v2*v2) / (4*a*v1));
      f2 = acos_clip((v2*v2 + 4*a*a - v1*v1) / (4*a*v2));
      if (2*a > v1 + v2) kind = 2;
    end
    tr = v1*$cos(th + f1) + v2*$cos(th - f2);
    ti = v1*$sin(th + f1) + v2*$sin(th - f2);
  endtask

  int si_h[N], sq_h[N], am_h[N], gc_h[N];

  task automatic check(input int k);
    real tr, ti, hr, hi, v1, v2, a1, a2, err;
    int kind, s;
    target(si_h[k], sq_h[k], am_h[k], gc_h[k], tr, ti, kind);
    v1 = am_h[k];  v2 = am_h[k] * gc_h[k] / 512.0;
    a1 = -2.0 * PI * p1 / 256.0;
    a2 = -2.0 * PI * p2 / 256.0;
    hr = v1*$cos(a1) + v2*$cos(a2);
    hi = v1*$sin(a1) + v2*$sin(a2);
    err = $sqrt((hr-tr)*(hr-tr) + (hi-ti)*(hi-ti)) / (v1 + v2);
    if (err > max_err) max_err = err;
    sum_sq += err * err;
    n_err++;
    checks++;
    if (err > TOL) begin
      failures++;
      $display("FAIL k=%0d si=%0d sq=%0d amax=%0d gc=%0d p1=%0d p2=%0d err=%f",
               k, si_h[k], sq_h[k], am_h[k], gc_h[k], p1, p2, err);
    end
    if (kind == 1) n_opp++;
    if (kind == 2) n_clip++;
    if (kind == 3) n_zero++;
    // Gc = 1: p1 + p2 = -2*theta, independent of phi
    if (gc_h[k] == 512 && kind == 0 && (si_h[k] != 0 || sq_h[k] != 0)) begin
      real th; int want, got, d;
      th   = $atan2(real'(sq_h[k]), real'(si_h[k]));
      want = int'($floor(-2.0 * th * 256.0 / (2.0*PI) + 0.5));
      got  = int'(p1) + int'(p2);
      d    = ((got - want) % 256 + 256 + 128) % 256 - 128;
      checks++;
      if (d > 2 || d < -2) begin
        failures++;
        $display("FAIL theta k=%0d si=%0d sq=%0d p1+p2=%0d want=%0d", k, si_h[k], sq_h[k], got, want);
      end
    end
    // zero sample with V1 = V2: half a turn between branches (Fig. of measured waveforms)
    if (kind == 3 && gc_h[k] == 512) begin
      checks++;
      s = (int'(p1) - int'(p2) + 256) % 256;
      if (s != 128) begin
        failures++;
        $display("FAIL zero sample p1=%0d p2=%0d", p1, p2);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0;
    si = '0; sq = '0; amax = 8'd181; gc = 10'd512;
    // sample list: directed first, then random
    for (int k = 0; k < N; k++) begin
      if (k < 4)          begin si_h[k] = 0;   sq_h[k] = 0;   end
      else if (k < 8)     begin si_h[k] = 100; sq_h[k] = -100; end
      else begin
        si_h[k] = int'($urandom_range(0, 255)) - 128;
        sq_h[k] = int'($urandom_range(0, 255)) - 128;
      end
      // configuration changes in blocks of 400 samples
      case ((k / 400) % 5)
        0: begin am_h[k] = 181; gc_h[k] = 512; end
        1: begin am_h[k] = 150; gc_h[k] = 575; end   // +1 dB
        2: begin am_h[k] = 200; gc_h[k] = 456; end   // -1 dB
        3: begin am_h[k] = 120; gc_h[k] = 512; end   // clipping likely
        default: begin am_h[k] = 181; gc_h[k] = 700; end   // +2.7 dB
      endcase
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < N + LAT; k++) begin
      @(negedge clk);
      // amax/gc are static configuration: skip samples in flight when it changes
      if (k >= LAT && (k - LAT) % 400 < 400 - LAT) check(k - LAT);
      if (k < N) begin
        si = 8'(si_h[k]); sq = 8'(sq_h[k]);
        amax = 8'(am_h[k]); gc = 10'(gc_h[k]);
      end
    end
    $display("max relative error %f, rms %f, opposite=%0d clip=%0d zero=%0d",
             max_err, $sqrt(sum_sq / n_err), n_opp, n_clip, n_zero);
    checks++;
    if ($sqrt(sum_sq / n_err) > RMS_TOL) begin
      failures++;
      $display("FAIL rms error");
    end
    checks++;
    if (n_opp == 0 || n_clip == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL a special case was never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
