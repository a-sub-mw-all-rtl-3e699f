// End-to-end testbench of the signal component separator, all parameters at
// their defaults.
//
//  1. Reset; the chip calibrates its delay lines by itself while the register
//     file is loaded serially (A_max, Gc, offsets, div = 1: 50 MHz DSP clock).
//     The calibration result read back from test_o must equal what the
//     typical-corner delays (Tc = 37.76 ps, Tf = 4.21 ps, T = 10 ns) give.
//  2. Zero input, Gc = 1: the two IF outputs must be half a period (5 ns)
//     apart.
//  3. Held samples, output edges measured in time: each output's delay
//     beyond T0, as a phase lag, gives the transmitted phase; the two
//     constant-amplitude vectors V1, V2 = Gc*V1 are summed and compared with
//     the exact separation of the sample (clipping and opposite-vector rules
//     included). A phase offset on branch 1 must delay it by offset*Tf.
//  4. Streaming OFDM symbols at one sample per DSP clock: 64-point QPSK and
//     64-QAM symbols, 52 used subcarriers, interpolated 10x by a 640-point
//     inverse DFT, quantised to 8 bits, with a 1 dB branch gain mismatch
//     compensated through Gc. The DCPS codes seen each clock (six clocks of
//     latency) are turned back into phases and the error vector magnitude
//     of the recombined signal against the 8-bit input must stay below
//     -25 dB.
// Every mechanism (calibration, hand-over to the mappers, clipping,
// opposite vectors, zero input, gain and phase compensation, streaming) is
// counted and must occur at least once.
`timescale 1ns/1ps
module tb_scs_top;
  import scs_pkg::*;

  localparam real PI   = 3.14159265358979;
  localparam real T_IF = 10.0;
  localparam real T0   = 3.63, TC = 0.03776, TF = 0.00421;
  localparam int  LAT  = 6;      // DSP clocks from sample to DCPS code
  localparam int  NS   = 640;    // samples per interpolated OFDM symbol

  logic if_clk = 1'b0;
  logic rst_n;
  logic signed [7:0] si, sq;
  logic r_in, r_clk;
  logic s1_hat, s2_hat, test_o, dsp_clk, cal_done;

  scs_top dut (.if_clk, .rst_n, .si, .sq, .r_in, .r_clk, .s1_hat, .s2_hat,
               .test_o, .dsp_clk, .cal_done);

  always #(T_IF / 2) if_clk = ~if_clk;

  int checks = 0, failures = 0;
  int n_cal = 0, n_handover = 0, n_clip = 0, n_opp = 0, n_zero = 0,
      n_gain = 0, n_phase = 0, n_stream = 0;
  int cur_amax = 128, cur_gc = 512, cur_phi1c = 0;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- helpers
  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic load_cfg(input int dv, input int am, input int g, input int o1, input int o2);
    logic [41:0] w;
    w = {4'(dv), 8'(am), 10'(g), 10'(o1), 10'(o2)};
    for (int i = 41; i >= 0; i--) begin
      r_in = w[i];
      #10 r_clk = 1'b1;
      #10 r_clk = 1'b0;
    end
    cur_amax = am;  cur_gc = g;  cur_phi1c = o1;
    if (g != 512) n_gain++;
  endtask

  function automatic real acos_clip(input real x);
    if (x >= 1.0)  return 0.0;
    if (x <= -1.0) return PI;
    return $acos(x);
  endfunction

  // exact separation: target sum of the two vectors, and its kind
  task automatic target(input int i, input int q, output real tr, output real ti, output int kind);
    real a, th, v1, v2, f1, f2;
    v1 = cur_amax;  v2 = cur_amax * cur_gc / 512.0;
    a  = $sqrt(real'(i*i + q*q));
    th = (i == 0 && q == 0) ? 0.0 : $atan2(real'(q), real'(i));
    kind = 0;
    if (2*a < ((v2 > v1) ? v2 - v1 : v1 - v2)) begin
      kind = 1;  f1 = (v2 > v1) ? PI : 0.0;  f2 = (v2 > v1) ? 0.0 : PI;
    end else if (a == 0.0) begin
      kind = 3;  f1 = PI / 2;  f2 = PI / 2;
    end else begin
      f1 = acos_clip((v1*v1 + 4*a*a - v2*v2) / (4*a*v1));
      f2 = acos_clip((v2*v2 + 4*a*a - v1*v1) / (4*a*v2));
      if (2*a > v1 + v2) kind = 2;
    end
    tr = v1*$cos(th + f1) + v2*$cos(th - f2);
    ti = v1*$sin(th + f1) + v2*$sin(th - f2);
  endtask

  // sum of the two vectors for phase lags (ns of delay beyond T0)
  task automatic recombine(input real d1, input real d2, output real hr, output real hi);
    real v1, v2, a1, a2;
    v1 = cur_amax;  v2 = cur_amax * cur_gc / 512.0;
    a1 = -2.0 * PI * d1 / T_IF;
    a2 = -2.0 * PI * d2 / T_IF;
    hr = v1*$cos(a1) + v2*$cos(a2);
    hi = v1*$sin(a1) + v2*$sin(a2);
  endtask

  function automatic real wrap(input real x);   // into [0, T_IF)
    return x - T_IF * $floor(x / T_IF);
  endfunction

  // delay of each branch beyond T0, from its next rising edge
  task automatic measure(output real d1, output real d2);
    realtime t1, t2;
    @(posedge s1_hat) t1 = $realtime;
    @(posedge s2_hat) t2 = $realtime;
    d1 = wrap(t1 - T_IF / 2 - T0);   // IF clock rises at T_IF/2 + n*T_IF
    d2 = wrap(t2 - T_IF / 2 - T0);
  endtask

  task automatic held_sample(input int i, input int q);
    real d1, d2, hr, hi, tr, ti, err;
    int kind;
    @(negedge dsp_clk);
    si = 8'(i);  sq = 8'(q);
    repeat (LAT + 4) @(posedge dsp_clk);
    measure(d1, d2);
    d1 = wrap(d1 - cur_phi1c * TF);   // remove the branch-1 compensation offset
    target(i, q, tr, ti, kind);
    recombine(d1, d2, hr, hi);
    err = $sqrt((hr-tr)*(hr-tr) + (hi-ti)*(hi-ti)) /
          (cur_amax * (1.0 + cur_gc / 512.0));
    checks++;
    if (err > 0.1) fail($sformatf("held sample (%0d, %0d): relative error %f", i, q, err));
    if (kind == 1) n_opp++;
    if (kind == 2) n_clip++;
  endtask

  // ---------------------------------------------------------- OFDM symbols
  int sym_i[NS], sym_q[NS];

  task automatic make_symbol(input bit qam64, output int amax);
    real xr[NS], xi[NS], pk, ar, ai, s, mag;
    pk = 0.0;
    for (int n = 0; n < NS; n++) begin xr[n] = 0.0; xi[n] = 0.0; end
    for (int k = -26; k <= 26; k++) begin
      if (k == 0) continue;
      if (qam64) begin
        ar = 2.0 * $urandom_range(0, 7) - 7.0;
        ai = 2.0 * $urandom_range(0, 7) - 7.0;
      end else begin
        ar = $urandom_range(0, 1) ? 1.0 : -1.0;
        ai = $urandom_range(0, 1) ? 1.0 : -1.0;
      end
      for (int n = 0; n < NS; n++) begin
        real w;
        w = 2.0 * PI * k * n / NS;
        xr[n] += ar * $cos(w) - ai * $sin(w);
        xi[n] += ar * $sin(w) + ai * $cos(w);
      end
    end
    for (int n = 0; n < NS; n++) begin
      if (xr[n] > pk) pk = xr[n];
      if (-xr[n] > pk) pk = -xr[n];
      if (xi[n] > pk) pk = xi[n];
      if (-xi[n] > pk) pk = -xi[n];
    end
    s = 127.0 / pk;
    amax = 0;
    for (int n = 0; n < NS; n++) begin
      sym_i[n] = int'($floor(xr[n] * s + 0.5));
      sym_q[n] = int'($floor(xi[n] * s + 0.5));
      if (sym_i[n] > 127) sym_i[n] = 127;
      if (sym_q[n] > 127) sym_q[n] = 127;
      mag = $sqrt(real'(sym_i[n]*sym_i[n] + sym_q[n]*sym_q[n]));
      if (int'($ceil(mag)) > amax) amax = int'($ceil(mag));
    end
  endtask

  task automatic stream_symbol(input string name);
    real e_pow, s_pow, hr, hi, d1, d2, evm;
    e_pow = 0.0;  s_pow = 0.0;
    for (int k = 0; k < NS + LAT; k++) begin
      @(negedge dsp_clk);
      if (k >= LAT) begin
        int n;
        n  = k - LAT;
        d1 = (dut.code1.c * TC + dut.code1.f * TF);
        d2 = (dut.code2.c * TC + dut.code2.f * TF);
        recombine(d1, d2, hr, hi);
        e_pow += (hr - 2.0*sym_i[n]) * (hr - 2.0*sym_i[n]) + (hi - 2.0*sym_q[n]) * (hi - 2.0*sym_q[n]);
        s_pow += 4.0 * (sym_i[n]*sym_i[n] + sym_q[n]*sym_q[n]);
        n_stream++;
      end
      if (k < NS) begin
        si = 8'(sym_i[k]);  sq = 8'(sym_q[k]);
      end
    end
    evm = 10.0 * $log10(e_pow / s_pow);
    $display("%s: EVM %0.2f dB (A_max %0d, Gc %0d/512)", name, evm, cur_amax, cur_gc);
    checks++;
    if (evm > -25.0) fail($sformatf("%s EVM %0.2f dB above -25 dB", name, evm));
  endtask

  // ------------------------------------------------------------------ test
  int dsp_edges = 0;
  always @(posedge dsp_clk) dsp_edges++;

  initial begin
    int cf, b, ff, np, dm, am;
    real d1, d2, d1b, diff;
    logic [18:0] frame;

    rst_n = 1'b1;  si = '0;  sq = '0;  r_in = 1'b0;  r_clk = 1'b0;
    #1 rst_n = 1'b0;
    #40 rst_n = 1'b1;
    dsp_edges = 0;

    // 1. calibration, with the register file loaded meanwhile
    load_cfg(1, 160, 512, 0, 0);
    fork
      begin
        @(posedge cal_done);
        n_cal++;
      end
      begin
        wait (dut.sel_cal == 1'b0);
        n_handover++;
      end
    join
    cf = 1;  while (cf * TC < T_IF) cf++;
    b  = 1;  while (!(b * TF > TC)) b++;
    ff = 0;  while ((cf - 1) * TC + ff * TF < T_IF) ff++;
    np = (cf - 1) * b + ff;
    dm = np - (np + 128) / 256;
    // read one test_o frame: bit 18 is shown after every 19th DSP edge
    @(negedge dsp_clk);
    while (dsp_edges % 19 != 0) @(negedge dsp_clk);
    for (int i = 18; i >= 0; i--) begin
      frame[i] = test_o;
      @(negedge dsp_clk);
    end
    checks++;
    if (frame != {9'(dm / b), 5'(dm % b), 5'(b)})
      fail($sformatf("calibration C(M)=%0d F(M)=%0d beta=%0d, want %0d %0d %0d",
                     frame[18:10], frame[9:5], frame[4:0], dm / b, dm % b, b));
    $display("calibrated: C(M)=%0d F(M)=%0d beta=%0d at %0.0f ns", frame[18:10], frame[9:5], frame[4:0], $realtime);

    // 2. zero input: outputs half a period apart
    @(negedge dsp_clk);
    si = '0;  sq = '0;
    repeat (LAT + 4) @(posedge dsp_clk);
    measure(d1, d2);
    diff = wrap(d1 - d2);
    checks++;
    n_zero++;
    if (diff < 4.95 || diff > 5.05) fail($sformatf("zero input: branches %f ns apart", diff));
    $display("zero input: branches %0.3f ns apart", diff);

    // 3. held samples, measured at the outputs
    for (int k = 0; k < 20; k++)
      held_sample(int'($urandom_range(0, 255)) - 128, int'($urandom_range(0, 255)) - 128);
    held_sample(127, 127);                    // beyond (V1+V2)/2 = 160: clipped
    held_sample(-120, 110);
    load_cfg(1, 160, 575, 0, 0);              // +1 dB on branch 2
    held_sample(3, -2);                       // 2A below |V2 - V1|: opposite vectors
    for (int k = 0; k < 10; k++)
      held_sample(int'($urandom_range(0, 255)) - 128, int'($urandom_range(0, 255)) - 128);
    // phase compensation: same sample without and with a branch-1 offset
    @(negedge dsp_clk);
    si = 8'sd40;  sq = -8'sd70;
    repeat (LAT + 4) @(posedge dsp_clk);
    measure(d1, d2);
    load_cfg(1, 160, 575, 100, 0);
    repeat (LAT + 4) @(posedge dsp_clk);
    measure(d1b, d2);
    diff = wrap(d1b - d1 + T_IF / 2) - T_IF / 2;
    checks++;
    n_phase++;
    if (diff < 100 * TF - 0.02 || diff > 100 * TF + 0.02)
      fail($sformatf("phase offset of 100 fine steps moved branch 1 by %f ns", diff));
    $display("phase offset 100 steps: branch 1 later by %0.3f ns", diff);
    held_sample(40, -70);

    // 4. OFDM symbols at full rate, 1 dB gain mismatch compensated
    make_symbol(1'b0, am);
    load_cfg(1, am, 575, 0, 0);
    stream_symbol("QPSK 64-point OFDM, 10x interpolated");
    make_symbol(1'b1, am);
    load_cfg(1, am, 575, 0, 0);
    stream_symbol("64-QAM 64-point OFDM, 10x interpolated");
    load_cfg(1, am, 456, 0, 0);               // -1 dB
    stream_symbol("64-QAM 64-point OFDM, 10x interpolated, -1 dB");

    $display("mechanisms: calibration=%0d handover=%0d clip=%0d opposite=%0d zero=%0d gain=%0d phase=%0d streamed=%0d",
             n_cal, n_handover, n_clip, n_opp, n_zero, n_gain, n_phase, n_stream);
    checks++;
    if (n_cal == 0 || n_handover == 0 || n_clip == 0 || n_opp == 0 || n_zero == 0 ||
        n_gain == 0 || n_phase == 0 || n_stream == 0)
      fail("a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
