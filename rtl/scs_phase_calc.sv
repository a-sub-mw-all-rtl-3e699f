// Phase calculator of the signal component separator.
//
// For each baseband sample S = Si + jSq it computes
//   theta = atan(Sq/Si)                                   (phase of S)
//   phi1  = acos((V1^2 + 4A^2 - V2^2) / (4 A V1))         (branch-1 outphasing angle)
//   phi2  = acos((V2^2 + 4A^2 - V1^2) / (4 A V2))         (branch-2 outphasing angle)
// with A = |S|, V1 = A_max and V2 = A_max * Gc, so that V1*e^{j(theta+phi1)} +
// V2*e^{j(theta-phi2)} = 2S: the gain ratio Gc of the two amplifier branches is
// compensated by choosing the phases alone. As in the chip, no divider is
// used: every quotient is a difference of table logarithms, and the angles come
// from an exp-atan table (theta) and an exp-acos table (phi1, phi2).
// A never needs a square root: log2(4 A V) = 2 + log2(A^2)/2 + log2(V).
//
// Special cases: if 2A < |V2 - V1| no pair of angles reaches A, and the two
// vectors are set opposite, leaving the smallest error (phi1 = pi,
// phi2 = 0 when V2 > V1, the reverse when V1 > V2); if A > (V1 + V2)/2 the
// acos argument exceeds one and the angle is 0 (clipping); S = 0 with V1 = V2
// gives phi1 = phi2 = pi/2 and theta = 0.
//
// Outputs are the 8-bit phase codewords of the two delay-line phase shifters,
// 2*pi/256 per step. A codeword is a delay, that is a phase lag, so
//   p1 = -(theta + phi1),  p2 = -(theta - phi2)   (mod 2*pi).
// Internally angles have 1024 steps per turn and are rounded at the output.
//
// Interface: si, sq signed two's complement; amax unsigned in the same units;
// gc unsigned with 9 fraction bits (512 = 1.0, step about 0.017 dB). amax and
// gc are static configuration.
// Timing: fully pipelined, one sample per clock; four register stages, so a
// sample present before rising edge n gives its codewords after edge n+3.
// The equations, the 8-bit widths, the 10-bit Gc and the use of tables follow
// the chip; the fixed-point formats, table sizes, codeword sign and pipeline
// depth are this design's own choices.
module scs_phase_calc
  import scs_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [W_IN-1:0]   si,
  input  logic signed [W_IN-1:0]   sq,
  input  logic [W_AMAX-1:0]        amax,
  input  logic [W_GC-1:0]          gc,
  output logic [W_P-1:0]           p1,
  output logic [W_P-1:0]           p2
);
  // ---------------------------------------------------------------- tables
  localparam atan_lut_t atan_tab = gen_atan_exp_lut();   // atan(2^(i/32))
  localparam acos_lut_t acos_tab = gen_acos_exp_lut();   // acos(2^(-i/256))

  // ------------------------------------------------ static V1, V2 (4 frac bits)
  localparam int unsigned WV = W_AMAX + W_GC - GC_FRAC + 4;   // 13
  logic [W_AMAX+W_GC-1:0] amax_gc;
  logic [WV-1:0]          v1q, v2q;
  always_comb begin
    amax_gc = {{W_GC{1'b0}}, amax} * {{W_AMAX{1'b0}}, gc};
    v1q     = WV'({amax, 4'd0});
    v2q     = WV'((amax_gc + (W_AMAX+W_GC)'(1 << (GC_FRAC - 5))) >> (GC_FRAC - 4));
  end

  // --------------------------------------------------------- stage A: input
  logic signed [W_IN-1:0] si_a, sq_a;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      si_a <= '0;
      sq_a <= '0;
    end else begin
      si_a <= si;
      sq_a <= sq;
    end

  // ------------------------------------ stage B: magnitudes, A^2, numerators
  localparam int unsigned WA2 = 2 * W_IN + 1;   // A^2 <= 2 * 128^2
  localparam int unsigned WN  = 2 * WV + 2;     // signed numerators
  typedef struct packed {
    logic si_neg, sq_neg, si_zero, sq_zero;
    logic a2_zero, opp, v2_gt;
    logic n1_neg, n1_zero, n2_neg, n2_zero;
  } flags_t;

  logic [W_IN-1:0]        ai_b, aq_b;
  logic [WA2-1:0]         a2_b;
  logic [WN-2:0]          n1m_b, n2m_b;    // |N1|, |N2|, 8 fraction bits
  flags_t                 fl_b;

  logic [W_IN-1:0]        ai, aq;
  logic [WA2-1:0]         a2;
  logic signed [WN-1:0]   v1sq, v2sq, a2x, n1, n2, dv;
  flags_t                 fl;

  always_comb begin
    ai   = si_a[W_IN-1] ? W_IN'(-si_a) : W_IN'(si_a);
    aq   = sq_a[W_IN-1] ? W_IN'(-sq_a) : W_IN'(sq_a);
    a2   = WA2'(ai) * WA2'(ai) + WA2'(aq) * WA2'(aq);
    v1sq = WN'(v1q) * WN'(v1q);               // 256 * V1^2
    v2sq = WN'(v2q) * WN'(v2q);               // 256 * V2^2
    a2x  = WN'(a2) <<< 10;                    // 256 * 4 A^2
    n1   = v1sq + a2x - v2sq;
    n2   = v2sq + a2x - v1sq;
    dv   = WN'(v2q) - WN'(v1q);
    fl   = '{si_neg:  si_a[W_IN-1], sq_neg: sq_a[W_IN-1],
             si_zero: si_a == '0,   sq_zero: sq_a == '0,
             a2_zero: a2 == '0,
             opp:     (WN'(a2) <<< 10) < dv * dv,  // 2A < |V2 - V1|
             v2_gt:   v2q > v1q,
             n1_neg:  n1[WN-1], n1_zero: n1 == '0,
             n2_neg:  n2[WN-1], n2_zero: n2 == '0};
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ai_b <= '0; aq_b <= '0; a2_b <= '0; n1m_b <= '0; n2m_b <= '0; fl_b <= '0;
    end else begin
      ai_b  <= ai;
      aq_b  <= aq;
      a2_b  <= a2;
      n1m_b <= (WN-1)'(n1[WN-1] ? -n1 : n1);
      n2m_b <= (WN-1)'(n2[WN-1] ? -n2 : n2);
      fl_b  <= fl;
    end

  // -------------------------------------- stage C: logarithms and differences
  localparam int unsigned LWI = $clog2(W_IN) + LOG_FRAC;
  localparam int unsigned LWA = $clog2(WA2) + LOG_FRAC;
  localparam int unsigned LWN = $clog2(WN - 1) + LOG_FRAC;
  localparam int unsigned LWV = $clog2(WV) + LOG_FRAC;

  logic [LWI-1:0] l_ai, l_aq;
  logic [LWA-1:0] l_a2;
  logic [LWN-1:0] l_n1, l_n2;
  logic [LWV-1:0] l_v1, l_v2;
  logic           z_ai, z_aq, z_a2, z_n1, z_n2, z_v1, z_v2;

  scs_log2 #(.W(W_IN))   u_log_ai (.x(ai_b),  .lg(l_ai), .zero(z_ai));
  scs_log2 #(.W(W_IN))   u_log_aq (.x(aq_b),  .lg(l_aq), .zero(z_aq));
  scs_log2 #(.W(WA2))    u_log_a2 (.x(a2_b),  .lg(l_a2), .zero(z_a2));
  scs_log2 #(.W(WN - 1)) u_log_n1 (.x(n1m_b), .lg(l_n1), .zero(z_n1));
  scs_log2 #(.W(WN - 1)) u_log_n2 (.x(n2m_b), .lg(l_n2), .zero(z_n2));
  scs_log2 #(.W(WV))     u_log_v1 (.x(v1q),   .lg(l_v1), .zero(z_v1));
  scs_log2 #(.W(WV))     u_log_v2 (.x(v2q),   .lg(l_v2), .zero(z_v2));

  logic signed [15:0] eth_c, e1_c, e2_c;   // log2 of the three quotients, 8 frac bits
  flags_t             fl_c;

  int t1, t2;
  always_comb begin
    // log2(|N|/(4 A V)) with |N| scaled by 256 and V by 16:
    //   l_n - 8 - (2 + l_a2/2 + l_v - 4), formed at twice the scale to keep l_a2/2 exact.
    t1 = 2 * int'(l_n1) - 2 * int'(l_v1) - int'(l_a2) - 3072;
    t2 = 2 * int'(l_n2) - 2 * int'(l_v2) - int'(l_a2) - 3072;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      eth_c <= '0; e1_c <= '0; e2_c <= '0; fl_c <= '0;
    end else begin
      eth_c <= 16'(int'(l_aq) - int'(l_ai));
      e1_c  <= 16'((t1 + 1) >>> 1);
      e2_c  <= 16'((t2 + 1) >>> 1);
      fl_c  <= fl_b;
    end

  // ---------------------------------- stage D: angle tables and codewords
  function automatic logic [W_ANG-1:0] outphase(input logic signed [15:0] e,
                                                input logic neg, input logic zero);
    logic [W_ANG-1:0] base;
    if (zero)        return W_ANG'(ANG_90);
    if (e >= 0)      base = '0;                                   // clipping
    else if (-e > 2047) base = W_ANG'(acos_tab[2047]);
    else             base = W_ANG'(acos_tab[11'(-e)]);
    return neg ? W_ANG'(ANG_180) - base : base;
  endfunction

  logic [W_ANG-1:0] thq, th, ph1, ph2, ps1, ps2;
  int               idx;
  always_comb begin
    idx = 0;
    // first-quadrant angle of |Sq|/|Si|
    if (fl_c.si_zero)      thq = fl_c.sq_zero ? '0 : W_ANG'(ANG_90);
    else if (fl_c.sq_zero) thq = '0;
    else if (eth_c >= 0) begin
      idx = (int'(eth_c) + 4) >>> 3;
      thq = (idx > 255) ? W_ANG'(ANG_90) : W_ANG'(atan_tab[idx[7:0]]);
    end else begin
      idx = (4 - int'(eth_c)) >>> 3;
      thq = (idx > 255) ? '0 : W_ANG'(ANG_90) - W_ANG'(atan_tab[idx[7:0]]);
    end
    // quadrant
    case ({fl_c.si_neg, fl_c.sq_neg})
      2'b00:   th = thq;
      2'b10:   th = W_ANG'(ANG_180) - thq;
      2'b11:   th = W_ANG'(ANG_180) + thq;
      default: th = -thq;
    endcase
    // outphasing angles
    if (fl_c.opp) begin
      ph1 = fl_c.v2_gt ? W_ANG'(ANG_180) : '0;
      ph2 = fl_c.v2_gt ? '0 : W_ANG'(ANG_180);
    end else if (fl_c.a2_zero) begin
      ph1 = W_ANG'(ANG_90);
      ph2 = W_ANG'(ANG_90);
    end else begin
      ph1 = outphase(e1_c, fl_c.n1_neg, fl_c.n1_zero);
      ph2 = outphase(e2_c, fl_c.n2_neg, fl_c.n2_zero);
    end
    // codewords: delay = phase lag
    ps1 = -(th + ph1);
    ps2 = ph2 - th;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      p1 <= '0;
      p2 <= '0;
    end else begin
      p1 <= W_P'((ps1 + W_ANG'(2)) >> 2);
      p2 <= W_P'((ps2 + W_ANG'(2)) >> 2);
    end

  // V1 = 0 (A_max = 0) has no meaning; the zero flags of V1/V2 are not needed.
  logic unused;
  assign unused = ^{z_ai, z_aq, z_a2, z_n1, z_n2, z_v1, z_v2};
endmodule
