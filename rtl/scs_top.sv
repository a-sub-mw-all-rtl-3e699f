// All-digital signal component separator (SCS) for a LINC / outphasing
// transmitter, with branch gain and phase mismatch compensation.
//
// A baseband sample S = Si + jSq of varying amplitude is split into two
// constant-amplitude, phase-only signals whose sum is S, so each can be
// amplified by an efficient nonlinear amplifier. The phases are computed
// digitally and applied directly to a 100 MHz IF clock by two delay-line
// phase shifters (DCPS), so no DACs or quadrature modulators are needed.
// Branch mismatch of the two amplifier paths is compensated inside the SCS:
// the gain ratio Gc is folded into the phase calculation, and a phase
// mismatch is cancelled by a fixed delay offset on one branch.
//
// Data path, one sample per DSP clock (IF/(div+1), 50 MHz by default):
//   scs_phase_calc  : (Si, Sq, A_max, Gc) -> phase codewords P1, P2 (8 bit)
//   scs_mapper x2   : P -> 9-bit coarse / 5-bit fine DCPS codes, plus offset
//   code multiplexer: calibration codes until calibration is done, then mapper codes
//   scs_dcps x2     : IF clock delayed by T0 + C*Tc + F*Tf  -> s1_hat, s2_hat
// Support:
//   scs_regfile       : A_max, Gc, offsets and div, loaded serially (r_in/r_clk)
//   scs_control       : after reset, calibrates the DCPS pair with scs_phase_detector
//   scs_pvt_reg       : holds the calibration result, shown serially on test_o
//   scs_clock_manager : DSP clock from the IF clock
// Latency: a sample present before DSP clock edge n reaches the DCPS codes
// after edge n+5 (four stages of phase calculation, two of mapping) and the
// outputs one delay-line delay later. The block structure, widths and clock
// rates follow the chip; the two power domains and their level shifters are
// not represented (the shifters are wires). Samples must be aligned to
// dsp_clk, which is brought out for that purpose, as is cal_done. The
// register file should be loaded while nothing depends on the DSP clock:
// shifting passes through other div values.
module scs_top
  import scs_pkg::*;
(
  input  logic                   if_clk,
  input  logic                   rst_n,
  input  logic signed [W_IN-1:0] si,
  input  logic signed [W_IN-1:0] sq,
  input  logic                   r_in,
  input  logic                   r_clk,
  output logic                   s1_hat,
  output logic                   s2_hat,
  output logic                   test_o,
  output logic                   dsp_clk,
  output logic                   cal_done
);
  cfg_t       cfg;
  pvt_t       pvt, pvt_wdata;
  logic       pvt_we, sel_cal, up, down;
  logic [W_P-1:0] p1, p2;
  dcps_code_t map1, map2, cal1, cal2, code1, code2;

  scs_clock_manager u_clkman (.if_clk, .rst_n, .div(cfg.div), .dsp_clk);

  scs_regfile u_regfile (.r_clk, .rst_n, .r_in, .cfg);

  scs_phase_calc u_phase_calc (
    .clk(dsp_clk), .rst_n, .si, .sq, .amax(cfg.amax), .gc(cfg.gc), .p1, .p2);

  scs_mapper u_mapper1 (
    .clk(dsp_clk), .rst_n, .p(p1), .phc(cfg.phi1c),
    .cm(pvt.cm), .fm(pvt.fm), .beta(pvt.beta), .c(map1.c), .f(map1.f));

  scs_mapper u_mapper2 (
    .clk(dsp_clk), .rst_n, .p(p2), .phc(cfg.phi2c),
    .cm(pvt.cm), .fm(pvt.fm), .beta(pvt.beta), .c(map2.c), .f(map2.f));

  scs_control u_control (
    .clk(dsp_clk), .rst_n, .up, .down, .cal_code1(cal1), .cal_code2(cal2),
    .sel_cal, .pvt_we, .pvt_wdata, .done(cal_done));

  scs_pvt_reg u_pvt_reg (.clk(dsp_clk), .rst_n, .we(pvt_we), .wdata(pvt_wdata), .pvt, .test_o);

  // code multiplexers in front of the phase shifters
  always_comb begin
    code1 = sel_cal ? cal1 : map1;
    code2 = sel_cal ? cal2 : map2;
  end

  scs_dcps u_dcps1 (.clk_in(if_clk), .c(code1.c), .f(code1.f), .clk_out(s1_hat));
  scs_dcps u_dcps2 (.clk_in(if_clk), .c(code2.c), .f(code2.f), .clk_out(s2_hat));

  scs_phase_detector u_pd (.s1(s1_hat), .s2(s2_hat), .rst_n, .up, .down);
endmodule
