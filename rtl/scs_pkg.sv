// Shared widths, types and constants of the LINC signal component separator (SCS).
//
// The SCS turns an 8-bit complex baseband sample (Si, Sq) into two phase-only
// signals. Widths follow the chip's block diagram: 8-bit samples and phase
// codewords, 10-bit gain ratio and phase offsets, 9-bit coarse and 5-bit fine
// delay codewords (14 bits per DCPS). The field order of the configuration word
// and the fixed-point formats are this design's own choices.
package scs_pkg;

  localparam int unsigned W_IN   = 8;   // baseband sample width (signed)
  localparam int unsigned W_P    = 8;   // phase codeword: 256 steps per turn
  localparam int unsigned W_AMAX = 8;   // A_max, unsigned, same units as Si/Sq
  localparam int unsigned W_GC   = 10;  // gain ratio Gc, unsigned, GC_FRAC fraction bits
  localparam int unsigned GC_FRAC = 9;  // Gc = 1.0 is 512
  localparam int unsigned W_PHC  = 10;  // phase-compensation offset, fine-tune steps
  localparam int unsigned W_DIV  = 4;   // clock manager divide setting
  localparam int unsigned W_C    = 9;   // DCPS coarse-tune codeword
  localparam int unsigned W_F    = 5;   // DCPS fine-tune codeword
  localparam int unsigned W_BETA = 5;   // coarse/fine resolution ratio

  // Angles inside the phase calculator: 1024 steps per turn.
  localparam int unsigned W_ANG   = 10;
  localparam int unsigned ANG_90  = 256;
  localparam int unsigned ANG_180 = 512;

  // Base-2 logarithms: 8 fraction bits.
  localparam int unsigned LOG_FRAC = 8;

  // ------------------------------------------------------------------ tables
  // Computed at elaboration from their formulas; angles in 1024 steps per turn.
  localparam real PI_R = 3.14159265358979;

  // log2 mantissa: round(256 * log2(1 + m/256)), m = 0..255 (255 at most)
  typedef logic [LOG_FRAC-1:0] log_lut_t [256];
  function automatic log_lut_t gen_log2_lut();
    log_lut_t t;
    for (int m = 0; m < 256; m++) begin
      real v;
      v = 256.0 * $ln(1.0 + m / 256.0) / $ln(2.0) + 0.5;
      t[m] = (v >= 255.0) ? 8'd255 : 8'($rtoi(v));
    end
    return t;
  endfunction

  // exp-atan: round(atan(2^(i/32)) * 1024/(2*pi)), i = 0..255
  typedef logic [8:0] atan_lut_t [256];
  function automatic atan_lut_t gen_atan_exp_lut();
    atan_lut_t t;
    for (int i = 0; i < 256; i++)
      t[i] = 9'($rtoi($atan($pow(2.0, i / 32.0)) * 1024.0 / (2.0 * PI_R) + 0.5));
    return t;
  endfunction

  // exp-acos: round(acos(2^(-i/256)) * 1024/(2*pi)), i = 0..2047 (255 at most)
  typedef logic [7:0] acos_lut_t [2048];
  function automatic acos_lut_t gen_acos_exp_lut();
    acos_lut_t t;
    for (int i = 0; i < 2048; i++) begin
      real v;
      v = $acos($pow(2.0, -i / 256.0)) * 1024.0 / (2.0 * PI_R) + 0.5;
      t[i] = (v >= 255.0) ? 8'd255 : 8'($rtoi(v));
    end
    return t;
  endfunction

  // Parameters held in the register file, loaded before operation.
  typedef struct packed {
    logic [W_DIV-1:0]  div;
    logic [W_AMAX-1:0] amax;
    logic [W_GC-1:0]   gc;
    logic [W_PHC-1:0]  phi1c;
    logic [W_PHC-1:0]  phi2c;
  } cfg_t;
  localparam int unsigned W_CFG = $bits(cfg_t);   // 42

  localparam cfg_t CFG_RESET = '{div: 4'd1, amax: 8'd128, gc: 10'd512, phi1c: '0, phi2c: '0};

  // DCPS control codeword.
  typedef struct packed {
    logic [W_C-1:0] c;
    logic [W_F-1:0] f;
  } dcps_code_t;

  // Calibration result held in the PVT register.
  typedef struct packed {
    logic [W_C-1:0]    cm;
    logic [W_F-1:0]    fm;
    logic [W_BETA-1:0] beta;
  } pvt_t;
  localparam int unsigned W_PVT = $bits(pvt_t);   // 19

  localparam pvt_t PVT_RESET = '{cm: 9'd265, fm: 5'd0, beta: 5'd9};

endpackage
