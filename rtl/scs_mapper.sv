// Codeword mapper: phase codeword -> two-stage DCPS delay codeword.
//
// The DCPS delays the IF clock by T0 + C*Tc + F*Tf. A phase codeword P = k
// must give T0 + k*Tref/256, so the delay beyond T0 is k/255 of the delay of
// the calibrated codeword pair (C(M), F(M)), which stands for 255/256 of an IF
// period. Counted in fine-tune steps, with beta = Tc/Tf:
//   D = round(k * (C(M)*beta + F(M)) / 255) + phc
//   C = D div beta,  F = D mod beta
// phc is the branch's phase-compensation offset in fine-tune steps, which
// shifts this branch later to balance a phase mismatch of the amplifier path.
// A coarse code beyond 511 saturates at the longest delay; beta = 0 counts as 1.
// Timing: two register stages (multiply and scale, then divide); one codeword
// per clock. The mapping idea (delay linear in k up to C(M), F(M)) follows the
// chip; the exact formula, rounding and pipelining are this design's choices.
module scs_mapper
  import scs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [W_P-1:0]    p,
  input  logic [W_PHC-1:0]  phc,
  input  logic [W_C-1:0]    cm,
  input  logic [W_F-1:0]    fm,
  input  logic [W_BETA-1:0] beta,
  output logic [W_C-1:0]    c,
  output logic [W_F-1:0]    f
);
  localparam int unsigned WD = W_C + W_BETA + 1;   // 15 bits of fine steps

  logic [WD-1:0] dm;        // delay of (C(M), F(M)) in fine steps
  logic [WD-1:0] d_q;       // target delay of this codeword, registered
  logic [W_BETA-1:0] b;

  always_comb begin
    dm = WD'(cm) * WD'(beta) + WD'(fm);
    b  = (beta == '0) ? W_BETA'(1) : beta;
  end

  logic [WD+W_P-1:0] prod;
  logic [WD-1:0]     q;
  always_comb begin
    prod = (WD+W_P)'(p) * (WD+W_P)'(dm) + (WD+W_P)'(127);
    q    = d_q / WD'(b);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) d_q <= '0;
    else        d_q <= WD'(prod / 255) + WD'(phc);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      c <= '0;
      f <= '0;
    end else if (q > WD'((1 << W_C) - 1)) begin
      c <= '1;
      f <= '1;
    end else begin
      c <= W_C'(q);
      f <= W_F'(d_q - q * WD'(b));
    end
endmodule
