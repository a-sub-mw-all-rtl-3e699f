// Base-2 logarithm by table, used by the phase calculator in place of dividers.
//
// A leading-one detector gives the integer part of log2(x); the 8 bits that
// follow the leading one index a 256-entry table holding
// round(256 * log2(1 + m/256)), which gives the fraction. The result is
// unsigned fixed point with 8 fraction bits. x = 0 raises `zero` and returns 0.
// Purely combinational; the table is computed at elaboration (scs_pkg). The
// table-based logarithm follows the chip, its size is this design's choice.
module scs_log2
  import scs_pkg::*;
#(
  parameter int unsigned W  = 16,
  parameter int unsigned LW = $clog2(W) + 8
) (
  input  logic [W-1:0]  x,
  output logic [LW-1:0] lg,
  output logic          zero
);
  localparam log_lut_t LUT = gen_log2_lut();

  logic [$clog2(W)-1:0] msb;
  logic [W+7:0]         xe;
  logic [7:0]           mant;

  always_comb begin
    msb = '0;
    for (int i = 0; i < int'(W); i++)
      if (x[i]) msb = i[$clog2(W)-1:0];
    xe   = {x, 8'd0} << (int'(W) - 1 - int'(msb));
    mant = xe[W+6 -: 8];
    zero = (x == '0);
    lg   = zero ? '0 : LW'({msb, 8'd0}) + LW'(LUT[mant]);
  end
endmodule
