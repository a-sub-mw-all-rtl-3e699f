// Register file: configuration set before the separator runs.
//
// Holds the clock divide setting, A_max, the gain ratio Gc and the two
// phase-compensation offsets (scs_pkg::cfg_t, 42 bits). It is written
// serially: on every rising edge of r_clk the word shifts left by one and
// r_in enters at the least significant bit, so a full load is 42 clocks,
// most significant bit (div[3]) first. The outputs are the shift register
// itself; they are meant to be loaded before operation and are used by the
// DSP clock domain without synchronisation. The serial pins follow the chip;
// the bit order, field order and reset values are this design's choices.
module scs_regfile
  import scs_pkg::*;
(
  input  logic r_clk,
  input  logic rst_n,
  input  logic r_in,
  output cfg_t cfg
);
  always_ff @(posedge r_clk or negedge rst_n)
    if (!rst_n) cfg <= CFG_RESET;
    else        cfg <= {cfg[W_CFG-2:0], r_in};
endmodule
