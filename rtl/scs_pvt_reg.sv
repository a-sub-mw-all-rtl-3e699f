// PVT register: holds the DCPS calibration result for the two mappers.
//
// Stores C(M), F(M) and beta (scs_pkg::pvt_t, 19 bits) when the calibration
// controller pulses `we`. The stored word is also shown on test_o, one bit
// per clock, most significant bit first, repeating every 19 clocks; the first
// bit after reset is bit 18. Storing the calibration result and a test
// output follow the chip; the readout format and reset value are this
// design's choices.
module scs_pvt_reg
  import scs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic we,
  input  pvt_t wdata,
  output pvt_t pvt,
  output logic test_o
);
  logic [$clog2(W_PVT)-1:0] bit_idx;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pvt <= PVT_RESET;
    else if (we) pvt <= wdata;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) bit_idx <= $clog2(W_PVT)'(W_PVT - 1);
    else        bit_idx <= (bit_idx == '0) ? $clog2(W_PVT)'(W_PVT - 1) : bit_idx - 1'b1;

  assign test_o = pvt[bit_idx];
endmodule
