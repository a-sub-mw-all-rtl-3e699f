// Clock manager: derives the DSP clock from the IF clock.
//
// The IF clock (100 MHz) drives the two phase shifters directly; the DSP
// domain runs on the IF clock divided by div + 1 (div = 1 gives 50 MHz, the
// chip's operating point; div = 0 passes the IF clock through). The divided
// clock is high for the first floor((div+1)/2) IF cycles of each period, so
// even ratios give 50% duty. div is static configuration. The divider is this
// design's reading of the 4-bit div setting shown going to the clock manager.
module scs_clock_manager
  import scs_pkg::*;
(
  input  logic             if_clk,
  input  logic             rst_n,
  input  logic [W_DIV-1:0] div,
  output logic             dsp_clk
);
  logic [W_DIV-1:0] cnt;
  logic             div_q;

  logic [W_DIV-1:0] nxt;
  assign nxt = (cnt >= div) ? '0 : cnt + 1'b1;

  always_ff @(posedge if_clk or negedge rst_n)
    if (!rst_n) begin
      cnt   <= '0;
      div_q <= 1'b0;
    end else begin
      cnt   <= nxt;
      div_q <= ({1'b0, nxt} < ({1'b0, div} + 5'd1) / 5'd2);
    end

  assign dsp_clk = (div == '0) ? if_clk : div_q;
endmodule
