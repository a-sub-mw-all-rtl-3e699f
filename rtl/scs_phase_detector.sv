// Phase detector between the two DCPS outputs, used during calibration.
//
// A bang-bang detector: one flip-flop samples branch 1's output on the rising
// edge of branch 2's output. With 50% duty clocks, a 1 means branch 1 rose
// less than half a period before branch 2 (branch 1 leads, asserting `up`:
// it needs more delay); a 0 means branch 1 lags (`down`). Outputs change on
// branch 2's edges and are synchronised by the reader. Only the detector's
// name and its UP/DOWN outputs are given by the chip; the circuit is this
// design's choice.
module scs_phase_detector (
  input  logic s1,
  input  logic s2,
  input  logic rst_n,
  output logic up,
  output logic down
);
  logic q;
  always_ff @(posedge s2 or negedge rst_n)
    if (!rst_n) q <= 1'b0;
    else        q <= s1;

  assign up   = q;
  assign down = ~q;
endmodule
