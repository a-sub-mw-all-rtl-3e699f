// Testbench of the DCPS delay-line model.
//
// Runs a 100 MHz IF clock through the model and, for directed and random
// coarse/fine codes, measures the time from an IF rising edge to the output
// rising edge it causes. The expected delay T0 + c*Tc + f*Tf is computed here
// from the typical-corner figures; delays longer than one IF period are
// handled by matching the output edge to the IF edge one or two periods back.
`timescale 1ns/10ps
module tb_scs_dcps;
  import scs_pkg::*;

  localparam real T_IF = 10.0;
  localparam real T0 = 3.63, TC = 0.03776, TF = 0.00421;

  logic clk = 1'b0;
  logic [8:0] c;
  logic [4:0] f;
  logic out;

  scs_dcps dut (.clk_in(clk), .c, .f, .clk_out(out));

  always #(T_IF / 2) clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int cc, input int ff);
    real want, t, ph;
    c = 9'(cc);  f = 5'(ff);
    repeat (4) @(posedge clk);            // let edges in flight leave the line
    @(posedge out);
    t    = $realtime;
    want = T0 + cc * TC + ff * TF;
    // the clock's rising edges are at odd multiples of T_IF/2
    ph   = t - want - T_IF / 2;
    ph   = ph - T_IF * $floor(ph / T_IF + 0.5);
    checks++;
    if (ph > 0.011 || ph < -0.011) begin
      failures++;
      $display("FAIL c=%0d f=%0d edge at %f, expected delay %f, phase error %f", cc, ff, t, want, ph);
    end
  endtask

  initial begin
    c = '0; f = '0;
    measure(0, 0);
    measure(1, 0);
    measure(0, 1);
    measure(511, 31);
    measure(265, 0);
    measure(132, 17);
    for (int i = 0; i < 9; i++) measure(1 << i, 0);
    for (int i = 0; i < 5; i++) measure(0, 1 << i);
    repeat (30) measure(int'($urandom_range(0, 511)), int'($urandom_range(0, 31)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
