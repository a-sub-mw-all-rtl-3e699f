// Testbench of the clock manager: for every divide setting it measures the
// period and high time of the DSP clock against the 10 ns IF clock:
// period (div+1)*10 ns, high for floor((div+1)/2) IF cycles (div = 0: the IF
// clock itself).
`timescale 1ns/1ps
module tb_scs_clock_manager;
  import scs_pkg::*;

  logic if_clk = 1'b0;
  logic rst_n;
  logic [3:0] div;
  logic dsp_clk;

  scs_clock_manager dut (.if_clk, .rst_n, .div, .dsp_clk);

  always #5 if_clk = ~if_clk;

  int checks = 0, failures = 0;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t_rise, t_fall, t_next;
    real want_p, want_h;
    rst_n = 1'b0; div = 4'd1;
    #12 rst_n = 1'b1;
    for (int d = 0; d < 16; d++) begin
      div = 4'(d);
      repeat (3 * (d + 1) + 4) @(posedge if_clk);
      @(posedge dsp_clk); t_rise = $realtime;
      @(negedge dsp_clk); t_fall = $realtime;
      @(posedge dsp_clk); t_next = $realtime;
      want_p = 10.0 * (d + 1);
      want_h = (d == 0) ? 5.0 : 10.0 * ((d + 1) / 2);
      checks++;
      if (t_next - t_rise != want_p || t_fall - t_rise != want_h) begin
        failures++;
        $display("FAIL div=%0d: period %f high %f, want %f %f", d, t_next - t_rise,
                 t_fall - t_rise, want_p, want_h);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
