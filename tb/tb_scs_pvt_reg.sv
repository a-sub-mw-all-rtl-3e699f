// Testbench of the PVT register: reset value, write strobe, hold without
// strobe, and the serial test output (19 bits, MSB first, bit 18 in the
// first clock after reset, repeating).
`timescale 1ns/1ps
module tb_scs_pvt_reg;
  import scs_pkg::*;

  logic clk = 1'b0;
  logic rst_n, we, test_o;
  pvt_t wdata, pvt;

  scs_pvt_reg dut (.clk, .rst_n, .we, .wdata, .pvt, .test_o);

  always #10 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d, want %0d", what, got, want);
    end
  endtask

  // read one serial frame and compare with the stored word
  task automatic read_frame(input pvt_t want);
    logic [18:0] got;
    for (int i = 18; i >= 0; i--) begin
      got[i] = test_o;
      @(negedge clk);
    end
    expect_eq("test_o frame", int'(got), int'(want));
  endtask

  initial begin
    pvt_t v;
    rst_n = 1'b0; we = 1'b0; wdata = '0;
    @(negedge clk);
    expect_eq("reset cm", int'(pvt.cm), 265);
    expect_eq("reset fm", int'(pvt.fm), 0);
    expect_eq("reset beta", int'(pvt.beta), 9);
    rst_n = 1'b1;
    read_frame(PVT_RESET);         // frame starts right after reset
    repeat (20) begin
      v = pvt_t'($urandom_range(0, (1 << 19) - 1));
      wdata = v;  we = 1'b1;
      @(negedge clk);
      we = 1'b0;  wdata = ~v;
      expect_eq("stored", int'(pvt), int'(v));
      repeat (18) @(negedge clk);  // back to frame start
      read_frame(v);
      expect_eq("held", int'(pvt), int'(v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
