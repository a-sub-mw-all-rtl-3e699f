// Testbench of the serial register file: checks the reset values, then
// shifts in random 42-bit configuration words, most significant bit first,
// and checks every field after the 42nd clock.
`timescale 1ns/1ps
module tb_scs_regfile;
  import scs_pkg::*;

  logic r_clk = 1'b0;
  logic rst_n, r_in;
  cfg_t cfg;

  scs_regfile dut (.r_clk, .rst_n, .r_in, .cfg);

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

  initial begin
    rst_n = 1'b1; r_in = 1'b0;
    #1 rst_n = 1'b0;
    #4;
    expect_eq("reset div", int'(cfg.div), 1);
    expect_eq("reset amax", int'(cfg.amax), 128);
    expect_eq("reset gc", int'(cfg.gc), 512);
    expect_eq("reset phi1c", int'(cfg.phi1c), 0);
    expect_eq("reset phi2c", int'(cfg.phi2c), 0);
    rst_n = 1'b1;
    repeat (50) begin
      int dv, am, g, o1, o2;
      logic [41:0] w;
      dv = int'($urandom_range(0, 15)); am = int'($urandom_range(0, 255));
      g  = int'($urandom_range(0, 1023)); o1 = int'($urandom_range(0, 1023));
      o2 = int'($urandom_range(0, 1023));
      w  = {4'(dv), 8'(am), 10'(g), 10'(o1), 10'(o2)};
      for (int i = 41; i >= 0; i--) begin
        r_in = w[i];
        #5 r_clk = 1'b1;
        #5 r_clk = 1'b0;
      end
      expect_eq("div", int'(cfg.div), dv);
      expect_eq("amax", int'(cfg.amax), am);
      expect_eq("gc", int'(cfg.gc), g);
      expect_eq("phi1c", int'(cfg.phi1c), o1);
      expect_eq("phi2c", int'(cfg.phi2c), o2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
