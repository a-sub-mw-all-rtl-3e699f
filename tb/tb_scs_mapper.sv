// Testbench of the codeword mapper.
//
// For random calibration words (C(M), F(M), beta), phase codewords and
// offsets it checks, two clocks after the input, that the output codeword
// (C, F) has F < beta and that its delay in fine steps, C*beta + F, equals
// k/255 of the (C(M), F(M)) delay plus the offset, rounded to the nearest
// step. It also checks the end points (k = 0 gives the offset alone, k = 255
// gives C(M), F(M)) and saturation of a coarse code beyond 511.
`timescale 1ns/1ps
module tb_scs_mapper;
  import scs_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic [7:0] p;
  logic [9:0] phc;
  logic [8:0] cm, c;
  logic [4:0] fm, beta, f;

  scs_mapper dut (.clk, .rst_n, .p, .phc, .cm, .fm, .beta, .c, .f);

  always #10 clk = ~clk;

  int checks = 0, failures = 0, n_sat = 0;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int k, input int off, input int ccm, input int ffm, input int b);
    real want;
    int got, wi;
    @(negedge clk);
    p = 8'(k); phc = 10'(off); cm = 9'(ccm); fm = 5'(ffm); beta = 5'(b);
    repeat (2) @(posedge clk);
    #1;
    want = real'(k) * real'(ccm * b + ffm) / 255.0 + real'(off);
    wi   = int'($floor(want + 0.5));
    got  = int'(c) * b + int'(f);
    checks++;
    if (wi > 511 * b + b - 1) begin
      n_sat++;
      if (c != 9'd511 || f != 5'd31) begin
        failures++;
        $display("FAIL saturation k=%0d off=%0d: c=%0d f=%0d", k, off, c, f);
      end
    end else if (got != wi || int'(f) >= b) begin
      failures++;
      $display("FAIL k=%0d off=%0d cm=%0d fm=%0d beta=%0d: c=%0d f=%0d, want %0d steps",
               k, off, ccm, ffm, b, c, f, wi);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    p = '0; phc = '0; cm = '0; fm = '0; beta = 5'd9;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    apply(0, 0, 263, 8, 9);
    apply(255, 0, 263, 8, 9);
    apply(0, 37, 263, 8, 9);
    apply(128, 0, 337, 6, 10);
    apply(255, 1023, 300, 0, 9);
    apply(255, 1023, 511, 30, 31);     // beyond the longest code
    repeat (2000) begin
      int b;
      b = int'($urandom_range(1, 31));
      apply(int'($urandom_range(0, 255)), int'($urandom_range(0, 1023)) >> $urandom_range(0, 10),
            int'($urandom_range(150, 400)), int'($urandom_range(0, b - 1)), b);
    end
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
