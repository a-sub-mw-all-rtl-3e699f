// Calibration controller of the DCPS pair.
//
// The mappers need to know how the delay lines behave at the present process,
// voltage and temperature: the ratio beta = Tc/Tf of coarse to fine step, and
// the codeword pair (C(M), F(M)) whose delay is 255/256 of an IF period. After
// reset this controller measures them with the phase detector alone, by
// driving test codes into both DCPS through the code multiplexers:
//   1. DCPS2 at code 0, DCPS1 coarse code c = 1, 2, ... The detector first
//      reports branch 1 lagging, then leading once c*Tc passes half a period,
//      then lagging again once c*Tc passes a full period: that c is c_full.
//   2. DCPS1 at coarse 1, DCPS2 fine code f = 0, 1, ... until branch 1
//      leads, i.e. f*Tf > Tc: beta = f.
//   3. DCPS1 at (c_full - 1, f), f = 0, 1, ... until branch 1 lags again,
//      i.e. the delay reaches a period: the period is
//      N = (c_full - 1)*beta + f fine steps.
//   4. D_M = N - round(N/256); C(M) = D_M div beta, F(M) = D_M mod beta are
//      written to the PVT register, and the multiplexers are handed to the
//      mappers (sel_cal low, done high).
// Every code change is followed by SETTLE clocks before the detector, brought
// into this clock domain through two flip-flops, is read. up = branch 1 leads.
// A sweep that runs out of codes stops at the largest code.
// That the chip calibrates itself from a phase detector and stores C(M), F(M)
// and beta follows the chip; this procedure is this design's own.
module scs_control
  import scs_pkg::*;
#(
  parameter int unsigned SETTLE = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       up,
  input  logic       down,
  output dcps_code_t cal_code1,
  output dcps_code_t cal_code2,
  output logic       sel_cal,
  output logic       pvt_we,
  output pvt_t       pvt_wdata,
  output logic       done
);
  typedef enum logic [2:0] {S_COARSE, S_BETA, S_FINE, S_CALC, S_STORE, S_DONE} state_t;

  localparam int unsigned WD = W_C + W_BETA + 1;

  state_t              state;
  logic [1:0]          up_sync, down_sync;
  logic [$clog2(SETTLE+1)-1:0] wait_cnt;
  logic                seen_lead;
  logic [W_C-1:0]      c_full;
  logic [W_BETA-1:0]   beta;
  logic [WD-1:0]       dm;
  logic                lead;

  // phase detector into this clock domain
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      up_sync   <= '0;
      down_sync <= 2'b11;
    end else begin
      up_sync   <= {up_sync[0], up};
      down_sync <= {down_sync[0], down};
    end
  assign lead = up_sync[1] & ~down_sync[1];

  // period in fine steps at the present fine code, and the final division
  logic [WD-1:0] n_per, q;
  always_comb begin
    n_per = WD'(cal_code1.c) * WD'(beta) + WD'(cal_code1.f);
    q     = dm / WD'(beta);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state     <= S_COARSE;
      cal_code1 <= '{c: W_C'(1), f: '0};
      cal_code2 <= '0;
      wait_cnt  <= '0;
      seen_lead <= 1'b0;
      c_full    <= '0;
      beta      <= '0;
      dm        <= '0;
      pvt_we    <= 1'b0;
      pvt_wdata <= PVT_RESET;
    end else begin
      pvt_we <= 1'b0;
      if (state inside {S_COARSE, S_BETA, S_FINE} && wait_cnt != $clog2(SETTLE+1)'(SETTLE))
        wait_cnt <= wait_cnt + 1'b1;
      else begin
        unique case (state)
          S_COARSE: begin
            wait_cnt <= '0;
            if (seen_lead && !lead || cal_code1.c == '1) begin
              c_full    <= cal_code1.c;
              state     <= S_BETA;
              cal_code1 <= '{c: W_C'(1), f: '0};
              cal_code2 <= '0;
            end else begin
              seen_lead   <= seen_lead | lead;
              cal_code1.c <= cal_code1.c + 1'b1;
            end
          end
          S_BETA: begin
            wait_cnt <= '0;
            if (lead || cal_code2.f == '1) begin
              beta      <= (cal_code2.f == '0) ? W_BETA'(1) : W_BETA'(cal_code2.f);
              state     <= S_FINE;
              cal_code1 <= '{c: c_full - 1'b1, f: '0};
              cal_code2 <= '0;
            end else
              cal_code2.f <= cal_code2.f + 1'b1;
          end
          S_FINE: begin
            wait_cnt <= '0;
            if (!lead || cal_code1.f == '1) begin
              dm    <= n_per - ((n_per + WD'(128)) >> 8);
              state <= S_CALC;
            end else
              cal_code1.f <= cal_code1.f + 1'b1;
          end
          S_CALC: begin
            pvt_wdata <= '{cm:   (q > WD'((1 << W_C) - 1)) ? '1 : W_C'(q),
                           fm:   W_F'(dm - q * WD'(beta)),
                           beta: beta};
            state <= S_STORE;
          end
          S_STORE: begin
            pvt_we <= 1'b1;
            state  <= S_DONE;
          end
          default: ;   // S_DONE: calibration finished until the next reset
        endcase
      end
    end

  assign sel_cal = (state != S_DONE);
  assign done    = (state == S_DONE);

  // the calibration codes only move while the multiplexers pass them
  a_codes_stable: assert property (@(posedge clk) disable iff (!rst_n)
    !sel_cal |-> $stable(cal_code1) && $stable(cal_code2));
endmodule
