// Digital-control phase shifter (DCPS): behavioural model of the open-loop
// delay line that turns a delay codeword into a phase-shifted IF clock.
//
// The IF clock passes a fixed delay T0, then a coarse-tune stage and a
// fine-tune stage. Both stages follow a power-of-two architecture: bit i of
// the 9-bit coarse code c switches in a section of 2^i unit delays Tc, and
// bit j of the 5-bit fine code f a section of 2^j varactor loads Tf, so the
// total delay is T0 + c*Tc + f*Tf with no encoder. In silicon the sections are
// standard-cell delay cells and digitally controlled varactors, whose delays
// depend on process, voltage and temperature; here each lump of units is a delay
// with the typical-corner averages measured on the chip (T0 = 3.63 ns,
// Tc = 37.76 ps, Tf = 4.21 ps, so c = 511 adds 19.3 ns and f = 31 adds
// 0.13 ns). Up to CHUNK unit delays are lumped into one delay to keep
// simulation fast; the delays are inertial, so a lump must stay shorter than
// the narrowest pulse on the line. Not synthesizable: this is a model for simulation. Codes may change
// at any time; an edge already inside a section keeps that section's delay.
// Jitter and cell-to-cell spread are not modelled.
module scs_dcps
  import scs_pkg::*;
#(
  parameter realtime T0_PS = 3630.0,
  parameter realtime TC_PS = 37.76,
  parameter realtime TF_PS = 4.21,
  // Unit delays lumped into one delay. Each lump must stay shorter
  // than the narrowest pulse on the line (half an IF period), or edges are lost.
  parameter int      CHUNK = 64
) (
  input  logic           clk_in,
  input  logic [W_C-1:0] c,
  input  logic [W_F-1:0] f,
  output logic           clk_out
);
  timeunit 1ps;
  timeprecision 10fs;

  logic [W_C+W_F:0] node;   // chain nodes between sections

  assign #(T0_PS) node[0] = clk_in;

  for (genvar i = 0; i < W_C + W_F; i++) begin : g_sec
    localparam int      NUNIT = (i < W_C) ? (1 << i) : (1 << (i - W_C));
    localparam int      NCELL = (NUNIT + CHUNK - 1) / CHUNK;
    localparam realtime D     = ((i < W_C) ? TC_PS : TF_PS) * real'(NUNIT / NCELL);
    logic [NCELL:0] tap;   // a section: NCELL delays of up to CHUNK units
    logic           sel;
    assign tap[0] = node[i];
    for (genvar k = 0; k < NCELL; k++) begin : g_cell
      assign #(D) tap[k+1] = tap[k];
    end
    assign sel = (i < W_C) ? c[i % W_C] : f[(i - W_C) % W_F];
    assign node[i+1] = sel ? tap[NCELL] : node[i];
  end

  assign clk_out = node[W_C+W_F];
endmodule
