// Behavioural model (not synthesizable logic): three-stage current-starved
// ring oscillator that clocks the Body Dust transmitter at 1 MHz.
//
// The real part is analog: three inverters whose current is limited by
// starving transistors, each loaded by a capacitor (a 200 fF capacitor in
// the 0.18 um version, the stage-to-stage parasitic capacitance in the
// 28 nm one). The document gives the oscillation frequency as
//   f = I / (N * C_tot * V_dd)
// and this model derives each stage's delay from it, t_d = 1 / (2 * N * f),
// and closes a ring of N inverting stages with that delay. I_BIAS_A is not
// given by the document: it is chosen so that the formula gives the
// document's 1 MHz with N = 3, C = 200 fF and V_dd = 1.8 V (1.08 uA).
//
// The first stage is a NAND with the enable input, an addition of this
// model so that the ring starts from a known state: with en low the ring
// rests with clk low; when en rises the first rising edge of clk follows
// after N stage delays.
//
// Interface: en (active high), clk (oscillator output, duty cycle 50%).
`timescale 1ns / 1ps
module sro #(
  parameter int unsigned N_STAGES = 3,          // odd number of ring stages
  parameter real         C_TOT_F  = 200.0e-15,  // capacitance per stage [F]
  parameter real         VDD_V    = 1.8,        // supply [V]
  parameter real         I_BIAS_A = 1.08e-6     // ring current [A]
) (
  input  logic en,
  output logic clk
);

  localparam real FREQ_HZ  = I_BIAS_A / (real'(N_STAGES) * C_TOT_F * VDD_V);
  localparam real TSTAGE_NS = 1.0e9 / (2.0 * real'(N_STAGES) * FREQ_HZ);

  logic [N_STAGES-1:0] node;

  // First stage: NAND(en, feedback). Others: plain inverters.
  assign #(TSTAGE_NS) node[0] = ~(en & node[N_STAGES-1]);

  for (genvar i = 1; i < N_STAGES; i++) begin : g_stage
    assign #(TSTAGE_NS) node[i] = ~node[i-1];
  end

  // With en low, node[0] = 1 and, N being odd, the last node is 1 as well.
  assign clk = ~node[N_STAGES-1];

endmodule
