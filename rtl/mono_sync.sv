// Behavioural model (not synthesizable logic): monostable synchronizer that
// makes the latch-enable (LE) pulse for the four PISO latches and the
// front-end latch.
//
// The document describes it as an inverter-based delay block producing a
// pulse of about 1 ns, sized for the five latches it drives and routed
// symmetrically to them. Its exact circuit is not given; this model uses
// the usual form of such a pulse generator: the trigger is ANDed with a
// copy of itself delayed and inverted by an odd chain of N_INV inverters,
// which gives a pulse of N_INV * T_INV_NS on each rising edge of the
// trigger and nothing on the falling edge. The trigger is the ring
// oscillator output.
//
// Interface: trig (oscillator clock), le (pulse). Timing: le rises with
// trig and falls PULSE_NS later.
`timescale 1ns / 1ps
module mono_sync #(
  parameter int unsigned N_INV    = 5,    // odd number of delay inverters
  parameter real         T_INV_NS = 0.2   // delay of one inverter [ns]
) (
  input  logic trig,
  output logic le
);

  logic [N_INV-1:0] chain;

  assign #(T_INV_NS) chain[0] = ~trig;
  for (genvar i = 1; i < N_INV; i++) begin : g_inv
    assign #(T_INV_NS) chain[i] = ~chain[i-1];
  end

  assign le = trig & chain[N_INV-1];

endmodule
