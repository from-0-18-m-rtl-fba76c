// Behavioural model (not synthesizable logic): NMOS switch of the on-off
// keying (OOK) backscatter modulator.
//
// The switch sits across the modulator resistance R_m, which equals the
// lumped resistance R_p of the piezoelectric (PZT) receiver. With the gate
// low the switch is open, the receiver sees R_m = R_p and is matched, and
// little ultrasound is reflected. With the gate high the switch shorts R_m,
// the receiver is mismatched and the reflection is strong: that change is
// what the external base station detects. The model reports the resistance
// the receiver sees and the reflection coefficient of that load against
// R_p, (R - R_p) / (R + R_p), in signed Q1.15 fixed point: 0 when
// matched, -32768 (-1.0) when shorted. R_m and the
// receiver capacitance C_p (62.75 pF, used only by the transducer) are the
// document's values; the switching delay is this model's assumption.
//
// Interface: gate (serial data from the PISO), r_load_ohm (resistance in
// parallel with the receiver), mismatched, reflection (Q1.15).
`timescale 1ns / 1ps
module ook_switch #(
  parameter int unsigned R_M_OHM  = 3552,  // modulator resistance = R_p
  parameter real         T_SW_NS  = 0.1    // switching delay
) (
  input  logic        gate,
  output logic [15:0] r_load_ohm,
  output logic        mismatched,
  output logic signed [15:0] reflection
);

  logic               closed;
  logic signed [31:0] r_s, rp_s;

  assign #(T_SW_NS) closed = gate;

  always_comb begin
    r_load_ohm = closed ? 16'd0 : 16'(R_M_OHM);
    mismatched = closed;
    r_s        = 32'(r_load_ohm);
    rp_s       = 32'(R_M_OHM);
    reflection = 16'(((r_s - rp_s) * 32'sd32768) / (r_s + rp_s));
  end

endmodule
