// Front-end monostable: turns each rising edge of the quasi-digital sensor
// signal FE into one LOAD pulse for the PISO register.
//
// As in the document, a single D-latch triggered by the latch-enable pulse
// serves as the delay element: it holds the value FE had at the last LE
// pulse, and LOAD is FE high while that delayed copy is still low. LOAD
// therefore rises with FE and falls at the next LE pulse, so it lasts at
// most one oscillator period (about 1 us) and always contains one LE pulse:
// the PISO samples it exactly once. A FE level held high produces no
// further LOAD. The latch is written as a register on the LE edge (see
// piso.sv for why this is equivalent); its asynchronous clear is this
// design's addition.
//
// Interface: le, rst_n, fe (asynchronous input, at most ~100 kHz), load.
// Timing: load is combinational from fe; it is read by the PISO at the
// next rising edge of le.
`timescale 1ns / 1ps
module fe_monostable (
  input  logic le,
  input  logic rst_n,
  input  logic fe,
  output logic load
);

  logic fe_dly;  // FE as seen at the last LE pulse

  always_ff @(posedge le or negedge rst_n) begin
    if (!rst_n) fe_dly <= 1'b0;
    else        fe_dly <= fe;
  end

  assign load = fe & ~fe_dly;

  // LOAD never spans two LE pulses: it is cleared by the pulse it meets.
  a_load_one_pulse: assert property (@(posedge le) load |=> !(load && $stable(fe)))
    else $error("LOAD stayed high across two LE pulses");

endmodule
