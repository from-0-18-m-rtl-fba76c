// Parallel-input serial-output register of the Body Dust transmitter.
//
// Each latch-enable (LE) pulse either writes the parallel packet into the
// register (LOAD high) or shifts it one place towards the serial output
// (LOAD low), filling with SHIFT_FILL. The serial output is the most
// significant stage, so after a load it shows the header bit at once and
// the following three LE pulses bring out A2, A1 and A0; after the fourth
// the register holds only the fill value and the modulator switch stays
// open (matched, no backscatter).
//
// The document builds the register from four D-latches that are
// transparent only during the ~1 ns LE pulse. A latch opened for a pulse
// much shorter than a clock period samples once per pulse, so here each
// stage is written as a register triggered by the rising edge of LE; the
// behaviour per pulse is the same. The load/shift multiplexer in front of
// the latches follows the document. The fill value, the bit order (header
// first) and the asynchronous clear are this design's choices.
//
// Interface: le (trigger), rst_n (asynchronous clear, active low), load,
// par_in[W-1:0], sout. Timing: sout changes right after an LE edge and is
// held for one oscillator period (1 us at 1 MHz).
`timescale 1ns / 1ps
module piso #(
  parameter int unsigned W          = 4,     // number of latches
  parameter logic        SHIFT_FILL = 1'b0   // value shifted in behind the packet
) (
  input  logic         le,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] par_in,
  output logic         sout
);

  logic [W-1:0] stage;

  always_ff @(posedge le or negedge rst_n) begin
    if (!rst_n)    stage <= '0;
    else if (load) stage <= par_in;
    else           stage <= {stage[W-2:0], SHIFT_FILL};
  end

  assign sout = stage[W-1];

endmodule
