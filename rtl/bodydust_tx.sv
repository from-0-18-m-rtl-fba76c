// Event-driven OOK backscatter transmitter of a Body Dust sensing tag.
//
// Each rising edge of FE, the frequency-coded ("quasi-digital") output of
// the sensor read-out, makes the tag send one 4-bit packet: a header bit 1
// followed by the 3-bit address of the sensor currently selected by the
// on-chip multiplexer. The base station recovers the sensor value as the
// rate at which packets with a given address arrive, so the packet carries
// only the address and its arrival time carries the measurement.
//
// Chain, as in the document:
//   sro            1 MHz starved ring oscillator (behavioural model)
//   mono_sync      turns each oscillator rising edge into a ~1 ns LE pulse
//                  (behavioural model)
//   fe_monostable  edge detector on FE giving a LOAD pulse of <= 1 period
//   piso           4 latches: load {1, A2, A1, A0} on LOAD, else shift
//   ook_switch     NMOS switch across R_m driven by the serial bit
//                  (behavioural model)
// The serial bit stream is one bit per oscillator period (1 Mb/s); a packet
// takes 4 us, well inside the 10 us period of the fastest FE signal
// (about 100 kHz).
//
// Interface: por_n (power-on reset, active low: stops the oscillator and
// clears the latches; an addition of this design, the document shows no
// reset), fe, addr (from the sensor multiplexer), and towards the PZT
// receiver the modulator state: sdata (switch gate), r_load_ohm,
// mismatched and reflection (Q1.15). le and load are brought out for observation.
// Timing: the header bit appears at the first oscillator rising edge after
// the FE rising edge (within 1 us); A2, A1, A0 follow at the next three
// edges; afterwards sdata stays 0 until the next FE rising edge.
`timescale 1ns / 1ps
module bodydust_tx
  import bodydust_pkg::*;
#(
  parameter real         SRO_I_BIAS_A = 1.08e-6,  // sets 1 MHz via f = I/(N C V)
  parameter int unsigned R_M_OHM      = 3552      // modulator resistance
) (
  input  logic              por_n,
  input  logic              fe,
  input  logic [ADDR_W-1:0] addr,
  output logic              sdata,
  output logic [15:0]       r_load_ohm,
  output logic              mismatched,
  output logic signed [15:0] reflection,
  output logic              le,
  output logic              load
);

  logic    clk_sro;
  packet_t pkt;

  sro #(.I_BIAS_A(SRO_I_BIAS_A)) u_sro (
    .en  (por_n),
    .clk (clk_sro)
  );

  mono_sync u_mono_sync (
    .trig (clk_sro),
    .le   (le)
  );

  fe_monostable u_fe_mono (
    .le    (le),
    .rst_n (por_n),
    .fe    (fe),
    .load  (load)
  );

  assign pkt = make_packet(addr);

  piso #(.W(PKT_W)) u_piso (
    .le     (le),
    .rst_n  (por_n),
    .load   (load),
    .par_in (pkt),
    .sout   (sdata)
  );

  ook_switch #(.R_M_OHM(R_M_OHM)) u_switch (
    .gate       (sdata),
    .r_load_ohm (r_load_ohm),
    .mismatched (mismatched),
    .reflection (reflection)
  );

endmodule
