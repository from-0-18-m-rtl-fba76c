// Shared constants and the packet type of the Body Dust OOK transmitter.
//
// A packet is four bits sent most significant bit first: a header bit that
// is always 1, then the 3-bit address A2 A1 A0 of the sensor whose
// quasi-digital signal triggered the transmission. The header and the
// address width follow the document; the names and the packing are this
// design's own.
`timescale 1ns / 1ps
package bodydust_pkg;

  localparam int unsigned ADDR_W = 3;           // sensor address bits A2..A0
  localparam int unsigned PKT_W  = ADDR_W + 1;  // header + address
  localparam int unsigned N_SENSORS = 5;        // nano-biosensors on the chip
  localparam logic        HEADER_BIT = 1'b1;    // header is always 1

  typedef struct packed {
    logic              header;
    logic [ADDR_W-1:0] addr;
  } packet_t;

  // Build the parallel word loaded into the PISO register.
  function automatic packet_t make_packet(input logic [ADDR_W-1:0] addr);
    packet_t p;
    p.header = HEADER_BIT;
    p.addr   = addr;
    return p;
  endfunction

endpackage
