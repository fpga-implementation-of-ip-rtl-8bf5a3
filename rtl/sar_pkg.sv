// Shared constants and types of the IP segmentation and reassembly design.
//
// A cell is L bits wide. Its upper L-16 bits carry packet bytes (first byte
// in the most significant byte) and its lower 16 bits carry the cell header.
// The header holds, from high to low bits, the 5-bit ToS (class of service),
// the 10-bit ID of the input port that built the cell and the End bit that
// marks the last cell of a packet. Field widths follow the document; the bit
// order (payload high, End bit lowest) is this design's reading of the
// left-to-right order of the cell drawing.
package sar_pkg;

  localparam int unsigned HDR_W  = 16;  // cell header length in bits
  localparam int unsigned TOS_W  = 5;   // up to 32 service classes
  localparam int unsigned PORT_W = 10;  // up to 1024 router ports

  typedef struct packed {
    logic [TOS_W-1:0]  tos;
    logic [PORT_W-1:0] port_id;
    logic              end_bit;
  } cell_hdr_t;

  // Two priority classes are reassembled (high / low). A cell belongs to the
  // high-priority class when the top bit of its 5-bit ToS field is set.
  function automatic logic is_high_prio(input logic [TOS_W-1:0] tos);
    return tos[TOS_W-1];
  endfunction

  // The 5-bit cell ToS is taken from the upper five bits of the 8-bit IPv4
  // type-of-service byte.
  function automatic logic [TOS_W-1:0] tos_from_ip(input logic [7:0] ip_tos);
    return ip_tos[7:8-TOS_W];
  endfunction

endpackage
