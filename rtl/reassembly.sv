// Packet reassembly block of the output port.
//
// Three parts wired as one unit: the selector picks the next completed
// packet (high priority first) when the header-stripping block raises
// next_packet; the address generator takes that packet's start address
// from the chosen list and reads its cells from the buffer, one on
// selection and one per read_next_cell; the header-stripping block removes
// the cell headers and sends the IP packet bytes to layer 2, counting them
// with the IP total length so that padding is not sent.
//
// Interface: the two completed-packet lists are FIFOs outside this block
// (start address at the head, empty flag, pop = read_list_*). The buffer is
// read through rd_req/read_address_from_buffer and answers with
// cell_in/cell_valid after any fixed or varying latency below PB-2 clocks,
// one answer per request, in order.
//
// From the document: the three parts and their signals. The request /
// answer handshake with the memory controller is this design's choice.
module reassembly
  import sar_pkg::*;
#(
  parameter int unsigned L      = 256,
  parameter int unsigned SLOT_W = 7,
  localparam int unsigned ADDR_W = 1 + PORT_W + SLOT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // lists of completed packets
  input  logic [ADDR_W-1:0] start_address_cphp,
  input  logic [ADDR_W-1:0] start_address_cplp,
  input  logic              empty_list_cphp,
  input  logic              empty_list_cplp,
  output logic              read_list_cphp,
  output logic              read_list_cplp,
  // buffer (through its memory controller)
  output logic              rd_req,
  output logic [ADDR_W-1:0] read_address_from_buffer,
  input  logic [L-1:0]      cell_in,
  input  logic              cell_valid,
  // layer 2
  output logic [7:0]        ip_packet,
  output logic              ip_packet_valid,
  output logic              ip_packet_start,
  output logic              ip_packet_end
);

  logic next_packet, lists_empty, sel_valid, sel_hp, read_next_cell;

  selector u_selector (
    .next_packet, .empty_list_cphp, .empty_list_cplp,
    .read_list_cphp, .read_list_cplp, .lists_empty, .sel_valid, .sel_hp
  );

  address_generator #(.ADDR_W(ADDR_W), .SLOT_W(SLOT_W)) u_address_generator (
    .clk, .rst_n, .start_address_cphp, .start_address_cplp,
    .sel_valid, .sel_hp, .read_next_cell, .rd_req, .read_address_from_buffer
  );

  cell_header_stripping #(.L(L)) u_cell_header_stripping (
    .clk, .rst_n, .cell_in, .cell_valid, .lists_empty,
    .next_packet, .read_next_cell,
    .ip_packet, .ip_packet_valid, .ip_packet_start, .ip_packet_end
  );

endmodule
