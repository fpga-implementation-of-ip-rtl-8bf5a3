// Selector of the reassembly block.
//
// Chooses which completed packet is reassembled next when there are two
// priority classes. empty_list_cphp / empty_list_cplp tell whether the
// lists of completed high- and low-priority packets are empty. When the
// header-stripping block asks for a packet with next_packet, the selector
// pops the high-priority list if it holds a packet, otherwise the
// low-priority list (read_list_cphp / read_list_cplp, one clock), and tells
// the address generator which list it chose (sel_valid, sel_hp). The list
// FIFOs show their head entry before the pop, so the address generator
// takes the start address in the same clock. lists_empty is high while
// both lists are empty; a next_packet then selects nothing.
//
// Timing: purely combinational, decisions take effect at the next edge.
//
// From the document: the strict preference of the high-priority list, the
// signal names and lists_empty. The sel_valid/sel_hp pair standing for the
// link between selector and address generator is this design's choice.
module selector (
  input  logic next_packet,
  input  logic empty_list_cphp,
  input  logic empty_list_cplp,
  output logic read_list_cphp,
  output logic read_list_cplp,
  output logic lists_empty,
  output logic sel_valid,
  output logic sel_hp
);

  always_comb begin
    lists_empty    = empty_list_cphp && empty_list_cplp;
    read_list_cphp = next_packet && !empty_list_cphp;
    read_list_cplp = next_packet && empty_list_cphp && !empty_list_cplp;
    sel_valid      = read_list_cphp || read_list_cplp;
    sel_hp         = !empty_list_cphp;
  end

endmodule
