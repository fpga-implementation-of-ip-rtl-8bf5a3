// Layer-3 datapath of one router port: IP packet segmentation on the input
// side and IP packet reassembly on the output side.
//
// Input side: packets from layer 2 pass the IP header check; packets with a
// bad header are dropped, and for good ones the destination address and
// ToS go out to the lookup function (dst_valid). Segmentation cuts the
// packet into L-bit cells with a 16-bit header (ToS, Port ID, End bit) and
// offers each to the scheduler (unscheduled_cell, get_cell). The scheduler,
// which is outside this design, writes scheduled cells into the input cell
// buffer at address sched_aw and reads them out at sched_ar in their time
// slot toward the crossbar.
//
// Output side: cells from the crossbar (xbar_cell) go to the cell manager,
// which stores them in the external cell buffer (buf_* write port) in the
// circular block of their priority class and input port and, on a cell with
// the End bit, puts the packet's start address into the completed-packet
// list of its class. The reassembly block takes packets from the two lists,
// high priority first, reads their cells back (buf_rd_req / buf_rdata) and
// sends the IP packets to layer 2 without cell headers or padding.
//
// The lookup function and its table, the scheduler, the crossbar and the
// external buffer memory with its controller are not part of this design;
// their connections are ports of this module. The two sides share only the
// clock and reset, as they do in a router port.
module sar_router_top
  import sar_pkg::*;
#(
  parameter int unsigned L             = 256,  // cell length in bits
  parameter int unsigned SLOT_W        = 7,    // log2 cells per circular block
  parameter int unsigned IN_BUF_DEPTH  = 64,   // input cell buffer, cells
  parameter int unsigned LIST_DEPTH    = 256,  // entries per completed-packet list
  localparam int unsigned ADDR_W       = 1 + PORT_W + SLOT_W,
  localparam int unsigned IN_AW        = $clog2(IN_BUF_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PORT_W-1:0] port_id,          // hardware position of this port
  // layer 2 -> input side
  input  logic              l2_in_valid,
  input  logic              l2_in_first,
  input  logic              l2_in_last,
  input  logic [7:0]        l2_in_byte,
  // to lookup function
  output logic              dst_valid,
  output logic [31:0]       dst_addr,
  output logic [7:0]        ip_tos,
  output logic              pkt_dropped,
  // to / from scheduler
  output logic [L-1:0]      unscheduled_cell,
  output logic              get_cell,
  input  logic              sched_we,
  input  logic [IN_AW-1:0]  sched_aw,
  input  logic [L-1:0]      scheduled_cell,
  input  logic              sched_re,
  input  logic [IN_AW-1:0]  sched_ar,
  output logic [L-1:0]      cell_to_crossbar,
  output logic              cell_to_crossbar_valid,
  // crossbar -> output side
  input  logic [L-1:0]      xbar_cell,
  input  logic              xbar_cell_valid,
  // external cell buffer of the output side (through its memory controller)
  output logic              buf_we,
  output logic [ADDR_W-1:0] buf_waddr,
  output logic [L-1:0]      buf_wdata,
  output logic              buf_rd_req,
  output logic [ADDR_W-1:0] buf_raddr,
  input  logic [L-1:0]      buf_rdata,
  input  logic              buf_rdata_valid,
  // output side -> layer 2
  output logic [7:0]        ip_packet,
  output logic              ip_packet_valid,
  output logic              ip_packet_start,
  output logic              ip_packet_end,
  output logic              list_full,        // a completed-packet list is full
  output logic              out_ready         // output side initialised, crossbar cells accepted
);

  // ---------------- input side ----------------
  logic       seg_valid, seg_first, seg_last;
  logic [7:0] seg_byte;

  ip_header_check u_ip_header_check (
    .clk, .rst_n,
    .in_valid(l2_in_valid), .in_first(l2_in_first), .in_last(l2_in_last), .in_byte(l2_in_byte),
    .out_valid(seg_valid), .out_first(seg_first), .out_last(seg_last), .out_byte(seg_byte),
    .dst_valid, .dst_addr, .ip_tos, .pkt_dropped
  );

  segmentation #(.L(L)) u_segmentation (
    .clk, .rst_n,
    .first_byte(seg_first), .last_byte(seg_last), .byte_en(seg_valid),
    .valid_ip_packet_byte(seg_byte), .port_id,
    .unscheduled_cell, .get_cell
  );

  cell_buffer #(.L(L), .DEPTH(IN_BUF_DEPTH)) u_cell_buffer (
    .clk, .rst_n,
    .we(sched_we), .aw(sched_aw), .scheduled_cell,
    .re(sched_re), .ar(sched_ar),
    .cell_to_crossbar, .cell_valid(cell_to_crossbar_valid)
  );

  // ---------------- output side ----------------
  logic              push_hp, push_lp;
  logic [ADDR_W-1:0] cp_addr, head_hp, head_lp;
  logic              empty_hp, empty_lp, full_hp, full_lp, pop_hp, pop_lp;

  cell_manager #(.L(L), .SLOT_W(SLOT_W)) u_cell_manager (
    .clk, .rst_n,
    .cell_in(xbar_cell), .cell_in_valid(xbar_cell_valid),
    .mem_we(buf_we), .mem_waddr(buf_waddr), .mem_wdata(buf_wdata),
    .cp_push_hp(push_hp), .cp_push_lp(push_lp), .cp_addr, .ready(out_ready)
  );

  sync_fifo #(.W(ADDR_W), .DEPTH(LIST_DEPTH)) u_list_cphp (
    .clk, .rst_n, .push(push_hp), .din(cp_addr),
    .pop(pop_hp), .dout(head_hp), .empty(empty_hp), .full(full_hp), .count()
  );

  sync_fifo #(.W(ADDR_W), .DEPTH(LIST_DEPTH)) u_list_cplp (
    .clk, .rst_n, .push(push_lp), .din(cp_addr),
    .pop(pop_lp), .dout(head_lp), .empty(empty_lp), .full(full_lp), .count()
  );

  assign list_full = full_hp || full_lp;

  reassembly #(.L(L), .SLOT_W(SLOT_W)) u_reassembly (
    .clk, .rst_n,
    .start_address_cphp(head_hp), .start_address_cplp(head_lp),
    .empty_list_cphp(empty_hp), .empty_list_cplp(empty_lp),
    .read_list_cphp(pop_hp), .read_list_cplp(pop_lp),
    .rd_req(buf_rd_req), .read_address_from_buffer(buf_raddr),
    .cell_in(buf_rdata), .cell_valid(buf_rdata_valid),
    .ip_packet, .ip_packet_valid, .ip_packet_start, .ip_packet_end
  );

endmodule
