// Cell manager of the output port.
//
// Cells arriving from the crossbar are written to the output cell buffer
// (an external memory) and completed packets are announced. The buffer is
// divided into one circular block of 2**SLOT_W cell slots per (priority
// class, input port) pair, so a cell's buffer address is
// {high_priority, port_id, slot}. Cells from one input port and class are
// therefore stored at successive slots, wrapping around inside the block,
// and cells of packets from different ports or classes never mix even when
// they arrive interleaved.
//
// For each block the manager keeps the next free slot, whether a packet is
// open, and the slot of that packet's first cell. When a cell with the End
// bit is stored, the start address of its packet is pushed to the
// completed-packet list of its class (cp_push_hp or cp_push_lp, cp_addr).
//
// After reset the block table is cleared, one entry per clock, for
// 2**(PORT_W+1) clocks; ready is low meanwhile and no cell may arrive.
//
// Timing: one cell per clock; mem_we/mem_waddr/mem_wdata and the list push
// appear the clock after cell_in_valid. There is no check that a block is
// overrun by a sender that gets more than 2**SLOT_W cells ahead of
// reassembly; the buffer is sized so this does not happen.
//
// From the document: the division of the buffer into circular blocks by
// priority and input port, classification by Port ID and ToS and the use of
// the End bit. This design's own choices: address layout, block size
// (8 MB of 256-bit cells over 2 x 1024 blocks gives 128 slots), the mapping
// of ToS to the two classes (see sar_pkg) and one cell per clock.
module cell_manager
  import sar_pkg::*;
#(
  parameter int unsigned L      = 256,
  parameter int unsigned SLOT_W = 7,
  localparam int unsigned ADDR_W = 1 + PORT_W + SLOT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [L-1:0]      cell_in,
  input  logic              cell_in_valid,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_waddr,
  output logic [L-1:0]      mem_wdata,
  output logic              cp_push_hp,
  output logic              cp_push_lp,
  output logic [ADDR_W-1:0] cp_addr,
  output logic              ready          // block table cleared, cells accepted
);

  localparam int unsigned NBLK = 2 ** (1 + PORT_W);

  // per-block state, kept in one table word: {packet open, first slot, next slot}
  typedef struct packed {
    logic              open;
    logic [SLOT_W-1:0] first;
    logic [SLOT_W-1:0] next;
  } blk_state_t;

  blk_state_t        tbl [NBLK];
  blk_state_t        st, st_new;
  cell_hdr_t         hdr;
  logic [PORT_W:0]   blk;          // {high_priority, port_id}
  logic              hp;
  logic [SLOT_W-1:0] first_slot;
  logic [PORT_W:0]   clr_idx;      // table clearing after reset
  logic              clearing;

  assign hdr        = cell_hdr_t'(cell_in[HDR_W-1:0]);
  assign hp         = is_high_prio(hdr.tos);
  assign blk        = {hp, hdr.port_id};
  assign st         = tbl[blk];
  assign first_slot = st.open ? st.first : st.next;
  assign st_new     = '{open: !hdr.end_bit, first: first_slot, next: st.next + SLOT_W'(1)};
  assign ready      = !clearing;

  // The table is a plain memory: after reset it is cleared one entry per
  // clock (2**(PORT_W+1) clocks) while ready is low.
  always_ff @(posedge clk) begin
    if (clearing)           tbl[clr_idx] <= '0;
    else if (cell_in_valid) tbl[blk]     <= st_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing   <= 1'b1;
      clr_idx    <= '0;
      mem_we     <= 1'b0;
      mem_waddr  <= '0;
      mem_wdata  <= '0;
      cp_push_hp <= 1'b0;
      cp_push_lp <= 1'b0;
      cp_addr    <= '0;
    end else begin
      if (clearing) begin
        clr_idx <= clr_idx + 1'b1;
        if (clr_idx == '1) clearing <= 1'b0;
      end
      mem_we     <= cell_in_valid && !clearing;
      cp_push_hp <= cell_in_valid && !clearing && hdr.end_bit && hp;
      cp_push_lp <= cell_in_valid && !clearing && hdr.end_bit && !hp;
      if (cell_in_valid && !clearing) begin
        mem_waddr <= {blk, st.next};
        mem_wdata <= cell_in;
        cp_addr   <= {blk, first_slot};
      end
    end
  end

  no_cell_while_clearing_a: assert property (@(posedge clk) disable iff (!rst_n)
      !(cell_in_valid && clearing))
    else $error("cell_manager: cell arrived before the block table was cleared");

endmodule
