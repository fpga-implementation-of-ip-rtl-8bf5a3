// Address generator of the reassembly block.
//
// When the selector picks a list (sel_valid, sel_hp), it takes the start
// address of that list's head packet and issues a read of the packet's
// first cell (rd_req with read_address_from_buffer). Each read_next_cell
// from the header-stripping block issues a read of the following cell. The
// cells of a packet lie in successive slots of one circular block of the
// buffer, so the next address only increments the SLOT_W low bits and
// wraps inside the block.
//
// Timing: rd_req and its address are registered: they appear the clock
// after sel_valid or read_next_cell. One read per clock is possible.
//
// From the document: start addresses from the two lists, read of the first
// cell on selection, read_next_cell for the rest, and successive locations
// in circular blocks. The read request strobe is this design's choice.
module address_generator #(
  parameter int unsigned ADDR_W = 18,
  parameter int unsigned SLOT_W = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] start_address_cphp,
  input  logic [ADDR_W-1:0] start_address_cplp,
  input  logic              sel_valid,
  input  logic              sel_hp,
  input  logic              read_next_cell,
  output logic              rd_req,
  output logic [ADDR_W-1:0] read_address_from_buffer
);

  logic [ADDR_W-1:0] next_addr;

  assign next_addr = {read_address_from_buffer[ADDR_W-1:SLOT_W],
                      read_address_from_buffer[SLOT_W-1:0] + SLOT_W'(1)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_req                   <= 1'b0;
      read_address_from_buffer <= '0;
    end else begin
      rd_req <= sel_valid || read_next_cell;
      if (sel_valid)
        read_address_from_buffer <= sel_hp ? start_address_cphp : start_address_cplp;
      else if (read_next_cell)
        read_address_from_buffer <= next_addr;
    end
  end

endmodule
