// IP packet segmentation into fixed-length cells.
//
// Bytes of a validated IP packet arrive one per clock on
// valid_ip_packet_byte, qualified by byte_en. The write controller places
// them, first byte in the most significant payload byte, into the payload of
// the cell register until the payload is full or the packet ends. It then
// copies the cell, with its header, into the output register
// unscheduled_cell and pulses get_cell for one clock to tell the scheduler
// to take it. The build register is cleared at the same edge, so the next
// byte can arrive in the very next clock and the last cell of a packet is
// zero-padded.
//
// Header (see sar_pkg): ToS is taken from the type-of-service byte of the IP
// header (byte 1 of the packet) while the first cell is being filled and is
// repeated in every cell of the packet; Port_ID is the fixed position of the
// input port; End is 1 only in the cell that holds the byte flagged by
// last_byte. A first_byte restarts cell building even if the previous packet
// never ended.
//
// Timing: get_cell is high the clock after the byte that completes a cell;
// the block accepts one byte per clock without stalling. A packet of N bytes
// gives ceil(N / PB) cells with PB = (L-16)/8 payload bytes.
//
// From the document: the two-part structure (cell register and byte write
// controller), the signal names, the 16-bit header with 5-bit ToS, 10-bit
// Port ID and End bit, and the cell lengths 256/512/1024. This design's own
// choices: L counts the whole cell including its header, byte ordering in
// the payload, header bit order, the separate output register and the use of
// the upper five ToS bits.
module segmentation
  import sar_pkg::*;
#(
  parameter int unsigned L = 256  // cell length in bits, header included
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 first_byte,            // first byte of a packet
  input  logic                 last_byte,             // last byte of a packet
  input  logic                 byte_en,               // valid_ip_packet_byte holds a byte
  input  logic [7:0]           valid_ip_packet_byte,
  input  logic [PORT_W-1:0]    port_id,               // constant: position of this input port
  output logic [L-1:0]         unscheduled_cell,
  output logic                 get_cell
);

  localparam int unsigned PB    = (L - HDR_W) / 8;       // payload bytes per cell
  localparam int unsigned IDX_W = $clog2(PB);

  initial begin
    assert ((L - HDR_W) % 8 == 0 && L > HDR_W + 16)
      else $error("segmentation: payload must be a whole number of bytes");
  end

  logic [PB*8-1:0] payload_q, payload_d;
  logic [IDX_W-1:0] idx_q, idx_w;       // next free payload byte
  logic             first_cell_q;        // building the first cell of a packet
  logic [TOS_W-1:0] tos_q, tos_d;
  logic             cell_done;

  // Byte position written by the current byte: a first_byte always starts
  // at payload byte 0.
  assign idx_w = first_byte ? '0 : idx_q;

  always_comb begin
    payload_d = first_byte ? '0 : payload_q;
    payload_d[(PB - 1 - 32'(idx_w)) * 8 +: 8] = valid_ip_packet_byte;
    tos_d = tos_q;
    if ((first_byte || first_cell_q) && idx_w == IDX_W'(1))
      tos_d = tos_from_ip(valid_ip_packet_byte);
  end

  assign cell_done = byte_en && (last_byte || idx_w == IDX_W'(PB - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      payload_q        <= '0;
      idx_q            <= '0;
      first_cell_q     <= 1'b0;
      tos_q            <= '0;
      unscheduled_cell <= '0;
      get_cell         <= 1'b0;
    end else begin
      get_cell <= 1'b0;
      if (byte_en) begin
        tos_q <= tos_d;
        if (cell_done) begin
          unscheduled_cell <= {payload_d, tos_d, port_id, last_byte};
          get_cell         <= 1'b1;
          payload_q        <= '0;
          idx_q            <= '0;
          first_cell_q     <= 1'b0;
        end else begin
          payload_q        <= payload_d;
          idx_q            <= idx_w + IDX_W'(1);
          if (first_byte) first_cell_q <= 1'b1;
        end
      end
    end
  end

endmodule
