// Cell header stripping: turns the cells of one completed packet back into
// the IP packet byte stream for layer 2.
//
// Operation. While idle and a completed packet exists (lists_empty low) the
// block raises next_packet for one clock, so the selector and address
// generator fetch that packet's first cell. From the first cell it reads
// the IP total length (payload bytes 2 and 3, the IP header's Total Length
// field) and loads the byte counter that tells it when the packet ends; the
// zero padding of the last cell is never sent. The 16-bit cell header is
// dropped and the payload bytes go out one per clock on ip_packet with
// ip_packet_valid; ip_packet_start marks the first byte and ip_packet_end
// the last.
//
// Pacing. Each time a cell is taken into the output shift register and the
// packet still has bytes beyond the cells already read, read_next_cell is
// pulsed; the arriving cell waits in a one-cell prefetch register and is
// taken over in the clock in which the previous cell sends its last byte.
// As long as the buffer answers a read within PB-2 clocks (PB payload bytes
// per cell), the bytes of a packet leave without a gap. When a packet's last
// byte is sent, next_packet is raised in the same clock if another packet is
// waiting; otherwise the block waits for lists_empty to fall.
//
// Interface: cell_in/cell_valid come from the buffer's memory controller, one
// cell per read. Outputs ip_packet* are registered; next_packet and
// read_next_cell are combinational one-clock pulses.
//
// From the document: header removal, the length counter loaded from the
// first cell, read_next_cell pacing with no pause inside a packet,
// IP_packet_start/IP_packet_end, next_packet and the lists_empty rule. The
// one-cell prefetch register and the moment next_packet is raised are this
// design's choices; layer 2 is assumed never to stall.
module cell_header_stripping
  import sar_pkg::*;
#(
  parameter int unsigned L = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [L-1:0] cell_in,
  input  logic         cell_valid,
  input  logic         lists_empty,
  output logic         next_packet,
  output logic         read_next_cell,
  output logic [7:0]   ip_packet,
  output logic         ip_packet_valid,
  output logic         ip_packet_start,
  output logic         ip_packet_end
);

  localparam int unsigned PB  = (L - HDR_W) / 8;
  localparam int unsigned PW  = PB * 8;
  localparam int unsigned CW  = $clog2(PB + 1);

  typedef enum logic [1:0] {IDLE, WAIT_FIRST, SEND} state_t;

  state_t            state_q, state_d;
  logic [PW-1:0]     cur_q, cur_d, pre_q, pre_d;
  logic              pre_valid_q, pre_valid_d;
  logic [CW-1:0]     cur_left_q, cur_left_d;     // bytes still in cur
  logic [15:0]       remaining_q, remaining_d;   // packet bytes still to send
  logic [16:0]       unreq_q, unreq_d;           // packet bytes in cells not yet read
  logic              first_q, first_d;           // next byte sent is the packet's first
  logic              emit;
  logic [PW-1:0]     load_cell;
  logic [15:0]       tot_len;
  logic [7:0]        byte_d;

  assign tot_len = cell_in[L-1-16 -: 16];

  always_comb begin
    state_d        = state_q;
    cur_d          = cur_q;
    pre_d          = pre_q;
    pre_valid_d    = pre_valid_q;
    cur_left_d     = cur_left_q;
    remaining_d    = remaining_q;
    unreq_d        = unreq_q;
    first_d        = first_q;
    next_packet    = 1'b0;
    read_next_cell = 1'b0;
    emit           = 1'b0;
    load_cell      = pre_valid_q ? pre_q : cell_in[L-1:HDR_W];
    byte_d         = cur_q[PW-1 -: 8];

    unique case (state_q)
      IDLE: begin
        if (!lists_empty) begin
          next_packet = 1'b1;
          state_d     = WAIT_FIRST;
        end
      end

      WAIT_FIRST: begin
        if (cell_valid) begin
          cur_d       = cell_in[L-1:HDR_W];
          cur_left_d  = CW'(PB);
          remaining_d = (tot_len == 16'd0) ? 16'd1 : tot_len;
          first_d     = 1'b1;
          // bytes beyond the first cell; the second cell is asked for now
          if ({1'b0, tot_len} > 17'(PB)) begin
            read_next_cell = 1'b1;
            unreq_d        = ({1'b0, tot_len} > 17'(2 * PB)) ? {1'b0, tot_len} - 17'(2 * PB) : '0;
          end else begin
            unreq_d        = '0;
          end
          state_d = SEND;
        end
      end

      SEND: begin
        // a cell arriving now is parked in the prefetch register
        if (cell_valid) begin
          pre_d       = cell_in[L-1:HDR_W];
          pre_valid_d = 1'b1;
        end
        if (cur_left_q != '0) begin
          emit        = 1'b1;
          cur_d       = {cur_q[PW-9:0], 8'h00};
          cur_left_d  = cur_left_q - CW'(1);
          remaining_d = remaining_q - 16'd1;
          first_d     = 1'b0;
        end
        // take the next cell when cur is (about to be) empty
        if ((cur_left_d == '0) && (remaining_d != 16'd0) && (pre_valid_q || cell_valid)) begin
          cur_d       = load_cell;
          cur_left_d  = CW'(PB);
          pre_valid_d = 1'b0;
          if (unreq_q != '0) begin
            read_next_cell = 1'b1;
            unreq_d        = (unreq_q > 17'(PB)) ? unreq_q - 17'(PB) : '0;
          end
        end
        if (emit && remaining_q == 16'd1) begin
          pre_valid_d = 1'b0;
          if (!lists_empty) begin
            next_packet = 1'b1;
            state_d     = WAIT_FIRST;
          end else begin
            state_d     = IDLE;
          end
        end
      end

      default: state_d = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q         <= IDLE;
      cur_q           <= '0;
      pre_q           <= '0;
      pre_valid_q     <= 1'b0;
      cur_left_q      <= '0;
      remaining_q     <= '0;
      unreq_q         <= '0;
      first_q         <= 1'b0;
      ip_packet       <= '0;
      ip_packet_valid <= 1'b0;
      ip_packet_start <= 1'b0;
      ip_packet_end   <= 1'b0;
    end else begin
      state_q         <= state_d;
      cur_q           <= cur_d;
      pre_q           <= pre_d;
      pre_valid_q     <= pre_valid_d;
      cur_left_q      <= cur_left_d;
      remaining_q     <= remaining_d;
      unreq_q         <= unreq_d;
      first_q         <= first_d;
      ip_packet       <= emit ? byte_d : 8'h00;
      ip_packet_valid <= emit;
      ip_packet_start <= emit && first_q;
      ip_packet_end   <= emit && remaining_q == 16'd1;
    end
  end

  // a cell may only arrive when the block is waiting for one
  no_orphan_cell_a: assert property (@(posedge clk) disable iff (!rst_n)
      cell_valid |-> (state_q == WAIT_FIRST || (state_q == SEND && !pre_valid_q)))
    else $error("cell_header_stripping: unexpected cell");

endmodule
