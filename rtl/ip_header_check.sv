// IPv4 header validity check in front of segmentation.
//
// Packet bytes from layer 2 arrive one per clock (in_valid, with in_first
// and in_last marking the first and last byte). They go into a byte queue
// while a checker inspects the header as it streams past: version must be
// 4, the header length IHL at least 5 words, the total length at least the
// header length, and the ones'-complement sum of all header words 0xFFFF
// (correct header checksum). A packet that ends before its header is
// complete is also rejected. When the header has been seen, a verdict with
// the destination address and ToS byte is queued. The output side takes one
// verdict per packet and then drains that packet's bytes from the byte
// queue, forwarding them (out_valid, out_first, out_last) when the verdict
// is good and discarding them otherwise. For each forwarded packet it pulses
// dst_valid with the destination address (for the lookup function) and the
// ToS byte.
//
// Timing: the first byte of a packet leaves IHL*4+1 clocks after it arrived
// (the header must be complete first); afterwards bytes flow at one per
// clock. The byte queue must hold a full header plus any backlog, so
// DATA_DEPTH >= 64 is required; no back-pressure is given to layer 2.
//
// From the document: the block checks the IP header for errors, extracts
// the destination address for lookup, and passes on only packets whose
// header is valid, rejecting the others. The checks themselves, the queueing
// scheme and the interface are this design's choices.
module ip_header_check #(
  parameter int unsigned DATA_DEPTH    = 128,  // byte queue entries
  parameter int unsigned VERDICT_DEPTH = 8     // packets whose verdict waits
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_first,
  input  logic        in_last,
  input  logic [7:0]  in_byte,
  output logic        out_valid,
  output logic        out_first,
  output logic        out_last,
  output logic [7:0]  out_byte,
  output logic        dst_valid,    // one pulse per forwarded packet
  output logic [31:0] dst_addr,
  output logic [7:0]  ip_tos,
  output logic        pkt_dropped   // one pulse per rejected packet
);

  // ---------------- header checker on the input stream ----------------
  logic [15:0] cnt_q;          // index of the current byte in the packet
  logic [15:0] cnt;
  logic [3:0]  ver_q, ihl_q;
  logic [15:0] tlen_q;
  logic [31:0] dst_q;
  logic [7:0]  tos_q;
  logic [7:0]  hi_q;           // high byte of the current 16-bit word
  logic [15:0] sum_q, sum_d;   // ones'-complement running sum
  logic        decided_q;      // verdict already queued for this packet
  logic [3:0]  ver, ihl;
  logic [15:0] tlen, hdr_end;
  logic [31:0] dst;
  logic [7:0]  tos;
  logic [16:0] add;
  logic        hdr_done, hdr_ok, v_push;
  logic [40:0] v_din, v_dout;  // {ok, tos, dst}
  logic        v_empty, v_full;

  assign cnt  = in_first ? 16'd0 : cnt_q;
  assign ver  = (cnt == 16'd0) ? in_byte[7:4] : ver_q;
  assign ihl  = (cnt == 16'd0) ? in_byte[3:0] : ihl_q;
  assign tos  = (cnt == 16'd1) ? in_byte : tos_q;

  always_comb begin
    tlen = tlen_q;
    if (cnt == 16'd2) tlen[15:8] = in_byte;
    if (cnt == 16'd3) tlen[7:0]  = in_byte;
    dst = dst_q;
    if (cnt >= 16'd16 && cnt <= 16'd19) dst[(3 - 32'(cnt[1:0])) * 8 +: 8] = in_byte;
    // add a word on every odd byte, with end-around carry
    add   = {1'b0, (cnt == 16'd0) ? 16'd0 : sum_q} + {1'b0, hi_q, in_byte};
    sum_d = (cnt == 16'd0) ? 16'd0 : sum_q;
    if (cnt[0]) sum_d = add[15:0] + 16'(add[16]);
    hdr_end = (ihl < 4'd5) ? 16'd19 : {10'd0, ihl, 2'b00} - 16'd1;
  end

  assign hdr_done = in_valid && !(decided_q && !in_first) && (cnt == hdr_end || in_last);
  assign hdr_ok   = (cnt == hdr_end) && ver == 4'd4 && ihl >= 4'd5 &&
                    tlen >= {10'd0, ihl, 2'b00} && sum_d == 16'hFFFF;
  assign v_push   = hdr_done;
  assign v_din    = {hdr_ok, tos, dst};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0; ver_q <= '0; ihl_q <= '0; tlen_q <= '0; dst_q <= '0;
      tos_q <= '0; hi_q <= '0; sum_q <= '0; decided_q <= 1'b0;
    end else if (in_valid) begin
      cnt_q  <= (cnt == 16'hFFFF) ? cnt : cnt + 16'd1;
      ver_q  <= ver;
      ihl_q  <= ihl;
      tlen_q <= tlen;
      dst_q  <= dst;
      tos_q  <= tos;
      hi_q   <= in_byte;
      sum_q  <= sum_d;
      if (in_first)  decided_q <= 1'b0;
      if (hdr_done)  decided_q <= 1'b1;
    end
  end

  // ---------------- queues ----------------
  logic [9:0] d_dout;  // {first, last, byte}
  logic       d_empty, d_full, d_pop, v_pop;

  sync_fifo #(.W(10), .DEPTH(DATA_DEPTH)) u_bytes (
    .clk, .rst_n,
    .push(in_valid), .din({in_first, in_last, in_byte}),
    .pop(d_pop), .dout(d_dout), .empty(d_empty), .full(d_full), .count()
  );

  sync_fifo #(.W(41), .DEPTH(VERDICT_DEPTH)) u_verdicts (
    .clk, .rst_n,
    .push(v_push), .din(v_din),
    .pop(v_pop), .dout(v_dout), .empty(v_empty), .full(v_full), .count()
  );

  // ---------------- output side ----------------
  logic active_q, fwd_q, fwd;

  assign v_pop = !active_q && !v_empty && !d_empty;
  assign d_pop = !d_empty && (active_q || !v_empty);
  assign fwd   = active_q ? fwd_q : v_dout[40];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0; fwd_q <= 1'b0;
      out_valid <= 1'b0; out_first <= 1'b0; out_last <= 1'b0; out_byte <= '0;
      dst_valid <= 1'b0; dst_addr <= '0; ip_tos <= '0; pkt_dropped <= 1'b0;
    end else begin
      out_valid   <= d_pop && fwd;
      out_first   <= d_dout[9];
      out_last    <= d_dout[8];
      out_byte    <= d_dout[7:0];
      dst_valid   <= v_pop && v_dout[40];
      pkt_dropped <= v_pop && !v_dout[40];
      if (v_pop) begin
        dst_addr <= v_dout[31:0];
        ip_tos   <= v_dout[39:32];
        fwd_q    <= v_dout[40];
      end
      if (d_pop) active_q <= !d_dout[8];
    end
  end

  no_overrun_a: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && d_full))
    else $error("ip_header_check: byte queue overrun");

endmodule
