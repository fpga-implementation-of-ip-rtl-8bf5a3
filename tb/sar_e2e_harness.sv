// End-to-end harness of sar_router_top for a chosen cell length: the same
// traffic and checks as tb_sar_router_top (layer-2 packets with some bad
// headers, scheduler and crossbar models, three other input ports, external
// cell buffer model), with L and SLOT_W as parameters. It reports its check
// and failure counts and raises done when finished.
module sar_e2e_harness #(
  parameter int L      = 256,
  parameter int SLOT_W = 7
) (
  output int checks,
  output int failures,
  output bit done
);
  import tb_pkt_pkg::*;
  localparam int PB = (L - 16) / 8, ADDR_W = 11 + SLOT_W, IN_AW = 6, LAT = 7;
  localparam logic [9:0] MY_PORT = 10'd42;

  logic clk = 0, rst_n = 0;
  logic [9:0] port_id = MY_PORT;
  logic l2_in_valid = 0, l2_in_first = 0, l2_in_last = 0;
  logic [7:0] l2_in_byte = 0;
  logic dst_valid, pkt_dropped, get_cell;
  logic [31:0] dst_addr;
  logic [7:0] ip_tos;
  logic [L-1:0] unscheduled_cell, cell_to_crossbar, buf_wdata;
  logic sched_we = 0, sched_re = 0, cell_to_crossbar_valid;
  logic [IN_AW-1:0] sched_aw = 0, sched_ar = 0;
  logic [L-1:0] scheduled_cell = 0, xbar_cell = 0, buf_rdata = 0;
  logic xbar_cell_valid = 0, buf_we, buf_rd_req, buf_rdata_valid = 0;
  logic [ADDR_W-1:0] buf_waddr, buf_raddr;
  logic [7:0] ip_packet;
  logic ip_packet_valid, ip_packet_start, ip_packet_end, list_full, out_ready;

  int cycle = 0;
  initial begin checks = 0; failures = 0; done = 0; end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  sar_router_top #(.L(L), .SLOT_W(SLOT_W)) dut (.*);

  // ---------------- expected packets, by identification field ----------------
  bytes_t expected [int];
  int delivered = 0, good_sent = 0, bad_sent = 0;

  // ---------------- mechanism counters ----------------
  int n_dropped = 0, n_single = 0, n_multi = 0, n_padded = 0, n_interleave = 0;
  int n_wrap = 0, n_hp_first = 0, n_idle_wait = 0, n_prefetch = 0, n_lookup = 0;

  // ---------------- scheduler model (input side) ----------------
  logic [L-1:0] sched_q[$];
  int in_buf_count = 0;
  logic [IN_AW-1:0] wr_ptr = 0, rd_ptr = 0;

  always @(posedge clk) if (rst_n && get_cell) sched_q.push_back(unscheduled_cell);
  // cells stored in the input buffer and not yet read
  always @(posedge clk) in_buf_count <= in_buf_count + int'(sched_we) - int'(sched_re);

  always @(negedge clk) begin
    sched_we = 0;
    if (sched_q.size() != 0) begin
      sched_we = 1; sched_aw = wr_ptr; scheduled_cell = sched_q.pop_front();
      wr_ptr++;
    end
  end

  // ---------------- crossbar model ----------------
  logic [L-1:0] vport_q [3][$];     // cells of three other input ports
  int last_src = -1;
  bit loop_pending = 0;

  always @(negedge clk) begin
    sched_re = 0;
    xbar_cell_valid = 0;
    if (loop_pending) begin
      // the cell read from the input buffer in the previous clock
      xbar_cell = cell_to_crossbar; xbar_cell_valid = 1; loop_pending = 0;
      if (last_src != 0) n_interleave++;
      last_src = 0;
    end else if (out_ready && $urandom % 36 == 0) begin
      int s;
      s = $urandom % 4;
      if (s == 0 && in_buf_count > 0) begin
        sched_re = 1; sched_ar = rd_ptr; rd_ptr++; loop_pending = 1;
      end else if (s != 0 && vport_q[s-1].size() != 0) begin
        xbar_cell = vport_q[s-1].pop_front(); xbar_cell_valid = 1;
        if (last_src != s) n_interleave++;
        last_src = s;
      end
    end
  end

  // reference segmenter for the other input ports
  function automatic void segment_into(int q, bytes_t p, logic [9:0] port);
    int n = (p.size() + PB - 1) / PB;
    for (int k = 0; k < n; k++) begin
      logic [L-1:0] c = '0;
      for (int j = 0; j < PB; j++) if (k * PB + j < p.size()) c[L-1-8*j -: 8] = p[k*PB+j];
      c[15:0] = {p[1][7:3], port, k == n - 1};
      vport_q[q].push_back(c);
    end
  endfunction

  // ---------------- external cell buffer model ----------------
  logic [L-1:0] sdram [logic [ADDR_W-1:0]];
  int rd_time[$];
  logic [ADDR_W-1:0] rd_addr_q[$];

  always @(posedge clk) if (rst_n) begin
    if (buf_we) begin
      sdram[buf_waddr] = buf_wdata;
      if (buf_waddr[SLOT_W-1:0] == '1) n_wrap++;
    end
    if (buf_rd_req) begin rd_time.push_back(cycle + LAT); rd_addr_q.push_back(buf_raddr); end
    buf_rdata_valid <= 0;
    if (rd_time.size() != 0 && rd_time[0] == cycle) begin
      void'(rd_time.pop_front());
      buf_rdata <= sdram[rd_addr_q.pop_front()];
      buf_rdata_valid <= 1;
    end
  end

  // ---------------- observers ----------------
  byte unsigned rx[$];
  always @(posedge clk) if (rst_n) begin
    if (pkt_dropped) n_dropped++;
    if (dst_valid) n_lookup++;
    if (dut.u_reassembly.read_list_cphp && !dut.empty_lp) n_hp_first++;
    if (dut.u_reassembly.u_cell_header_stripping.state_q == 0 && dut.u_reassembly.lists_empty) n_idle_wait++;
    if (dut.u_reassembly.read_next_cell) n_prefetch++;
    if (list_full) begin failures++; $display("completed-packet list full"); end
    if (ip_packet_valid) begin
      if (ip_packet_start) rx.delete();
      rx.push_back(ip_packet);
      if (ip_packet_end) begin
        int id;
        checks++;
        id = (rx.size() >= 6) ? {rx[4], rx[5]} : -1;
        if (!expected.exists(id)) begin failures++; $display("unexpected packet id %0d", id); end
        else begin
          if (rx != expected[id]) begin failures++; $display("packet %0d corrupted", id); end
          expected.delete(id);
          delivered++;
        end
      end
    end
  end

  // ---------------- stimulus ----------------
  task automatic l2_send(bytes_t p);
    foreach (p[i]) begin
      @(negedge clk);
      l2_in_valid = 1; l2_in_byte = p[i]; l2_in_first = (i == 0); l2_in_last = (i == p.size() - 1);
    end
    @(negedge clk); l2_in_valid = 0; l2_in_first = 0; l2_in_last = 0;
  endtask

  function automatic void note_sizes(int len);
    if (len <= PB) n_single++; else n_multi++;
    if (len % PB != 0) n_padded++;
  endfunction

  initial begin
    bytes_t p;
    int id = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // other ports: a few packets of both classes, one port sending enough
    // cells to wrap its circular block
    for (int i = 0; i < 4; i++) begin
      p = make_packet(1500, 8'h88, $urandom, 16'(id)); expected[id++] = p; note_sizes(p.size());
      segment_into(0, p, 10'd900);
    end
    for (int i = 0; i < 12; i++) begin
      p = make_packet(20 + $urandom % 300, (i % 2) ? 8'h10 : 8'hF0, $urandom, 16'(id));
      expected[id++] = p; note_sizes(p.size());
      segment_into(1 + i % 2, p, (i % 2) ? 10'd5 : 10'd1023);
    end
    wait (out_ready);
    // this port: good and corrupted packets from layer 2
    for (int i = 0; i < 24; i++) begin
      int len;
      len = (i % 6 == 0) ? 20 + $urandom % 10 : 20 + $urandom % 200;
      p = make_packet(len, (i % 3 == 0) ? 8'hA0 : 8'h20, $urandom, 16'(id));
      if (i % 5 == 4) begin
        p[8] ^= 8'h40;            // TTL changed, checksum now wrong
        bad_sent++;
      end else begin
        expected[id] = p; good_sent++; note_sizes(p.size());
      end
      id++;
      l2_send(p);
      wait (in_buf_count < 16);
      repeat ($urandom % 50) @(negedge clk);
    end
    wait (expected.size() == 0 || cycle > 150000);
    repeat (200) @(negedge clk);
    checks++;
    if (expected.size() != 0) begin failures++; $display("%0d packets not delivered", expected.size()); end
    checks++;
    if (n_dropped != bad_sent) begin failures++; $display("dropped %0d of %0d bad packets", n_dropped, bad_sent); end
    checks++;
    if (n_lookup != good_sent) begin failures++; $display("lookup requests %0d for %0d packets", n_lookup, good_sent); end
    $display("mechanisms: dropped %0d single %0d multi %0d padded %0d interleave %0d wrap %0d hp_first %0d idle_wait %0d prefetch %0d",
             n_dropped, n_single, n_multi, n_padded, n_interleave, n_wrap, n_hp_first, n_idle_wait, n_prefetch);
    begin
      int m [9];
      m = '{n_dropped, n_single, n_multi, n_padded, n_interleave, n_wrap, n_hp_first, n_idle_wait, n_prefetch};
      foreach (m[k]) begin
        checks++;
        if (m[k] == 0) begin failures++; $display("mechanism %0d never happened", k); end
      end
    end
    $display("L=%0d: delivered %0d packets in %0d clocks", L, delivered, cycle);
    done = 1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("L=%0d: watchdog expired", L);
    done = 1;
  end
endmodule
