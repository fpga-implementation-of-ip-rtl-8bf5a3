// Self-checking testbench of cell_header_stripping. A model of the selector,
// address generator and buffer answers next_packet with the packet's first
// cell and each read_next_cell with the next cell, after LAT clocks. The
// output must be exactly the packet bytes (no header, no padding), with
// start/end flags, no pause inside a packet, one read per cell, and
// next_packet must wait while lists_empty is high.
module tb_cell_header_stripping;
  import tb_pkt_pkg::*;
  localparam int L = 256, PB = (L - 16) / 8, LAT = 6;

  logic clk = 0, rst_n = 0;
  logic [L-1:0] cell_in = 0;
  logic cell_valid = 0, lists_empty;
  logic next_packet, read_next_cell, ip_packet_valid, ip_packet_start, ip_packet_end;
  logic [7:0] ip_packet;
  int checks = 0, failures = 0;

  bytes_t pending[$];          // completed packets not yet selected
  bytes_t cur_pkt;             // packet whose cells are being read
  int cells_read = 0;
  byte unsigned exp_bytes[$];
  bit exp_start[$], exp_end[$];
  int resp_time[$];
  logic [L-1:0] resp_cell[$];
  int cycle = 0, last_out = -10;
  bit in_pkt = 0;
  int packets_out = 0, waits_on_empty = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cell_header_stripping #(.L(L)) dut (.*);

  function automatic logic [L-1:0] make_cell(bytes_t p, int k);
    logic [L-1:0] c = '0;
    for (int j = 0; j < PB; j++) if (k * PB + j < p.size()) c[L-1-8*j -: 8] = p[k*PB+j];
    c[15:0] = 16'hA5A5;  // header content must not leak into the output
    return c;
  endfunction

  assign lists_empty = (pending.size() == 0);

  // selector / address generator / buffer model
  always @(posedge clk) if (rst_n) begin
    if (next_packet) begin
      checks++;
      if (pending.size() == 0) begin failures++; $display("next_packet with empty lists"); end
      else begin
        cur_pkt = pending.pop_front();
        cells_read = 1;
        foreach (cur_pkt[i]) begin
          exp_bytes.push_back(cur_pkt[i]);
          exp_start.push_back(i == 0);
          exp_end.push_back(i == cur_pkt.size() - 1);
        end
        resp_time.push_back(cycle + LAT);
        resp_cell.push_back(make_cell(cur_pkt, 0));
      end
    end
    if (read_next_cell) begin
      checks++;
      if (cells_read * PB >= cur_pkt.size()) begin failures++; $display("read beyond packet"); end
      resp_time.push_back(cycle + LAT);
      resp_cell.push_back(make_cell(cur_pkt, cells_read));
      cells_read++;
    end
    cell_valid <= 0;
    if (resp_time.size() != 0 && resp_time[0] == cycle) begin
      void'(resp_time.pop_front());
      cell_in    <= resp_cell.pop_front();
      cell_valid <= 1;
    end
    if (ip_packet_valid) begin
      checks++;
      if (exp_bytes.size() == 0) begin failures++; $display("unexpected byte"); end
      else begin
        byte unsigned b;
        bit s, e;
        b = exp_bytes.pop_front(); s = exp_start.pop_front(); e = exp_end.pop_front();
        if (ip_packet != b || ip_packet_start != s || ip_packet_end != e) begin
          failures++; $display("byte %h/%b/%b exp %h/%b/%b", ip_packet, ip_packet_start, ip_packet_end, b, s, e);
        end
      end
      // bytes of one packet leave on consecutive clocks
      checks++;
      if (!ip_packet_start && last_out != cycle - 1) begin failures++; $display("gap inside packet"); end
      last_out = cycle;
      if (ip_packet_end) packets_out++;
    end
  end

  task automatic add_packet(int len);
    pending.push_back(make_packet(len, byte'($urandom), $urandom, 16'(len)));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // nothing may be requested while the lists are empty
    repeat (20) @(negedge clk);
    add_packet(20);
    repeat (60) @(negedge clk);
    for (int i = 0; i < 40; i++) add_packet(20 + $urandom % 300);
    for (int i = 0; i < 9; i++) add_packet(PB * (i + 1) + (i % 3) - 1);
    wait (pending.size() == 0);
    repeat (2000) @(negedge clk);
    add_packet(1500);
    repeat (3000) @(negedge clk);
    checks++;
    if (exp_bytes.size() != 0 || packets_out != 51) begin
      failures++; $display("bytes left %0d packets %0d", exp_bytes.size(), packets_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
