// Self-checking testbench of the reassembly block (selector, address
// generator, header stripping) with the two completed-packet list FIFOs and
// a buffer model that answers each read after LAT clocks. Packets of both
// classes from several input ports are stored in their circular blocks
// (some wrapping around) and announced in the lists at random times. The
// output must be every packet, byte for byte, in an order where a
// low-priority packet is only taken when no high-priority packet waits,
// each class in FIFO order, and with no pause inside a packet.
module tb_reassembly;
  import tb_pkt_pkg::*;
  localparam int L = 256, PB = (L - 16) / 8, SLOT_W = 7, ADDR_W = 18, LAT = 5;

  logic clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] start_address_cphp, start_address_cplp, read_address_from_buffer;
  logic empty_list_cphp, empty_list_cplp, read_list_cphp, read_list_cplp, rd_req;
  logic [L-1:0] cell_in = 0;
  logic cell_valid = 0;
  logic [7:0] ip_packet;
  logic ip_packet_valid, ip_packet_start, ip_packet_end;
  logic push_hp = 0, push_lp = 0;
  logic [ADDR_W-1:0] push_addr = 0;
  int checks = 0, failures = 0, cycle = 0;

  logic [L-1:0] mem [logic [ADDR_W-1:0]];
  logic [SLOT_W-1:0] next_slot [logic [10:0]];
  bytes_t hp_model[$], lp_model[$];
  byte unsigned exp_bytes[$];
  bit exp_start[$], exp_end[$];
  int resp_time[$];
  logic [ADDR_W-1:0] resp_addr[$];
  int last_out = 0, packets_out = 0, hp_over_lp = 0, wraps = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  sync_fifo #(.W(ADDR_W), .DEPTH(64)) u_hp (.clk, .rst_n, .push(push_hp), .din(push_addr),
    .pop(read_list_cphp), .dout(start_address_cphp), .empty(empty_list_cphp), .full(), .count());
  sync_fifo #(.W(ADDR_W), .DEPTH(64)) u_lp (.clk, .rst_n, .push(push_lp), .din(push_addr),
    .pop(read_list_cplp), .dout(start_address_cplp), .empty(empty_list_cplp), .full(), .count());

  reassembly #(.L(L), .SLOT_W(SLOT_W)) dut (.*);

  // write the cells of packet p into the block of (hp, port); return start address
  function automatic logic [ADDR_W-1:0] store(bytes_t p, bit hp, logic [9:0] port);
    logic [10:0] blk = {hp, port};
    logic [ADDR_W-1:0] a;
    int n = (p.size() + PB - 1) / PB;
    if (!next_slot.exists(blk)) next_slot[blk] = SLOT_W'($urandom);
    a = {blk, next_slot[blk]};
    for (int k = 0; k < n; k++) begin
      logic [L-1:0] c = '0;
      for (int j = 0; j < PB; j++) if (k * PB + j < p.size()) c[L-1-8*j -: 8] = p[k*PB+j];
      c[15:0] = {hp, 4'h0, port, k == n - 1};
      if (next_slot[blk] == '1) wraps++;
      mem[{blk, next_slot[blk]}] = c;
      next_slot[blk]++;
    end
    return a;
  endfunction

  function automatic void expect_packet(bytes_t p);
    foreach (p[i]) begin
      exp_bytes.push_back(p[i]); exp_start.push_back(i == 0); exp_end.push_back(i == p.size() - 1);
    end
  endfunction

  always @(posedge clk) if (rst_n) begin
    // list model: the popped class decides which packet comes next
    if (read_list_cphp) begin
      checks++;
      if (hp_model.size() == 0) begin failures++; $display("pop of empty HP list"); end
      else begin
        if (lp_model.size() != 0) hp_over_lp++;
        expect_packet(hp_model.pop_front());
      end
    end
    if (read_list_cplp) begin
      checks++;
      if (lp_model.size() == 0 || hp_model.size() != 0) begin
        failures++; $display("LP chosen while HP waits, or LP list empty");
      end else expect_packet(lp_model.pop_front());
    end
    // buffer model
    if (rd_req) begin
      checks++;
      if (!mem.exists(read_address_from_buffer)) begin failures++; $display("read of unwritten address"); end
      resp_time.push_back(cycle + LAT);
      resp_addr.push_back(read_address_from_buffer);
    end
    cell_valid <= 0;
    if (resp_time.size() != 0 && resp_time[0] == cycle) begin
      void'(resp_time.pop_front());
      cell_in    <= mem[resp_addr.pop_front()];
      cell_valid <= 1;
    end
    if (ip_packet_valid) begin
      byte unsigned b;
      bit s, e;
      checks++;
      if (exp_bytes.size() == 0) begin failures++; $display("unexpected byte"); end
      else begin
        b = exp_bytes.pop_front(); s = exp_start.pop_front(); e = exp_end.pop_front();
        if (ip_packet != b || ip_packet_start != s || ip_packet_end != e) begin
          failures++; $display("byte %h/%b/%b exp %h/%b/%b", ip_packet, ip_packet_start, ip_packet_end, b, s, e);
        end
      end
      checks++;
      if (!ip_packet_start && last_out != cycle - 1) begin failures++; $display("gap inside packet"); end
      last_out = cycle;
      if (ip_packet_end) packets_out++;
    end
  end

  task automatic announce(int len, bit hp, logic [9:0] port);
    bytes_t p = make_packet(len, {hp, 7'($urandom)}, $urandom, 16'($urandom));
    logic [ADDR_W-1:0] a = store(p, hp, port);
    @(negedge clk);
    push_addr = a; push_hp = hp; push_lp = !hp;
    if (hp) hp_model.push_back(p); else lp_model.push_back(p);
    @(negedge clk);
    push_hp = 0; push_lp = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    // a burst of both classes, then packets trickling in with idle gaps
    for (int i = 0; i < 30; i++) announce(20 + $urandom % 400, $urandom % 2, 10'($urandom % 4));
    for (int i = 0; i < 30; i++) begin
      announce(20 + $urandom % 200, $urandom % 2, 10'($urandom % 4));
      repeat ($urandom % 300) @(negedge clk);
    end
    wait (hp_model.size() == 0 && lp_model.size() == 0);
    repeat (3000) @(negedge clk);
    checks++;
    if (exp_bytes.size() != 0 || packets_out != 60) begin
      failures++; $display("bytes left %0d packets %0d", exp_bytes.size(), packets_out);
    end
    checks++;
    if (hp_over_lp == 0 || wraps == 0) begin failures++; $display("coverage hp_over_lp %0d wraps %0d", hp_over_lp, wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
