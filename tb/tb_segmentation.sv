// Self-checking testbench of segmentation: packets of many lengths, sent
// back to back and with gaps, must give the expected cells (payload,
// zero padding, ToS / Port ID / End header) one clock after the byte that
// completes each cell.
module tb_segmentation;
  import tb_pkt_pkg::*;

  localparam int L  = 256;
  localparam int PB = (L - 16) / 8;

  logic clk = 0, rst_n = 0;
  logic first_byte = 0, last_byte = 0, byte_en = 0;
  logic [7:0] data = 0;
  logic [9:0] port_id = 10'd613;
  logic [L-1:0] ocell;
  logic get_cell;
  int checks = 0, failures = 0;
  logic [L-1:0] exp_q[$];
  int last_sent_cycle[$];
  int cycle = 0;
  int lens[9] = '{20, 29, 30, 31, 59, 60, 61, 100, 1500};

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  segmentation #(.L(L)) dut (
    .clk, .rst_n, .first_byte, .last_byte, .byte_en,
    .valid_ip_packet_byte(data), .port_id, .unscheduled_cell(ocell), .get_cell
  );

  function automatic void expect_cells(bytes_t p);
    int n = (p.size() + PB - 1) / PB;
    for (int k = 0; k < n; k++) begin
      logic [L-1:0] c = '0;
      for (int j = 0; j < PB; j++)
        if (k * PB + j < p.size()) c[L-1-8*j -: 8] = p[k*PB+j];
      c[15:11] = p[1][7:3];
      c[10:1]  = port_id;
      c[0]     = (k == n - 1);
      exp_q.push_back(c);
    end
  endfunction

  task automatic send(bytes_t p, bit gaps);
    expect_cells(p);
    foreach (p[i]) begin
      @(negedge clk);
      byte_en = 1; data = p[i];
      first_byte = (i == 0); last_byte = (i == p.size() - 1);
      if (((i % PB) == PB - 1) || last_byte) last_sent_cycle.push_back(cycle);
      if (gaps && ($urandom % 3 == 0)) begin
        @(negedge clk); byte_en = 0; first_byte = 0; last_byte = 0;
      end
    end
    @(negedge clk); byte_en = 0; first_byte = 0; last_byte = 0;
  endtask

  always @(posedge clk) if (rst_n && get_cell) begin
    logic [L-1:0] e;
    int t;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected ocell"); end
    else begin
      e = exp_q.pop_front();
      if (ocell !== e) begin failures++; $display("ocell mismatch\n got %h\n exp %h", ocell, e); end
    end
    checks++;
    t = last_sent_cycle.pop_front();
    if (cycle != t + 1) begin failures++; $display("ocell latency %0d", cycle - t); end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // lengths around ocell boundaries
    for (int i = 0; i < 9; i++) begin
      send(make_packet(lens[i], byte'($urandom), $urandom, 16'(i)), 0);
    end
    for (int i = 0; i < 30; i++)
      send(make_packet(20 + $urandom % 200, byte'($urandom), $urandom, 16'(i)), i % 2);
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d cells missing", exp_q.size()); end
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
