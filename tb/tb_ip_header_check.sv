// Self-checking testbench of ip_header_check: a mix of good packets and
// packets with a bad checksum, wrong version, too small IHL, a total length
// below the header length, or a truncated header. Only the good packets may
// come out, byte for byte with first/last flags, each announced once with
// its destination address and ToS; each bad packet must be counted as
// dropped. The header-check latency (IHL*4+1 clocks to the first byte out)
// is checked for a packet entering an idle block.
module tb_ip_header_check;
  import tb_pkt_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [7:0] in_byte = 0;
  logic out_valid, out_first, out_last, dst_valid, pkt_dropped;
  logic [7:0] out_byte, ip_tos;
  logic [31:0] dst_addr;
  int checks = 0, failures = 0, cycle = 0;
  byte unsigned exp_bytes[$];
  bit exp_first[$], exp_last[$];
  logic [39:0] exp_dst[$];
  int exp_drops = 0, drops = 0;
  int first_in_cycle = -1, first_out_cycle = -1;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  ip_header_check dut (.*);

  task automatic send(bytes_t p, bit good, bit gaps);
    if (good) begin
      foreach (p[i]) begin
        exp_bytes.push_back(p[i]);
        exp_first.push_back(i == 0);
        exp_last.push_back(i == p.size() - 1);
      end
      exp_dst.push_back({p[1], p[16], p[17], p[18], p[19]});
    end else exp_drops++;
    foreach (p[i]) begin
      @(negedge clk);
      in_valid = 1; in_byte = p[i]; in_first = (i == 0); in_last = (i == p.size() - 1);
      if (gaps && $urandom % 4 == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0; in_first = 0; in_last = 0;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (exp_bytes.size() == 0) begin failures++; $display("unexpected byte"); end
      else begin
        byte unsigned b;
        bit f, l;
        b = exp_bytes.pop_front();
        f = exp_first.pop_front();
        l = exp_last.pop_front();
        if (out_byte != b || out_first != f || out_last != l) begin
          failures++; $display("byte mismatch %h/%b/%b exp %h/%b/%b", out_byte, out_first, out_last, b, f, l);
        end
      end
      if (out_first && first_out_cycle < 0) first_out_cycle = cycle;
    end
    if (dst_valid) begin
      checks++;
      if (exp_dst.size() == 0 || {ip_tos, dst_addr} != exp_dst[0]) begin
        failures++; $display("dst mismatch %h", dst_addr);
      end
      if (exp_dst.size() != 0) void'(exp_dst.pop_front());
    end
    if (pkt_dropped) drops++;
  end

  initial begin
    bytes_t p;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // latency on an idle block, IHL = 6 (24-byte header)
    p = make_packet(64, 8'hB8, 32'h0A000001, 16'd1, 6);
    first_in_cycle = cycle + 1;
    send(p, 1, 0);
    repeat (40) @(negedge clk);
    checks++;
    if (first_out_cycle - first_in_cycle != 6 * 4 + 1) begin
      failures++; $display("latency %0d", first_out_cycle - first_in_cycle);
    end
    for (int i = 0; i < 60; i++) begin
      int kind, len;
      kind = $urandom % 7;
      len  = 28 + $urandom % 120;
      p = make_packet(len, byte'($urandom), $urandom, 16'(i), (kind == 6) ? 7 : 5);
      case (kind)
        1: p[10] ^= 8'h01;                           // checksum error
        2: begin p[0] = 8'h65; end                   // version 6
        3: begin p = make_packet(len, 8'h00, $urandom, 16'(i), 4); end // IHL 4
        4: begin p[2] = 0; p[3] = 8'd10; end         // total length < header
        5: begin p = p[0:9]; end                     // truncated header
        default: ;
      endcase
      send(p, kind == 0 || kind == 6, i % 3 == 0);
    end
    repeat (300) @(negedge clk);
    checks += 3;
    if (exp_bytes.size() != 0) begin failures++; $display("%0d bytes missing", exp_bytes.size()); end
    if (exp_dst.size() != 0)   begin failures++; $display("%0d dst missing", exp_dst.size()); end
    if (drops != exp_drops)    begin failures++; $display("drops %0d exp %0d", drops, exp_drops); end
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
