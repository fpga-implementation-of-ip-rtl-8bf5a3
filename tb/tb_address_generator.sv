// Self-checking testbench of address_generator: selections from either list
// followed by runs of read_next_cell, checking each read address one clock
// later and the wrap-around inside a circular block.
module tb_address_generator;
  localparam int ADDR_W = 18, SLOT_W = 7;
  logic clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] start_address_cphp = 0, start_address_cplp = 0;
  logic sel_valid = 0, sel_hp = 0, read_next_cell = 0, rd_req;
  logic [ADDR_W-1:0] read_address_from_buffer;
  logic [ADDR_W-1:0] exp_q[$];
  int checks = 0, failures = 0, wraps = 0;

  always #5 clk = ~clk;
  address_generator #(.ADDR_W(ADDR_W), .SLOT_W(SLOT_W)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (rd_req) begin
      checks++;
      if (exp_q.size() == 0 || read_address_from_buffer != exp_q[0]) begin
        failures++; $display("address %h", read_address_from_buffer);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  initial begin
    logic [ADDR_W-1:0] a;
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 100; p++) begin
      start_address_cphp = ADDR_W'($urandom);
      start_address_cplp = ADDR_W'($urandom);
      if (p % 10 == 0) start_address_cphp[SLOT_W-1:0] = '1 - SLOT_W'(2);  // near the block end
      @(negedge clk);
      sel_valid = 1; sel_hp = $urandom % 2;
      a = sel_hp ? start_address_cphp : start_address_cplp;
      exp_q.push_back(a);
      @(negedge clk);
      sel_valid = 0;
      start_address_cphp = ADDR_W'($urandom);  // head changes after the pop
      n = $urandom % 8;
      for (int k = 0; k < n; k++) begin
        read_next_cell = 1;
        if (a[SLOT_W-1:0] == '1) wraps++;
        a = {a[ADDR_W-1:SLOT_W], a[SLOT_W-1:0] + SLOT_W'(1)};
        exp_q.push_back(a);
        @(negedge clk);
        read_next_cell = ($urandom % 3 == 0);
        if (read_next_cell) begin read_next_cell = 0; @(negedge clk); end
      end
      read_next_cell = 0;
      repeat (2) @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("reads missing"); end
    checks++;
    if (wraps == 0) begin failures++; $display("no wrap-around exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
