// Self-checking testbench of cell_manager: cells of packets from several
// (input port, ToS) sources arrive interleaved, one per clock or with gaps.
// Every cell must be written at {class, port, slot} with slots counting up
// per block and wrapping, and every End cell must push its packet's start
// address to the list of its class. Checks that ready rises after the table
// has been cleared.
module tb_cell_manager;
  localparam int L = 256, SLOT_W = 7, ADDR_W = 18, NSRC = 6;
  logic clk = 0, rst_n = 0;
  logic [L-1:0] cell_in = 0, mem_wdata;
  logic cell_in_valid = 0, mem_we, cp_push_hp, cp_push_lp, ready;
  logic [ADDR_W-1:0] mem_waddr, cp_addr;
  int checks = 0, failures = 0, wraps = 0, hp_pushes = 0, lp_pushes = 0;

  // sources: port and ToS; two share a port with different classes
  logic [9:0] src_port [NSRC] = '{10'd0, 10'd1023, 10'd77, 10'd77, 10'd500, 10'd3};
  logic [4:0] src_tos  [NSRC] = '{5'h10, 5'h03, 5'h1F, 5'h00, 5'h08, 5'h11};
  logic [SLOT_W-1:0] next_slot [NSRC];
  logic [SLOT_W-1:0] pkt_start [NSRC];
  int left [NSRC];           // cells left in the current packet

  logic [ADDR_W-1:0] exp_addr;
  logic [L-1:0] exp_data;
  bit exp_we, exp_hp, exp_lp;
  logic [ADDR_W-1:0] exp_cp;

  always #5 clk = ~clk;
  cell_manager #(.L(L), .SLOT_W(SLOT_W)) dut (.*);

  always @(negedge clk) if (rst_n && ready) begin
    checks++;
    if (mem_we != exp_we || (exp_we && (mem_waddr != exp_addr || mem_wdata != exp_data)) ||
        cp_push_hp != exp_hp || cp_push_lp != exp_lp || ((exp_hp || exp_lp) && cp_addr != exp_cp)) begin
      failures++;
      $display("mismatch we %b/%b addr %h/%h push %b%b/%b%b cp %h/%h", mem_we, exp_we,
               mem_waddr, exp_addr, cp_push_hp, cp_push_lp, exp_hp, exp_lp, cp_addr, exp_cp);
    end
  end

  initial begin
    int s;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NSRC; i++) begin next_slot[i] = 0; left[i] = 0; end
    @(negedge clk);
    checks++;
    if (ready) begin failures++; $display("ready during table clearing"); end
    wait (ready);
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      // source 0 sends most cells so that its block wraps around
      s = ($urandom % 2) ? 0 : $urandom % NSRC;
      if (left[s] == 0) begin left[s] = 1 + $urandom % 5; pkt_start[s] = next_slot[s]; end
      cell_in = '0;
      for (int w = 0; w < L / 32; w++) cell_in[w*32 +: 32] = $urandom;
      cell_in[15:0] = {src_tos[s], src_port[s], left[s] == 1};
      cell_in_valid = ($urandom % 4 != 0);
      @(posedge clk);
      exp_we = cell_in_valid; exp_hp = 0; exp_lp = 0;
      if (cell_in_valid) begin
        exp_addr = {src_tos[s][4], src_port[s], next_slot[s]};
        exp_data = cell_in;
        if (next_slot[s] == '1) wraps++;
        next_slot[s]++;
        left[s]--;
        if (left[s] == 0) begin
          exp_cp = {src_tos[s][4], src_port[s], pkt_start[s]};
          exp_hp = src_tos[s][4]; exp_lp = !src_tos[s][4];
          hp_pushes += exp_hp; lp_pushes += exp_lp;
        end
      end
      @(negedge clk);
    end
    cell_in_valid = 0;
    @(posedge clk); exp_we = 0; exp_hp = 0; exp_lp = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (wraps == 0 || hp_pushes == 0 || lp_pushes == 0) begin
      failures++; $display("coverage: wraps %0d hp %0d lp %0d", wraps, hp_pushes, lp_pushes);
    end
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
