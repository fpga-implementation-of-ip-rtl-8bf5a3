// Self-checking testbench of cell_buffer: writes random cells at random
// addresses, reads them back at random times and checks data and the
// one-clock read latency, including a read of the address being written.
module tb_cell_buffer;
  localparam int L = 256, DEPTH = 64, AW = 6;
  logic clk = 0, rst_n = 0, we = 0, re = 0, cell_valid;
  logic [AW-1:0] aw = 0, ar = 0;
  logic [L-1:0] scheduled_cell = 0, cell_to_crossbar;
  logic [L-1:0] model [DEPTH];
  bit written [DEPTH];
  logic [L-1:0] exp_q[$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  cell_buffer #(.L(L), .DEPTH(DEPTH)) dut (.*);

  function automatic logic [L-1:0] rnd_cell();
    logic [L-1:0] c;
    for (int i = 0; i < L / 32; i++) c[i*32 +: 32] = $urandom;
    return c;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (cell_valid) begin
      checks++;
      if (exp_q.size() == 0 || cell_to_crossbar != exp_q[0]) begin
        failures++; $display("read mismatch");
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = $urandom % 2;
      aw = AW'($urandom);
      scheduled_cell = rnd_cell();
      ar = (i % 50 == 0) ? aw : AW'($urandom);
      re = written[ar] && ($urandom % 2);
      @(posedge clk);
      if (re) exp_q.push_back(model[ar]);   // old contents on a same-address write
      if (we) begin model[aw] = scheduled_cell; written[aw] = 1; end
    end
    @(negedge clk); we = 0; re = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("reads missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
