// Self-checking testbench of sync_fifo (the completed-packet list): random
// pushes and pops against a queue model, checking the head entry, empty,
// full and count every clock, including filling it completely.
module tb_sync_fifo;
  localparam int W = 18, DEPTH = 16;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [W-1:0] din = 0, dout;
  logic empty, full;
  logic [$clog2(DEPTH):0] count;
  logic [W-1:0] model[$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  task automatic compare();
    checks++;
    if (empty != (model.size() == 0) || full != (model.size() == DEPTH) ||
        count != model.size() || (model.size() != 0 && dout != model[0])) begin
      failures++;
      $display("mismatch: empty %b full %b count %0d dout %h model %0d", empty, full, count, dout, model.size());
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 3; phase++) begin
      for (int i = 0; i < 400; i++) begin
        @(negedge clk);
        compare();
        // phase 0 mostly pushes (fills), phase 1 mostly pops, phase 2 mixed
        push = (model.size() < DEPTH) && !full && ($urandom % 4 < (phase == 0 ? 3 : phase == 1 ? 1 : 2));
        pop  = (model.size() > 0)     && ($urandom % 4 < (phase == 0 ? 1 : phase == 1 ? 3 : 2));
        din  = W'($urandom);
        @(posedge clk);
        if (pop)  void'(model.pop_front());
        if (push) model.push_back(din);
      end
    end
    @(negedge clk); push = 0; pop = 0; compare();
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
