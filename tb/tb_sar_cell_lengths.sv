// Runs the end-to-end test of sar_router_top for the three cell lengths
// the design is evaluated with: 256, 512 and 1024 bits. The circular block
// size is scaled so that 2 classes x 1024 ports x blocks still fit an 8 MB
// cell buffer (128, 64 and 32 cells per block).
module tb_sar_cell_lengths;
  int c [3], f [3];
  bit d [3];
  int checks, failures;

  sar_e2e_harness #(.L(256),  .SLOT_W(7)) u_256  (.checks(c[0]), .failures(f[0]), .done(d[0]));
  sar_e2e_harness #(.L(512),  .SLOT_W(6)) u_512  (.checks(c[1]), .failures(f[1]), .done(d[1]));
  sar_e2e_harness #(.L(1024), .SLOT_W(5)) u_1024 (.checks(c[2]), .failures(f[2]), .done(d[2]));

  initial begin
    wait (d[0] && d[1] && d[2]);
    checks = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end
endmodule
