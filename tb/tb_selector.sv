// Self-checking testbench of selector: every combination of next_packet and
// the two list-empty flags, checking that the high-priority list always
// wins, that nothing is popped from an empty list and lists_empty.
module tb_selector;
  logic next_packet, empty_list_cphp, empty_list_cplp;
  logic read_list_cphp, read_list_cplp, lists_empty, sel_valid, sel_hp;
  int checks = 0, failures = 0;

  selector dut (.*);

  initial begin
    for (int i = 0; i < 8; i++) begin
      bit np, eh, el, exp_h, exp_l;
      {np, eh, el} = 3'(i);
      next_packet = np; empty_list_cphp = eh; empty_list_cplp = el;
      #1;
      exp_h = np && !eh;
      exp_l = np && eh && !el;
      checks++;
      if (read_list_cphp != exp_h || read_list_cplp != exp_l || lists_empty != (eh && el) ||
          sel_valid != (exp_h || exp_l) || (sel_valid && sel_hp != exp_h)) begin
        failures++;
        $display("mismatch np=%b eh=%b el=%b -> %b %b %b", np, eh, el, read_list_cphp, read_list_cplp, lists_empty);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
