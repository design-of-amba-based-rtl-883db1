// tb_apb_access -- self-checking testbench for the APB-side controller.
//
// Runs apb_access_harness on two instances, with no wait states (the
// default) and with three, and adds up their checks.
module tb_apb_access;
  int   c0, f0, c3, f3;
  logic d0, d3;

  apb_access_harness #(.WS(0)) h0 (.checks(c0), .failures(f0), .finished(d0));
  apb_access_harness #(.WS(3)) h3 (.checks(c3), .failures(f3), .finished(d3));

  initial begin
    #400000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c3, f0 + f3 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (d0 && d3);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c3, f0 + f3);
    $finish;
  end
endmodule
