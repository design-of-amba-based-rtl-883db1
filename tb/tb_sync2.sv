// tb_sync2 -- self-checking testbench for the double stage synchronizer.
//
// Two instances (reset value 0 and 1) are fed the same random bit stream,
// changed between clock edges. A reference two-deep shift register kept by the
// testbench predicts the output after every edge: the output must equal the
// input of two edges before, and both instances must show their reset value
// while reset is held.
module tb_sync2;
  logic clk = 1'b0;
  logic rst_n;
  logic d;
  logic q0, q1;
  int   checks = 0, failures = 0;
  logic h1, h2;   // reference history

  always #5 clk = ~clk;

  sync2 #(.RESET_VAL(1'b0)) u0 (.clk(clk), .rst_n(rst_n), .d(d), .q(q0));
  sync2 #(.RESET_VAL(1'b1)) u1 (.clk(clk), .rst_n(rst_n), .d(d), .q(q1));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 1'b1;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    check(q0 == 1'b0, "reset value 0");
    check(q1 == 1'b1, "reset value 1");
    rst_n = 1'b1;
    h1 = 1'b0; h2 = 1'b0;
    // first edge after reset: u0 holds 0 in both stages
    for (int n = 0; n < 400; n++) begin
      d = (n < 6) ? 1'b1 : 1'(($urandom() >> 3) & 1);
      @(posedge clk);
      // reference: after this edge q == value of d two edges ago
      h2 = h1;
      h1 = d;
      @(negedge clk);
      if (n >= 2) begin
        check(q0 == h2, "u0 follows input two edges later");
        check(q1 == h2, "u1 follows input two edges later");
      end
    end
    // reset again in the middle of traffic
    rst_n = 1'b0;
    #1;
    check(q0 == 1'b0 && q1 == 1'b1, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
