// reset_sync -- reset synchronizer for one clock domain.
//
// Asserts its active-low output at once when the input reset is asserted and
// releases it on the second rising edge of `clk` after the input is released,
// so that every flip-flop of the domain leaves reset on the same edge. The top
// level uses it to hand the single generated reset to the PCLK domain.
module reset_sync (
  input  logic clk,
  input  logic arst_n,   // asynchronous reset in, active low
  output logic rst_n     // reset out: asynchronous assert, synchronous release
);

  logic stage;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      stage <= 1'b0;
      rst_n <= 1'b0;
    end else begin
      stage <= 1'b1;
      rst_n <= stage;
    end
  end

endmodule
