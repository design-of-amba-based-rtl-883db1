// apb_access_harness -- stimulus and checks for one apb_access instance.
//
// Plays the AHB side of the handshake (raises PENDWR or PENDRD between clock
// edges with the transfer held stable, waits for PDONE, drops the request
// after a random delay) and the APB slave (returns f(PADDR) on PRDATA only in
// the last access cycle, noise before). Checks for every transfer, counting
// PCLK cycles mid-cycle:
//   * PSEL rises 3 cycles after the request (2 synchronizer edges + 1);
//   * exactly one setup cycle with the latched address, direction and data;
//   * exactly 1 + WS access cycles with PENABLE high;
//   * PDONE rises as PSEL falls, with rdata_q = f(PADDR) for reads;
//   * PDONE stays up while the request does and falls 3 cycles after it.
module apb_access_harness
  import ahb2apb_pkg::*;
#(
  parameter int unsigned WS = 0,
  parameter int unsigned N  = 150
) (
  output int   checks,
  output int   failures,
  output logic finished
);
  logic  clk = 1'b0;
  logic  rst_n;
  logic  pendwr, pendrd, pdone;
  addr_t addr_i;
  data_t wdata_i, rdata_q;
  logic  psel, penable, pwrite;
  addr_t paddr;
  data_t pwdata, prdata;

  always #4 clk = ~clk;

  apb_access #(.WAIT_STATES(WS)) dut (
    .PCLK(clk), .PRESETn(rst_n), .PENDWR(pendwr), .PENDRD(pendrd), .PDONE(pdone),
    .addr_i(addr_i), .wdata_i(wdata_i), .rdata_q(rdata_q),
    .PSEL(psel), .PENABLE(penable), .PADDR(paddr), .PWRITE(pwrite), .PWDATA(pwdata),
    .PRDATA(prdata)
  );

  function automatic data_t f(input addr_t a);
    return a ^ 32'hA5A5_0F0F;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL(WS=%0d): %s at %0t", WS, what, $time);
    end
  endtask

  // APB slave model: valid read data only in the last access cycle.
  int enc = 0;
  always @(negedge clk) begin
    if (psel && penable) begin
      prdata = (enc == int'(WS)) ? f(paddr) : $urandom();
      enc++;
    end else begin
      prdata = $urandom();
      enc = 0;
    end
  end

  initial begin
    checks = 0; failures = 0; finished = 0;
    pendwr = 0; pendrd = 0; addr_i = '0; wdata_i = '0;
    rst_n = 0;
    repeat (3) @(negedge clk);
    check(!psel && !penable && !pdone, "reset state");
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int n = 0; n < int'(N); n++) begin
      logic w;
      int   cyc, en_cycles;
      w       = 1'($urandom() & 1);
      addr_i  = $urandom();
      wdata_i = $urandom();
      if (w) pendwr = 1; else pendrd = 1;
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (!psel && cyc < 20);
      check(cyc == 3, $sformatf("PSEL %0d cycles after request, expected 3", cyc));
      check(!penable, "setup cycle has PENABLE low");
      check(paddr == addr_i && pwrite == w, "setup address and direction");
      if (w) check(pwdata == wdata_i, "setup write data");
      // hold-time noise on the AHB-side latches is not allowed while pending;
      // keep them steady and count the access cycles
      en_cycles = 0;
      @(negedge clk);
      while (psel && penable) begin
        en_cycles++;
        check(paddr == addr_i && pwrite == w, "address stable in access");
        @(negedge clk);
      end
      check(en_cycles == int'(WS) + 1, $sformatf("%0d access cycles, expected %0d", en_cycles, WS + 1));
      check(!psel && !penable && pdone, "PDONE raised as the transfer ends");
      if (!w) check(rdata_q == f(addr_i), "read data latched in the last access cycle");
      repeat ($urandom() % 5) begin
        @(negedge clk);
        check(pdone && !psel, "PDONE held while the request is up");
      end
      pendwr = 0; pendrd = 0;
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (pdone && cyc < 20);
      check(cyc == 3, $sformatf("PDONE fell %0d cycles after request, expected 3", cyc));
      if (!w) check(rdata_q == f(addr_i), "read data held after PDONE");
      repeat ($urandom() % 3) @(negedge clk);
    end
    finished = 1;
  end
endmodule
