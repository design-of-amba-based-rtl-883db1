// tb_ahb_response -- self-checking testbench for the AHB-side controller.
//
// An AHB master model issues reads and writes (and transfers that must be
// ignored: HSEL low, HTRANS IDLE or BUSY). An acknowledger model plays the
// APB side: it raises PDONE a random number of cycles after it sees PENDWR
// or PENDRD, and drops it a random number of cycles after the request falls.
// Checked: one addr_en per accepted transfer and none for ignored ones; one
// wdata_en per write and one rdata_en per read; the request matches the
// direction; and the exact number of HREADY-low cycles. With PDONE driven
// half a cycle after the request and released half a cycle after it falls,
// a read keeps HREADY low for 5 + d1 + d2 cycles and a write for 6 + d1 + d2
// (two synchronizer edges for each PDONE edge, one edge to react, plus the
// write data cycle), where d1/d2 are the acknowledger's extra delays.
module tb_ahb_response;
  import ahb2apb_pkg::*;
  logic       clk = 1'b0;
  logic       rst_n;
  logic       hsel, hwrite;
  logic [1:0] htrans;
  logic       hready;
  logic       pendwr, pendrd, pdone;
  logic       addr_en, wdata_en, rdata_en;
  int         checks = 0, failures = 0;
  int         n_addr = 0, n_wdata = 0, n_rdata = 0, low_cycles = 0;
  int         d1, d2;

  always #5 clk = ~clk;

  ahb_response dut (
    .HCLK(clk), .HRESETn(rst_n), .HSEL(hsel), .HTRANS(htrans), .HWRITE(hwrite),
    .HREADY(hready), .PENDWR(pendwr), .PENDRD(pendrd), .PDONE(pdone),
    .addr_en(addr_en), .wdata_en(wdata_en), .rdata_en(rdata_en)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // Strobe and stall counters, sampled mid-cycle where everything is settled.
  always @(negedge clk) begin
    if (rst_n) begin
      if (addr_en)  n_addr++;
      if (wdata_en) n_wdata++;
      if (rdata_en) n_rdata++;
      if (!hready)  low_cycles++;
      if (pendwr && pendrd) begin
        failures++;
        $display("FAIL: both requests high");
      end
    end
  end

  // Acknowledger: four-phase, with programmable extra delays d1, d2.
  initial begin
    pdone = 1'b0;
    forever begin
      @(negedge clk);
      if (pendwr || pendrd) begin
        repeat (d1) @(negedge clk);
        pdone = 1'b1;
        while (pendwr || pendrd) @(negedge clk);
        repeat (d2) @(negedge clk);
        pdone = 1'b0;
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One AHB transfer, non-pipelined; returns the HREADY-low cycles it saw.
  task automatic xfer(input logic write, input logic [1:0] trans, output int stall);
    int a0, w0, r0, l0;
    a0 = n_addr; w0 = n_wdata; r0 = n_rdata;
    hsel = 1'b1; htrans = trans; hwrite = write;
    while (!hready) @(negedge clk);
    @(negedge clk);                       // address phase accepted
    l0 = low_cycles;
    hsel = 1'b0; htrans = HTRANS_IDLE;
    if (write) check(pendwr == 1'b0 && !hready, "write: data cycle before request");
    else       check(pendrd == 1'b1 && !hready, "read: request raised at once");
    while (!hready) begin
      if (write) check(!pendrd, "no read request on a write");
      else       check(!pendwr, "no write request on a read");
      @(negedge clk);
    end
    stall = low_cycles - l0;
    check(n_addr == a0 + 1, "one address capture");
    check(n_wdata == w0 + (write ? 1 : 0), "write data capture count");
    check(n_rdata == r0 + (write ? 0 : 1), "read data capture count");
  endtask

  initial begin
    int stall, expect_stall;
    hsel = 0; htrans = HTRANS_IDLE; hwrite = 0;
    d1 = 0; d2 = 0;
    rst_n = 0;
    repeat (3) @(negedge clk);
    check(hready && !pendwr && !pendrd, "reset state");
    rst_n = 1;
    @(negedge clk);

    // Transfers that must be ignored.
    begin
      int a0 = n_addr;
      hsel = 0; htrans = HTRANS_NONSEQ; hwrite = 1; @(negedge clk);
      hsel = 1; htrans = HTRANS_IDLE;   @(negedge clk);
      hsel = 1; htrans = HTRANS_BUSY;   @(negedge clk);
      hsel = 0; htrans = HTRANS_IDLE;   @(negedge clk);
      check(n_addr == a0, "deselected / IDLE / BUSY ignored");
      check(hready && !pendwr && !pendrd, "still idle");
    end

    // Directed latency checks with no extra acknowledge delay.
    xfer(1'b0, HTRANS_NONSEQ, stall);
    check(stall == 5, $sformatf("read stall 5 cycles (got %0d)", stall));
    xfer(1'b1, HTRANS_NONSEQ, stall);
    check(stall == 6, $sformatf("write stall 6 cycles (got %0d)", stall));
    xfer(1'b0, HTRANS_SEQ, stall);
    check(stall == 5, "SEQ read accepted");

    // Random transfers and delays.
    for (int n = 0; n < 200; n++) begin
      logic w;
      w  = 1'($urandom() & 1);
      d1 = $urandom() % 4;
      d2 = $urandom() % 4;
      expect_stall = (w ? 6 : 5) + d1 + d2;
      xfer(w, ($urandom() & 1) ? HTRANS_SEQ : HTRANS_NONSEQ, stall);
      check(stall == expect_stall, $sformatf("stall %0d expected %0d", stall, expect_stall));
      repeat ($urandom() % 3) @(negedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
