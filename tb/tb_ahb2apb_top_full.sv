// tb_ahb2apb_top_full -- the whole system at its default parameters.
//
// The top level keeps every default (no wait states, 16 transfers, 64-word
// APB register bank). HCLK runs at 100 MHz and PCLK at a third of it, with an
// offset phase. One complete write / read-back pass is made; the testbench
// checks every AHB read against seed ^ (i * 32'h9E3779B9) on the bus
// observation ports, and the monitors' counts and error counters at the end.
module tb_ahb2apb_top_full;
  import ahb2apb_pkg::*;
  localparam int unsigned N = 16;   // the top's default NUM_XFERS

  logic        hclk = 1'b0, pclk = 1'b0;
  logic        resetn, start;
  data_t       seed;
  logic        done, busy;
  logic [15:0] ahb_wr_count, ahb_rd_count, err_count, stall_cycles, gap_count,
               unsel_count, b2b_count, apb_wr_count, apb_rd_count, wait_count,
               proto_err_count;
  logic        hready, hsel, hwrite, psel, penable, pwrite;
  logic [1:0]  htrans;
  addr_t       haddr, paddr;
  data_t       hwdata, hrdata, pwdata, prdata;
  int          checks = 0, failures = 0, reads_seen = 0;

  always #5 hclk = ~hclk;
  initial begin
    #7;
    forever #15 pclk = ~pclk;
  end

  ahb2apb_top dut (
    .HCLK(hclk), .PCLK(pclk), .RESETn(resetn), .start(start), .seed(seed),
    .done(done), .busy(busy),
    .ahb_wr_count(ahb_wr_count), .ahb_rd_count(ahb_rd_count), .err_count(err_count),
    .stall_cycles(stall_cycles), .gap_count(gap_count), .unsel_count(unsel_count),
    .b2b_count(b2b_count), .apb_wr_count(apb_wr_count), .apb_rd_count(apb_rd_count),
    .wait_count(wait_count), .proto_err_count(proto_err_count),
    .HREADY(hready), .HSEL(hsel), .HTRANS(htrans), .HADDR(haddr), .HWRITE(hwrite),
    .HWDATA(hwdata), .HRDATA(hrdata), .PSEL(psel), .PENABLE(penable), .PADDR(paddr),
    .PWRITE(pwrite), .PWDATA(pwdata), .PRDATA(prdata)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  function automatic data_t pat(input data_t s, input addr_t a);
    return s ^ (32'(a >> 2) * 32'h9E37_79B9);
  endfunction

  logic  dp_v = 0, dp_w = 0;
  addr_t dp_a;
  always @(negedge hclk) begin
    if (busy && hready) begin
      if (dp_v && !dp_w) begin
        reads_seen++;
        check(hrdata == pat(seed, dp_a), $sformatf("AHB read %h = %h", dp_a, hrdata));
      end
      dp_v = hsel && htrans[1];
      dp_w = hwrite;
      dp_a = haddr;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seed = 32'h0BAD_F00D; start = 0;
    resetn = 0;
    #200;
    resetn = 1;
    repeat (20) @(negedge hclk);
    start = 1;
    while (!done) @(negedge hclk);
    start = 0;
    repeat (10) @(negedge pclk);
    check(reads_seen == int'(N), "every read observed");
    check(err_count == 0, "no read errors");
    check(proto_err_count == 0, "no APB protocol errors");
    check(ahb_wr_count == 16'(N) && ahb_rd_count == 16'(N), "AHB transfer counts");
    check(apb_wr_count == 16'(N) && apb_rd_count == 16'(N), "APB transfer counts");
    check(wait_count == 0, "no wait states at the default");
    check(stall_cycles > 0 && b2b_count > 0 && gap_count > 0, "stalls, hand-overs and gaps");
    $display("stall_cycles=%0d for %0d transfers", stall_cycles, 2 * N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
