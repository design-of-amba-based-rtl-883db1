// tb_ahb2apb_top -- end-to-end testbench of the whole AHB-to-APB system.
//
// The top level runs with two APB wait states, eight transfers per pass and a
// 16-word APB register bank. For each of four HCLK/PCLK period pairs (AHB
// faster, APB faster, equal, unrelated) the system is reset and the driver's
// programme is run twice with different seeds. The testbench checks, on the
// bus observation ports and independently of the design's own monitors:
//   * every AHB read returns seed ^ (i * 32'h9E3779B9) for address 4*i;
//   * every APB write carries that value, and the deselected write never
//     reaches APB;
// and from the monitors: no read errors, no APB protocol errors, NUM_XFERS
// writes and reads on each side per pass, and WAIT_STATES extra access
// cycles per APB transfer. Each mechanism must occur at least once over the
// test: AHB stall (HREADY low), APB wait state, back-to-back AHB hand-over,
// IDLE gap, deselected transfer, AHB-faster and APB-faster clocking, and
// reset with re-run.
module tb_ahb2apb_top;
  import ahb2apb_pkg::*;
  localparam int unsigned WS = 2;
  localparam int unsigned N  = 8;
  localparam int unsigned D  = 16;

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
  real         hper = 10.0, pper = 10.0;
  int          checks = 0, failures = 0;
  // mechanism counters
  int          m_stall = 0, m_wait = 0, m_b2b = 0, m_gap = 0, m_unsel = 0,
               m_ahb_fast = 0, m_apb_fast = 0, m_rerun = 0;
  int          ahb_reads_seen = 0, apb_writes_seen = 0;

  always #(hper / 2) hclk = ~hclk;
  always #(pper / 2) pclk = ~pclk;

  ahb2apb_top #(.WAIT_STATES(WS), .NUM_XFERS(N), .DEPTH(D)) dut (
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

  // Independent AHB read-data check, mid-cycle.
  logic  dp_v = 0, dp_w = 0;
  addr_t dp_a;
  always @(negedge hclk) begin
    if (busy && hready) begin
      if (dp_v && !dp_w) begin
        ahb_reads_seen++;
        check(hrdata == pat(seed, dp_a), $sformatf("AHB read %h = %h", dp_a, hrdata));
      end
      dp_v = hsel && htrans[1];
      dp_w = hwrite;
      dp_a = haddr;
    end else if (!busy) begin
      dp_v = 0;
    end
  end

  // Independent APB write-data check.
  logic pen_q = 0;
  always @(negedge pclk) begin
    if (psel && penable && pwrite) begin
      check(pwdata == pat(seed, paddr), $sformatf("APB write %h = %h", paddr, pwdata));
      if (!pen_q) apb_writes_seen++;
    end
    pen_q = psel && penable;
  end

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_pass(input data_t s, input int pass);
    int r0, w0;
    r0 = ahb_reads_seen; w0 = apb_writes_seen;
    seed = s;
    @(negedge hclk); start = 1;
    while (!done) @(negedge hclk);
    start = 0;
    while (done) @(negedge hclk);
    repeat (4) @(negedge pclk);
    check(ahb_reads_seen == r0 + int'(N), $sformatf("all AHB reads observed (%0d)", ahb_reads_seen - r0));
    check(apb_writes_seen == w0 + int'(N), "exactly N APB writes (deselected one ignored)");
    check(err_count == 0, "driver saw no read errors");
    check(proto_err_count == 0, "APB monitor saw no protocol errors");
    check(32'(ahb_wr_count) == 32'(pass * N) && 32'(ahb_rd_count) == 32'(pass * N), "AHB counts");
    check(32'(apb_wr_count) == 32'(pass * N) && 32'(apb_rd_count) == 32'(pass * N), "APB counts");
    check(32'(wait_count) == 32'(pass * 2 * N * WS), $sformatf("wait_count %0d", wait_count));
    check(32'(unsel_count) == 32'(pass), "one deselected transfer per pass");
  endtask

  task automatic config_run(input real hp, input real pp);
    hper = hp; pper = pp;
    resetn = 0; start = 0;
    #(4 * (hp + pp));
    resetn = 1;
    repeat (12) @(negedge pclk);
    repeat (12) @(negedge hclk);
    check(!busy && !done && hready && err_count == 0 && apb_wr_count == 0, "reset state");
    one_pass(32'hA5A5_0001 ^ $urandom(), 1);
    one_pass(32'h3C3C_0002 ^ $urandom(), 2);
    m_rerun++;
    if (stall_cycles > 0)  m_stall++;
    if (wait_count > 0)    m_wait++;
    if (b2b_count > 0)     m_b2b++;
    if (gap_count > 0)     m_gap++;
    if (unsel_count > 0)   m_unsel++;
    if (hp < pp)           m_ahb_fast++;
    if (pp < hp)           m_apb_fast++;
  endtask

  initial begin
    seed = '0; start = 0;
    config_run(10.0, 30.0);
    config_run(30.0, 10.0);
    config_run(10.0, 10.0);
    config_run(7.0, 17.0);
    $display("mechanisms: stall=%0d wait=%0d b2b=%0d gap=%0d unsel=%0d ahb_fast=%0d apb_fast=%0d rerun=%0d",
             m_stall, m_wait, m_b2b, m_gap, m_unsel, m_ahb_fast, m_apb_fast, m_rerun);
    check(m_stall > 0, "AHB stall happened");
    check(m_wait > 0, "APB wait state happened");
    check(m_b2b > 0, "back-to-back hand-over happened");
    check(m_gap > 0, "IDLE gap happened");
    check(m_unsel > 0, "deselected transfer happened");
    check(m_ahb_fast > 0, "AHB-faster clocking run");
    check(m_apb_fast > 0, "APB-faster clocking run");
    check(m_rerun > 1, "reset and re-run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
