// tb_control_transfer -- self-checking testbench for the bridge's latches.
//
// Random address, direction, write data, read data and capture strobes are
// applied between clock edges; a reference model kept by the testbench holds
// what each register should contain and is compared after every edge.
module tb_control_transfer;
  import ahb2apb_pkg::*;
  logic  clk = 1'b0;
  logic  rst_n;
  addr_t haddr;
  logic  hwrite;
  data_t hwdata, apb_rdata;
  logic  addr_en, wdata_en, rdata_en;
  addr_t addr_q;
  logic  write_q;
  data_t wdata_q, hrdata;
  addr_t m_addr;
  logic  m_write;
  data_t m_wdata, m_rdata;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  control_transfer dut (
    .HCLK(clk), .HRESETn(rst_n), .HADDR(haddr), .HWRITE(hwrite), .HWDATA(hwdata),
    .addr_en(addr_en), .wdata_en(wdata_en), .rdata_en(rdata_en), .apb_rdata(apb_rdata),
    .addr_q(addr_q), .write_q(write_q), .wdata_q(wdata_q), .HRDATA(hrdata)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin
    #50000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_en = 0; wdata_en = 0; rdata_en = 0;
    haddr = '1; hwrite = 1; hwdata = '1; apb_rdata = '1;
    rst_n = 0;
    repeat (2) @(negedge clk);
    check(addr_q == '0 && write_q == 0 && wdata_q == '0 && hrdata == '0, "reset clears all");
    rst_n = 1;
    m_addr = '0; m_write = 0; m_wdata = '0; m_rdata = '0;
    for (int n = 0; n < 1000; n++) begin
      haddr     = $urandom();
      hwrite    = 1'($urandom() & 1);
      hwdata    = $urandom();
      apb_rdata = $urandom();
      addr_en   = 1'(($urandom() % 4) == 0);
      wdata_en  = 1'(($urandom() % 4) == 0);
      rdata_en  = 1'(($urandom() % 4) == 0);
      @(posedge clk);
      if (addr_en) begin m_addr = haddr; m_write = hwrite; end
      if (wdata_en) m_wdata = hwdata;
      if (rdata_en) m_rdata = apb_rdata;
      @(negedge clk);
      check(addr_q == m_addr, "address latch");
      check(write_q == m_write, "direction latch");
      check(wdata_q == m_wdata, "write data latch");
      check(hrdata == m_rdata, "read data register");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
