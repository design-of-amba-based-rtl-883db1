// tb_apb_driver_monitor -- self-checking testbench for the APB slave
// environment.
//
// An APB master model performs random writes and reads, each with 0..3
// extra access cycles, against a shadow memory kept by the testbench
// (DEPTH = 16 words, so addresses above it alias). Checked: read data after
// reset is zero, every read returns the shadow word, PRDATA is zero outside a
// read, the write/read/wait counters match the testbench's counts, and three
// deliberate protocol violations (PENABLE without PSEL, an access without a
// setup cycle, an address change between setup and access) are each counted
// once as a protocol error.
module tb_apb_driver_monitor;
  import ahb2apb_pkg::*;
  localparam int unsigned DEPTH = 16;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        psel, penable, pwrite;
  addr_t       paddr;
  data_t       pwdata, prdata;
  logic [15:0] wr_count, rd_count, wait_count, proto_err_count;
  int          checks = 0, failures = 0;
  int          n_wr = 0, n_rd = 0, n_wait = 0;
  data_t       shadow [DEPTH];

  always #5 clk = ~clk;

  apb_driver_monitor #(.DEPTH(DEPTH)) dut (
    .PCLK(clk), .PRESETn(rst_n), .PSEL(psel), .PENABLE(penable), .PADDR(paddr),
    .PWRITE(pwrite), .PWDATA(pwdata), .PRDATA(prdata),
    .wr_count(wr_count), .rd_count(rd_count), .wait_count(wait_count),
    .proto_err_count(proto_err_count)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // Signals change mid-cycle (negedge); the slave samples on the rising edge.
  task automatic apb(input logic w, input addr_t a, input data_t d, input int waits,
                     output data_t rd);
    psel = 1; penable = 0; pwrite = w; paddr = a; pwdata = w ? d : $urandom();
    @(negedge clk);
    penable = 1;
    for (int k = 0; k <= waits; k++) begin
      #1;
      if (!w) check(prdata == shadow[a[5:2]], $sformatf("read %h", a));
      rd = prdata;
      @(negedge clk);
    end
    psel = 0; penable = 0;
    if (w) begin shadow[a[5:2]] = d; n_wr++; end else n_rd++;
    n_wait += waits;
  endtask

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t rd;
    int    e0;
    psel = 0; penable = 0; pwrite = 0; paddr = '0; pwdata = '0;
    for (int i = 0; i < int'(DEPTH); i++) shadow[i] = '0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < int'(DEPTH); i++) apb(1'b0, addr_t'(4 * i), '0, 0, rd);
    for (int n = 0; n < 600; n++) begin
      logic w;
      addr_t a;
      w = 1'($urandom() & 1);
      a = addr_t'($urandom() & 32'h0000_0FFC);
      apb(w, a, $urandom(), $urandom() % 4, rd);
      if ($urandom() % 2) begin
        pwrite = 0; paddr = $urandom();
        #1;
        check(prdata == '0, "PRDATA zero when not selected");
        @(negedge clk);
      end
    end
    @(negedge clk);
    check(32'(wr_count) == 32'(n_wr), $sformatf("wr_count %0d vs %0d", wr_count, n_wr));
    check(32'(rd_count) == 32'(n_rd), $sformatf("rd_count %0d vs %0d", rd_count, n_rd));
    check(32'(wait_count) == 32'(n_wait), $sformatf("wait_count %0d vs %0d", wait_count, n_wait));
    check(proto_err_count == 0, "no protocol errors on legal traffic");

    // Violation 1: PENABLE without PSEL for one cycle.
    e0 = int'(proto_err_count);
    penable = 1; @(negedge clk); penable = 0; @(negedge clk);
    check(int'(proto_err_count) == e0 + 1, "PENABLE without PSEL counted");
    // Violation 2: read access with no setup cycle.
    e0 = int'(proto_err_count);
    psel = 1; penable = 1; pwrite = 0; paddr = 32'h8; @(negedge clk);
    psel = 0; penable = 0; @(negedge clk);
    check(int'(proto_err_count) == e0 + 1, "access without setup counted");
    // Violation 3: address changes between setup and access.
    e0 = int'(proto_err_count);
    psel = 1; penable = 0; pwrite = 0; paddr = 32'h10; @(negedge clk);
    penable = 1; paddr = 32'h14; @(negedge clk);
    psel = 0; penable = 0; @(negedge clk);
    check(int'(proto_err_count) == e0 + 1, "address change in access counted");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
