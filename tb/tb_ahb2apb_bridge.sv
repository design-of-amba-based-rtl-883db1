// tb_ahb2apb_bridge -- self-checking testbench for the complete bridge.
//
// An AHB master model issues random writes and reads (with pipelined
// back-to-back hand-over, idle gaps, and deselected or IDLE/BUSY transfers
// that must be ignored) through the bridge into an APB slave model with a
// 256-word memory. The testbench keeps its own shadow copy of the memory:
//   * every read must return the shadow value;
//   * every APB transfer must match, in order, the AHB transfer that caused
//     it (address, direction, write data), and nothing else may reach APB;
//   * each APB access must last 1 + WS cycles and follow setup/access order;
//   * an AHB transfer must never finish before its APB transfer has.
// The run is repeated for several HCLK/PCLK period pairs (equal with a phase
// offset, AHB faster, APB faster, unrelated), with a reset between runs.
module tb_ahb2apb_bridge;
  import ahb2apb_pkg::*;
  localparam int unsigned WS = 1;

  logic       hclk = 1'b0, pclk = 1'b0;
  logic       hrst_n, prst_n;
  logic       hsel, hwrite;
  logic [1:0] htrans;
  addr_t      haddr;
  data_t      hwdata, hrdata;
  logic       hready;
  logic       psel, penable, pwrite;
  addr_t      paddr;
  data_t      pwdata, prdata;
  int         checks = 0, failures = 0;
  real        hper = 10.0, pper = 10.0;
  int         apb_done = 0;   // completed APB transfers

  always #(hper / 2) hclk = ~hclk;
  always #(pper / 2) pclk = ~pclk;

  ahb2apb_bridge #(.WAIT_STATES(WS)) dut (
    .HCLK(hclk), .HRESETn(hrst_n), .HSEL(hsel), .HTRANS(htrans), .HADDR(haddr),
    .HWRITE(hwrite), .HWDATA(hwdata), .HRDATA(hrdata), .HREADY(hready),
    .PCLK(pclk), .PRESETn(prst_n), .PSEL(psel), .PENABLE(penable), .PADDR(paddr),
    .PWRITE(pwrite), .PWDATA(pwdata), .PRDATA(prdata)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- APB slave
  data_t mem [256];
  typedef struct packed { logic write; addr_t addr; data_t data; } xfer_t;
  xfer_t expq [$];
  int    enc = 0;
  logic  prev_psel = 0;

  assign prdata = mem[paddr[9:2]];

  always @(posedge pclk) begin
    if (prst_n) begin
      if (psel && !penable) begin
        if (prev_psel && enc == 0) begin
          failures++; $display("FAIL: setup after setup");
        end
      end
      if (psel && penable) begin
        enc++;
        if (enc == int'(WS) + 1) begin
          xfer_t e;
          checks++;
          if (expq.size() == 0) begin
            failures++; $display("FAIL: unexpected APB transfer at %0t", $time);
          end else begin
            e = expq.pop_front();
            if (e.write != pwrite || e.addr != paddr || (pwrite && e.data != pwdata)) begin
              failures++;
              $display("FAIL: APB transfer %0b %h %h, expected %0b %h %h",
                       pwrite, paddr, pwdata, e.write, e.addr, e.data);
            end
          end
          if (pwrite) mem[paddr[9:2]] <= pwdata;
          apb_done++;
        end
      end else begin
        if (enc != 0) begin
          checks++;
          if (enc != int'(WS) + 1) begin
            failures++; $display("FAIL: access lasted %0d cycles", enc);
          end
        end
        enc = 0;
      end
      prev_psel <= psel;
    end
  end

  // ---------------------------------------------------------------- AHB master
  data_t shadow [256];

  // One transfer. The address phase is driven now (mid-cycle), which may
  // overlap the final cycle of the previous transfer's data phase.
  task automatic ahb_xfer(input logic write, input addr_t a, input data_t d, input logic seq);
    data_t wd;
    int    apb_before;
    hsel = 1'b1; htrans = seq ? HTRANS_SEQ : HTRANS_NONSEQ; haddr = a; hwrite = write;
    while (!hready) @(negedge hclk);
    @(negedge hclk);                         // accepted; data phase
    apb_before = apb_done;
    hsel = 1'b0; htrans = HTRANS_IDLE; haddr = $urandom(); hwrite = 1'($urandom());
    hwdata = write ? d : $urandom();
    expq.push_back('{write: write, addr: a, data: d});
    while (!hready) @(negedge hclk);
    check(apb_done == apb_before + 1, "AHB transfer ends after its APB transfer");
    if (write) begin
      shadow[a[9:2]] = d;
    end else begin
      check(hrdata == shadow[a[9:2]],
            $sformatf("read %h: got %h expected %h", a, hrdata, shadow[a[9:2]]));
    end
  endtask

  task automatic ignored_cycle();
    // one address phase that the bridge must not take
    int sel;
    sel = $urandom() % 3;
    unique case (sel)
      0: begin hsel = 1'b0; htrans = HTRANS_NONSEQ; end
      1: begin hsel = 1'b1; htrans = HTRANS_IDLE;   end
      default: begin hsel = 1'b1; htrans = HTRANS_BUSY; end
    endcase
    haddr = $urandom(); hwrite = 1'($urandom());
    while (!hready) @(negedge hclk);
    @(negedge hclk);
    hsel = 1'b0; htrans = HTRANS_IDLE;
  endtask

  task automatic run(input real hp, input real pp, input int n);
    hper = hp; pper = pp;
    hrst_n = 0; prst_n = 0;
    hsel = 0; htrans = HTRANS_IDLE; hwrite = 0; haddr = '0; hwdata = '0;
    #(3 * (hp + pp));
    @(negedge hclk);
    check(hready && !psel && !penable, "reset state");
    hrst_n = 1;
    @(negedge pclk); prst_n = 1;
    repeat (2) @(negedge hclk);
    for (int i = 0; i < n; i++) begin
      int    k;
      addr_t a;
      k = $urandom() % 10;
      a = addr_t'(($urandom() % 256) << 2);
      if (k < 4)      ahb_xfer(1'b1, a, $urandom(), 1'($urandom()));
      else if (k < 8) ahb_xfer(1'b0, a, '0, 1'($urandom()));
      else if (k < 9) ignored_cycle();
      else            repeat (1 + $urandom() % 3) @(negedge hclk);
    end
    while (!hready) @(negedge hclk);
    repeat (20) @(negedge pclk);
    check(expq.size() == 0, "every AHB transfer reached APB");
  endtask

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      mem[i] = 32'(i) * 32'h0101_0101;
      shadow[i] = mem[i];
    end
    run(10.0, 10.0, 300);     // same frequency (phase set by start-up)
    run(10.0, 13.0, 300);     // unrelated, close
    run(10.0, 40.0, 300);     // AHB four times faster
    run(35.0, 10.0, 300);     // APB faster
    run(7.0, 23.0, 300);      // unrelated
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
