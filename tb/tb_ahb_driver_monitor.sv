// tb_ahb_driver_monitor -- self-checking testbench for the AHB master
// environment.
//
// An AHB slave model with a memory and random wait states (HREADY low) answers
// the driver. The testbench records every address phase the driver puts on
// the bus and checks it against the programme worked out here: NUM_XFERS
// writes of seed ^ (i * 32'h9E3779B9) to ADDR_BASE + 4*i, one deselected
// write, NUM_XFERS reads of the same addresses, with one IDLE cycle after
// every second transfer. It also checks the reset generator's release time,
// the driver's counters against its own counts, and that a read returning
// wrong data is counted as an error (second run, one read corrupted).
module tb_ahb_driver_monitor;
  import ahb2apb_pkg::*;
  localparam int unsigned N    = 16;
  localparam addr_t       BASE = 32'h0000_1000;
  localparam int unsigned RC   = 4;

  logic        clk = 1'b0;
  logic        resetn, rst_n, start;
  data_t       seed;
  logic        hsel, hwrite, hready;
  logic [1:0]  htrans;
  addr_t       haddr;
  data_t       hwdata, hrdata;
  logic        busy, done;
  logic [15:0] wr_count, rd_count, err_count, stall_cycles, gap_count, unsel_count, b2b_count;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  ahb_driver_monitor #(.NUM_XFERS(N), .ADDR_BASE(BASE), .RST_CYCLES(RC)) dut (
    .HCLK(clk), .RESETn(resetn), .rst_n_o(rst_n), .start(start), .seed(seed),
    .HSEL(hsel), .HTRANS(htrans), .HADDR(haddr), .HWRITE(hwrite), .HWDATA(hwdata),
    .HRDATA(hrdata), .HREADY(hready), .busy(busy), .done(done),
    .wr_count(wr_count), .rd_count(rd_count), .err_count(err_count),
    .stall_cycles(stall_cycles), .gap_count(gap_count), .unsel_count(unsel_count),
    .b2b_count(b2b_count)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  function automatic data_t pat(input data_t s, input int i);
    return s ^ (32'(i) * 32'h9E37_79B9);
  endfunction

  // ------------------------------------------------ AHB slave model
  // Everything is evaluated mid-cycle, for the rising edge that follows.
  data_t mem [1024];
  typedef struct packed { logic sel; logic write; addr_t addr; } aphase_t;
  aphase_t seen [$];        // selected and deselected address phases taken
  int      idle_phases = 0; // IDLE address phases taken while running
  logic    dp_v = 0, dp_w = 0;
  addr_t   dp_a;
  int      t_stall = 0, t_b2b = 0, reads_done = 0;
  int      corrupt_read = -1;

  always @(negedge clk) begin
    if (!rst_n) begin
      dp_v = 0;
      hready = 1;
      hrdata = '0;
    end else begin
      hready = (($urandom() % 3) != 0);
      hrdata = (dp_v && !dp_w) ? mem[dp_a[11:2]] : $urandom();
      if (dp_v && !dp_w && reads_done == corrupt_read) hrdata = ~hrdata;
      if (!hready) begin
        if (dp_v) t_stall++;
      end else begin
        if (dp_v) begin
          if (dp_w) mem[dp_a[11:2]] = hwdata;
          else reads_done++;
          if (hsel && htrans[1]) t_b2b++;
        end
        if (htrans[1]) seen.push_back('{sel: hsel, write: hwrite, addr: haddr});
        else if (busy) idle_phases++;
        dp_v = hsel && htrans[1];
        dp_w = hwrite;
        dp_a = haddr;
      end
    end
  end

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_run(input data_t s, input int run_no);
    int edges;
    seen.delete();
    idle_phases = 0;
    seed = s;
    start = 1;
    while (!done) @(negedge clk);
    check(reads_done == run_no * int'(N), $sformatf("done only after the last read (%0d reads)", reads_done));
    start = 0;
    edges = 0;
    while (done && edges < 20) begin @(negedge clk); edges++; end
    check(!done, "done released with start");
    // programme
    check(seen.size() == 2 * N + 1, $sformatf("%0d transfers seen", seen.size()));
    for (int i = 0; i < int'(N); i++) begin
      check(seen[i].sel && seen[i].write && seen[i].addr == BASE + 32'(4 * i), "write address");
      check(mem[(BASE[11:2]) + 10'(i)] == pat(s, i), "write data pattern");
      check(seen[N + 1 + i].sel && !seen[N + 1 + i].write && seen[N + 1 + i].addr == BASE + 32'(4 * i),
            "read address");
    end
    check(!seen[N].sel && seen[N].write, "one deselected write");
    check(idle_phases >= 2 * ((N - 1) / 2), "idle gaps on the bus");
    check(32'(gap_count) == 32'(run_no * 2 * ((N - 1) / 2)), $sformatf("gap_count %0d", gap_count));
    check(32'(wr_count) == 32'(run_no * N), "wr_count");
    check(32'(rd_count) == 32'(run_no * N), "rd_count");
    check(32'(unsel_count) == 32'(run_no), "unsel_count");
    check(32'(stall_cycles) == 32'(t_stall), $sformatf("stall_cycles %0d vs %0d", stall_cycles, t_stall));
    check(32'(b2b_count) == 32'(t_b2b), "b2b_count");
  endtask

  initial begin
    int edges;
    start = 0; seed = '0;
    for (int i = 0; i < 1024; i++) mem[i] = 32'hDEAD_0000 + 32'(i);
    resetn = 0;
    #23;
    check(!rst_n, "reset output low while RESETn low");
    @(negedge clk);
    resetn = 1;
    edges = 0;
    do begin @(negedge clk); edges++; end while (!rst_n && edges < 50);
    check(edges == RC + 1, $sformatf("reset released after %0d edges", edges));
    check(!busy && !done && hsel == 0 && htrans == HTRANS_IDLE, "idle after reset");
    repeat (3) @(negedge clk);
    check(!busy && htrans == HTRANS_IDLE, "waits for start");

    do_run(32'h1234_5678, 1);
    check(err_count == 0, "no read errors on clean run");
    check(t_b2b > 0 && t_stall > 0, "back-to-back and stalls exercised");

    corrupt_read = reads_done + 5;
    do_run(32'hCAFE_F00D, 2);
    check(err_count == 1, $sformatf("corrupted read counted (err_count=%0d)", err_count));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
