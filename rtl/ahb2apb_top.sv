// ahb2apb_top -- complete AHB-to-APB test system.
//
// Three blocks wired together, as in the design's top-level diagram:
//   ahb_driver_monitor --AHB--> ahb2apb_bridge --APB--> apb_driver_monitor
// The AHB driver/monitor generates the reset; the bridge's AHB side takes it
// directly (it is already released on HCLK), while the PCLK side, the bridge's
// PRESETn and the APB driver/monitor, take it through a reset synchronizer in
// the PCLK domain. The two clocks come in as ports and may be unrelated.
//
// Pulsing `start` runs the driver's write / read-back programme once; `done`
// rises when it has finished, and the counters then show what happened on both
// buses (a correct run has err_count = 0, proto_err_count = 0 and
// NUM_XFERS writes and reads on each side). The AHB and APB bus signals are
// brought out for observation.
module ahb2apb_top
  import ahb2apb_pkg::*;
#(
  parameter int unsigned WAIT_STATES = 0,
  parameter int unsigned NUM_XFERS   = 16,
  parameter int unsigned DEPTH       = 64,
  parameter addr_t       ADDR_BASE   = '0
) (
  input  logic        HCLK,
  input  logic        PCLK,
  input  logic        RESETn,
  input  logic        start,
  input  data_t       seed,
  output logic        done,
  output logic        busy,
  // AHB monitor
  output logic [15:0] ahb_wr_count,
  output logic [15:0] ahb_rd_count,
  output logic [15:0] err_count,
  output logic [15:0] stall_cycles,
  output logic [15:0] gap_count,
  output logic [15:0] unsel_count,
  output logic [15:0] b2b_count,
  // APB monitor
  output logic [15:0] apb_wr_count,
  output logic [15:0] apb_rd_count,
  output logic [15:0] wait_count,
  output logic [15:0] proto_err_count,
  // bus observation
  output logic        HREADY,
  output logic        HSEL,
  output logic [1:0]  HTRANS,
  output addr_t       HADDR,
  output logic        HWRITE,
  output data_t       HWDATA,
  output data_t       HRDATA,
  output logic        PSEL,
  output logic        PENABLE,
  output addr_t       PADDR,
  output logic        PWRITE,
  output data_t       PWDATA,
  output data_t       PRDATA
);

  logic hresetn, presetn;

  ahb_driver_monitor #(
    .NUM_XFERS (NUM_XFERS),
    .ADDR_BASE (ADDR_BASE)
  ) u_ahb_dm (
    .HCLK         (HCLK),
    .RESETn       (RESETn),
    .rst_n_o      (hresetn),
    .start        (start),
    .seed         (seed),
    .HSEL         (HSEL),
    .HTRANS       (HTRANS),
    .HADDR        (HADDR),
    .HWRITE       (HWRITE),
    .HWDATA       (HWDATA),
    .HRDATA       (HRDATA),
    .HREADY       (HREADY),
    .busy         (busy),
    .done         (done),
    .wr_count     (ahb_wr_count),
    .rd_count     (ahb_rd_count),
    .err_count    (err_count),
    .stall_cycles (stall_cycles),
    .gap_count    (gap_count),
    .unsel_count  (unsel_count),
    .b2b_count    (b2b_count)
  );

  reset_sync u_prst_sync (
    .clk    (PCLK),
    .arst_n (hresetn),
    .rst_n  (presetn)
  );

  ahb2apb_bridge #(.WAIT_STATES(WAIT_STATES)) u_bridge (
    .HCLK    (HCLK),
    .HRESETn (hresetn),
    .HSEL    (HSEL),
    .HTRANS  (HTRANS),
    .HADDR   (HADDR),
    .HWRITE  (HWRITE),
    .HWDATA  (HWDATA),
    .HRDATA  (HRDATA),
    .HREADY  (HREADY),
    .PCLK    (PCLK),
    .PRESETn (presetn),
    .PSEL    (PSEL),
    .PENABLE (PENABLE),
    .PADDR   (PADDR),
    .PWRITE  (PWRITE),
    .PWDATA  (PWDATA),
    .PRDATA  (PRDATA)
  );

  apb_driver_monitor #(.DEPTH(DEPTH)) u_apb_dm (
    .PCLK            (PCLK),
    .PRESETn         (presetn),
    .PSEL            (PSEL),
    .PENABLE         (PENABLE),
    .PADDR           (PADDR),
    .PWRITE          (PWRITE),
    .PWDATA          (PWDATA),
    .PRDATA          (PRDATA),
    .wr_count        (apb_wr_count),
    .rd_count        (apb_rd_count),
    .wait_count      (wait_count),
    .proto_err_count (proto_err_count)
  );

endmodule
