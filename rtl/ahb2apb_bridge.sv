// ahb2apb_bridge -- AHB to APB bridge with a handshake clock-domain crossing.
//
// The bridge is an AHB slave on HCLK and the APB master on PCLK; the two clocks
// may have any ratio and phase. The AHB interface (ahb_response and
// control_transfer, both on HCLK) accepts a transfer, latches its address,
// direction and write data and raises PENDWR or PENDRD. The APB interface
// (apb_access, on PCLK) synchronizes the request, performs the APB transfer
// and answers with PDONE, which is synchronized back into HCLK. HREADY stays
// low for the whole round trip, so no transfer is lost or overtaken, at the
// cost of several cycles of each clock per transfer. A read holds HREADY low
// for about 4 HCLK + (7 + WAIT_STATES) PCLK cycles, a write for one HCLK cycle
// more; each of the four synchronized edges adds up to one further period of
// its receiving clock, depending on phase.
//
// The port list follows the bridge's pin diagram (HCLK, HRESET, HSEL, HTRANS,
// HADDR, HWRITE, HWDATA, HRDATA, HREADY; PCLK, PRESET, PSEL, PENABLE, PADDR,
// PWRITE, PWDATA, PRDATA). The resets are active low here (HRESETn, PRESETn),
// as in AMBA; the bus widths come from ahb2apb_pkg.
module ahb2apb_bridge
  import ahb2apb_pkg::*;
#(
  parameter int unsigned WAIT_STATES = 0
) (
  // AHB side
  input  logic       HCLK,
  input  logic       HRESETn,
  input  logic       HSEL,
  input  logic [1:0] HTRANS,
  input  addr_t      HADDR,
  input  logic       HWRITE,
  input  data_t      HWDATA,
  output data_t      HRDATA,
  output logic       HREADY,
  // APB side
  input  logic       PCLK,
  input  logic       PRESETn,
  output logic       PSEL,
  output logic       PENABLE,
  output addr_t      PADDR,
  output logic       PWRITE,
  output data_t      PWDATA,
  input  data_t      PRDATA
);

  logic  pendwr, pendrd, pdone;
  logic  addr_en, wdata_en, rdata_en;
  addr_t addr_q;
  logic  write_q;
  data_t wdata_q;
  data_t apb_rdata;

  ahb_response u_ahb_response (
    .HCLK     (HCLK),
    .HRESETn  (HRESETn),
    .HSEL     (HSEL),
    .HTRANS   (HTRANS),
    .HWRITE   (HWRITE),
    .HREADY   (HREADY),
    .PENDWR   (pendwr),
    .PENDRD   (pendrd),
    .PDONE    (pdone),
    .addr_en  (addr_en),
    .wdata_en (wdata_en),
    .rdata_en (rdata_en)
  );

  control_transfer u_control_transfer (
    .HCLK      (HCLK),
    .HRESETn   (HRESETn),
    .HADDR     (HADDR),
    .HWRITE    (HWRITE),
    .HWDATA    (HWDATA),
    .addr_en   (addr_en),
    .wdata_en  (wdata_en),
    .rdata_en  (rdata_en),
    .apb_rdata (apb_rdata),
    .addr_q    (addr_q),
    .write_q   (write_q),
    .wdata_q   (wdata_q),
    .HRDATA    (HRDATA)
  );

  apb_access #(.WAIT_STATES(WAIT_STATES)) u_apb_access (
    .PCLK    (PCLK),
    .PRESETn (PRESETn),
    .PENDWR  (pendwr),
    .PENDRD  (pendrd),
    .PDONE   (pdone),
    .addr_i  (addr_q),
    .wdata_i (wdata_q),
    .rdata_q (apb_rdata),
    .PSEL    (PSEL),
    .PENABLE (PENABLE),
    .PADDR   (PADDR),
    .PWRITE  (PWRITE),
    .PWDATA  (PWDATA),
    .PRDATA  (PRDATA)
  );

  // The latched direction must agree with the request that is raised.
  a_dir_matches_request: assert property (@(posedge HCLK) disable iff (!HRESETn)
    (pendwr |-> write_q) and (pendrd |-> !write_q));

  // Crossing rule: the latched transfer does not change while a request is up,
  // so the PCLK side may sample it at any time during the handshake.
  a_hold_while_pending: assert property (@(posedge HCLK) disable iff (!HRESETn)
    $past(pendwr || pendrd) |-> ($stable(addr_q) && $stable(write_q) && $stable(wdata_q)));

endmodule
