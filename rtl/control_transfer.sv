// control_transfer -- address, control and data latches of the bridge (HCLK).
//
// The AHB side of the bridge must hold the transfer still while the slower,
// unrelated APB side works on it. This block is that holding stage: on the
// accepting edge of an AHB address phase it latches HADDR and HWRITE, one edge
// later (the write data phase) it latches HWDATA, and it keeps all three
// unchanged until the AHB response controller captures the next transfer. The
// APB access block reads them directly across the clock boundary; this is safe
// because they only change while no request (PENDWR/PENDRD) is raised.
// In the other direction it latches the read data held by the APB side when
// the controller sees the synchronized PDONE, and drives it on HRDATA.
//
// The division of the bridge into AHB response, control transfer and APB
// access follows the bridge's block diagram; the enable inputs and the exact
// capture edges are this design's choice.
//
// Timing: all registers on HCLK rising edge, async active-low reset to zero.
module control_transfer
  import ahb2apb_pkg::*;
(
  input  logic  HCLK,
  input  logic  HRESETn,
  // from the AHB bus
  input  addr_t HADDR,
  input  logic  HWRITE,
  input  data_t HWDATA,
  // capture strobes from ahb_response
  input  logic  addr_en,    // address phase accepted
  input  logic  wdata_en,   // write data phase sample
  input  logic  rdata_en,   // APB read data is valid (PDONE seen)
  // read data held by apb_access (PCLK domain, stable while PDONE is high)
  input  data_t apb_rdata,
  // to apb_access (HCLK domain, stable while a request is pending)
  output addr_t addr_q,
  output logic  write_q,
  output data_t wdata_q,
  // back to the AHB bus
  output data_t HRDATA
);

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      addr_q  <= '0;
      write_q <= 1'b0;
      wdata_q <= '0;
      HRDATA  <= '0;
    end else begin
      if (addr_en) begin
        addr_q  <= HADDR;
        write_q <= HWRITE;
      end
      if (wdata_en) wdata_q <= HWDATA;
      if (rdata_en) HRDATA  <= apb_rdata;
    end
  end

endmodule
