// apb_driver_monitor -- APB slave environment for the bridge (PCLK domain).
//
// It plays the APB peripheral: a bank of DEPTH 32-bit memory-mapped
// registers, word addressed by PADDR[ADDR_LSB +: log2(DEPTH)] (higher address
// bits are ignored, so the bank repeats through the address space). A write
// is stored in every PSEL & PENABLE cycle with PWRITE high; PRDATA drives the
// addressed word combinationally while PSEL is high and PWRITE low, and zero
// otherwise.
//
// As a monitor it counts completed writes and reads (access cycles whose next
// cycle is not another access cycle), the extra access cycles of each transfer
// (wait states), and protocol errors: PENABLE without PSEL, PENABLE without a
// setup cycle before it, and PADDR/PWRITE/PWDATA changing between the setup
// cycle and the end of the access.
//
// That this block receives the APB control, address and data, serves writes
// and reads, and monitors them follows the description of the APB
// driver/monitor; the register bank, its depth and the checks are this
// design's choice. PCLK generation, also part of that description, is left to
// the simulation environment. All registers reset to zero.
module apb_driver_monitor
  import ahb2apb_pkg::*;
#(
  parameter int unsigned DEPTH    = 64,
  parameter int unsigned ADDR_LSB = 2
) (
  input  logic        PCLK,
  input  logic        PRESETn,
  input  logic        PSEL,
  input  logic        PENABLE,
  input  addr_t       PADDR,
  input  logic        PWRITE,
  input  data_t       PWDATA,
  output data_t       PRDATA,
  // monitor results
  output logic [15:0] wr_count,
  output logic [15:0] rd_count,
  output logic [15:0] wait_count,
  output logic [15:0] proto_err_count
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  data_t             mem [DEPTH];
  logic [IDX_W-1:0]  widx;
  logic              access;
  logic              prev_psel, prev_access;
  addr_t             setup_addr;
  logic              setup_write;
  data_t             setup_wdata;
  logic              err;

  assign widx   = PADDR[ADDR_LSB +: IDX_W];
  assign access = PSEL && PENABLE;
  assign PRDATA = (PSEL && !PWRITE) ? mem[widx] : '0;

  always_comb begin
    err = 1'b0;
    if (PENABLE && !PSEL) err = 1'b1;
    if (access && !prev_psel) err = 1'b1;
    if (access && (PADDR != setup_addr || PWRITE != setup_write ||
                   (PWRITE && PWDATA != setup_wdata))) err = 1'b1;
  end

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
      prev_psel       <= 1'b0;
      prev_access     <= 1'b0;
      setup_addr      <= '0;
      setup_write     <= 1'b0;
      setup_wdata     <= '0;
      wr_count        <= '0;
      rd_count        <= '0;
      wait_count      <= '0;
      proto_err_count <= '0;
    end else begin
      prev_psel   <= PSEL;
      prev_access <= access;
      if (PSEL && !PENABLE) begin
        setup_addr  <= PADDR;
        setup_write <= PWRITE;
        setup_wdata <= PWDATA;
      end
      if (access && PWRITE) mem[widx] <= PWDATA;
      if (access && prev_access) wait_count <= wait_count + 1'b1;
      // A transfer ends in the last access cycle; it is counted one cycle
      // later, when PENABLE has gone low.
      if (prev_access && !access) begin
        if (setup_write) wr_count <= wr_count + 1'b1;
        else             rd_count <= rd_count + 1'b1;
      end
      if (err) proto_err_count <= proto_err_count + 1'b1;
    end
  end

endmodule
