// ahb2apb_pkg -- types and constants shared by the AHB-to-APB bridge and its
// AHB/APB environment blocks.
//
// The bus widths are the usual 32-bit AMBA widths; they are this design's
// choice, since the bridge description names the signals but gives no widths.
// HTRANS uses the AMBA AHB encoding. Only NONSEQ and SEQ start a transfer.
package ahb2apb_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;

  // AHB transfer type (HTRANS[1:0])
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  // True when HTRANS names a real transfer (NONSEQ or SEQ).
  function automatic logic htrans_active(input logic [1:0] t);
    return (t == HTRANS_NONSEQ) || (t == HTRANS_SEQ);
  endfunction

endpackage
