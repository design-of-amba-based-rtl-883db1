// ahb_response -- AHB-side controller of the bridge (HCLK domain).
//
// It accepts an AHB transfer when HSEL is high, HTRANS is NONSEQ or SEQ and
// HREADY is high, and then runs the request half of a four-phase handshake
// with the APB side:
//   1. raise PENDWR (write) or PENDRD (read) and hold HREADY low;
//   2. wait for PDONE, brought into HCLK by a double stage synchronizer;
//   3. drop the request and, for a read, capture the read data;
//   4. wait for the synchronized PDONE to fall, then end the data phase by
//      driving HREADY high.
// For a write, the request is raised one edge after the address phase, once
// HWDATA has been sampled in the data phase. A new transfer may be accepted on
// the edge that ends the previous data phase (step 4), as AHB pipelining
// allows.
//
// The three handshake signals PENDWR, PENDRD and PDONE and the synchronizer on
// PDONE follow the bridge's description. The state machine, the four-phase
// (return-to-zero) form of the handshake and the HREADY timing are this
// design's choice. PENDWR and PENDRD are flip-flop outputs, as a signal that
// crosses into another clock domain must be. HREADY is decoded from the state
// and the synchronized PDONE, both registered. There is no HRESP: every
// transfer completes with an OKAY response.
module ahb_response
  import ahb2apb_pkg::*;
(
  input  logic       HCLK,
  input  logic       HRESETn,
  input  logic       HSEL,
  input  logic [1:0] HTRANS,
  input  logic       HWRITE,
  output logic       HREADY,
  // handshake with apb_access
  output logic       PENDWR,
  output logic       PENDRD,
  input  logic       PDONE,      // from the PCLK domain, asynchronous here
  // capture strobes for control_transfer
  output logic       addr_en,
  output logic       wdata_en,
  output logic       rdata_en
);

  typedef enum logic [1:0] {
    S_IDLE  = 2'd0,   // no transfer in flight, HREADY high
    S_WDATA = 2'd1,   // write data phase: sample HWDATA, then request
    S_WAIT  = 2'd2,   // request raised, waiting for PDONE
    S_DONE  = 2'd3    // request dropped, waiting for PDONE to fall
  } state_e;

  state_e state, state_nx;
  logic   pdone_s;
  logic   accept;
  logic   pendwr_nx, pendrd_nx;

  sync2 u_sync_pdone (
    .clk   (HCLK),
    .rst_n (HRESETn),
    .d     (PDONE),
    .q     (pdone_s)
  );

  assign HREADY = (state == S_IDLE) || (state == S_DONE && !pdone_s);
  assign accept = HSEL && htrans_active(HTRANS) && HREADY;

  always_comb begin
    state_nx  = state;
    pendwr_nx = PENDWR;
    pendrd_nx = PENDRD;
    addr_en   = 1'b0;
    wdata_en  = 1'b0;
    rdata_en  = 1'b0;
    unique case (state)
      S_IDLE, S_DONE: begin
        if (HREADY) begin
          if (accept) begin
            addr_en = 1'b1;
            if (HWRITE) begin
              state_nx = S_WDATA;
            end else begin
              state_nx  = S_WAIT;
              pendrd_nx = 1'b1;
            end
          end else begin
            state_nx = S_IDLE;
          end
        end
      end
      S_WDATA: begin
        wdata_en  = 1'b1;
        pendwr_nx = 1'b1;
        state_nx  = S_WAIT;
      end
      S_WAIT: begin
        if (pdone_s) begin
          rdata_en  = PENDRD;
          pendwr_nx = 1'b0;
          pendrd_nx = 1'b0;
          state_nx  = S_DONE;
        end
      end
      default: state_nx = S_IDLE;
    endcase
  end

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      state  <= S_IDLE;
      PENDWR <= 1'b0;
      PENDRD <= 1'b0;
    end else begin
      state  <= state_nx;
      PENDWR <= pendwr_nx;
      PENDRD <= pendrd_nx;
    end
  end

  // Handshake rules on the AHB side.
  a_one_request: assert property (@(posedge HCLK) disable iff (!HRESETn)
    !(PENDWR && PENDRD));
  a_stall_while_pending: assert property (@(posedge HCLK) disable iff (!HRESETn)
    (PENDWR || PENDRD) |-> !HREADY);

endmodule
