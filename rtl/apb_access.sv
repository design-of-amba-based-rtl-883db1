// apb_access -- APB-side controller of the bridge (PCLK domain).
//
// It runs the acknowledge half of the four-phase handshake with ahb_response.
// PENDWR and PENDRD each pass through a double stage synchronizer into PCLK.
// When one of them is seen high, the block:
//   1. SETUP  : drives PSEL with PADDR, PWRITE and PWDATA taken from the
//               control transfer latches (stable while the request is up);
//   2. ACCESS : drives PENABLE for 1 + WAIT_STATES PCLK cycles; on the last
//               one, for a read, PRDATA is latched into rdata_q;
//   3. ACK    : drops PSEL/PENABLE and raises PDONE, and holds it (and
//               rdata_q) until both synchronized requests have fallen, then
//               drops PDONE and returns to IDLE.
// The APB transfer thus takes 2 + WAIT_STATES PCLK cycles, as in AMBA APB.
//
// The synchronizers on PENDWR/PENDRD and the PDONE acknowledge follow the
// bridge's description. So do the APB signal names. The number of extra
// access cycles, WAIT_STATES, is this design's way of serving peripherals
// that need wait states, since the bridge's APB port has no ready input; it
// defaults to 0. All APB outputs and PDONE are registered.
module apb_access
  import ahb2apb_pkg::*;
#(
  parameter int unsigned WAIT_STATES = 0
) (
  input  logic  PCLK,
  input  logic  PRESETn,
  // handshake with ahb_response (asynchronous to PCLK)
  input  logic  PENDWR,
  input  logic  PENDRD,
  output logic  PDONE,
  // transfer held by control_transfer (HCLK domain, stable while pending)
  input  addr_t addr_i,
  input  data_t wdata_i,
  // read data back to control_transfer (stable while PDONE is high)
  output data_t rdata_q,
  // APB bus
  output logic  PSEL,
  output logic  PENABLE,
  output addr_t PADDR,
  output logic  PWRITE,
  output data_t PWDATA,
  input  data_t PRDATA
);

  localparam int unsigned CNT_W = (WAIT_STATES > 0) ? $clog2(WAIT_STATES + 1) : 1;

  typedef enum logic [1:0] {
    S_IDLE   = 2'd0,
    S_SETUP  = 2'd1,
    S_ACCESS = 2'd2,
    S_ACK    = 2'd3
  } state_e;

  state_e             state;
  logic               pendwr_s, pendrd_s;
  logic [CNT_W-1:0]   wait_cnt;

  sync2 u_sync_pendwr (
    .clk   (PCLK),
    .rst_n (PRESETn),
    .d     (PENDWR),
    .q     (pendwr_s)
  );

  sync2 u_sync_pendrd (
    .clk   (PCLK),
    .rst_n (PRESETn),
    .d     (PENDRD),
    .q     (pendrd_s)
  );

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      state    <= S_IDLE;
      PSEL     <= 1'b0;
      PENABLE  <= 1'b0;
      PADDR    <= '0;
      PWRITE   <= 1'b0;
      PWDATA   <= '0;
      PDONE    <= 1'b0;
      rdata_q  <= '0;
      wait_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (pendwr_s || pendrd_s) begin
            PSEL   <= 1'b1;
            PADDR  <= addr_i;
            PWRITE <= pendwr_s;
            PWDATA <= pendwr_s ? wdata_i : '0;
            state  <= S_SETUP;
          end
        end
        S_SETUP: begin
          PENABLE  <= 1'b1;
          wait_cnt <= CNT_W'(WAIT_STATES);
          state    <= S_ACCESS;
        end
        S_ACCESS: begin
          if (wait_cnt == '0) begin
            if (!PWRITE) rdata_q <= PRDATA;
            PSEL    <= 1'b0;
            PENABLE <= 1'b0;
            PDONE   <= 1'b1;
            state   <= S_ACK;
          end else begin
            wait_cnt <= wait_cnt - 1'b1;
          end
        end
        S_ACK: begin
          if (!pendwr_s && !pendrd_s) begin
            PDONE <= 1'b0;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // APB protocol rules for the signals this block drives.
  a_enable_needs_select: assert property (@(posedge PCLK) disable iff (!PRESETn)
    PENABLE |-> PSEL);
  a_setup_then_access: assert property (@(posedge PCLK) disable iff (!PRESETn)
    (PSEL && !PENABLE) |=> (PSEL && PENABLE));
  a_stable_in_access: assert property (@(posedge PCLK) disable iff (!PRESETn)
    (PSEL && PENABLE && wait_cnt != '0) |=> ($stable(PADDR) && $stable(PWRITE) && $stable(PWDATA)));

  a_done_needs_request: assert property (@(posedge PCLK) disable iff (!PRESETn)
    $rose(PDONE) |-> (pendwr_s || pendrd_s));
  // Crossing rule: read data is held while PDONE is up.
  a_rdata_held: assert property (@(posedge PCLK) disable iff (!PRESETn)
    $past(PDONE) |-> $stable(rdata_q));

endmodule
