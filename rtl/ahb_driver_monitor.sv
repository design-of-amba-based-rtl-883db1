// ahb_driver_monitor -- AHB master environment for the bridge (HCLK domain).
//
// It stands in for the AHB master side of a system: it generates the reset,
// drives address, control and write data into the bridge, and checks the read
// data that comes back.
//
// Reset generation: RESETn (asynchronous, active low) is stretched to
// RST_CYCLES HCLK cycles and released synchronously to HCLK; the result,
// rst_n_o, resets this block and is handed to the bridge and, through a reset
// synchronizer in the top level, to the APB side.
//
// Traffic: when `start` is seen high, one run is made of
//   * NUM_XFERS writes to ADDR_BASE + 4*i with data pattern(i), issued in
//     pairs back to back with one IDLE cycle between pairs;
//   * one write with HSEL low, which the bridge must ignore;
//   * NUM_XFERS reads of the same addresses, in the same rhythm, each
//     compared with pattern(i); a mismatch increments err_count.
// pattern(i) = seed ^ (i * 32'h9E3779B9). The master follows AHB pipelining:
// the address phase of one transfer overlaps the data phase of the one
// before, and every signal is held while HREADY is low. `done` goes high when
// the last read has completed and stays high until `start` is released.
// Counters report completed writes and reads, HCLK cycles spent waiting,
// IDLE gaps, deselected transfers and back-to-back hand-overs.
//
// That this block drives, monitors and generates the reset follows the
// description of the AHB driver/monitor; the traffic programme, the data
// pattern and the counters are this design's choice. Clock generation, also
// part of that description, is left to the simulation environment.
module ahb_driver_monitor
  import ahb2apb_pkg::*;
#(
  parameter int unsigned NUM_XFERS  = 16,
  parameter addr_t       ADDR_BASE  = '0,
  parameter int unsigned RST_CYCLES = 4
) (
  input  logic        HCLK,
  input  logic        RESETn,     // external reset request, asynchronous
  output logic        rst_n_o,    // generated reset, released on HCLK
  input  logic        start,
  input  data_t       seed,
  // AHB master signals
  output logic        HSEL,
  output logic [1:0]  HTRANS,
  output addr_t       HADDR,
  output logic        HWRITE,
  output data_t       HWDATA,
  input  data_t       HRDATA,
  input  logic        HREADY,
  // monitor results
  output logic        busy,
  output logic        done,
  output logic [15:0] wr_count,
  output logic [15:0] rd_count,
  output logic [15:0] err_count,
  output logic [15:0] stall_cycles,
  output logic [15:0] gap_count,
  output logic [15:0] unsel_count,
  output logic [15:0] b2b_count
);

  localparam int unsigned IDX_W = $clog2(NUM_XFERS + 1);
  localparam int unsigned RCNT_W = $clog2(RST_CYCLES + 1);

  typedef enum logic [2:0] {
    P_IDLE  = 3'd0,
    P_WRITE = 3'd1,
    P_UNSEL = 3'd2,
    P_READ  = 3'd3,
    P_DRAIN = 3'd4,
    P_DONE  = 3'd5
  } phase_e;

  function automatic data_t pattern(input data_t s, input logic [IDX_W-1:0] i);
    return s ^ data_t'(32'(i) * 32'h9E37_79B9);
  endfunction

  function automatic addr_t addr_of(input logic [IDX_W-1:0] i);
    return ADDR_BASE + (addr_t'(i) << 2);
  endfunction

  // ---------------------------------------------------------------- reset
  logic [RCNT_W-1:0] rst_cnt;

  always_ff @(posedge HCLK or negedge RESETn) begin
    if (!RESETn) begin
      rst_cnt <= '0;
      rst_n_o <= 1'b0;
    end else if (rst_cnt != RCNT_W'(RST_CYCLES)) begin
      rst_cnt <= rst_cnt + 1'b1;
    end else begin
      rst_n_o <= 1'b1;
    end
  end

  // ---------------------------------------------------------------- traffic
  phase_e           phase;
  logic [IDX_W-1:0] idx;       // next transfer of the current pass
  logic             gap;       // insert an IDLE before the next transfer
  logic [IDX_W-1:0] ap_idx;    // transfer now in its address phase
  logic             dp_valid;  // a selected transfer is in its data phase
  logic             dp_write;
  logic [IDX_W-1:0] dp_idx;
  logic             ap_active;
  data_t            seed_q;

  localparam logic [IDX_W-1:0] LAST = IDX_W'(NUM_XFERS - 1);

  assign ap_active = HSEL && htrans_active(HTRANS);
  assign busy      = (phase != P_IDLE) && (phase != P_DONE);
  assign done      = (phase == P_DONE);

  always_ff @(posedge HCLK or negedge rst_n_o) begin
    if (!rst_n_o) begin
      phase        <= P_IDLE;
      idx          <= '0;
      gap          <= 1'b0;
      ap_idx       <= '0;
      dp_valid     <= 1'b0;
      dp_write     <= 1'b0;
      dp_idx       <= '0;
      seed_q       <= '0;
      HSEL         <= 1'b0;
      HTRANS       <= HTRANS_IDLE;
      HADDR        <= '0;
      HWRITE       <= 1'b0;
      HWDATA       <= '0;
      wr_count     <= '0;
      rd_count     <= '0;
      err_count    <= '0;
      stall_cycles <= '0;
      gap_count    <= '0;
      unsel_count  <= '0;
      b2b_count    <= '0;
    end else if (!HREADY) begin
      if (dp_valid) stall_cycles <= stall_cycles + 1'b1;
    end else begin
      // The data phase in flight ends on this edge.
      if (dp_valid) begin
        if (dp_write) begin
          wr_count <= wr_count + 1'b1;
        end else begin
          rd_count <= rd_count + 1'b1;
          if (HRDATA != pattern(seed_q, dp_idx)) err_count <= err_count + 1'b1;
        end
        if (ap_active) b2b_count <= b2b_count + 1'b1;
      end
      // The address phase on the bus moves into its data phase.
      dp_valid <= ap_active;
      dp_write <= HWRITE;
      dp_idx   <= ap_idx;
      HWDATA   <= HWRITE ? (HSEL ? pattern(seed_q, ap_idx) : ~pattern(seed_q, ap_idx)) : '0;

      // Next address phase.
      HSEL   <= 1'b0;
      HTRANS <= HTRANS_IDLE;
      unique case (phase)
        P_IDLE: begin
          if (start) begin
            phase  <= P_WRITE;
            idx    <= '0;
            gap    <= 1'b0;
            seed_q <= seed;
          end
        end
        P_WRITE, P_READ: begin
          if (gap) begin
            gap       <= 1'b0;
            gap_count <= gap_count + 1'b1;
          end else begin
            HSEL   <= 1'b1;
            HTRANS <= HTRANS_NONSEQ;
            HADDR  <= addr_of(idx);
            HWRITE <= (phase == P_WRITE);
            ap_idx <= idx;
            gap    <= idx[0];
            idx    <= idx + 1'b1;
            if (idx == LAST) begin
              phase <= (phase == P_WRITE) ? P_UNSEL : P_DRAIN;
              gap   <= 1'b0;
            end
          end
        end
        P_UNSEL: begin
          HTRANS      <= HTRANS_NONSEQ;
          HADDR       <= addr_of('0);
          HWRITE      <= 1'b1;
          ap_idx      <= '0;
          unsel_count <= unsel_count + 1'b1;
          idx         <= '0;
          phase       <= P_READ;
        end
        P_DRAIN: if (!ap_active) phase <= P_DONE;   // last read accepted earlier
        P_DONE:  if (!start) phase <= P_IDLE;
        default: phase <= P_IDLE;
      endcase
    end
  end

  // AHB master rule: the address phase is held while HREADY is low.
  a_hold_addr: assert property (@(posedge HCLK) disable iff (!rst_n_o)
    !HREADY |=> ($stable(HADDR) && $stable(HTRANS) && $stable(HWRITE) && $stable(HSEL)));

endmodule
