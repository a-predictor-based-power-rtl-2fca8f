// power_saving_policy: chooses the DRAM power mode in every idle period (PSRS policy:
// prediction for self-refresh with speculative power-down).
//
// How an idle period is handled (elapsed = idle cycles since the last transaction):
//   1. From the first idle cycle the DRAM is put in power-down while the initial time-out
//      cfg_timeout runs; the first forecast is started at the same time.
//   2. When the time-out is over and the forecast is ready, a forecast length of at least
//      SRT (level 2 or higher) schedules self-refresh with expected end e = forecast and
//      power-up point p = e - X_SDLL. A shorter forecast keeps the DRAM in power-down.
//   3. Shortly before p the elapsed length p is written into the history as a temporary
//      entry and the forecast is repeated, so that its result is ready at p. If it is
//      again at least SRT, e grows by the new forecast and self-refresh continues;
//      otherwise the DRAM starts its X_SDLL-cycle power-up at p and is ready at e.
//      At most cfg_max_pred forecasts are made per idle period.
//   4. Any idle cycles left once the DRAM is up again are spent in speculative
//      power-down.
//   5. A request that arrives ends the idle period. In power-down it waits X_PDLL cycles;
//      in self-refresh the full X_SDLL; during a power-up already under way only the rest.
//
// This sequence follows the document: time-out, multiple predictions with just-in-time
// power-up, speculative power-down for every cycle self-refresh does not cover, and the
// penalties on a wrong forecast. This design's own choices: the first forecast starts at
// the beginning of the idle period, since the history does not change before the
// time-out ends; the repeated forecast is started early by the predictor latency LAT so
// that its answer is there at p; self-refresh is only entered if p lies in the future;
// power-down to self-refresh is a direct change of the requested mode (the command
// generator sequences the DRAM commands); a zero cfg_max_pred disables self-refresh.
//
// Timing of a power-up: the X_SDLL (or X_PDLL) cycles of latency count from the cycle in
// which the policy decides to leave the mode, which is the cycle a request arrives or the
// power-up point p; sr_req/pd_req fall one cycle later and mem_ready rises exactly X_SDLL
// (X_PDLL) cycles after that decision. A request that arrives at e thus sees no penalty,
// and one that arrives in self-refresh (power-down) waits X_SDLL (X_PDLL) cycles. When
// the DRAM is up again and the bus is still idle, it spends one cycle ready and then
// enters speculative power-down.
//
// Interface: sr_req/pd_req request the DRAM mode; mem_ready is high when the DRAM may
// be accessed; wake_stall marks cycles in which a request waits for a power-up. The
// idle_start/elapsed come from idle_monitor. The
// forecast is requested with pred_start and returned as pred_len (decoded length) with
// pred_done; temp_wr/temp_len write the temporary history entry. All outputs except
// wake_stall are decoded from registered state.
module power_saving_policy
  import psp_pkg::*;
#(
  parameter int unsigned CNT_W  = 24,
  parameter int unsigned SRT    = 3691,
  parameter int unsigned X_SDLL = 512,
  parameter int unsigned X_PDLL = 10,
  parameter int unsigned LAT    = 50
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bus_idle,
  input  logic             idle_start,
  input  logic [CNT_W-1:0] elapsed,
  input  logic [15:0]      cfg_timeout,
  input  logic [7:0]       cfg_max_pred,
  // predictor
  output logic             pred_start,
  input  logic             pred_done,
  input  logic [CNT_W-1:0] pred_len,
  // temporary history entry
  output logic             temp_wr,
  output logic [CNT_W-1:0] temp_len,
  // DRAM mode
  output logic             sr_req,
  output logic             pd_req,
  output logic             mem_ready,
  output logic             wake_stall,
  output pwr_state_e       state,
  output logic [7:0]       pred_count
);

  localparam int unsigned XW = 16;

  pwr_state_e       st_q;
  logic [CNT_W-1:0] e_q;          // expected end of the idle period
  logic [XW-1:0]    wait_q;       // remaining power-up cycles
  logic [7:0]       npred_q;      // forecasts made in this idle period
  logic             pend_q;       // a forecast has been started and not yet returned
  logic             have_q;       // the latest forecast has returned
  logic [1:0]       rp_q;         // repeated forecast: 0 none, 1 temp written, 2 started

  logic [CNT_W-1:0] p_time;       // power-up point
  logic [CNT_W:0]   e_ext;        // e after an extension, one bit wider
  logic             fc_gainful;   // the returned forecast is worth self-refresh
  logic             rp_due;       // time to prepare the repeated forecast

  assign p_time     = e_q - CNT_W'(X_SDLL);
  assign e_ext      = {1'b0, e_q} + {1'b0, pred_len};
  assign fc_gainful = have_q && (pred_len >= CNT_W'(SRT));
  assign rp_due     = ({1'b0, elapsed} + (CNT_W+1)'(LAT + 2) >= {1'b0, p_time});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q    <= PS_ACTIVE;
      e_q     <= '0;
      wait_q  <= '0;
      npred_q <= '0;
      pend_q  <= 1'b0;
      have_q  <= 1'b0;
      rp_q    <= 2'd0;
    end else begin
      if (pred_start) begin
        pend_q <= 1'b1;
        have_q <= 1'b0;
      end else if (pred_done && pend_q) begin
        pend_q <= 1'b0;
        have_q <= 1'b1;
      end

      unique case (st_q)
        PS_ACTIVE: begin
          if (idle_start) begin
            // a new idle period begins
            st_q    <= PS_TIMEOUT;
            npred_q <= (cfg_max_pred != 0) ? 8'd1 : 8'd0;
            rp_q    <= 2'd0;
          end else if (bus_idle) begin
            // powered up again before the idle period ended
            st_q <= PS_PD;
          end
        end

        PS_TIMEOUT: begin
          if (!bus_idle) begin
            st_q   <= PS_PDEXIT;
            wait_q <= XW'(X_PDLL - 2);
          end else if (elapsed + 1'b1 >= CNT_W'(cfg_timeout)) begin
            st_q <= PS_WAITPR;
          end
        end

        PS_WAITPR: begin
          if (!bus_idle) begin
            st_q   <= PS_PDEXIT;
            wait_q <= XW'(X_PDLL - 2);
          end else if (npred_q == 0) begin
            st_q <= PS_PD;
          end else if (have_q) begin
            if (fc_gainful && (pred_len > elapsed + CNT_W'(X_SDLL) + 1'b1)) begin
              st_q <= PS_SR;
              e_q  <= pred_len;
            end else begin
              st_q <= PS_PD;
            end
          end
        end

        PS_SR: begin
          if (!bus_idle) begin
            // over-estimation: full power-up penalty
            st_q   <= PS_SREXIT;
            wait_q <= XW'(X_SDLL - 2);
          end else if (elapsed >= p_time) begin
            if (rp_q == 2'd2 && fc_gainful) begin
              e_q     <= e_ext[CNT_W] ? '1 : e_ext[CNT_W-1:0];
              npred_q <= npred_q + 1'b1;
              rp_q    <= 2'd0;
            end else begin
              st_q   <= PS_SREXIT;
              wait_q <= XW'(X_SDLL - 2);
            end
          end else if (rp_q == 2'd0 && rp_due && npred_q < cfg_max_pred) begin
            rp_q <= 2'd1;
          end else if (rp_q == 2'd1) begin
            rp_q <= 2'd2;
          end
        end

        PS_SREXIT: begin
          if (wait_q == 0) st_q <= PS_ACTIVE;
          else             wait_q <= wait_q - 1'b1;
        end

        PS_PD: begin
          if (!bus_idle) begin
            st_q   <= PS_PDEXIT;
            wait_q <= XW'(X_PDLL - 2);
          end
        end

        PS_PDEXIT: begin
          if (wait_q == 0) st_q <= PS_ACTIVE;
          else             wait_q <= wait_q - 1'b1;
        end

        default: st_q <= PS_ACTIVE;
      endcase
    end
  end

  // First forecast at the start of the idle period; repeated forecast one cycle after
  // the temporary history entry has been written.
  assign pred_start = (st_q == PS_ACTIVE && idle_start && cfg_max_pred != 0)
                   || (st_q == PS_SR && bus_idle && rp_q == 2'd1);
  assign temp_wr    = (st_q == PS_SR && bus_idle && elapsed < p_time && rp_q == 2'd0
                       && rp_due && npred_q < cfg_max_pred);
  assign temp_len   = p_time;

  assign state      = st_q;
  assign sr_req     = (st_q == PS_SR);
  assign pd_req     = (st_q == PS_TIMEOUT) || (st_q == PS_WAITPR) || (st_q == PS_PD);
  assign mem_ready  = (st_q == PS_ACTIVE);
  assign wake_stall = !bus_idle && (st_q != PS_ACTIVE);
  assign pred_count = npred_q;

  // A request is never served while the DRAM is in a power-saving mode.
  a_no_sr_and_pd: assert property (@(posedge clk) disable iff (!rst_n) !(sr_req && pd_req));
  a_ready_only_active: assert property (@(posedge clk) disable iff (!rst_n)
                                        mem_ready |-> !sr_req && !pd_req);

endmodule
