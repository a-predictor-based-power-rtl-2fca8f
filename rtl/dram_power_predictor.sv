// dram_power_predictor: idle-period predictor and power-saving policy for one DRAM,
// placed beside the arbiter bus in the front end of a memory controller.
//
// The unit watches whether the bus is idle and decides, idle period by idle period,
// whether the DRAM goes into self-refresh, precharge power-down or a mix of both:
//   idle_monitor        counts the cycles of each idle period;
//   level_encoder       turns a finished idle length (or the temporary elapsed length
//                       during a repeated forecast) into a level 1..NLEV;
//   history_buffer      keeps the levels of the last HL idle periods; the newest PL are
//                       the reference pattern;
//   pattern_predictor   searches the history for patterns within floor(W/2) levels of the
//                       reference pattern and forecasts the next level;
//   level_decoder       turns the forecast level into its conservative lower-bound length;
//   power_saving_policy time-out, self-refresh with repeated forecasts and just-in-time
//                       power-up, speculative power-down for all other idle cycles.
// This structure (encoder, history with reference pattern, predictor, decoder, policy
// feeding "next prediction" back to the predictor) follows the document; the bus
// interface (a single bus_idle input) and the output handshake are this design's choice.
//
// Interface: bus_idle is 1 while the bus has no request pending and no transaction in
// flight; a request that finds the DRAM asleep keeps bus_idle low until mem_ready.
// cfg_timeout and cfg_max_pred are the per-application time-out and maximum number of
// forecasts per idle period; they must be stable while the bus is idle. sr_req and
// pd_req request self-refresh or power-down from the command generator; wake_stall
// marks the cycles a request waits for power-up. pred_level/pred_len show the latest
// forecast (pred_matched: some past pattern matched)
// and pred_count the forecasts made in the current idle period.
// Timing: the first forecast is ready pred_latency(HL, PL) = HL-PL+2 cycles after the
// idle period begins; see power_saving_policy for the power-up timing.
module dram_power_predictor
  import psp_pkg::*;
#(
  parameter int unsigned HL     = 50,
  parameter int unsigned PL     = 2,
  parameter int unsigned W      = 4,
  parameter int unsigned SRT    = 3691,
  parameter int unsigned NLEV   = 7,
  parameter int unsigned X_SDLL = 512,
  parameter int unsigned X_PDLL = 10,
  parameter int unsigned CNT_W  = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bus_idle,
  input  logic [15:0]      cfg_timeout,
  input  logic [7:0]       cfg_max_pred,
  output logic             sr_req,
  output logic             pd_req,
  output logic             mem_ready,
  output logic             wake_stall,
  output pwr_state_e       pwr_state,
  output level_t           pred_level,
  output logic [CNT_W-1:0] pred_len,
  output logic             pred_matched,
  output logic [7:0]       pred_count
);

  localparam int unsigned LAT = pred_latency(HL, PL);

  logic             idle_start, idle_end;
  logic [CNT_W-1:0] elapsed, idle_len;
  logic             temp_wr;
  logic [CNT_W-1:0] temp_len, enc_len;
  level_t           wr_level;
  level_t           hist [HL];
  logic [$clog2(HL+1)-1:0] hist_count;
  logic             hist_temp;
  logic             pred_start, pred_busy, pred_done;

  idle_monitor #(.CNT_W(CNT_W)) u_idle (
    .clk, .rst_n, .bus_idle,
    .idle_start, .idle_end, .elapsed, .idle_len
  );

  // One encoder serves both history writes; they never coincide (idle_end needs a busy
  // bus, temp_wr an idle one).
  assign enc_len = idle_end ? idle_len : temp_len;

  level_encoder #(.CNT_W(CNT_W), .SRT(SRT), .NLEV(NLEV)) u_enc (
    .len(enc_len), .level(wr_level)
  );

  history_buffer #(.HL(HL)) u_hist (
    .clk, .rst_n,
    .commit(idle_end), .temp_wr, .wr_level,
    .hist, .count(hist_count), .temp(hist_temp)
  );

  pattern_predictor #(.HL(HL), .PL(PL), .W(W)) u_pred (
    .clk, .rst_n,
    .start(pred_start), .hist, .count(hist_count),
    .busy(pred_busy), .done(pred_done), .level(pred_level), .matched(pred_matched)
  );

  level_decoder #(.CNT_W(CNT_W), .SRT(SRT), .NLEV(NLEV)) u_dec (
    .level(pred_level), .len(pred_len)
  );

  power_saving_policy #(
    .CNT_W(CNT_W), .SRT(SRT), .X_SDLL(X_SDLL), .X_PDLL(X_PDLL), .LAT(LAT)
  ) u_policy (
    .clk, .rst_n, .bus_idle, .idle_start, .elapsed, .cfg_timeout, .cfg_max_pred,
    .pred_start, .pred_done, .pred_len,
    .temp_wr, .temp_len,
    .sr_req, .pd_req, .mem_ready, .wake_stall,
    .state(pwr_state), .pred_count
  );

  // History writes happen only between forecasts: a forecast sees a stable history.
  a_hist_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                  pred_busy && bus_idle |-> !temp_wr);
  // A temporary history entry never outlives its idle period.
  a_temp_in_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                   !bus_idle && $past(!bus_idle) |-> !hist_temp);

endmodule
