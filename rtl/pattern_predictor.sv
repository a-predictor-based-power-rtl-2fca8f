// pattern_predictor: forecasts the level of the next idle period from the history.
//
// The reference pattern is the newest PL levels hist[0..PL-1]. The predictor slides a
// window of PL levels over the older history, one position k = 1 .. HL-PL per clock
// cycle: the window hist[k..k+PL-1] is a past pattern and hist[k-1] the level that
// followed it. A past pattern matches when none of its points differs from the
// corresponding reference point by more than floor(W/2) levels; positions beyond the
// valid history (`count`) are skipped. Each match adds its follower level to a weighted
// sum with weight 1 + sum_i (floor(W/2) - |diff_i|), so an exact match counts most. The
// forecast is the weighted mean rounded down (the largest level L with L * sum_w <=
// sum_wl), which keeps it conservative. No match gives level 1 with `matched` low.
//
// Matching within floor(w/2), scanning one data point at a time and forecasting from a
// similarity-weighted sum of all matches follow the document; the weight formula and the
// rounding are this design's choices, as the document does not spell them out.
//
// Interface: pulse `start` for one cycle while hist/count are stable; the scan must not
// see the history change. `busy` is high during the scan; `done` pulses with `level` and
// `matched` valid, and they hold until the next start. A start while busy restarts.
// Timing: done is LATENCY = HL-PL+2 cycles after the start cycle (psp_pkg::pred_latency).
module pattern_predictor
  import psp_pkg::*;
#(
  parameter int unsigned HL = 50,
  parameter int unsigned PL = 2,
  parameter int unsigned W  = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  level_t                  hist [HL],
  input  logic [$clog2(HL+1)-1:0] count,
  output logic                    busy,
  output logic                    done,
  output level_t                  level,
  output logic                    matched
);

  localparam int unsigned NK    = HL - PL;          // candidate positions
  localparam int unsigned HALFW = W / 2;
  localparam int unsigned ACC_W = 24;
  localparam int unsigned K_W   = $clog2(HL + 1);

  typedef enum logic [1:0] {P_IDLE, P_SCAN, P_FINISH} pstate_e;

  pstate_e          st_q;
  logic [K_W-1:0]   k_q;
  logic [ACC_W-1:0] sw_q, swl_q;   // sum of weights, sum of weight * follower level
  logic             done_q, matched_q;
  level_t           level_q;

  // Evaluate the candidate at position k_q.
  logic             cand_ok;
  logic [ACC_W-1:0] cand_w;
  always_comb begin
    int unsigned d, wsum;
    cand_ok = (32'(k_q) + PL <= 32'(count));
    wsum    = 1;
    for (int unsigned i = 0; i < PL; i++) begin
      int unsigned a, b;
      a = 32'(hist[int'(k_q) + i]);
      b = 32'(hist[i]);
      d = (a > b) ? a - b : b - a;
      if (d > HALFW) cand_ok = 1'b0;
      else           wsum += HALFW - d;
    end
    cand_w = ACC_W'(wsum);
  end

  // Rounded-down weighted mean.
  level_t mean_lvl;
  always_comb begin
    mean_lvl = level_t'(1);
    for (int unsigned l = 2; l < (1 << LEVEL_W); l++) begin
      if (longint'(l) * longint'(sw_q) <= longint'(swl_q))
        mean_lvl = level_t'(l);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q      <= P_IDLE;
      k_q       <= '0;
      sw_q      <= '0;
      swl_q     <= '0;
      done_q    <= 1'b0;
      matched_q <= 1'b0;
      level_q   <= level_t'(1);
    end else begin
      done_q <= 1'b0;
      if (start) begin
        st_q  <= P_SCAN;
        k_q   <= K_W'(1);
        sw_q  <= '0;
        swl_q <= '0;
      end else begin
        unique case (st_q)
          P_SCAN: begin
            if (cand_ok) begin
              sw_q  <= sw_q + cand_w;
              swl_q <= swl_q + cand_w * ACC_W'(hist[int'(k_q) - 1]);
            end
            if (32'(k_q) == NK) st_q <= P_FINISH;
            else                          k_q  <= k_q + 1'b1;
          end
          P_FINISH: begin
            st_q      <= P_IDLE;
            done_q    <= 1'b1;
            matched_q <= (sw_q != '0);
            level_q   <= (sw_q != '0) ? mean_lvl : level_t'(1);
          end
          default: ;
        endcase
      end
    end
  end

  assign busy    = (st_q != P_IDLE);
  assign done    = done_q;
  assign level   = level_q;
  assign matched = matched_q;

  initial begin
    assert (PL >= 1 && PL < HL) else $error("pattern_predictor: need 1 <= PL < HL");
  end

endmodule
