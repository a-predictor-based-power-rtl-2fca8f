// tb_dram_power_predictor: end-to-end test of the predictor unit at its default sizes
// (HL = 50, PL = 2, W = 4, SRT = 3691, 7 levels, X_SDLL = 512, X_PDLL = 10).
//
// The bus is driven with a scripted series of idle periods: a repeating short / medium /
// long pattern that the predictor can learn, with deliberate breaks (a long slot cut
// short, a slot that ends during the power-up, a slot that ends exactly when the DRAM is
// up again), under the three time-out and forecast-limit settings of the evaluated
// applications (230/150, 250/40, 0/200), then very long periods with a limit of two
// forecasts and without a limit. The testbench keeps its own history of levels and its
// own copy of the forecasting rule and checks, period by period:
//   - the first forecast of every period against that model;
//   - that self-refresh starts exactly one cycle after both the time-out and the
//     forecast latency have passed, and only when the model's forecast is level 2 or up;
//   - that the DRAM is ready exactly X_SDLL cycles after self-refresh ends;
//   - the wake-up penalty of every request from the mode it found the DRAM in: 0 when
//     ready, X_PDLL in power-down, X_SDLL in self-refresh, the rest of the power-up
//     otherwise.
// It also counts how often each mechanism happened and fails if one never did.
module tb_dram_power_predictor;
  import psp_pkg::*;

  localparam int HL = 50, PL = 2, W = 4, SRT = 3691, X_SDLL = 512, X_PDLL = 10;
  localparam int LAT = HL - PL + 2;
  localparam int LB [8] = '{0, 0, 3691, 7382, 14763, 29525, 59049, 118097};

  logic clk = 0, rst_n = 0, bus_idle = 0;
  logic [15:0] cfg_timeout = 16'd230;
  logic [7:0]  cfg_max_pred = 8'd150;
  logic sr_req, pd_req, mem_ready, wake_stall, pred_matched;
  pwr_state_e pwr_state;
  level_t pred_level;
  logic [23:0] pred_len;
  logic [7:0] pred_count;
  int checks = 0, failures = 0;

  dram_power_predictor dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- reference model ----------------
  int hist_m [$];   // newest first

  function automatic int lvl_of(int len);
    int r = 1;
    for (int i = 2; i <= 7; i++) if (len >= LB[i]) r = i;
    return r;
  endfunction

  function automatic void forecast(output int lvl, output bit m);
    int sw = 0, swl = 0, cnt;
    cnt = (hist_m.size() > HL) ? HL : hist_m.size();
    for (int k = 1; k + PL <= cnt; k++) begin
      bit ok = 1;
      int wgt = 1;
      for (int i = 0; i < PL; i++) begin
        int d = hist_m[k+i] - hist_m[i];
        if (d < 0) d = -d;
        if (d > W / 2) ok = 0; else wgt += W / 2 - d;
      end
      if (ok) begin sw += wgt; swl += wgt * hist_m[k-1]; end
    end
    m = (sw != 0);
    lvl = m ? swl / sw : 1;
  endfunction

  // ---------------- mechanism counters ----------------
  int m_timeout_filtered, m_pd_only, m_sr, m_extend, m_limit, m_over_full,
      m_over_partial, m_jit, m_spec_pd, m_nomatch, m_top_level, m_pd_wake;

  // ---------------- one idle period ----------------
  task automatic period(int len);
    int exp_lvl, sr_start, sr_first, sr_last, ready_at, stall, arr_state, arr_npred;
    bit exp_m, saw_pd_after_sr, checked_fc;
    longint sr_last_cyc, cyc;
    forecast(exp_lvl, exp_m);
    sr_start = ((int'(cfg_timeout) > LAT + 1) ? int'(cfg_timeout) : LAT + 1) + 1;
    sr_first = -1; sr_last = -1; ready_at = -1; saw_pd_after_sr = 0; checked_fc = 0;
    cyc = 0; sr_last_cyc = -1;
    // idle cycles 0 .. len-1
    // The bus input of a cycle is set at its falling edge and the outputs are sampled
    // just after, so each sample shows the cycle the input belongs to.
    for (int e = 0; e < len; e++) begin
      @(negedge clk);
      bus_idle = 1;
      #1;
      if (e == LAT + 1) begin
        checked_fc = 1;
        chk(int'(pred_level) == exp_lvl && pred_matched == exp_m,
            $sformatf("forecast %0d/%0b expected %0d/%0b", pred_level, pred_matched, exp_lvl, exp_m));
        if (!pred_matched) m_nomatch++;
      end
      if (sr_req) begin
        if (sr_first < 0) sr_first = e;
        sr_last = e;
      end
      if (sr_first >= 0 && mem_ready && ready_at < 0) ready_at = e;
      if (sr_first >= 0 && pd_req) saw_pd_after_sr = 1;
    end
    // the request
    stall = 0;
    @(negedge clk);
    bus_idle = 0;
    #1;
    arr_state = int'(pwr_state);
    arr_npred = int'(pred_count);
    if (sr_req) sr_last = len;
    while (wake_stall) begin
      stall++;
      @(negedge clk);
      #1;
    end
    chk(mem_ready, "ready once the stall ends");
    // checks
    if (sr_first >= 0) begin
      m_sr++;
      chk(sr_first == sr_start, $sformatf("self-refresh start %0d expected %0d", sr_first, sr_start));
      chk(exp_lvl >= 2, "self-refresh only on a forecast of level 2 or more");
      if (ready_at >= 0)
        chk(ready_at == sr_last + X_SDLL, $sformatf("ready at %0d, self-refresh ended %0d", ready_at, sr_last));
    end else if (checked_fc && exp_lvl >= 2 && len > sr_start + 1 && LB[exp_lvl] > sr_start + X_SDLL + 1) begin
      chk(0, $sformatf("no self-refresh on forecast level %0d", exp_lvl));
    end
    if (sr_first < 0 && checked_fc && exp_lvl == 1 && len > int'(cfg_timeout)) m_pd_only++;
    if (saw_pd_after_sr) m_spec_pd++;
    if (arr_npred >= 2 && sr_first >= 0) m_extend++;
    if (arr_npred == int'(cfg_max_pred) && cfg_max_pred >= 2 && sr_first >= 0) m_limit++;
    case (arr_state)
      PS_ACTIVE: begin
        chk(stall == 0, $sformatf("penalty %0d when ready", stall));
        if (sr_first >= 0) m_jit++;
      end
      PS_TIMEOUT, PS_WAITPR, PS_PD: begin
        chk(stall == X_PDLL, $sformatf("power-down penalty %0d", stall));
        m_pd_wake++;
        if (arr_state == PS_TIMEOUT) m_timeout_filtered++;
      end
      PS_SR: begin
        chk(stall == X_SDLL, $sformatf("self-refresh penalty %0d", stall));
        m_over_full++;
      end
      PS_SREXIT: begin
        chk(stall == sr_last + X_SDLL - len, $sformatf("partial penalty %0d expected %0d", stall, sr_last + X_SDLL - len));
        m_over_partial++;
      end
      default: chk(0, $sformatf("request found state %0d", arr_state));
    endcase
    // commit to the model history
    hist_m.push_front(lvl_of(len));
    if (lvl_of(len) == 7) m_top_level++;
    if (hist_m.size() > HL) void'(hist_m.pop_back());
    // busy period
    repeat ($urandom_range(1, 30)) @(negedge clk);
  endtask

  task automatic pattern(int reps, int break_at = -1, int break_len = 0);
    for (int r = 0; r < reps; r++) begin
      period(100);
      period(2500);
      period((r == break_at) ? break_len : 40000);
    end
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    // H263 decoder settings
    cfg_timeout = 16'd230; cfg_max_pred = 8'd150;
    // once learnt, a long slot is forecast as level 5: self-refresh up to 29013,
    // DRAM ready at 29525
    pattern(6);
    pattern(1, 0, 29525);     // request exactly when the DRAM is up
    pattern(1, 0, 29300);     // request during the power-up
    pattern(2, 1, 3000);      // long slot cut short: request in self-refresh
    // Ray Tracer settings
    cfg_timeout = 16'd250; cfg_max_pred = 8'd40;
    pattern(4);
    // JPEG encoder settings
    cfg_timeout = 16'd0; cfg_max_pred = 8'd200;
    pattern(4);
    // very long idle periods, two forecasts at most, then no limit
    cfg_timeout = 16'd230; cfg_max_pred = 8'd2;
    repeat (5) period(300000);
    cfg_max_pred = 8'd150;
    repeat (3) period(300000);

    $display("mechanisms: timeout_filtered=%0d pd_only=%0d self_refresh=%0d extended=%0d limit=%0d",
             m_timeout_filtered, m_pd_only, m_sr, m_extend, m_limit);
    $display("            over_full=%0d over_partial=%0d just_in_time=%0d spec_pd_after_sr=%0d",
             m_over_full, m_over_partial, m_jit, m_spec_pd);
    $display("            pd_wake=%0d no_match=%0d top_level=%0d", m_pd_wake, m_nomatch, m_top_level);
    chk(m_timeout_filtered > 0, "time-out filtered a period");
    chk(m_pd_only > 0, "power-down only period");
    chk(m_sr > 0, "self-refresh");
    chk(m_extend > 0, "self-refresh extended by a repeated forecast");
    chk(m_limit > 0, "forecast limit reached");
    chk(m_over_full > 0, "over-estimation, full penalty");
    chk(m_over_partial > 0, "over-estimation, partial penalty");
    chk(m_jit > 0, "just-in-time power-up");
    chk(m_spec_pd > 0, "speculative power-down after self-refresh");
    chk(m_pd_wake > 0, "power-down wake-up");
    chk(m_nomatch > 0, "forecast without a matching pattern");
    chk(m_top_level > 0, "top level");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
