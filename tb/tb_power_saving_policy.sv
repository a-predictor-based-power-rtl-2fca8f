// tb_power_saving_policy: runs the policy on its own, with the testbench standing in for
// the predictor (each start is answered LAT cycles later with the next length from a
// script) and counting idle cycles itself. Each scenario is one idle period; the
// expected cycle numbers are worked out by hand below from the policy rules, with
// SRT = 3691, X_SDLL = 512, X_PDLL = 10, LAT = 50 and time-out 230 unless noted:
//   A  request during the time-out            -> power-down penalty 10, no self-refresh
//      (power-down counts run up to and include the cycle in which the request arrives)
//   B  forecast level 1                       -> power-down only, penalty 10
//   C  forecast 7382, one forecast allowed    -> self-refresh from idle cycle 231,
//                                                power-up at 6870, ready at 7382, no penalty
//   D  forecasts 7382, 3691, 0                -> temporary history writes of 6870 and
//                                                10561, ready at 11073, then power-down
//   E  as D with a limit of two forecasts     -> no third forecast
//   F  forecast too long (over-estimation)    -> full self-refresh penalty 512
//   G  request during the power-up            -> penalty is the rest, 7382 - 7000 = 382
//   H  time-out 0                             -> self-refresh from idle cycle LAT + 2 = 52
//   I  no forecasts allowed                   -> power-down only
module tb_power_saving_policy;
  import psp_pkg::*;

  localparam int unsigned CNT_W = 24, SRT = 3691, X_SDLL = 512, X_PDLL = 10, LAT = 50;

  logic clk = 0, rst_n = 0;
  logic bus_idle = 0, idle_start;
  logic [CNT_W-1:0] elapsed = '0;
  logic [15:0] cfg_timeout = 16'd230;
  logic [7:0]  cfg_max_pred = 8'd150;
  logic pred_start, pred_done, temp_wr;
  logic [CNT_W-1:0] pred_len = '0, temp_len;
  logic sr_req, pd_req, mem_ready, wake_stall;
  pwr_state_e state;
  logic [7:0] pred_count;
  int checks = 0, failures = 0;

  power_saving_policy dut (.*);   // defaults: the values above

  always #5 clk = ~clk;

  // idle counter, same convention as idle_monitor
  logic idle_q = 0;
  always_ff @(posedge clk) begin
    idle_q  <= bus_idle;
    elapsed <= bus_idle ? elapsed + 1'b1 : '0;
  end
  assign idle_start = bus_idle && !idle_q;

  // predictor stand-in
  int unsigned fc_script [$];
  longint cyc = 0, due = -1;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (pred_start) begin
      due      <= cyc + LAT;
      pred_len <= CNT_W'(fc_script.size() ? fc_script.pop_front() : 0);
    end
  end
  assign pred_done = (cyc == due);

  // per-period observations, sampled at the falling edge
  int sr_first, sr_last, n_sr, n_pd, stall, n_start;
  int temp_lens [$];
  bit in_period;
  always @(negedge clk) if (rst_n && in_period) begin
    if (sr_req) begin
      if (sr_first < 0) sr_first = int'(elapsed);
      sr_last = int'(elapsed);
      n_sr++;
    end
    if (pd_req) n_pd++;
    if (wake_stall) stall++;
    if (pred_start) n_start++;
    if (temp_wr) temp_lens.push_back(int'(temp_len));
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // One idle period of idle_len cycles followed by a request; returns when the request
  // has been served and 5 busy cycles have passed.
  task automatic period(int idle_len);
    sr_first = -1; sr_last = -1; n_sr = 0; n_pd = 0; stall = 0; n_start = 0;
    temp_lens.delete();
    @(negedge clk);
    in_period = 1;
    bus_idle  = 1;
    repeat (idle_len) @(negedge clk);
    bus_idle = 0;
    while (!mem_ready) @(negedge clk);
    repeat (5) @(negedge clk);
    in_period = 0;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_period = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    // A: request inside the time-out
    fc_script = '{7382};
    period(100);
    chk(n_sr == 0 && stall == X_PDLL && n_pd == 100, $sformatf("A sr=%0d stall=%0d pd=%0d", n_sr, stall, n_pd));

    // B: level-1 forecast
    fc_script = '{0};
    period(5000);
    chk(n_sr == 0 && stall == X_PDLL && n_start == 1, $sformatf("B sr=%0d stall=%0d", n_sr, stall));
    chk(n_pd == 5000, $sformatf("B pd=%0d", n_pd));

    // C: one forecast, exact
    cfg_max_pred = 8'd1;
    fc_script = '{7382};
    period(7382);
    chk(sr_first == 231 && sr_last == 6870, $sformatf("C sr %0d..%0d", sr_first, sr_last));
    chk(stall == 0 && temp_lens.size() == 0, $sformatf("C stall=%0d temps=%0d", stall, temp_lens.size()));
    chk(n_pd == 230, $sformatf("C pd=%0d", n_pd));

    // D: extension then no more
    cfg_max_pred = 8'd150;
    fc_script = '{7382, 3691, 0};
    period(20000);
    chk(sr_first == 231 && sr_last == 10561, $sformatf("D sr %0d..%0d", sr_first, sr_last));
    chk(n_start == 3 && temp_lens.size() == 2, $sformatf("D starts=%0d temps=%0d", n_start, temp_lens.size()));
    if (temp_lens.size() == 2)
      chk(temp_lens[0] == 6870 && temp_lens[1] == 10561, $sformatf("D temp %0d %0d", temp_lens[0], temp_lens[1]));
    chk(stall == X_PDLL, $sformatf("D stall=%0d", stall));
    // 230 time-out cycles, then power-down from 11074 up to the request in cycle 20000
    chk(n_pd == 230 + (20000 - 11074 + 1), $sformatf("D pd=%0d", n_pd));
    chk(pred_count == 2, $sformatf("D pred_count=%0d", pred_count));

    // E: limit of two forecasts
    cfg_max_pred = 8'd2;
    fc_script = '{7382, 3691, 3691, 3691};
    period(30000);
    chk(n_start == 2 && sr_last == 10561, $sformatf("E starts=%0d sr_last=%0d", n_start, sr_last));
    fc_script.delete();

    // F: over-estimation
    cfg_max_pred = 8'd150;
    fc_script = '{14763};
    period(5000);
    chk(sr_first == 231 && sr_last == 5000 && stall == X_SDLL, $sformatf("F sr_last=%0d stall=%0d", sr_last, stall));
    fc_script.delete();

    // G: request while powering up
    cfg_max_pred = 8'd1;
    fc_script = '{7382};
    period(7000);
    chk(sr_last == 6870 && stall == 7382 - 7000, $sformatf("G stall=%0d", stall));

    // H: no time-out
    cfg_timeout = 16'd0;
    fc_script = '{7382};
    period(7382);
    chk(sr_first == LAT + 2 && sr_last == 6870 && stall == 0, $sformatf("H sr %0d..%0d stall=%0d", sr_first, sr_last, stall));

    // I: self-refresh disabled
    cfg_timeout = 16'd230;
    cfg_max_pred = 8'd0;
    fc_script = '{7382};
    period(9000);
    chk(n_sr == 0 && n_start == 0 && stall == X_PDLL, $sformatf("I sr=%0d starts=%0d", n_sr, n_start));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
