// tb_workloads: runs the predictor unit, at its default sizes, under the three
// application settings (time-out / forecast limit 230/150, 250/40 and 0/200) on long
// generated idle-period mixes. The mixes repeat a random motif of short (20-200),
// medium (500-3000) and long (5000-80000 cycle) idle periods with +-3 % jitter, and
// change the motif every 40 periods.
//
// For every idle period it checks that the policy covers the idle cycles completely:
// each one is in self-refresh, power-down or power-up, except the first idle cycle and
// at most one ready cycle after a power-up. It also checks that a power-up finishes
// within 512 cycles. It adds up a simple current-times-cycles energy figure
// (50 mA awake, 12 mA in power-down, 6 mA in self-refresh; busy cycles awake) and the
// penalty cycles, and requires an energy saving against an always-awake DRAM.
module tb_workloads;
  import psp_pkg::*;

  localparam int X_SDLL = 512;

  logic clk = 0, rst_n = 0, bus_idle = 0;
  logic [15:0] cfg_timeout;
  logic [7:0]  cfg_max_pred;
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

  longint e_base, e_psrs, cyc_total, stall_total, n_sr_cyc, n_pd_cyc;

  function automatic int draw_len();
    int c = $urandom_range(0, 2);
    if (c == 0) return $urandom_range(20, 200);
    if (c == 1) return $urandom_range(500, 3000);
    return $urandom_range(5000, 80000);
  endfunction

  task automatic period(int len);
    int n_sr = 0, n_pd = 0, n_up = 0, n_ready = 0, stall = 0, up_run = 0;
    for (int e = 0; e < len; e++) begin
      @(negedge clk);
      bus_idle = 1;
      #1;
      unique case (pwr_state)
        PS_SR:                         n_sr++;
        PS_TIMEOUT, PS_WAITPR, PS_PD:  n_pd++;
        PS_SREXIT, PS_PDEXIT:          n_up++;
        default:                       n_ready++;
      endcase
      if (pwr_state == PS_SREXIT) up_run++;
      else if (up_run != 0) begin
        chk(up_run == X_SDLL - 1, $sformatf("power-up took %0d cycles", up_run + 1));
        up_run = 0;
      end
    end
    @(negedge clk);
    bus_idle = 0;
    #1;
    while (wake_stall) begin stall++; @(negedge clk); #1; end
    chk(n_ready <= 2, $sformatf("%0d idle cycles left awake (len %0d)", n_ready, len));
    chk(n_sr + n_pd + n_up + n_ready == len, "idle cycles add up");
    e_base      += 50 * longint'(len);
    e_psrs      += 6 * n_sr + 12 * n_pd + 50 * (n_up + n_ready) + 50 * stall;
    cyc_total   += len + stall;
    stall_total += stall;
    n_sr_cyc    += n_sr;
    n_pd_cyc    += n_pd;
    repeat ($urandom_range(5, 60)) begin
      @(negedge clk);
      e_base += 50; e_psrs += 50; cyc_total++;
    end
  endtask

  task automatic workload(string name, int to, int pi, int n_periods);
    int motif [$];
    e_base = 0; e_psrs = 0; cyc_total = 0; stall_total = 0; n_sr_cyc = 0; n_pd_cyc = 0;
    cfg_timeout  = 16'(to);
    cfg_max_pred = 8'(pi);
    for (int n = 0; n < n_periods; n++) begin
      int l;
      if (n % 40 == 0) begin
        motif.delete();
        repeat ($urandom_range(3, 6)) motif.push_back(draw_len());
      end
      l = motif[n % motif.size()];
      l = l + int'($urandom_range(0, l / 16)) - l / 32;
      period(l);
    end
    $display("%s: %0d cycles, energy %0d%% of always-awake, penalty %0d cycles (%0d.%02d%%), SR %0d PD %0d cycles",
             name, cyc_total, 100 * e_psrs / e_base, stall_total,
             10000 * stall_total / cyc_total / 100, 10000 * stall_total / cyc_total % 100,
             n_sr_cyc, n_pd_cyc);
    chk(e_psrs < e_base, {name, ": energy saved"});
    chk(n_sr_cyc > 0, {name, ": self-refresh used"});
  endtask

  initial begin
    repeat (50000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_timeout = 16'd230;
    cfg_max_pred = 8'd150;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    workload("H263 decoder settings", 230, 150, 240);
    workload("Ray Tracer settings",   250, 40,  240);
    workload("JPEG encoder settings", 0,   200, 240);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
