// tb_idle_monitor: drives random busy and idle stretches and checks that idle_start
// marks the first idle cycle, that elapsed counts 0, 1, 2, ... through an idle stretch,
// and that idle_end reports the stretch's length when the bus becomes busy.
module tb_idle_monitor;
  localparam int unsigned CNT_W = 24;

  logic clk = 0, rst_n = 0, bus_idle = 0;
  logic idle_start, idle_end;
  logic [CNT_W-1:0] elapsed, idle_len;
  int checks = 0, failures = 0;

  idle_monitor dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_idle, n_busy, periods, prev_idle;
    periods = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int p = 0; p < 300; p++) begin
      prev_idle = n_idle;
      n_busy = $urandom_range(1, 20);
      n_idle = (p % 10 == 0) ? 1 : $urandom_range(1, 400);
      bus_idle <= 0;
      for (int c = 0; c < n_busy; c++) begin
        @(negedge clk);
        chk(!idle_start, "no idle_start while busy");
        if (c == 0 && p > 0) begin
          chk(idle_end, "idle_end in first busy cycle");
          chk(32'(idle_len) == prev_idle, $sformatf("idle length %0d vs %0d", idle_len, prev_idle));
          periods++;
        end else chk(!idle_end, "single idle_end");
        @(posedge clk);
        bus_idle <= (c == n_busy - 1);
      end
      for (int c = 0; c < n_idle; c++) begin
        @(negedge clk);
        chk(idle_start == (c == 0), "idle_start only in first idle cycle");
        chk(32'(elapsed) == c, "elapsed count");
        chk(!idle_end, "no idle_end while idle");
        @(posedge clk);
      end
    end
    chk(periods == 299, "all periods reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
