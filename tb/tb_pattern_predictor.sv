// tb_pattern_predictor: loads histories into the predictor and compares its forecast
// with a model that computes the weighted mean with a real division and takes the
// floor. Also checks the latency HL-PL+2 from start to done, the no-match case, a
// short history, and hand-worked examples. HL = 50, PL = 2, W = 4.
module tb_pattern_predictor;
  import psp_pkg::*;

  localparam int unsigned HL = 50, PL = 2, W = 4;

  logic   clk = 0, rst_n = 0, start = 0;
  level_t hist [HL];
  logic [$clog2(HL+1)-1:0] count;
  logic   busy, done, matched;
  level_t level;
  int checks = 0, failures = 0;

  pattern_predictor dut (.*);

  always #5 clk = ~clk;

  // Model: forecast from hist[0..cnt-1], newest first.
  function automatic void model(input int cnt, output int lvl, output bit m);
    int sw = 0, swl = 0;
    for (int k = 1; k + PL <= cnt; k++) begin
      bit ok = 1;
      int wgt = 1;
      for (int i = 0; i < PL; i++) begin
        int d = int'(hist[k+i]) - int'(hist[i]);
        if (d < 0) d = -d;
        if (d > W / 2) ok = 0;
        else wgt += W / 2 - d;
      end
      if (ok) begin sw += wgt; swl += wgt * int'(hist[k-1]); end
    end
    m   = (sw != 0);
    lvl = m ? swl / sw : 1;
  endfunction

  task automatic run_and_check(int cnt, int exp_lvl = -1);
    int lat, mlvl;
    bit mm;
    // Inputs change at the falling edge, outputs are sampled at the falling edge; lat
    // counts cycles from the start cycle to the cycle in which done is high.
    @(negedge clk);
    count = ($clog2(HL+1))'(cnt);
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    model(cnt, mlvl, mm);
    checks += 3;
    if (lat != HL - PL + 2) begin failures++; $display("FAIL latency %0d", lat); end
    if (int'(level) != mlvl) begin
      failures++; $display("FAIL level %0d expected %0d (cnt=%0d)", level, mlvl, cnt);
    end
    if (matched != mm) begin failures++; $display("FAIL matched %0b", matched); end
    if (exp_lvl >= 0) begin
      checks++;
      if (int'(level) != exp_lvl) begin
        failures++; $display("FAIL hand example level %0d expected %0d", level, exp_lvl);
      end
    end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < HL; i++) hist[i] = level_t'(1);
    count = '0;
    start = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // Empty history: no match, level 1.
    run_and_check(0, 1);
    // Periodic history 1,1,5,1,1,5,... (newest first: hist[0]=1, hist[1]=1, hist[2]=5)
    // Reference (1,1). Windows (1,5) and (5,1) differ by 4 > 2: no match. Windows (1,1)
    // are followed by 5: forecast 5.
    for (int i = 0; i < HL; i++) hist[i] = level_t'((i % 3 == 2) ? 5 : 1);
    run_and_check(HL, 5);
    // Only three entries: newest 2,3 then 7. Window (3,7) vs (2,3): diff 1 and 4: none.
    hist[0] = 3'd2; hist[1] = 3'd3; hist[2] = 3'd7;
    run_and_check(3, 1);
    // Three entries 4,4,4 then 6: window k=1 (4,4) follows 4; k=2 (4,6): d=0,2 ok
    // weights 5 and 3, followers 4 and 4: forecast 4.
    hist[0] = 3'd4; hist[1] = 3'd4; hist[2] = 3'd4; hist[3] = 3'd6;
    run_and_check(4, 4);
    // Random histories and counts.
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < HL; i++) hist[i] = level_t'($urandom_range(1, 7));
      run_and_check((n % 5 == 0) ? $urandom_range(0, HL) : HL);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
