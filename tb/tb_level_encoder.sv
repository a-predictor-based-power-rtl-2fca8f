// tb_level_encoder: checks the idle-length to level mapping at the default SRT = 3691.
// The expected bounds are written out by hand from the level rule (level 1 up to SRT-1,
// level 2 up to 2*SRT-1, each further upper bound doubled): 0, 3691, 7382, 14763, 29525,
// 59049, 118097. Every bound, its neighbours and random lengths are checked, and the
// package's SRT equation is checked against the datasheet currents.
module tb_level_encoder;
  import psp_pkg::*;

  localparam int unsigned CNT_W = 24;
  localparam longint unsigned LB [8] = '{0, 0, 3691, 7382, 14763, 29525, 59049, 118097};

  logic [CNT_W-1:0] len;
  level_t           level;
  int checks = 0, failures = 0;

  level_encoder dut (.len, .level);

  function automatic int unsigned ref_level(longint unsigned l);
    int unsigned r = 1;
    for (int i = 2; i <= 7; i++) if (l >= LB[i]) r = i;
    return r;
  endfunction

  task automatic check_len(longint unsigned l);
    len = CNT_W'(l);
    #1;
    checks++;
    if (32'(level) != ref_level(l)) begin
      failures++;
      $display("FAIL len=%0d level=%0d expected=%0d", l, level, ref_level(l));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the document's own examples
    check_len(0); check_len(3690); check_len(3691); check_len(7381);
    check_len(7382); check_len(14762); check_len(14763);
    for (int i = 2; i <= 7; i++) begin
      check_len(LB[i] - 1); check_len(LB[i]); check_len(LB[i] + 1);
    end
    check_len(236192); check_len((1 << CNT_W) - 1);
    for (int i = 0; i < 2000; i++) check_len($urandom_range(0, 300000));
    // package functions
    checks++;
    if (srt_from_currents(50, 12, 6, 512, 10) != 3691) begin
      failures++; $display("FAIL srt_from_currents");
    end
    checks++;
    if (level_lower(3691, 4) != 14763) begin
      failures++; $display("FAIL level_lower");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
