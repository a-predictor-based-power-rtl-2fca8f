// tb_level_decoder: checks that every level decodes to the lower bound of its range at
// the default SRT = 3691 (expected values written out by hand), and at a small SRT = 10
// (bounds 0, 10, 20, 39, 77, 153, 305).
module tb_level_decoder;
  import psp_pkg::*;

  localparam int unsigned CNT_W = 24;
  localparam int unsigned EXP_DEF [8] = '{0, 0, 3691, 7382, 14763, 29525, 59049, 118097};
  localparam int unsigned EXP_SML [8] = '{0, 0, 10, 20, 39, 77, 153, 305};

  level_t           level;
  logic [CNT_W-1:0] len_def, len_sml;
  int checks = 0, failures = 0;

  level_decoder                            dut_def (.level, .len(len_def));
  level_decoder #(.CNT_W(CNT_W), .SRT(10)) dut_sml (.level, .len(len_sml));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 1; l <= 7; l++) begin
      level = level_t'(l);
      #1;
      checks += 2;
      if (32'(len_def) != EXP_DEF[l]) begin
        failures++; $display("FAIL level=%0d len=%0d expected=%0d", l, len_def, EXP_DEF[l]);
      end
      if (32'(len_sml) != EXP_SML[l]) begin
        failures++; $display("FAIL small level=%0d len=%0d expected=%0d", l, len_sml, EXP_SML[l]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
