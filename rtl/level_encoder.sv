// level_encoder: maps an idle period length in cycles to its level.
//
// The level is 1 plus the number of level lower bounds x_1..x_(NLEV-1) that the length
// reaches (psp_pkg::level_lower), so a length in [x_(i-1), x_i - 1] gives level i and any
// length from x_(NLEV-1) up gives the top level NLEV. With SRT = 3691: 0..3690 is level 1,
// 3691..7381 level 2, 7382..14762 level 3, and so on. The ranges follow the document;
// saturating at the top level is this design's choice. The bounds are constants worked
// out at elaboration, so the circuit is NLEV-1 comparators and an adder.
//
// Timing: purely combinational.
module level_encoder
  import psp_pkg::*;
#(
  parameter int unsigned CNT_W = 24,
  parameter int unsigned SRT   = 3691,
  parameter int unsigned NLEV  = 7
) (
  input  logic [CNT_W-1:0] len,
  output level_t           level
);

  always_comb begin
    level = level_t'(1);
    for (int unsigned i = 2; i <= NLEV; i++) begin
      if (longint'(len) >= longint'(level_lower(64'(SRT), i)))
        level = level_t'(i);
    end
  end

endmodule
