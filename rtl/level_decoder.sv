// level_decoder: turns a forecast level into a conservative idle length in cycles.
//
// A forecast of level l_i stands for every length in [x_(i-1), x_i - 1]; the decoder
// returns the lower bound x_(i-1) (psp_pkg::level_lower), so that a correct level never
// overstates the idle period and the DRAM is powered up before the next request. Level 1
// decodes to 0 (self-refresh not worth it). Using the lower bound follows the document.
// Levels above NLEV, which the encoder never produces, decode like NLEV.
//
// Timing: purely combinational, a constant table of NLEV entries.
module level_decoder
  import psp_pkg::*;
#(
  parameter int unsigned CNT_W = 24,
  parameter int unsigned SRT   = 3691,
  parameter int unsigned NLEV  = 7
) (
  input  level_t           level,
  output logic [CNT_W-1:0] len
);

  always_comb begin
    len = '0;
    for (int unsigned i = 2; i <= NLEV; i++) begin
      if (32'(level) >= i)
        len = CNT_W'(level_lower(64'(SRT), i));
    end
  end

endmodule
