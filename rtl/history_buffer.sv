// history_buffer: the levels of the last HL idle periods, newest first.
//
// A shift register: entry 0 is the newest level y_n, entry HL-1 the oldest kept; the first
// PL entries are the reference pattern the predictor searches for. `count` says how many
// entries hold real history (it saturates at HL; older periods fall off the end).
//
// Two write operations:
//   commit    - the level of an idle period that has ended. If a temporary entry is
//               present it is overwritten in place and becomes permanent; otherwise the
//               level is shifted in.
//   temp_wr   - the level of the idle cycles elapsed so far in the current idle period,
//               written before an additional prediction inside that period. The first
//               temp_wr of a period shifts the level in and marks entry 0 temporary;
//               later ones overwrite it.
// commit takes priority if both are asserted. This temporary-entry scheme follows the
// document's description of multiple predictions per idle period; the exact write rules
// are this design's choice.
//
// Timing: writes take effect at the next clock edge; hist, count and temp are registers.
module history_buffer
  import psp_pkg::*;
#(
  parameter int unsigned HL = 50
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   commit,
  input  logic                   temp_wr,
  input  level_t                 wr_level,
  output level_t                 hist [HL],
  output logic [$clog2(HL+1)-1:0] count,
  output logic                   temp
);

  level_t                    hist_q [HL];
  logic [$clog2(HL+1)-1:0]   count_q;
  logic                      temp_q;

  logic do_write, do_shift;
  assign do_write = commit || temp_wr;
  assign do_shift = do_write && !temp_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < HL; i++) hist_q[i] <= level_t'(1);
      count_q <= '0;
      temp_q  <= 1'b0;
    end else if (do_write) begin
      if (do_shift) begin
        for (int i = HL - 1; i > 0; i--) hist_q[i] <= hist_q[i-1];
        if (count_q != ($clog2(HL+1))'(HL)) count_q <= count_q + 1'b1;
      end
      hist_q[0] <= wr_level;
      temp_q    <= !commit;
    end
  end

  assign hist  = hist_q;
  assign count = count_q;
  assign temp  = temp_q;

endmodule
