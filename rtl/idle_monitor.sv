// idle_monitor: measures the idle periods seen at the memory controller's arbiter bus.
//
// An idle period starts in the cycle after the last transaction ends (bus_idle rises) and
// ends when the first request of the next busy period arrives (bus_idle falls). The
// monitor counts the idle cycles in `elapsed` (0 in the first idle cycle, saturating at
// all ones) and, in the cycle bus_idle falls, pulses `idle_end` with the finished
// period's length in `idle_len`. `idle_start` pulses in the first idle cycle. Taking the
// idle period as the time between the end of the last and the start of the first
// transaction follows the document; the saturating CNT_W-bit counter is this design's
// choice.
//
// Timing: idle_start and idle_end are combinational from bus_idle and the registered
// previous value; elapsed and idle_len are registered counts.
module idle_monitor #(
  parameter int unsigned CNT_W = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bus_idle,
  output logic             idle_start,
  output logic             idle_end,
  output logic [CNT_W-1:0] elapsed,    // idle cycles so far in the current idle period
  output logic [CNT_W-1:0] idle_len    // length of the period that ends (valid with idle_end)
);

  logic             idle_q;
  logic [CNT_W-1:0] cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idle_q <= 1'b0;
      cnt_q  <= '0;
    end else begin
      idle_q <= bus_idle;
      if (!bus_idle)
        cnt_q <= '0;
      else if (cnt_q != '1)
        cnt_q <= cnt_q + 1'b1;
    end
  end

  assign idle_start = bus_idle && !idle_q;
  assign idle_end   = !bus_idle && idle_q;
  assign elapsed    = cnt_q;
  assign idle_len   = cnt_q;

endmodule
