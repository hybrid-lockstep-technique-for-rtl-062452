// pc_range_checker: control-flow check of one core's PC against allowed ranges.
//
// Every PC event recovered from the trace is compared, in parallel, with
// NUM_RANGES user-configured address ranges (inclusive lo..hi), each with its
// own enable bit. A PC that lies in no enabled range means the core is
// executing outside the application code: the checker pulses `violation`
// and sets the sticky `error` flag, which is the reset request for the
// system. `error` stays set until `clear` or reset.
//
// Timing: one register stage. A PC event in cycle t gives `violation` and
// `error` in cycle t+1. While `enable` is low no event is checked.
//
// The check itself (PC against a set of user ranges, signal to trigger a
// system reset) follows the described observer. The number of ranges,
// inclusive bounds, per-range enables and the sticky flag with a clear input
// are this design's choices.
module pc_range_checker
  import observer_pkg::*;
#(
  parameter int unsigned NUM_RANGES = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,
  input  logic                  clear,
  input  pc_range_t             ranges    [NUM_RANGES],
  input  logic [NUM_RANGES-1:0] range_en,
  input  pc_event_t             ev,
  output logic                  violation,   // one-cycle pulse
  output logic                  error,       // sticky
  output pc_t                   bad_pc       // PC of the first violation
);

  logic [NUM_RANGES-1:0] hit;
  logic                  outside;

  always_comb begin
    for (int unsigned r = 0; r < NUM_RANGES; r++)
      hit[r] = range_en[r] && (ev.pc >= ranges[r].lo) && (ev.pc <= ranges[r].hi);
    outside = enable && ev.valid && (hit == '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      violation <= 1'b0;
      error     <= 1'b0;
      bad_pc    <= '0;
    end else begin
      violation <= outside;
      if (outside && !error) bad_pc <= ev.pc;
      if (clear)        error <= 1'b0;
      else if (outside) error <= 1'b1;
    end
  end

endmodule
