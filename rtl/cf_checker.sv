// cf_checker: the control-flow checker of one core.
//
// Each core has one checker. It takes the PC events decoded from that
// core's trace and runs the two checks of the observer side by side:
//   * pc_range_checker - the PC must lie in one of the allowed ranges where
//     the application code is stored; otherwise `cf_error` (reset request);
//   * pc_watchdog      - the configured PC must reappear within the
//     configured number of cycles; otherwise `hang`.
// It also keeps the last decoded PC for the status registers.
//
// Timing: both flags rise one cycle after the PC event that causes them (the
// watchdog one cycle after the count reaches the timeout).
//
// The split into one checker per core and the two checks follow the
// described observer; keeping the last PC is this design's addition.
module cf_checker
  import observer_pkg::*;
#(
  parameter int unsigned NUM_RANGES = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  range_chk_en,
  input  logic                  wd_en,
  input  logic                  clear,
  input  pc_range_t             ranges    [NUM_RANGES],
  input  logic [NUM_RANGES-1:0] range_en,
  input  pc_t                   wd_pc,
  input  logic [31:0]           wd_timeout,
  input  pc_event_t             ev,
  output logic                  cf_error,
  output logic                  hang,
  output logic                  violation,   // pulse
  output logic                  wd_reload,   // pulse
  output logic                  wd_expired,  // pulse
  output pc_t                   bad_pc,
  output pc_t                   last_pc
);

  pc_range_checker #(.NUM_RANGES(NUM_RANGES)) u_range (
    .clk, .rst_n,
    .enable    (range_chk_en),
    .clear,
    .ranges,
    .range_en,
    .ev,
    .violation,
    .error     (cf_error),
    .bad_pc
  );

  pc_watchdog #(.CNT_W(32)) u_wd (
    .clk, .rst_n,
    .enable  (wd_en),
    .clear,
    .wd_pc,
    .timeout (wd_timeout),
    .ev,
    .reload  (wd_reload),
    .expired (wd_expired),
    .hang
  );

  always_ff @(posedge clk) begin
    if (!rst_n)        last_pc <= '0;
    else if (ev.valid) last_pc <= ev.pc;
  end

endmodule
