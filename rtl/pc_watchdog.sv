// pc_watchdog: watchdog reloaded by the trace instead of by software.
//
// A counter counts clock cycles since the configured PC (`wd_pc`, typically
// the first instruction of the application's main loop) was last seen in the
// decoded trace of the core. Each PC event equal to `wd_pc` reloads it. When
// the count reaches `timeout` the core is taken to be hung: `expired` pulses
// once and the sticky `hang` flag is set until `clear` or reset. The counter
// then holds; a later reload restarts it, but `hang` stays set.
//
// Timing: a matching PC event in cycle t makes the count 0 in cycle t+1.
// With no matching event after a reload, `hang` rises exactly `timeout`
// cycles after the reloaded count of 0 is visible. While `enable` is low the
// counter is held at 0.
//
// Reloading from the trace, the configurable PC and the configurable time
// follow the described observer. Counting in IP clock cycles, the 32-bit
// counter and the sticky flag are this design's choices.
module pc_watchdog
  import observer_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             clear,
  input  pc_t              wd_pc,
  input  logic [CNT_W-1:0] timeout,
  input  pc_event_t        ev,
  output logic             reload,    // one-cycle pulse: wd_pc seen
  output logic             expired,   // one-cycle pulse: timeout reached
  output logic             hang       // sticky
);

  logic [CNT_W-1:0] count;
  logic             running;   // counter has not yet reached the timeout
  logic             hit;

  assign hit = ev.valid && (ev.pc == wd_pc);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count   <= '0;
      running <= 1'b1;
      reload  <= 1'b0;
      expired <= 1'b0;
      hang    <= 1'b0;
    end else begin
      reload  <= enable && hit;
      expired <= 1'b0;
      if (!enable || hit) begin
        count   <= '0;
        running <= 1'b1;
      end else if (running) begin
        if (count + 1'b1 >= timeout) begin
          count   <= count + 1'b1;
          running <= 1'b0;
          expired <= 1'b1;
        end else begin
          count <= count + 1'b1;
        end
      end
      if (clear)                                          hang <= 1'b0;
      else if (enable && !hit && running && count + 1'b1 >= timeout) hang <= 1'b1;
    end
  end

endmodule
