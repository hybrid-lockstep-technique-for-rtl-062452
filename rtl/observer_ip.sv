// observer_ip: hardware control-flow observer for a dual-core lockstep.
//
// In the hybrid lockstep scheme the two cores run the same program as two
// software threads that check each other's data; control-flow errors (a
// core jumping outside the program, or hanging) are caught by this block,
// which sits on the processor's trace port and never disturbs execution.
//
// Structure:
//   trace_decoder  - deformats the shared trace port and rebuilds the PC of
//                    every core from its program-flow packets;
//   cf_checker x N - one per core: PC inside the allowed code ranges, and a
//                    watchdog reloaded whenever a chosen PC shows up;
//   observer_regs  - user configuration and status.
// `cf_error[c]` is set when core c's PC leaves the allowed ranges and is
// ORed into `reset_req`, the system reset request. `hang[c]` is set when the
// watchdog of core c runs out. Both are sticky until cleared through CTRL or
// by reset.
//
// Timing: a branch packet whose last byte sits at frame position p raises
// `cf_error` p+4 cycles after the frame's last trace word is accepted, at
// most 18 cycles, within the bound of 30 cycles the observer is meant to
// meet.
//
// The blocks, the two checks, the reset request and the latency bound
// follow the described observer; the trace word width, the register map and
// the packet subset are this design's choices (see each block).
module observer_ip
  import observer_pkg::*;
#(
  parameter int unsigned NUM_CORES  = 2,
  parameter int unsigned NUM_RANGES = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // trace port (formatted frames)
  input  logic [31:0]          tw_data,
  input  logic                 tw_valid,
  output logic                 tw_ready,
  // configuration port
  input  logic                 cfg_we,
  input  logic [CFG_AW-1:0]    cfg_addr,
  input  logic [31:0]          cfg_wdata,
  output logic [31:0]          cfg_rdata,
  // results
  output logic [NUM_CORES-1:0] cf_error,
  output logic [NUM_CORES-1:0] hang,
  output logic                 reset_req
);

  logic                  range_chk_en, wd_en, clear;
  trace_id_t             trace_id   [NUM_CORES];
  pc_t                   wd_pc      [NUM_CORES];
  logic [31:0]           wd_timeout [NUM_CORES];
  logic [NUM_RANGES-1:0] range_en   [NUM_CORES];
  pc_range_t             ranges     [NUM_CORES][NUM_RANGES];
  pc_t                   last_pc    [NUM_CORES];
  pc_t                   bad_pc     [NUM_CORES];
  pc_event_t             ev         [NUM_CORES];

  logic                  frame_synced, fsync_seen, id_change;
  logic [NUM_CORES-1:0]  in_sync, async_seen, isync_seen, branch_seen, atom_seen, proto_err;
  logic [NUM_CORES-1:0]  violation, wd_reload, wd_expired;

  trace_decoder #(.NUM_CORES(NUM_CORES)) u_dec (
    .clk, .rst_n,
    .tw_data, .tw_valid, .tw_ready,
    .trace_id,
    .ev,
    .frame_synced, .fsync_seen, .id_change,
    .in_sync, .async_seen, .isync_seen, .branch_seen, .atom_seen, .proto_err
  );

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_chk
    cf_checker #(.NUM_RANGES(NUM_RANGES)) u_chk (
      .clk, .rst_n,
      .range_chk_en,
      .wd_en,
      .clear,
      .ranges     (ranges[c]),
      .range_en   (range_en[c]),
      .wd_pc      (wd_pc[c]),
      .wd_timeout (wd_timeout[c]),
      .ev         (ev[c]),
      .cf_error   (cf_error[c]),
      .hang       (hang[c]),
      .violation  (violation[c]),
      .wd_reload  (wd_reload[c]),
      .wd_expired (wd_expired[c]),
      .bad_pc     (bad_pc[c]),
      .last_pc    (last_pc[c])
    );
  end

  observer_regs #(.NUM_CORES(NUM_CORES), .NUM_RANGES(NUM_RANGES)) u_regs (
    .clk, .rst_n,
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .range_chk_en, .wd_en, .clear,
    .trace_id, .wd_pc, .wd_timeout, .range_en, .ranges,
    .cf_error, .hang, .in_sync, .frame_synced, .last_pc, .bad_pc
  );

  assign reset_req = |cf_error;

endmodule
