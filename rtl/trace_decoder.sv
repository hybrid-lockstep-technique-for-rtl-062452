// trace_decoder: from the shared trace port to one PC stream per core.
//
// The trace port carries the interleaved trace of all cores. The
// trace_deformatter splits it into bytes tagged with their source ID; each
// byte whose ID equals `trace_id[c]` is passed to the program-flow decoder
// of core c, which rebuilds that core's PC. Bytes of other sources (null ID
// 0, other trace sources) are dropped.
//
// Timing: the routing is combinational, so a core's PC event appears the
// cycle after the deformatter presents the byte that completes the packet;
// see trace_deformatter for the frame timing.
//
// One decoder for the trace of all cores, feeding one checker per core,
// follows the described observer; the ID-based routing is how this design
// separates the cores.
module trace_decoder
  import observer_pkg::*;
#(
  parameter int unsigned NUM_CORES   = 2,
  parameter int unsigned CTXID_BYTES = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] tw_data,
  input  logic        tw_valid,
  output logic        tw_ready,
  input  trace_id_t   trace_id   [NUM_CORES],
  output pc_event_t   ev         [NUM_CORES],
  output logic        frame_synced,
  output logic        fsync_seen,
  output logic        id_change,
  output logic [NUM_CORES-1:0] in_sync,
  output logic [NUM_CORES-1:0] async_seen,
  output logic [NUM_CORES-1:0] isync_seen,
  output logic [NUM_CORES-1:0] branch_seen,
  output logic [NUM_CORES-1:0] atom_seen,
  output logic [NUM_CORES-1:0] proto_err
);

  trace_byte_t tb_byte;

  trace_deformatter u_deformat (
    .clk, .rst_n,
    .tw_data, .tw_valid, .tw_ready,
    .out        (tb_byte),
    .synced     (frame_synced),
    .fsync_seen,
    .id_change
  );

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    logic sel;
    assign sel = tb_byte.valid && (tb_byte.id == trace_id[c]) && (trace_id[c] != '0);

    pft_decoder #(.CTXID_BYTES(CTXID_BYTES)) u_pft (
      .clk, .rst_n,
      .byte_valid  (sel),
      .byte_data   (tb_byte.data),
      .ev          (ev[c]),
      .in_sync     (in_sync[c]),
      .async_seen  (async_seen[c]),
      .isync_seen  (isync_seen[c]),
      .branch_seen (branch_seen[c]),
      .atom_seen   (atom_seen[c]),
      .proto_err   (proto_err[c])
    );
  end

endmodule
