// observer_regs: configuration and status registers of the observer.
//
// The user configures, per core, the allowed code ranges, the watchdog
// reload PC and the watchdog time, and selects the trace source ID of each
// core. A simple word-addressed register port is used: a write takes effect
// at the clock edge where `cfg_we` is high; reads are combinational.
//
// Register map (word addresses, see observer_pkg):
//   0x00 CTRL      [0] range check enable, [1] watchdog enable,
//                  [2] write 1: clear the sticky error flags (self-clearing)
//   0x01 STATUS    RO [1:0] cf_error, [3:2] hang, [5:4] decoder in sync,
//                  [6] trace port frame-synchronised
//   0x02 TRACE_ID  [6:0] trace ID of core 0, [14:8] of core 1 (0 = none)
//   0x04+c         watchdog reload PC of core c
//   0x06+c         watchdog timeout of core c, in clock cycles
//   0x08+c         range enable bits of core c
//   0x0A+c         RO last decoded PC of core c
//   0x0C+c         RO PC of the first range violation of core c
//   0x10+16c+2r    low bound of range r of core c; 0x11+16c+2r high bound
// All registers reset to 0: checking is off until software turns it on.
// The map holds two cores and up to eight ranges per core.
//
// That ranges, reload PC and time are user-configurable follows the
// described observer; the register port and map are this design's own.
module observer_regs
  import observer_pkg::*;
#(
  parameter int unsigned NUM_CORES  = 2,
  parameter int unsigned NUM_RANGES = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we,
  input  logic [CFG_AW-1:0]     cfg_addr,
  input  logic [31:0]           cfg_wdata,
  output logic [31:0]           cfg_rdata,
  // configuration out
  output logic                  range_chk_en,
  output logic                  wd_en,
  output logic                  clear,
  output trace_id_t             trace_id   [NUM_CORES],
  output pc_t                   wd_pc      [NUM_CORES],
  output logic [31:0]           wd_timeout [NUM_CORES],
  output logic [NUM_RANGES-1:0] range_en   [NUM_CORES],
  output pc_range_t             ranges     [NUM_CORES][NUM_RANGES],
  // status in
  input  logic [NUM_CORES-1:0]  cf_error,
  input  logic [NUM_CORES-1:0]  hang,
  input  logic [NUM_CORES-1:0]  in_sync,
  input  logic                  frame_synced,
  input  pc_t                   last_pc    [NUM_CORES],
  input  pc_t                   bad_pc     [NUM_CORES]
);

  if (NUM_CORES > 2 || NUM_RANGES > 8) begin : g_map_check
    $error("observer_regs: register map holds at most 2 cores and 8 ranges");
  end

  function automatic logic [CFG_AW-1:0] lo_addr(int unsigned c, int unsigned r);
    return REG_RANGE0 + CFG_AW'(16 * c + 2 * r);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      range_chk_en <= 1'b0;
      wd_en        <= 1'b0;
      clear        <= 1'b0;
      for (int unsigned c = 0; c < NUM_CORES; c++) begin
        trace_id[c]   <= '0;
        wd_pc[c]      <= '0;
        wd_timeout[c] <= '0;
        range_en[c]   <= '0;
        for (int unsigned r = 0; r < NUM_RANGES; r++) ranges[c][r] <= '0;
      end
    end else begin
      clear <= 1'b0;
      if (cfg_we) begin
        if (cfg_addr == REG_CTRL) begin
          range_chk_en <= cfg_wdata[0];
          wd_en        <= cfg_wdata[1];
          clear        <= cfg_wdata[2];
        end
        for (int unsigned c = 0; c < NUM_CORES; c++) begin
          if (cfg_addr == REG_TRACE_ID) trace_id[c] <= cfg_wdata[8*c +: ID_W];
          if (cfg_addr == REG_WD_PC0 + CFG_AW'(c))   wd_pc[c]      <= cfg_wdata;
          if (cfg_addr == REG_WD_TO0 + CFG_AW'(c))   wd_timeout[c] <= cfg_wdata;
          if (cfg_addr == REG_RANGE_EN + CFG_AW'(c)) range_en[c]   <= cfg_wdata[NUM_RANGES-1:0];
          for (int unsigned r = 0; r < NUM_RANGES; r++) begin
            if (cfg_addr == lo_addr(c, r))            ranges[c][r].lo <= cfg_wdata;
            if (cfg_addr == lo_addr(c, r) + 8'd1)     ranges[c][r].hi <= cfg_wdata;
          end
        end
      end
    end
  end

  always_comb begin
    cfg_rdata = '0;
    if (cfg_addr == REG_CTRL)   cfg_rdata = {30'd0, wd_en, range_chk_en};
    if (cfg_addr == REG_STATUS) cfg_rdata = 32'({frame_synced, in_sync, hang, cf_error});
    for (int unsigned c = 0; c < NUM_CORES; c++) begin
      if (cfg_addr == REG_TRACE_ID)               cfg_rdata[8*c +: ID_W] = trace_id[c];
      if (cfg_addr == REG_WD_PC0 + CFG_AW'(c))    cfg_rdata = wd_pc[c];
      if (cfg_addr == REG_WD_TO0 + CFG_AW'(c))    cfg_rdata = wd_timeout[c];
      if (cfg_addr == REG_RANGE_EN + CFG_AW'(c))  cfg_rdata = 32'(range_en[c]);
      if (cfg_addr == REG_LAST_PC0 + CFG_AW'(c))  cfg_rdata = last_pc[c];
      if (cfg_addr == REG_BAD_PC0 + CFG_AW'(c))   cfg_rdata = bad_pc[c];
      for (int unsigned r = 0; r < NUM_RANGES; r++) begin
        if (cfg_addr == lo_addr(c, r))        cfg_rdata = ranges[c][r].lo;
        if (cfg_addr == lo_addr(c, r) + 8'd1) cfg_rdata = ranges[c][r].hi;
      end
    end
  end

endmodule
