// observer_pkg: types and constants shared by the control-flow observer.
//
// The observer watches the program-flow trace of a dual-core processor and
// checks the program counter (PC) of every core. This package holds the PC
// type, the byte and PC-event records passed between the trace deformatter,
// the packet decoders and the checkers, the header codes of the supported
// program-flow trace packets and the configuration register map.
//
// The PC width (32 bits) and the number of cores (two) follow the dual-core
// 32-bit ARM target. The packet codes follow the ARM program-flow trace
// protocol as this design implements a subset of it; the register map is
// this design's own.
package observer_pkg;

  localparam int unsigned PC_W      = 32;
  localparam int unsigned ID_W      = 7;   // trace source ID width
  localparam int unsigned CFG_AW    = 8;   // register address width (word index)

  typedef logic [PC_W-1:0] pc_t;
  typedef logic [ID_W-1:0] trace_id_t;

  // One byte of trace after deformatting, tagged with its source ID.
  typedef struct packed {
    logic      valid;
    trace_id_t id;
    logic [7:0] data;
  } trace_byte_t;

  // A PC value recovered from the trace of one core.
  typedef struct packed {
    logic valid;
    logic isync;   // 1: from an instruction sync packet, 0: from a branch
    pc_t  pc;
  } pc_event_t;

  // One allowed address range, inclusive at both ends.
  typedef struct packed {
    pc_t lo;
    pc_t hi;
  } pc_range_t;

  // Program-flow trace packet headers handled by pft_decoder.
  localparam logic [7:0] PFT_ASYNC_ZERO = 8'h00;  // five or more, then 0x80
  localparam logic [7:0] PFT_ASYNC_END  = 8'h80;
  localparam logic [7:0] PFT_ISYNC      = 8'h08;
  localparam logic [7:0] PFT_TRIGGER    = 8'h0C;
  localparam logic [7:0] PFT_IGNORE     = 8'h66;
  localparam logic [7:0] PFT_CONTEXTID  = 8'h6E;
  localparam logic [7:0] PFT_EXC_RETURN = 8'h76;
  localparam int unsigned PFT_ASYNC_MIN_ZEROS = 5;

  // Frame synchronisation word of the formatted trace port.
  localparam logic [31:0] FSYNC_WORD = 32'h7FFF_FFFF;

  // Configuration register map (32-bit word addresses).
  localparam logic [CFG_AW-1:0] REG_CTRL     = 8'h00; // [0] range check en, [1] watchdog en, [2] clear errors (W1)
  localparam logic [CFG_AW-1:0] REG_STATUS   = 8'h01; // RO: [1:0] cf_error, [3:2] hang, [5:4] decoder in sync, [6] frame sync
  localparam logic [CFG_AW-1:0] REG_TRACE_ID = 8'h02; // [6:0] core0 ID, [14:8] core1 ID
  localparam logic [CFG_AW-1:0] REG_WD_PC0   = 8'h04; // watchdog reload PC, core 0 (core c at +c)
  localparam logic [CFG_AW-1:0] REG_WD_TO0   = 8'h06; // watchdog timeout in cycles, core 0 (core c at +c)
  localparam logic [CFG_AW-1:0] REG_RANGE_EN = 8'h08; // range enable bits, core c at +c
  localparam logic [CFG_AW-1:0] REG_LAST_PC0 = 8'h0A; // RO last decoded PC, core c at +c
  localparam logic [CFG_AW-1:0] REG_BAD_PC0  = 8'h0C; // RO first out-of-range PC, core c at +c
  localparam logic [CFG_AW-1:0] REG_RANGE0   = 8'h10; // core c, range r: lo at 0x10+16c+2r, hi at +1

endpackage
