// pft_decoder: recovers one core's PC from its program-flow trace bytes.
//
// The trace macrocell of each core sends compressed program-flow packets.
// With branch broadcasting enabled every taken branch produces a branch
// address packet, so the PC after each taken branch, and at every
// instruction synchronisation point, can be rebuilt without the program
// image; between those points the core executes sequentially. This decoder
// handles the following packets of the ARM program-flow trace protocol:
//   A-sync      five or more 0x00 bytes then 0x80: (re)gains packet alignment
//   I-sync      0x08, four address bytes (bit 0 of the first is the Thumb
//               bit, ignored), one information byte, CTXID_BYTES context
//               ID bytes: gives the full PC
//   branch      header bit 0 = 1. ARM-state address compression: byte 0
//               bits 6:1 = PC[7:2], bytes 1..3 bits 6:0 = PC[14:8],
//               PC[21:15], PC[28:22], byte 4 bits 2:0 = PC[31:29]; bit 7 of
//               bytes 0..3 says another byte follows. Bits not sent keep
//               their previous value. Bit 6 of byte 4 announces exception
//               bytes (bit 7 = another follows), which are skipped.
//   atom        header bit 7 = 1, bit 0 = 0: counted, carries no address
//   trigger 0x0C, ignore 0x66, exception return 0x76: single byte
//   context ID  0x6E followed by CTXID_BYTES bytes: skipped
// Any other header is a protocol error: the decoder drops out of sync and
// waits for the next A-sync. Until the first I-sync (or a full five-byte
// branch address) the PC is unknown and no PC event is produced.
//
// Timing: one byte per cycle at most. The PC event is registered: it appears
// the cycle after the byte that completes the I-sync information byte or
// the branch address.
//
// Using the PC values in the trace, and assuming sequential execution
// where there is no branch information, follows the described observer.
// The packet subset, ARM-state-only branch decoding and the context ID size
// are this design's choices; cycle-accurate mode and timestamps are not
// supported.
module pft_decoder
  import observer_pkg::*;
#(
  parameter int unsigned CTXID_BYTES = 0   // 0..4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       byte_valid,
  input  logic [7:0] byte_data,
  output pc_event_t  ev,
  output logic       in_sync,
  output logic       async_seen,   // pulses
  output logic       isync_seen,
  output logic       branch_seen,
  output logic       atom_seen,
  output logic       proto_err
);

  typedef enum logic [2:0] { S_ASYNC, S_HDR, S_ISYNC, S_BRANCH, S_EXC, S_CTXID } state_t;

  state_t     state;
  logic [2:0] zcnt;       // zeros seen in an A-sync (saturating)
  logic [2:0] idx;        // byte index inside a packet
  pc_t        addr;       // last known PC
  logic       addr_valid;
  pc_t        work;       // address being assembled

  logic [7:0] b;
  assign b = byte_data;

  // Address after merging branch byte `idx` into `work`.
  function automatic pc_t merge_branch(pc_t w, logic [2:0] i, logic [7:0] d);
    pc_t r = w;
    unique case (i)
      3'd0: r[7:2]   = d[6:1];
      3'd1: r[14:8]  = d[6:0];
      3'd2: r[21:15] = d[6:0];
      3'd3: r[28:22] = d[6:0];
      default: r[31:29] = d[2:0];
    endcase
    r[1:0] = 2'b00;
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_ASYNC;
      zcnt        <= '0;
      idx         <= '0;
      addr        <= '0;
      addr_valid  <= 1'b0;
      work        <= '0;
      in_sync     <= 1'b0;
      ev          <= '0;
      async_seen  <= 1'b0;
      isync_seen  <= 1'b0;
      branch_seen <= 1'b0;
      atom_seen   <= 1'b0;
      proto_err   <= 1'b0;
    end else begin
      ev.valid    <= 1'b0;
      async_seen  <= 1'b0;
      isync_seen  <= 1'b0;
      branch_seen <= 1'b0;
      atom_seen   <= 1'b0;
      proto_err   <= 1'b0;
      if (byte_valid) begin
        unique case (state)
          S_ASYNC: begin
            if (b == PFT_ASYNC_ZERO) begin
              if (zcnt != 3'd7) zcnt <= zcnt + 3'd1;
            end else if (b == PFT_ASYNC_END && zcnt >= 3'(PFT_ASYNC_MIN_ZEROS)) begin
              state      <= S_HDR;
              in_sync    <= 1'b1;
              async_seen <= 1'b1;
              zcnt       <= '0;
            end else begin
              zcnt    <= '0;
              if (in_sync) proto_err <= 1'b1;
              in_sync <= 1'b0;
            end
          end
          S_HDR: begin
            idx <= 3'd1;
            if (b[0]) begin
              work <= merge_branch(addr, 3'd0, b);
              if (b[7]) state <= S_BRANCH;
              else if (addr_valid) begin
                ev          <= '{valid: 1'b1, isync: 1'b0, pc: merge_branch(addr, 3'd0, b)};
                addr        <= merge_branch(addr, 3'd0, b);
                branch_seen <= 1'b1;
              end
            end else if (b == PFT_ASYNC_ZERO) begin
              state <= S_ASYNC;
              zcnt  <= 3'd1;
            end else if (b == PFT_ISYNC) begin
              state <= S_ISYNC;
              idx   <= 3'd0;
            end else if (b[7]) begin
              atom_seen <= 1'b1;
            end else if (b == PFT_CONTEXTID) begin
              idx <= 3'd0;
              if (CTXID_BYTES != 0) state <= S_CTXID;
            end else if (b == PFT_TRIGGER || b == PFT_IGNORE || b == PFT_EXC_RETURN) begin
              // single-byte packets: nothing to do
            end else begin
              proto_err <= 1'b1;
              in_sync   <= 1'b0;
              state     <= S_ASYNC;
              zcnt      <= '0;
            end
          end
          S_ISYNC: begin
            idx <= idx + 3'd1;
            unique case (idx)
              3'd0: work[7:0] <= {b[7:1], 1'b0};  // bit 0: Thumb bit, not used
              3'd1: work[15:8]  <= b;
              3'd2: work[23:16] <= b;
              3'd3: work[31:24] <= b;
              default: begin
                // information byte: the PC is complete
                ev         <= '{valid: 1'b1, isync: 1'b1, pc: work};
                addr       <= work;
                addr_valid <= 1'b1;
                isync_seen <= 1'b1;
                idx        <= '0;
                state      <= (CTXID_BYTES != 0) ? S_CTXID : S_HDR;
              end
            endcase
          end
          S_BRANCH: begin
            work <= merge_branch(work, idx, b);
            idx  <= idx + 3'd1;
            if (idx != 3'd4 && b[7]) begin
              // more address bytes follow
            end else begin
              if (addr_valid || idx == 3'd4) begin
                ev          <= '{valid: 1'b1, isync: 1'b0, pc: merge_branch(work, idx, b)};
                branch_seen <= 1'b1;
              end
              addr <= merge_branch(work, idx, b);
              if (idx == 3'd4) addr_valid <= 1'b1;
              state <= (idx == 3'd4 && b[6]) ? S_EXC : S_HDR;
            end
          end
          S_EXC: begin
            if (!b[7]) state <= S_HDR;
          end
          S_CTXID: begin
            idx <= idx + 3'd1;
            if (idx == 3'(CTXID_BYTES - 1)) state <= S_HDR;
          end
          default: state <= S_ASYNC;
        endcase
      end
    end
  end

endmodule
