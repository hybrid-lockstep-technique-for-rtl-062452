// trace_deformatter: splits the shared trace port stream back into sources.
//
// Both cores' trace macrocells feed one trace port through a funnel, which
// packs their bytes into 16-byte frames and marks where the source changes
// with ID bytes. This block undoes that. It takes the port as 32-bit words
// (frame byte 0 in bits 7:0 of the first word), waits for the frame
// synchronisation word 0x7FFFFFFF, and then collects four words per frame.
// A frame synchronisation word seen where a frame would start is dropped.
//
// Frame layout (bytes 0..15): odd bytes 1..13 are always data. An even byte
// 2k (k = 0..7) is an ID change when its bit 0 is 1 (new ID in bits 7:1),
// otherwise data whose bit 0 is carried in bit k of byte 15, the auxiliary
// byte. For an ID change that same auxiliary bit says when the ID applies:
// 0 - from the next data byte on, 1 - after the next data byte.
//
// Timing: words are accepted one per cycle (`tw_ready` high) while a frame
// is being collected. The 15 payload positions are then walked one per
// cycle, with `tw_ready` low, so a frame takes 4 + 15 cycles. A data byte at
// position p appears on `out` p+2 cycles after the frame's last word is
// accepted. `out.valid` is a one-cycle strobe; there is no back-pressure.
//
// The frame format follows the ARM trace formatter the described observer
// is attached to; the word width, the byte order and the one-byte-per-cycle
// walk are this design's choices.
module trace_deformatter
  import observer_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] tw_data,
  input  logic        tw_valid,
  output logic        tw_ready,
  output trace_byte_t out,
  output logic        synced,
  output logic        fsync_seen,  // pulse: frame sync word consumed
  output logic        id_change    // pulse: ID byte processed
);

  typedef enum logic { COLLECT, UNPACK } state_t;

  state_t      state;
  logic [1:0]  word_idx;
  logic [3:0]  pos;
  logic [31:0] frame [4];
  trace_id_t   cur_id, pend_id;
  logic        pend_valid;

  logic [7:0]  fbyte, aux;
  logic        aux_bit;

  always_comb begin
    fbyte   = frame[pos[3:2]][8*pos[1:0] +: 8];
    aux     = frame[3][31:24];
    aux_bit = aux[pos[3:1]];
  end

  assign tw_ready = (state == COLLECT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= COLLECT;
      word_idx   <= '0;
      pos        <= '0;
      synced     <= 1'b0;
      cur_id     <= '0;
      pend_id    <= '0;
      pend_valid <= 1'b0;
      out        <= '0;
      fsync_seen <= 1'b0;
      id_change  <= 1'b0;
      for (int i = 0; i < 4; i++) frame[i] <= '0;
    end else begin
      out.valid  <= 1'b0;
      fsync_seen <= 1'b0;
      id_change  <= 1'b0;
      unique case (state)
        COLLECT: if (tw_valid) begin
          if (word_idx == 2'd0 && tw_data == FSYNC_WORD) begin
            synced     <= 1'b1;
            fsync_seen <= 1'b1;
          end else if (synced) begin
            frame[word_idx] <= tw_data;
            word_idx        <= word_idx + 2'd1;
            if (word_idx == 2'd3) begin
              state <= UNPACK;
              pos   <= '0;
            end
          end
        end
        UNPACK: begin
          if (!pos[0] && fbyte[0]) begin
            // ID change
            id_change <= 1'b1;
            if (!aux_bit) begin
              cur_id     <= fbyte[7:1];
              pend_valid <= 1'b0;
            end else begin
              if (pend_valid) cur_id <= pend_id;
              pend_id    <= fbyte[7:1];
              pend_valid <= 1'b1;
            end
          end else begin
            out.valid <= 1'b1;
            out.id    <= cur_id;
            out.data  <= pos[0] ? fbyte : {fbyte[7:1], aux_bit};
            if (pend_valid) begin
              cur_id     <= pend_id;
              pend_valid <= 1'b0;
            end
          end
          if (pos == 4'd14) begin
            state    <= COLLECT;
            word_idx <= '0;
          end
          pos <= pos + 4'd1;
        end
        default: state <= COLLECT;
      endcase
    end
  end

  // A word offered and not taken must be held until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) tw_valid && !tw_ready |=> tw_valid && $stable(tw_data);
  endproperty
  a_hold: assert property (p_hold) else $error("trace word changed while stalled");

endmodule
