// tb_trace_pkg: stimulus models for the observer testbenches.
//
// pft_encoder builds program-flow trace packets for one core the way a trace
// macrocell with branch broadcasting would: A-sync, I-sync with the full
// PC, branch address packets compressed against the previous address (only
// the low-order groups that changed are sent), atoms and other single-byte
// packets.
//
// trace_formatter is a behavioural model of the trace funnel and port
// formatter that merge the cores' byte streams: it packs bytes tagged with a
// source ID into 16-byte frames (ID bytes on even positions, auxiliary byte
// 15) and emits them as 32-bit words, byte 0 in bits 7:0, with frame
// synchronisation words in front. When there is no trace it pads with ID 0.
package tb_trace_pkg;

  typedef struct {
    logic [6:0] id;
    logic [7:0] data;
  } tagged_byte_t;

  class pft_encoder;
    logic [31:0] prev;
    logic [7:0]  q[$];

    function new();
      prev = '0;
    endfunction

    function void async();
      repeat (5) q.push_back(8'h00);
      q.push_back(8'h80);
    endfunction

    function void isync(logic [31:0] pc);
      q.push_back(8'h08);
      q.push_back({pc[7:1], 1'b0});
      q.push_back(pc[15:8]);
      q.push_back(pc[23:16]);
      q.push_back(pc[31:24]);
      q.push_back(8'h21);             // information byte
      prev = {pc[31:1], 1'b0};
    endfunction

    // Branch to `pc` (ARM state, word aligned). Returns the packet length.
    function int branch(logic [31:0] pc, bit exc = 0);
      int n;
      logic [7:0] b [5];
      if      (exc)                   n = 5;
      else if (pc[31:8]  == prev[31:8])  n = 1;
      else if (pc[31:15] == prev[31:15]) n = 2;
      else if (pc[31:22] == prev[31:22]) n = 3;
      else if (pc[31:29] == prev[31:29]) n = 4;
      else                               n = 5;
      b[0] = {1'b0, pc[7:2], 1'b1};
      b[1] = {1'b0, pc[14:8]};
      b[2] = {1'b0, pc[21:15]};
      b[3] = {1'b0, pc[28:22]};
      b[4] = {1'b0, exc, 3'b000, pc[31:29]};
      for (int i = 0; i < n; i++) begin
        if (i < n - 1) b[i][7] = 1'b1;
        q.push_back(b[i]);
      end
      if (exc) q.push_back(8'h03);  // one exception information byte
      prev = {pc[31:2], 2'b00};
      return n;
    endfunction

    function void atom();
      q.push_back(8'h84);
    endfunction

    function void single(logic [7:0] hdr);
      q.push_back(hdr);
    endfunction
  endclass

  class trace_formatter;
    tagged_byte_t in_q[$];
    logic [31:0]  words[$];
    logic [6:0]   cur_id;
    int           frames;
    int           id_bytes;

    function new();
      cur_id   = '0;
      frames   = 0;
      id_bytes = 0;
    endfunction

    function void push(logic [6:0] id, logic [7:0] data);
      tagged_byte_t t;
      t.id = id; t.data = data;
      in_q.push_back(t);
    endfunction

    function void fsync();
      words.push_back(32'h7FFF_FFFF);
    endfunction

    function tagged_byte_t peek(int i);
      tagged_byte_t t;
      if (i < in_q.size()) t = in_q[i];
      else begin t.id = '0; t.data = '0; end
      return t;
    endfunction

    function tagged_byte_t take();
      tagged_byte_t t = peek(0);
      if (in_q.size() > 0) void'(in_q.pop_front());
      return t;
    endfunction

    // Build one frame from the queue (padding with ID 0 when it runs dry).
    function void frame();
      logic [7:0] fb [16];
      logic [7:0] aux;
      tagged_byte_t b0, b1;
      aux = '0;
      for (int k = 0; k < 8; k++) begin
        b0 = peek(0);
        b1 = peek(1);
        if (b0.id != cur_id) begin
          fb[2*k] = {b0.id, 1'b1};
          aux[k]  = 1'b0;
          cur_id  = b0.id;
          id_bytes++;
          if (k < 7) fb[2*k+1] = take().data;
        end else if (k < 7 && b1.id != cur_id) begin
          fb[2*k]   = {b1.id, 1'b1};
          aux[k]    = 1'b1;
          id_bytes++;
          fb[2*k+1] = take().data;
          cur_id    = b1.id;
        end else begin
          b0 = take();
          fb[2*k] = {b0.data[7:1], 1'b0};
          aux[k]  = b0.data[0];
          if (k < 7) fb[2*k+1] = take().data;
        end
      end
      fb[15] = aux;
      for (int w = 0; w < 4; w++)
        words.push_back({fb[4*w+3], fb[4*w+2], fb[4*w+1], fb[4*w]});
      frames++;
    endfunction

    // Turn everything queued into frames, with a frame sync every `sync_every` frames.
    function void flush(int sync_every = 4);
      while (in_q.size() > 0) begin
        if (frames % sync_every == 0) fsync();
        frame();
      end
    endfunction
  endclass

endpackage
