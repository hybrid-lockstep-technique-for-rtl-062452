// tb_pft_decoder: self-checking test of the program-flow packet decoder.
//
// The packet encoder model produces a random program flow for one core:
// A-sync, I-sync, then branches to random targets near and far from the
// previous PC (so every compressed packet length, 1 to 5 bytes, occurs),
// branches with exception bytes, atoms and single-byte packets, plus one
// unknown header followed by a new A-sync. Bytes are fed with random gaps.
// The PC events must equal, in order, the I-sync and branch targets, each
// one cycle after the packet's last byte; bytes before the first A-sync and
// between the error and the next A-sync must yield nothing.
module tb_pft_decoder;
  import observer_pkg::*;
  import tb_trace_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       byte_valid;
  logic [7:0] byte_data;
  pc_event_t  ev;
  logic       in_sync, async_seen, isync_seen, branch_seen, atom_seen, proto_err;
  int         checks = 0, failures = 0;

  pft_decoder #(.CTXID_BYTES(0)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pft_encoder enc;
  pc_t        exp_q[$];
  int         len_hist[6];
  int         n_async = 0, n_atom = 0, n_err = 0, n_ev = 0;

  always @(posedge clk) begin
    if (rst_n && async_seen) n_async++;
    if (rst_n && atom_seen)  n_atom++;
    if (rst_n && proto_err)  n_err++;
    if (rst_n && ev.valid) begin
      checks++; n_ev++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected PC %h", ev.pc);
      end else begin
        pc_t e;
        e = exp_q.pop_front();
        if (ev.pc != e) begin failures++; $display("FAIL PC %h expected %h", ev.pc, e); end
      end
    end
  end

  // Send the encoder's bytes; the event of the last one must appear next cycle.
  task automatic send_all(bit expect_event);
    while (enc.q.size() > 0) begin
      @(negedge clk);
      byte_valid = 0;
      if ($urandom_range(0, 4) == 0) @(negedge clk);
      byte_valid = 1; byte_data = enc.q.pop_front();
    end
    @(negedge clk); byte_valid = 0;
    if (expect_event) begin
      checks++;
      if (!ev.valid) begin failures++; $display("FAIL no PC event one cycle after packet at %0t", $time); end
    end
  endtask

  function automatic pc_t next_target(pc_t prev);
    pc_t t;
    int sel;
    sel = $urandom_range(0, 4);
    case (sel)
      0: t = {prev[31:8],  8'($urandom)};
      1: t = {prev[31:15], 15'($urandom)};
      2: t = {prev[31:22], 22'($urandom)};
      3: t = {prev[31:29], 29'($urandom)};
      default: t = $urandom;
    endcase
    return {t[31:2], 2'b00};
  endfunction

  initial begin
    int n, kind, sub;
    pc_t pc;
    enc = new();
    byte_valid = 0; byte_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // noise before synchronisation (no zero bytes)
    for (int i = 0; i < 20; i++) enc.single(8'($urandom_range(1, 255)));
    send_all(0);
    checks++;
    if (in_sync) begin failures++; $display("FAIL in sync before A-sync"); end

    enc.async(); send_all(0);
    checks++;
    if (!in_sync) begin failures++; $display("FAIL not in sync after A-sync"); end
    pc = 32'h0010_0000;
    enc.isync(pc); exp_q.push_back(pc); send_all(1);

    for (int i = 0; i < 1500; i++) begin
      kind = $urandom_range(0, 9);
      case (kind)
        0: begin enc.atom(); send_all(0); end
        1: begin
             sub = $urandom_range(0, 2);
             case (sub)
               0: enc.single(PFT_TRIGGER);
               1: enc.single(PFT_IGNORE);
               default: enc.single(PFT_EXC_RETURN);
             endcase
             send_all(0);
           end
        2: begin
             pc = next_target(pc);
             n = enc.branch(pc, 1'b1);
             exp_q.push_back(pc);
             send_all(0);
             len_hist[n]++;
           end
        3: if (i % 50 == 0) begin
             pc = {$urandom} & ~32'h3;
             enc.isync(pc); exp_q.push_back(pc); send_all(1);
           end
        default: begin
             pc = next_target(pc);
             n = enc.branch(pc);
             exp_q.push_back(pc);
             send_all(1);
             len_hist[n]++;
           end
      endcase
      if (i == 700) begin
        // unknown header: out of sync until the next A-sync
        enc.single(8'h10);
        enc.single(8'h45); enc.single(8'h13);  // ignored
        send_all(0);
        checks++;
        if (in_sync) begin failures++; $display("FAIL still in sync after bad header"); end
        enc.async(); send_all(0);
      end
    end
    repeat (3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d PCs missing", exp_q.size()); end
    for (int l = 1; l <= 5; l++) begin
      checks++;
      if (len_hist[l] == 0) begin failures++; $display("FAIL no %0d-byte branch packet", l); end
    end
    checks++;
    if (n_async != 2 || n_err != 1 || n_atom == 0) begin
      failures++; $display("FAIL async=%0d err=%0d atoms=%0d", n_async, n_err, n_atom);
    end
    $display("events=%0d lengths 1..5: %0d %0d %0d %0d %0d", n_ev,
             len_hist[1], len_hist[2], len_hist[3], len_hist[4], len_hist[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
