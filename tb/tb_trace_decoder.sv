// tb_trace_decoder: self-checking test of the shared-port trace decoder.
//
// Two cores' program flows (A-sync, I-sync, random compressed branches,
// atoms) and a third, unrelated trace source are interleaved byte-wise in
// random bursts, as a trace funnel would, and packed into frames by the
// formatter model. Each core's PC events must equal, in order, its own
// I-sync and branch targets; the third source must not disturb them.
module tb_trace_decoder;
  import observer_pkg::*;
  import tb_trace_pkg::*;

  localparam int unsigned NC = 2;

  logic            clk = 0, rst_n = 0;
  logic [31:0]     tw_data;
  logic            tw_valid, tw_ready;
  trace_id_t       trace_id [NC];
  pc_event_t       ev [NC];
  logic            frame_synced, fsync_seen, id_change;
  logic [NC-1:0]   in_sync, async_seen, isync_seen, branch_seen, atom_seen, proto_err;
  int              checks = 0, failures = 0;

  trace_decoder #(.NUM_CORES(NC)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pft_encoder     enc [NC];
  trace_formatter fmt;
  pc_t            exp_q [NC][$];
  logic [7:0]     pend [NC][$];
  int             n_ev [NC];

  for (genvar c = 0; c < NC; c++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n && ev[c].valid) begin
        checks++; n_ev[c]++;
        if (exp_q[c].size() == 0) begin
          failures++; $display("FAIL core %0d unexpected PC %h", c, ev[c].pc);
        end else begin
          pc_t e;
          e = exp_q[c].pop_front();
          if (e != ev[c].pc) begin failures++; $display("FAIL core %0d PC %h expected %h", c, ev[c].pc, e); end
        end
      end
    end
  end

  initial begin
    pc_t pc [NC];
    int  len, c, kind;
    fmt = new();
    trace_id[0] = 7'h11; trace_id[1] = 7'h12;
    for (int k = 0; k < NC; k++) begin
      enc[k] = new();
      enc[k].async();
      pc[k] = 32'h0010_0000 + 32'h1000 * k;
      enc[k].isync(pc[k]); exp_q[k].push_back(pc[k]);
    end
    for (int i = 0; i < 800; i++) begin
      for (int k = 0; k < NC; k++) begin
        kind = $urandom_range(0, 5);
        if (kind == 0) enc[k].atom();
        else begin
          pc[k] = {pc[k][31:12], 12'($urandom)} & ~32'h3;
          if (kind == 1) pc[k] = $urandom & ~32'h3;
          void'(enc[k].branch(pc[k]));
          exp_q[k].push_back(pc[k]);
        end
      end
    end
    for (int k = 0; k < NC; k++) while (enc[k].q.size() > 0) pend[k].push_back(enc[k].q.pop_front());
    // interleave bursts of the two cores and of an unrelated source 0x30
    while (pend[0].size() > 0 || pend[1].size() > 0) begin
      c = $urandom_range(0, 2);
      len = $urandom_range(1, 12);
      if (c == 2) begin
        repeat (len) fmt.push(7'h30, 8'($urandom));
      end else begin
        for (int j = 0; j < len && pend[c].size() > 0; j++) fmt.push(trace_id[c], pend[c].pop_front());
      end
    end
    fmt.flush(8);

    tw_valid = 0; tw_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (fmt.words[i]) begin
      @(negedge clk);
      tw_valid = 1; tw_data = fmt.words[i];
      @(posedge clk);
      while (!tw_ready) @(posedge clk);
    end
    @(negedge clk); tw_valid = 0;
    repeat (40) @(negedge clk);
    for (int k = 0; k < NC; k++) begin
      checks++;
      if (exp_q[k].size() != 0) begin failures++; $display("FAIL core %0d: %0d PCs missing", k, exp_q[k].size()); end
      checks++;
      if (!in_sync[k]) begin failures++; $display("FAIL core %0d not in sync", k); end
    end
    $display("events core0=%0d core1=%0d frames=%0d", n_ev[0], n_ev[1], fmt.frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
