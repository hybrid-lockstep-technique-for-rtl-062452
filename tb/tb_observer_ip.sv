// tb_observer_ip: end-to-end test of the control-flow observer.
//
// Two cores run the same program image (code in 0x0010_0000..0x0010_FFFC,
// exception vectors at 0xFFFF_0000..0xFFFF_001C). Their program-flow traces
// (A-sync, I-sync, compressed branches, atoms, exception entries, periodic
// returns to the main-loop head) are interleaved and framed by the funnel
// and formatter model and fed to the observer, configured through its
// register port. The run has three phases:
//   A  both cores behave: no flag may rise; the last-PC registers must show
//      each core's last branch target;
//   B  core 1 branches outside the code: cf_error[1] and reset_req must rise
//      less than 30 cycles after the trace word completing that packet is
//      accepted, core 0 must stay clean, BAD_PC must hold the target; then
//      the flags are cleared through CTRL;
//   B2 the same with the bad branch packet ending in the last payload slot
//      of a frame, the slowest case: exactly 18 cycles;
//   C  core 0 stops passing the main-loop head: hang[0] must rise exactly
//      the configured time after its last watchdog reload, core 1 (which
//      keeps passing it) must not hang.
// Every mechanism (frame sync, ID change, port stall, A-sync, I-sync,
// branch, atom, range violation, watchdog reload and expiry, clear) is
// counted and must occur at least once. The observer runs with its default
// parameters.
module tb_observer_ip;
  import observer_pkg::*;
  import tb_trace_pkg::*;

  localparam int unsigned NC = 2;
  localparam pc_t CODE_LO = 32'h0010_0000, CODE_HI = 32'h0010_FFFC;
  localparam pc_t VEC_LO  = 32'hFFFF_0000, VEC_HI  = 32'hFFFF_001C;
  localparam pc_t MAIN_PC = 32'h0010_0100;
  localparam int unsigned WD_T0 = 1500;
  localparam int unsigned WD_T1 = 1_000_000;
  localparam trace_id_t ID [NC] = '{7'h11, 7'h12};

  logic              clk = 0, rst_n = 0;
  logic [31:0]       tw_data;
  logic              tw_valid, tw_ready;
  logic              cfg_we;
  logic [CFG_AW-1:0] cfg_addr;
  logic [31:0]       cfg_wdata, cfg_rdata;
  logic [NC-1:0]     cf_error, hang;
  logic              reset_req;
  int                checks = 0, failures = 0;

  observer_ip dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters -------------------------------------------------
  int n_fsync, n_idchg, n_stall, n_async, n_isync, n_branch, n_atom;
  int n_viol, n_reload, n_expire, n_clear, n_exc;
  longint cyc = 0, last_reload0 = -1, hang0_at = -1;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (dut.fsync_seen) n_fsync++;
      if (dut.id_change)  n_idchg++;
      if (tw_valid && !tw_ready) n_stall++;
      n_async  += $countones(dut.async_seen);
      n_isync  += $countones(dut.isync_seen);
      n_branch += $countones(dut.branch_seen);
      n_atom   += $countones(dut.atom_seen);
      n_viol   += $countones(dut.violation);
      n_reload += $countones(dut.wd_reload);
      n_expire += $countones(dut.wd_expired);
      if (dut.clear) n_clear++;
      if (dut.wd_reload[0]) last_reload0 = cyc;
      if (hang[0] && hang0_at < 0) hang0_at = cyc;
    end
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at cycle %0d", what, got, exp, cyc);
    end
  endtask

  task automatic wr(logic [CFG_AW-1:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic chk_rd(string what, logic [CFG_AW-1:0] a, logic [31:0] exp);
    @(negedge clk); cfg_addr = a;
    #1;
    checks++;
    if (cfg_rdata !== exp) begin
      failures++;
      $display("FAIL %s: read %h expected %h", what, cfg_rdata, exp);
    end
  endtask

  // ---- trace generation ---------------------------------------------------
  pft_encoder     enc [NC];
  trace_formatter fmt;
  logic [7:0]     pend [NC][$];
  pc_t            last [NC];

  function automatic pc_t code_pc();
    return CODE_LO + 4 * $urandom_range(0, (CODE_HI - CODE_LO) / 4);
  endfunction

  // `iters` loop bodies for core k; `with_main` = pass the main-loop head.
  function automatic void run_core(int k, int iters, bit with_main);
    int kind;
    pc_t t;
    for (int i = 0; i < iters; i++) begin
      if (with_main && i % 8 == 0) begin
        void'(enc[k].branch(MAIN_PC)); last[k] = MAIN_PC;
      end
      kind = $urandom_range(0, 9);
      if (kind == 0) enc[k].atom();
      else if (kind == 1) begin
        t = VEC_LO + 4 * $urandom_range(0, 7);
        void'(enc[k].branch(t, 1'b1)); last[k] = t; n_exc++;
        enc[k].single(PFT_EXC_RETURN);
        t = code_pc();
        void'(enc[k].branch(t)); last[k] = t;
      end else begin
        t = code_pc();
        if (t == MAIN_PC) t += 4;
        void'(enc[k].branch(t)); last[k] = t;
      end
    end
    while (enc[k].q.size() > 0) pend[k].push_back(enc[k].q.pop_front());
  endfunction

  // Interleave the pending bytes of both cores into frames.
  function automatic void mix();
    int c, len;
    while (pend[0].size() > 0 || pend[1].size() > 0) begin
      c = $urandom_range(0, 1);
      len = $urandom_range(1, 10);
      for (int j = 0; j < len && pend[c].size() > 0; j++) fmt.push(ID[c], pend[c].pop_front());
    end
    fmt.flush(6);
  endfunction

  // Offer all formatted words; returns the cycle the last one was accepted.
  task automatic stream(output longint last_acc);
    while (fmt.words.size() > 0) begin
      @(negedge clk);
      tw_valid = 1; tw_data = fmt.words.pop_front();
      @(posedge clk);
      while (!tw_ready) @(posedge clk);
      last_acc = cyc;
    end
    @(negedge clk); tw_valid = 0;
  endtask

  longint acc, rise;

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; tw_valid = 0; tw_data = 0;
    fmt = new();
    for (int k = 0; k < NC; k++) enc[k] = new();
    repeat (4) @(posedge clk);
    rst_n = 1;

    // configuration
    wr(REG_TRACE_ID, {17'd0, ID[1], 1'b0, ID[0]});
    for (int k = 0; k < NC; k++) begin
      wr(REG_RANGE0 + CFG_AW'(16 * k),     CODE_LO);
      wr(REG_RANGE0 + CFG_AW'(16 * k + 1), CODE_HI);
      wr(REG_RANGE0 + CFG_AW'(16 * k + 2), VEC_LO);
      wr(REG_RANGE0 + CFG_AW'(16 * k + 3), VEC_HI);
      wr(REG_RANGE_EN + CFG_AW'(k), 32'b11);
      wr(REG_WD_PC0 + CFG_AW'(k), MAIN_PC);
    end
    wr(REG_WD_TO0,        WD_T0);
    wr(REG_WD_TO0 + 8'd1, WD_T1);
    wr(REG_CTRL, 32'h3);

    // ---- phase A: both cores in their code ----
    for (int k = 0; k < NC; k++) begin
      enc[k].async();
      enc[k].isync(MAIN_PC); last[k] = MAIN_PC;
      run_core(k, 60, 1'b1);
    end
    mix();
    stream(acc);
    repeat (30) @(negedge clk);
    check("A: no cf_error", |cf_error, 1'b0);
    check("A: no hang", |hang, 1'b0);
    check("A: no reset_req", reset_req, 1'b0);
    chk_rd("A: status", REG_STATUS, 32'b111_0000);
    chk_rd("A: last pc core0", REG_LAST_PC0, last[0]);
    chk_rd("A: last pc core1", REG_LAST_PC0 + 8'd1, last[1]);

    // ---- phase B: core 1 leaves the code ----
    run_core(0, 10, 1'b1);
    run_core(1, 10, 1'b1);
    mix();
    void'(enc[1].branch(32'h2000_0040));
    while (enc[1].q.size() > 0) fmt.push(ID[1], enc[1].q.pop_front());
    fmt.flush(6);
    stream(acc);
    rise = -1;
    for (int i = 0; i < 60 && rise < 0; i++) begin
      @(posedge clk); #1;
      if (cf_error[1]) rise = cyc;
    end
    checks++;
    if (rise < 0 || rise - acc >= 30) begin
      failures++; $display("FAIL B: cf_error latency %0d cycles (limit 30)", rise - acc);
    end else $display("detection latency %0d cycles after the last trace word", rise - acc);
    check("B: reset_req", reset_req, 1'b1);
    check("B: core 0 clean", cf_error[0], 1'b0);
    chk_rd("B: bad pc core1", REG_BAD_PC0 + 8'd1, 32'h2000_0040);
    wr(REG_CTRL, 32'h7);   // clear, keep both checks on
    @(negedge clk);
    check("B: cleared", |cf_error, 1'b0);
    check("B: reset_req cleared", reset_req, 1'b0);

    // ---- phase B2: worst case, the bad packet ends in the frame's last slot ----
    // After padding the formatter's current ID is 0, so a new frame holds an
    // ID byte in slot 0 and 14 bytes of core 1 in slots 1..14: nine atoms and
    // a five-byte branch address.
    for (int i = 0; i < 9; i++) enc[1].atom();
    void'(enc[1].branch(32'h6000_0100));
    checks++;
    if (enc[1].q.size() != 14) begin failures++; $display("FAIL B2: packet setup %0d bytes", enc[1].q.size()); end
    while (enc[1].q.size() > 0) fmt.push(ID[1], enc[1].q.pop_front());
    fmt.frame();
    stream(acc);
    rise = -1;
    for (int i = 0; i < 60 && rise < 0; i++) begin
      @(posedge clk); #1;
      if (cf_error[1]) rise = cyc;
    end
    checks++;
    if (rise < 0 || rise - acc >= 30 || rise - acc != 18) begin
      failures++; $display("FAIL B2: worst-case latency %0d cycles (expected 18, limit 30)", rise - acc);
    end else $display("worst-case detection latency %0d cycles", rise - acc);
    wr(REG_CTRL, 32'h7);
    @(negedge clk);
    check("B2: cleared", cf_error[1], 1'b0);

    // ---- phase C: core 0 never returns to the main loop ----
    enc[1].isync(MAIN_PC);    // core 1 resynchronises after the bad jump
    while (enc[1].q.size() > 0) pend[1].push_back(enc[1].q.pop_front());
    run_core(0, 500, 1'b0);
    run_core(1, 500, 1'b1);
    mix();
    stream(acc);
    repeat (30) @(negedge clk);
    check("C: hang core0", hang[0], 1'b1);
    check("C: no hang core1", hang[1], 1'b0);
    check("C: no cf_error", |cf_error, 1'b0);
    checks++;
    if (hang0_at - last_reload0 != WD_T0) begin
      failures++; $display("FAIL C: hang %0d cycles after reload, expected %0d", hang0_at - last_reload0, WD_T0);
    end

    // ---- every mechanism must have happened ----
    begin
      string names [12] = '{"frame sync", "ID change", "port stall", "A-sync", "I-sync", "branch",
                            "atom", "exception entry", "range violation", "watchdog reload",
                            "watchdog expiry", "clear"};
      int    counts[12];
      counts = '{n_fsync, n_idchg, n_stall, n_async, n_isync, n_branch, n_atom, n_exc,
                 n_viol, n_reload, n_expire, n_clear};
      for (int i = 0; i < 12; i++) begin
        $display("  %-16s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("FAIL mechanism '%s' never happened", names[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
