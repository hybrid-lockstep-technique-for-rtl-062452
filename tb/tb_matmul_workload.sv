// tb_matmul_workload: the observer watching a duplicated matrix multiply.
//
// Both cores run the protected 20x20 matrix multiplication with a coarse
// checkpoint, in the style of a duplicated-with-comparison workload: the
// main-loop head, a spin barrier, three nested loops (20 x 20 x 20), a second
// barrier, then the primary core (core 0) compares the two 20x20 results
// while the shadow core (core 1) waits at the barrier. The trace of each
// core is generated from that loop structure: one branch packet per taken
// loop back-edge or call, an atom where a loop falls through. All code lies
// in 0x0010_0000..0x0010_FFFC, the only allowed range; the watchdog PC is
// the main-loop head.
//
// Runs:
//   1  fault-free: no flag; each core reloads its watchdog once per run;
//      the length of one run (in observer cycles) sets the watchdog time
//      to 1.5 runs;
//   2  core 1 takes an unmanaged exception inside the inner loop (branch to
//      the vector table, then to a default handler loop): cf_error[1] and
//      reset_req within 30 cycles of the trace word; core 0 stays clean;
//   3  the threads miss each other at the barrier and both spin there: no
//      range error (the barrier is valid code), but both watchdogs expire,
//      not before the configured time.
module tb_matmul_workload;
  import observer_pkg::*;
  import tb_trace_pkg::*;

  localparam int unsigned NC = 2;
  localparam int unsigned N  = 20;          // matrix size
  localparam pc_t CODE_LO   = 32'h0010_0000, CODE_HI = 32'h0010_FFFC;
  localparam pc_t MAIN_PC   = 32'h0010_0100;
  localparam pc_t BARRIER   = 32'h0010_0800;
  localparam pc_t LOOP_I    = 32'h0010_0200;
  localparam pc_t LOOP_J    = 32'h0010_0240;
  localparam pc_t LOOP_K    = 32'h0010_0280;
  localparam pc_t CMP_LOOP  = 32'h0010_2000;
  localparam pc_t VECTOR    = 32'hFFFF_0010;
  localparam pc_t HANDLER   = 32'h0000_0400;
  localparam trace_id_t ID [NC] = '{7'h21, 7'h22};

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
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  int     reloads [NC];
  longint hang_at [NC];

  always @(posedge clk) begin
    cyc++;
    if (rst_n)
      for (int c = 0; c < NC; c++) begin
        if (dut.wd_reload[c]) reloads[c]++;
        if (hang[c] && hang_at[c] < 0) hang_at[c] = cyc;
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

  pft_encoder     enc [NC];
  trace_formatter fmt;
  logic [7:0]     pend [NC][$];

  function automatic void take(int k);
    while (enc[k].q.size() > 0) pend[k].push_back(enc[k].q.pop_front());
  endfunction

  // Barrier: a few spins, then leave.
  function automatic void barrier(int k, int spins);
    for (int s = 0; s < spins; s++) void'(enc[k].branch(BARRIER));
    enc[k].atom();
  endfunction

  // One run of the protected benchmark on core k.
  function automatic void matmul_run(int k);
    void'(enc[k].branch(MAIN_PC));
    barrier(k, 3);
    for (int i = 0; i < N; i++) begin
      void'(enc[k].branch(LOOP_I));
      for (int j = 0; j < N; j++) begin
        void'(enc[k].branch(LOOP_J));
        for (int kk = 0; kk < N - 1; kk++) void'(enc[k].branch(LOOP_K));
        enc[k].atom();                         // inner loop falls through
      end
    end
    if (k == 0) begin
      barrier(k, 2);
      for (int e = 0; e < N * N; e++) void'(enc[k].branch(CMP_LOOP));
      enc[k].atom();
    end else begin
      barrier(k, 2 + N * N / 4);               // shadow waits for the check
    end
    take(k);
  endfunction

  function automatic void mix();
    int c, len;
    while (pend[0].size() > 0 || pend[1].size() > 0) begin
      c = $urandom_range(0, 1);
      len = $urandom_range(1, 16);
      for (int j = 0; j < len && pend[c].size() > 0; j++) fmt.push(ID[c], pend[c].pop_front());
    end
    fmt.flush(16);
  endfunction

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

  longint t0, acc, run_len, rise, stuck_from;
  int     wd_time;

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; tw_valid = 0; tw_data = 0;
    for (int c = 0; c < NC; c++) begin reloads[c] = 0; hang_at[c] = -1; end
    fmt = new();
    for (int k = 0; k < NC; k++) enc[k] = new();
    repeat (4) @(posedge clk);
    rst_n = 1;

    wr(REG_TRACE_ID, {17'd0, ID[1], 1'b0, ID[0]});
    for (int k = 0; k < NC; k++) begin
      wr(REG_RANGE0 + CFG_AW'(16 * k),     CODE_LO);
      wr(REG_RANGE0 + CFG_AW'(16 * k + 1), CODE_HI);
      wr(REG_RANGE_EN + CFG_AW'(k), 32'b1);
      wr(REG_WD_PC0 + CFG_AW'(k), MAIN_PC);
      wr(REG_WD_TO0 + CFG_AW'(k), 32'hFFFF_FFFF);
    end
    wr(REG_CTRL, 32'h3);

    // ---- run 1: fault-free ----
    for (int k = 0; k < NC; k++) begin
      enc[k].async();
      enc[k].isync(CODE_LO);
      take(k);
      matmul_run(k);
    end
    mix();
    t0 = cyc;
    stream(acc);
    run_len = acc - t0;
    repeat (30) @(negedge clk);
    $display("one 20x20 run: %0d trace words, %0d observer cycles", fmt.frames * 4, run_len);
    check("run 1: no cf_error", |cf_error, 1'b0);
    check("run 1: no hang", |hang, 1'b0);
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (reloads[c] != 1) begin failures++; $display("FAIL run 1: core %0d reloaded %0d times", c, reloads[c]); end
    end
    wd_time = int'(run_len + run_len / 2);
    for (int k = 0; k < NC; k++) wr(REG_WD_TO0 + CFG_AW'(k), wd_time);

    // ---- run 2: unmanaged exception on core 1 ----
    matmul_run(0);
    void'(enc[1].branch(MAIN_PC));
    barrier(1, 3);
    void'(enc[1].branch(LOOP_I));
    void'(enc[1].branch(LOOP_J));
    for (int kk = 0; kk < 7; kk++) void'(enc[1].branch(LOOP_K));
    take(1);
    mix();
    stream(acc);
    void'(enc[1].branch(VECTOR, 1'b1));
    take(1);
    mix();
    stream(acc);
    rise = -1;
    for (int i = 0; i < 60 && rise < 0; i++) begin
      @(posedge clk); #1;
      if (cf_error[1]) rise = cyc;
    end
    checks++;
    if (rise < 0 || rise - acc >= 30) begin
      failures++; $display("FAIL run 2: exception not flagged within 30 cycles (%0d)", rise - acc);
    end else $display("run 2: exception flagged %0d cycles after the trace word", rise - acc);
    check("run 2: reset_req", reset_req, 1'b1);
    check("run 2: core 0 clean", cf_error[0], 1'b0);
    // the handler spins outside the application code
    for (int s = 0; s < 20; s++) void'(enc[1].branch(HANDLER));
    take(1);
    mix();
    stream(acc);
    check("run 2: still flagged", cf_error[1], 1'b1);
    // system reset: observer and trace restart
    @(negedge clk); rst_n = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    fmt = new();
    for (int k = 0; k < NC; k++) begin enc[k] = new(); pend[k].delete(); end
    wr(REG_TRACE_ID, {17'd0, ID[1], 1'b0, ID[0]});
    for (int k = 0; k < NC; k++) begin
      wr(REG_RANGE0 + CFG_AW'(16 * k),     CODE_LO);
      wr(REG_RANGE0 + CFG_AW'(16 * k + 1), CODE_HI);
      wr(REG_RANGE_EN + CFG_AW'(k), 32'b1);
      wr(REG_WD_PC0 + CFG_AW'(k), MAIN_PC);
      wr(REG_WD_TO0 + CFG_AW'(k), wd_time);
    end
    wr(REG_CTRL, 32'h3);
    check("after reset: clean", |cf_error | |hang, 1'b0);

    // ---- run 3: both threads stuck at the barrier ----
    for (int c = 0; c < NC; c++) hang_at[c] = -1;
    for (int k = 0; k < NC; k++) begin
      enc[k].async();
      enc[k].isync(CODE_LO);
      void'(enc[k].branch(MAIN_PC));
      take(k);
    end
    mix();
    stream(acc);
    stuck_from = cyc;
    // spin at the barrier for two watchdog periods worth of trace
    while (cyc - stuck_from < 2 * wd_time) begin
      for (int k = 0; k < NC; k++) begin
        for (int s = 0; s < 200; s++) void'(enc[k].branch(BARRIER));
        take(k);
      end
      mix();
      stream(acc);
    end
    check("run 3: no cf_error", |cf_error, 1'b0);
    for (int c = 0; c < NC; c++) begin
      check($sformatf("run 3: hang core %0d", c), hang[c], 1'b1);
      checks++;
      if (hang_at[c] >= 0 && hang_at[c] - stuck_from < wd_time - 40) begin
        failures++; $display("FAIL run 3: core %0d flagged too early", c);
      end
    end
    $display("run 3: hang after %0d / %0d cycles (time %0d)",
             hang_at[0] - stuck_from, hang_at[1] - stuck_from, wd_time);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
