// tb_observer_regs: self-checking test of the configuration registers.
//
// Writes random values to every configuration register and reads them back,
// checks that each value reaches its output, that STATUS and the last/bad
// PC registers show their inputs, that the clear bit pulses for one cycle
// and that unmapped addresses read as zero and change nothing.
module tb_observer_regs;
  import observer_pkg::*;

  localparam int unsigned NC = 2;
  localparam int unsigned NR = 4;

  logic              clk = 0, rst_n = 0;
  logic              cfg_we;
  logic [CFG_AW-1:0] cfg_addr;
  logic [31:0]       cfg_wdata, cfg_rdata;
  logic              range_chk_en, wd_en, clear;
  trace_id_t         trace_id   [NC];
  pc_t               wd_pc      [NC];
  logic [31:0]       wd_timeout [NC];
  logic [NR-1:0]     range_en   [NC];
  pc_range_t         ranges     [NC][NR];
  logic [NC-1:0]     cf_error, hang, in_sync;
  logic              frame_synced;
  pc_t               last_pc    [NC];
  pc_t               bad_pc     [NC];
  int                checks = 0, failures = 0;

  observer_regs #(.NUM_CORES(NC), .NUM_RANGES(NR)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(logic [CFG_AW-1:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic chk_rd(string what, logic [CFG_AW-1:0] a, logic [31:0] exp);
    cfg_addr = a;
    #1;
    check32(what, cfg_rdata, exp);
  endtask

  logic [31:0] v;
  logic [31:0] lo [NC][NR], hi [NC][NR];

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    cf_error = '0; hang = '0; in_sync = '0; frame_synced = 0;
    last_pc[0] = 32'hA0A0_0000; last_pc[1] = 32'hB0B0_0004;
    bad_pc[0]  = 32'hDEAD_0000; bad_pc[1]  = 32'hBEEF_0008;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk_rd("reset ctrl", REG_CTRL, 0);

    wr(REG_CTRL, 32'h3);
    chk_rd("ctrl", REG_CTRL, 32'h3);
    checks++; if (!(range_chk_en && wd_en && !clear)) begin failures++; $display("FAIL ctrl outputs"); end
    @(negedge clk); cfg_we = 1; cfg_addr = REG_CTRL; cfg_wdata = 32'h7;
    @(negedge clk); cfg_we = 0;
    checks++; if (!clear) begin failures++; $display("FAIL clear pulse missing"); end
    @(negedge clk);
    checks++; if (clear) begin failures++; $display("FAIL clear not self-clearing"); end

    wr(REG_TRACE_ID, 32'h0000_2311);
    chk_rd("trace id", REG_TRACE_ID, 32'h0000_2311);
    check32("trace id 0 out", 32'(trace_id[0]), 32'h11);
    check32("trace id 1 out", 32'(trace_id[1]), 32'h23);

    for (int c = 0; c < NC; c++) begin
      v = $urandom; wr(REG_WD_PC0 + CFG_AW'(c), v);
      chk_rd("wd pc", REG_WD_PC0 + CFG_AW'(c), v); check32("wd pc out", wd_pc[c], v);
      v = $urandom; wr(REG_WD_TO0 + CFG_AW'(c), v);
      chk_rd("wd to", REG_WD_TO0 + CFG_AW'(c), v); check32("wd to out", wd_timeout[c], v);
      v = $urandom; wr(REG_RANGE_EN + CFG_AW'(c), v);
      chk_rd("range en", REG_RANGE_EN + CFG_AW'(c), v & 32'hF);
      check32("range en out", 32'(range_en[c]), v & 32'hF);
      for (int r = 0; r < NR; r++) begin
        lo[c][r] = $urandom; hi[c][r] = $urandom;
        wr(REG_RANGE0 + CFG_AW'(16 * c + 2 * r), lo[c][r]);
        wr(REG_RANGE0 + CFG_AW'(16 * c + 2 * r + 1), hi[c][r]);
      end
    end
    for (int c = 0; c < NC; c++)
      for (int r = 0; r < NR; r++) begin
        chk_rd("range lo", REG_RANGE0 + CFG_AW'(16 * c + 2 * r), lo[c][r]);
        chk_rd("range hi", REG_RANGE0 + CFG_AW'(16 * c + 2 * r + 1), hi[c][r]);
        check32("range lo out", ranges[c][r].lo, lo[c][r]);
        check32("range hi out", ranges[c][r].hi, hi[c][r]);
      end

    cf_error = 2'b10; hang = 2'b01; in_sync = 2'b11; frame_synced = 1;
    chk_rd("status", REG_STATUS, 32'b111_0110);
    chk_rd("last pc 0", REG_LAST_PC0, last_pc[0]);
    chk_rd("last pc 1", REG_LAST_PC0 + 8'd1, last_pc[1]);
    chk_rd("bad pc 1", REG_BAD_PC0 + 8'd1, bad_pc[1]);
    wr(8'hF0, 32'hFFFF_FFFF);
    chk_rd("unmapped", 8'hF0, 0);
    chk_rd("ctrl untouched", REG_CTRL, 32'h3);
    check32("range untouched", ranges[1][3].hi, hi[1][3]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
