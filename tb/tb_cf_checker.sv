// tb_cf_checker: self-checking test of one core's checker.
//
// Drives a loop of PC events inside the allowed range that passes the
// watchdog PC regularly (no flag may rise), then a PC outside the ranges
// (cf_error one cycle later, hang stays low), then stops the reload PC
// (hang after the timeout). The last-PC register is compared as it goes.
module tb_cf_checker;
  import observer_pkg::*;

  localparam int unsigned NR = 4;
  localparam int unsigned T  = 30;

  logic          clk = 0, rst_n = 0;
  logic          range_chk_en, wd_en, clear;
  pc_range_t     ranges [NR];
  logic [NR-1:0] range_en;
  pc_t           wd_pc;
  logic [31:0]   wd_timeout;
  pc_event_t     ev;
  logic          cf_error, hang, violation, wd_reload, wd_expired;
  pc_t           bad_pc, last_pc;
  int            checks = 0, failures = 0;

  cf_checker #(.NUM_RANGES(NR)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic send(pc_t pc);
    @(negedge clk); ev = '{valid: 1'b1, isync: 1'b0, pc: pc};
    @(negedge clk); ev.valid = 1'b0;
    check($sformatf("last_pc %h", pc), last_pc == pc, 1'b1);
  endtask

  initial begin
    ev = '0; clear = 0;
    range_chk_en = 1; wd_en = 1;
    ranges[0] = '{lo: 32'h0000_1000, hi: 32'h0000_1FFC};
    for (int r = 1; r < NR; r++) ranges[r] = '{lo: 32'hFFFF_FFFF, hi: 32'h0};
    range_en = 4'b0001;
    wd_pc = 32'h0000_1040; wd_timeout = T;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int it = 0; it < 20; it++) begin
      send(32'h0000_1040);
      check("reload", wd_reload, 1'b1);
      for (int i = 0; i < 5; i++) send(32'h0000_1000 + 4 * $urandom_range(0, 1000));
      check("no cf_error in loop", cf_error, 1'b0);
      check("no hang in loop", hang, 1'b0);
    end
    send(32'h0000_3000);
    check("violation pulse", violation, 1'b1);
    check("cf_error", cf_error, 1'b1);
    check("bad pc", bad_pc == 32'h0000_3000, 1'b1);
    check("no hang yet", hang, 1'b0);
    repeat (T + 2) @(negedge clk);
    check("hang after timeout", hang, 1'b1);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check("cf_error cleared", cf_error, 1'b0);
    check("hang cleared", hang, 1'b0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
