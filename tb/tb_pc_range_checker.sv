// tb_pc_range_checker: self-checking test of the PC range check.
//
// Loads four allowed ranges, then drives random PC events (half of them
// inside a random range, a few on the exact bounds) and compares the
// `violation` pulse one cycle later with a reference computed here. Also
// checks the enable, the per-range enables, the sticky error flag with its
// clear, and the captured first bad PC.
module tb_pc_range_checker;
  import observer_pkg::*;

  localparam int unsigned NR = 4;

  logic            clk = 0, rst_n = 0;
  logic            enable, clear;
  pc_range_t       ranges [NR];
  logic [NR-1:0]   range_en;
  pc_event_t       ev;
  logic            violation, error;
  pc_t             bad_pc;
  int              checks = 0, failures = 0;

  pc_range_checker #(.NUM_RANGES(NR)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ref_outside(pc_t pc);
    for (int r = 0; r < NR; r++)
      if (range_en[r] && pc >= ranges[r].lo && pc <= ranges[r].hi) return 1'b0;
    return 1'b1;
  endfunction

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  task automatic drive(pc_t pc);
    bit exp;
    @(negedge clk);
    ev = '{valid: 1'b1, isync: 1'b0, pc: pc};
    exp = enable && ref_outside(pc);
    @(negedge clk);
    ev.valid = 1'b0;
    check($sformatf("violation pc=%h", pc), violation, exp);
  endtask

  pc_t first_bad;
  bit  seen_bad;

  initial begin
    enable = 0; clear = 0; ev = '0; range_en = '0;
    ranges[0] = '{lo: 32'h0010_0000, hi: 32'h0010_FFFF};
    ranges[1] = '{lo: 32'h0020_0000, hi: 32'h0020_0FFF};
    ranges[2] = '{lo: 32'h8000_0000, hi: 32'h8000_00FF};
    ranges[3] = '{lo: 32'hFFFF_0000, hi: 32'hFFFF_FFFC};
    repeat (3) @(posedge clk);
    rst_n = 1;

    // disabled: nothing flagged
    drive(32'h0000_1234);
    check("error while disabled", error, 1'b0);

    enable = 1; range_en = 4'b1111;
    // bounds
    drive(32'h0010_0000); drive(32'h0010_FFFF); drive(32'h000F_FFFC); drive(32'h0011_0000);
    check("sticky error", error, 1'b1);
    check("bad pc captured", bad_pc == 32'h000F_FFFC, 1'b1);
    drive(32'h0011_0004);
    check("bad pc kept", bad_pc == 32'h000F_FFFC, 1'b1);
    // clear
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check("error cleared", error, 1'b0);
    // disabled range no longer allows
    range_en = 4'b1110;
    drive(32'h0010_0100);
    range_en = 4'b1111;
    drive(32'h0010_0100);

    // random
    for (int i = 0; i < 2000; i++) begin
      pc_t pc;
      int r;
      if (i % 97 == 0) range_en = 4'($urandom);
      r = $urandom_range(0, NR - 1);
      if ($urandom_range(0, 1) == 0)
        pc = ranges[r].lo + ($urandom % (ranges[r].hi - ranges[r].lo + 1));
      else
        pc = $urandom;
      drive(pc);
    end

    // the sticky flag follows the reference over a clear-free stretch
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    range_en = 4'b1111;
    seen_bad = 0;
    for (int i = 0; i < 200; i++) begin
      pc_t pc;
      pc = $urandom;
      if (!seen_bad && ref_outside(pc)) begin seen_bad = 1; first_bad = pc; end
      drive(pc);
    end
    check("sticky after random", error, seen_bad);
    if (seen_bad) check("first bad pc", bad_pc == first_bad, 1'b1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
