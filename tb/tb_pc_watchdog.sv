// tb_pc_watchdog: self-checking test of the trace-reloaded watchdog.
//
// With a timeout T, the reload PC is sent at random intervals shorter than
// T (no hang may appear), then withheld: `hang` must rise exactly T cycles
// after the reloaded count becomes visible, `expired` must pulse once, and
// events with other PCs must not reload it. Clear, disable and a restart
// after a hang are checked as well.
module tb_pc_watchdog;
  import observer_pkg::*;

  localparam int unsigned T = 40;
  localparam pc_t WD_PC = 32'h0010_0200;

  logic        clk = 0, rst_n = 0;
  logic        enable, clear;
  pc_t         wd_pc;
  logic [31:0] timeout;
  pc_event_t   ev;
  logic        reload, expired, hang;
  int          checks = 0, failures = 0;
  int          expired_cnt = 0;

  pc_watchdog #(.CNT_W(32)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && expired) expired_cnt++;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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
  endtask

  int n, gap, c;

  initial begin
    enable = 0; clear = 0; ev = '0; wd_pc = WD_PC; timeout = T;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // disabled: never expires
    repeat (3 * T) @(negedge clk);
    check("no hang while disabled", hang, 1'b0);

    enable = 1;
    // regular reloads, with other PCs in between
    for (int i = 0; i < 50; i++) begin
      send(WD_PC);
      check("reload pulse", reload, 1'b1);
      gap = $urandom_range(0, T - 6);
      c = 0;
      while (c < gap) begin
        if ($urandom_range(0, 3) == 0 && c + 2 <= gap) begin send(WD_PC + 4); c += 2; end
        else begin @(negedge clk); c++; end
      end
      check("no hang with reloads", hang, 1'b0);
    end

    // withhold the reload: hang exactly T cycles after the count is 0
    send(WD_PC);             // at this negedge the count is 0
    n = 0;
    while (!hang && n < 10 * T) begin
      @(negedge clk); n++;
      if (n % 7 == 0) begin ev = '{valid: 1'b1, isync: 1'b0, pc: WD_PC + 8}; end
      else ev.valid = 1'b0;
    end
    ev.valid = 1'b0;
    checks++;
    if (n != T) begin failures++; $display("FAIL hang after %0d cycles, expected %0d", n, T); end
    @(negedge clk);
    check("expired once", expired_cnt == 1, 1'b1);
    repeat (2 * T) @(negedge clk);
    check("still hung", hang, 1'b1);
    check("expired only once", expired_cnt == 1, 1'b1);

    // clear and restart
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check("hang cleared", hang, 1'b0);
    send(WD_PC);
    repeat (T - 3) @(negedge clk);
    check("no hang before timeout", hang, 1'b0);
    repeat (5) @(negedge clk);
    check("hang after restart", hang, 1'b1);
    check("expired twice", expired_cnt == 2, 1'b1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
