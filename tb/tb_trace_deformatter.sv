// tb_trace_deformatter: self-checking test of the trace frame splitter.
//
// Random bytes from three sources are interleaved in random bursts, packed
// into frames by the formatter model (which exercises ID changes that apply
// before and after the next byte) and offered as words with random gaps and
// with garbage before the first frame sync. Every byte with a non-zero ID
// that comes out must match, in order, the byte and ID that went in. Also
// checks that words are refused while a frame is being walked, and the
// latency of the last byte of a frame.
module tb_trace_deformatter;
  import observer_pkg::*;
  import tb_trace_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [31:0] tw_data;
  logic        tw_valid;
  logic        tw_ready;
  trace_byte_t out;
  logic        synced, fsync_seen, id_change;
  int          checks = 0, failures = 0;

  trace_deformatter dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  trace_formatter fmt;
  tagged_byte_t   exp_q[$];
  int             got = 0, idc = 0, fsc = 0;

  always @(posedge clk) begin
    if (rst_n && id_change)  idc++;
    if (rst_n && fsync_seen) fsc++;
    if (rst_n && out.valid && out.id != 0) begin
      checks++;
      got++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected byte %h id %0d", out.data, out.id);
      end else begin
        tagged_byte_t e;
        e = exp_q.pop_front();
        if (e.id != out.id || e.data != out.data) begin
          failures++;
          $display("FAIL byte %0d: got id %0d data %h, expected id %0d data %h",
                   got, out.id, out.data, e.id, e.data);
        end
      end
    end
  end

  int lat;

  initial begin
    fmt = new();
    tw_valid = 0; tw_data = '0;
    // random bursts from sources 1, 2 and 5
    for (int i = 0; i < 3000; ) begin
      logic [6:0] id;
      int len;
      id  = (i % 3 == 0) ? 7'd1 : ($urandom_range(0, 1) ? 7'd2 : 7'd5);
      len = $urandom_range(1, 9);
      for (int j = 0; j < len; j++) begin
        logic [7:0] d;
        d = 8'($urandom);
        fmt.push(id, d);
        exp_q.push_back('{id: id, data: d});
        i++;
      end
    end
    fmt.flush(3);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // garbage before synchronisation is ignored
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); tw_valid = 1; tw_data = 32'h1234_5600 + i;
    end
    foreach (fmt.words[i]) begin
      @(negedge clk);
      tw_valid = 0;
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      tw_valid = 1; tw_data = fmt.words[i];
      @(posedge clk);
      while (!tw_ready) @(posedge clk);
    end
    @(negedge clk); tw_valid = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d bytes never came out", exp_q.size()); end
    checks++;
    if (idc == 0 || fsc == 0) begin failures++; $display("FAIL no ID change (%0d) or frame sync (%0d)", idc, fsc); end

    // latency: a frame whose last payload byte (14) is data for source 3
    fmt = new();
    for (int i = 0; i < 14; i++) fmt.push(7'd3, 8'(i + 8'h40));
    fmt.frame();
    @(negedge clk); tw_valid = 1; tw_data = fmt.words[0];
    @(negedge clk); tw_data = fmt.words[1];
    @(negedge clk); tw_data = fmt.words[2];
    @(negedge clk); tw_data = fmt.words[3];
    @(posedge clk); #1 tw_valid = 0;
    for (int i = 0; i < 14; i++) exp_q.push_back('{id: 7'd3, data: 8'(i + 8'h40)});
    lat = 1;
    while (!(out.valid && out.data == 8'h4D)) begin @(posedge clk); #1 lat++; end
    checks++;
    if (lat != 16) begin failures++; $display("FAIL last byte latency %0d, expected 16", lat); end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL latency frame incomplete"); end
    $display("bytes=%0d id_changes=%0d fsyncs=%0d", got, idc, fsc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
