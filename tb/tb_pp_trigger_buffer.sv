// tb_pp_trigger_buffer: self-checking test of PP storage and triggered extraction.
// Merged frames with random hits are written; L0 requests with random times and window
// widths are issued, and each response (header with trigger number, the stored hits whose
// {frame, slot} time is within T +- W, trailer with count and lost frames) is compared
// with a reference model. The buffer is shrunk (1024 hits, 16 frames) so that old frames
// are overwritten and reported lost. One request names a frame not yet written: its
// response must wait for that frame's trailer. Output back-pressure is random.
module tb_pp_trigger_buffer;
  import na62_pkg::*;
  localparam int DEPTH = 1024, SLOTS = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] window = '0;
  logic in_valid = 0, trig_valid = 0, out_ready = 0, out_valid;
  logic [31:0] in_data = '0, out_data, lost_frames_total, dropped_trig_total;
  trig_t trig = '0;

  pp_trigger_buffer #(.HIT_DEPTH(DEPTH), .FRAME_SLOTS(SLOTS)) dut (.clk, .rst_n, .pp_id(2'd3),
    .window, .in_valid, .in_data, .trig_valid, .trig, .out_valid, .out_ready, .out_data,
    .lost_frames_total, .dropped_trig_total);

  int checks = 0, failures = 0, lost_seen = 0, waited = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference store
  logic [31:0] hits[$];       // all hit words ever written, in order
  int          fstart[int], fcount[int];
  int          nframes = 0;   // frames 0 .. nframes-1 written

  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  task automatic write_frame();
    int n;
    n = $urandom_range(0, 40);
    fstart[nframes] = hits.size();
    fcount[nframes] = n;
    @(negedge clk); in_valid = 1; in_data = {2'b10, 6'd3, 24'(nframes)};
    for (int k = 0; k < n; k++) begin
      logic [31:0] w;
      w = {2'b00, 1'($urandom), 7'($urandom), 3'b0, 3'(nframes), 8'($urandom), 8'($urandom)};
      hits.push_back(w);
      @(negedge clk); in_data = w;
    end
    @(negedge clk); in_data = {2'b11, 12'(n), 18'd0};
    @(negedge clk); in_valid = 0;
    nframes++;
  endtask

  task automatic expect_response(logic [23:0] num, logic [31:0] ts, int w);
    logic [31:0] lo, hi, exp_q[$], got[$];
    int sent, lost;
    lo = (ts > 32'(w)) ? ts - 32'(w) : 0;
    hi = ts + 32'(w);
    sent = 0; lost = 0;
    exp_q.push_back({2'b10, 6'd3, num});
    for (int f = int'(lo >> 8); f <= int'(hi >> 8); f++) begin
      bit ok;
      ok = (f < nframes) && (f + SLOTS >= nframes) && (hits.size() - fstart[f] <= DEPTH);
      if (!ok) lost++;
      else for (int k = 0; k < fcount[f]; k++) begin
        logic [31:0] h, t;
        h = hits[fstart[f] + k];
        t = {24'(f), h[15:8]};
        if (t >= lo && t <= hi) begin exp_q.push_back(h); sent++; end
      end
    end
    exp_q.push_back({2'b11, 12'(sent), 18'(lost)});
    lost_seen += lost;
    // collect the response
    while (got.size() == 0 || got[got.size() - 1][31:30] != 2'b11) begin
      @(posedge clk);
      if (out_valid && out_ready) got.push_back(out_data);
    end
    check(got.size() == exp_q.size(), $sformatf("response length %0d expected %0d", got.size(), exp_q.size()));
    foreach (exp_q[i]) if (i < got.size()) check(got[i] == exp_q[i], $sformatf("word %0d: %h expected %h", i, got[i], exp_q[i]));
  endtask

  task automatic request(logic [23:0] num, logic [31:0] ts, int w);
    @(negedge clk);
    window = 8'(w);
    trig = '{num: num, ttype: 8'h5, ts: ts};
    trig_valid = 1;
    @(negedge clk);
    trig_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6; i++) write_frame();
    for (int r = 0; r < 60; r++) begin
      int f, w;
      logic [31:0] ts;
      f  = $urandom_range(nframes > 20 ? nframes - 20 : 0, nframes - 1);
      w  = (r % 3 == 0) ? 0 : $urandom_range(1, 200);
      ts = {24'(f), 8'($urandom)};
      if (((ts + 32'(w)) >> 8) >= 32'(nframes)) ts = {24'(nframes - 1), 8'd0} - 32'(w);
      request(24'(r), ts, w);
      expect_response(24'(r), ts, w);
      repeat ($urandom_range(1, 3)) write_frame();
    end
    // a request whose window reaches a frame that has not been written yet
    begin
      logic [31:0] ts;
      bit early;
      ts = {24'(nframes), 8'd10};
      request(24'd999, ts, 5);
      early = 0;
      repeat (50) @(posedge clk) if (out_valid) early = 1;
      check(!early, "no response before the frame is complete");
      write_frame();
      waited++;
      expect_response(24'd999, ts, 5);
    end
    check(lost_seen > 0, "overwritten frames reported lost");
    check(lost_frames_total == 32'(lost_seen), "lost counter");
    check(waited == 1, "waited for frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
