// tb_pp_latency_workload: one PP-FPGA at its default sizes under the experiment's rates.
//
// Workload: a main detector at 10 MHz read by a single board gives 2.5 MHz per PP (the
// rate split evenly over the four PPs), i.e. on average 16 hits per 6.4 us frame; L0
// requests arrive 1 ms (40000 clocks of 25 ns) after the time they ask for, the maximum
// L0 latency the buffer must cover. Frames are sent on the four TDC buses exactly every
// 256 clocks for 280 frames, with 0..8 random hits per TDC and frame. From 1 ms on, a
// request for the slot 40000 clocks back is sent every 200 clocks with a random window
// of 0..10 slots. Every response must hold exactly the hits of that window and report no
// lost frame, and the PP must drop no request. At the end a request for frame 5, then
// 275 frames (1.76 ms) old, must report lost frames, because the frame directory holds 256 frames
// (1.64 ms). The response to a request must begin within 8 clocks of it while the
// request queue is empty.
module tb_pp_latency_workload;
  import na62_pkg::*;
  localparam int NF      = 280;
  localparam int LAT     = 40000;      // 1 ms in 25 ns clocks
  localparam int PERIOD  = 200;        // clocks between requests
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] window = '0, threshold = 8'd0;
  logic [3:0] tdc_valid = '0, tdc_ready;
  logic [3:0][31:0] tdc_data = '0;
  logic trig_valid = 0, data_valid, data_ready = 1, prim_valid, mon_clear = 0;
  trig_t trig = '0;
  logic [31:0] data, mon_data, lost_frames_total, dropped_trig_total, mismatch_total, overrun_total;
  prim_t prim;
  logic [7:0] mon_addr = '0;

  pp_fpga dut (.clk, .rst_n, .pp_id(2'd1), .window, .threshold, .tdc_valid, .tdc_ready,
    .tdc_data, .trig_valid, .trig, .data_valid, .data_ready, .data, .prim_valid, .prim,
    .mon_clear, .mon_addr, .mon_data, .lost_frames_total, .dropped_trig_total,
    .mismatch_total, .overrun_total);

  int checks = 0, failures = 0;
  int now = 0;
  logic [31:0] src_q[4][$], got[$];
  logic [31:0] hit_w[$];
  int hit_t[$];
  logic [31:0] exp_q[$][$];
  int nreq = 0, nresp = 0, nhits = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    now <= now + 1;
    for (int i = 0; i < 4; i++) if (tdc_valid[i] && tdc_ready[i]) void'(src_q[i].pop_front());
    if (data_valid && data_ready) got.push_back(data);
  end
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++) begin
      tdc_valid[i] <= (src_q[i].size() > 0);
      tdc_data[i]  <= (src_q[i].size() > 0) ? src_q[i][0] : '0;
    end
  end

  // parse one response from the front of got[]; returns 0 if it is not complete yet
  task automatic take_response(output bit ok, output int num, output logic [31:0] hits[$],
                                       output int count, output int lost);
    int k;
    hits.delete();
    for (k = 1; k < got.size(); k++) if (got[k][31:30] == 2'b11) break;
    ok = 0;
    if (got.size() == 0 || k >= got.size()) return;
    check(got[0][31:24] == {2'b10, 6'd1}, "response header");
    num = int'(got[0][23:0]);
    for (int j = 1; j < k; j++) hits.push_back(got[j]);
    count = int'(got[k][29:18]);
    lost  = int'(got[k][17:0]);
    for (int j = 0; j <= k; j++) void'(got.pop_front());
    ok = 1;
  endtask

  task automatic drain_responses();
    int num, count, lost;
    logic [31:0] hits[$], exp_hits[$];
    bit ok;
    forever begin
      take_response(ok, num, hits, count, lost);
      if (!ok) break;
      check(num == nresp % (1 << 24), $sformatf("response number %0d expected %0d", num, nresp));
      check(lost == 0, $sformatf("request %0d reports %0d lost frames", num, lost));
      check(count == hits.size(), "trailer count");
      exp_hits = exp_q.pop_front();
      hits.sort(); exp_hits.sort();
      check(hits == exp_hits, $sformatf("request %0d hits %0d expected %0d", num, hits.size(), exp_hits.size()));
      nhits += hits.size();
      nresp++;
    end
  endtask

  // frame generator: frame f is handed over at the boundary that closes it
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      repeat (256) @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        int n;
        n = $urandom_range(0, 8);
        src_q[i].push_back({2'b10, 6'(i), 24'(f)});
        for (int k = 0; k < n; k++) begin
          logic [31:0] w;
          logic [7:0] slot;
          slot = 8'($urandom);
          w = {2'b00, 1'($urandom), 2'(i), 5'($urandom), 3'b0, 3'(f), slot, 8'($urandom)};
          src_q[i].push_back(w);
          hit_w.push_back(w);
          hit_t.push_back(f * 256 + int'(slot));
        end
        src_q[i].push_back({2'b11, 12'(n), 18'd0});
      end
    end
  end

  // L0 requests 1 ms old
  initial begin
    int t0;
    logic [31:0] exp_hits[$];
    wait (rst_n);
    wait (now >= LAT + 512);
    while (now < NF * 256) begin
      int ts, w;
      ts = now - LAT;
      w = $urandom_range(0, 10);
      exp_hits.delete();
      foreach (hit_t[k]) if (hit_t[k] >= ts - w && hit_t[k] <= ts + w) exp_hits.push_back(hit_w[k]);
      exp_q.push_back(exp_hits);
      @(negedge clk);
      window = 8'(w);
      trig_valid = 1; trig = '{num: 24'(nreq), ttype: 8'd1, ts: 32'(ts)};
      t0 = now;
      @(negedge clk); trig_valid = 0;
      if (nreq == 0) begin
        while (got.size() == 0) @(negedge clk);
        check(now - t0 <= 8, $sformatf("first response word after %0d clocks", now - t0));
      end
      nreq++;
      repeat (PERIOD - 2) @(negedge clk);
      drain_responses();
    end
    repeat (600) @(negedge clk);
    drain_responses();
    check(nresp == nreq, $sformatf("responses %0d of %0d", nresp, nreq));
    check(dropped_trig_total == 0 && mismatch_total == 0 && lost_frames_total == 0,
          $sformatf("dropped %0d mismatches %0d lost %0d", dropped_trig_total, mismatch_total, lost_frames_total));
    check(nhits > 0, "workload extracted hits");
    // a request for frame 5, older than the 256 frames the directory holds
    begin
      int num, count, lost;
      logic [31:0] hits[$];
      bit ok;
      @(negedge clk);
      window = 8'd4;
      trig_valid = 1; trig = '{num: 24'(nreq), ttype: 8'd1, ts: 32'(5 * 256 + 128)};
      @(negedge clk); trig_valid = 0;
      repeat (600) @(negedge clk);
      take_response(ok, num, hits, count, lost);
      check(ok && lost > 0 && hits.size() == 0,
            $sformatf("request beyond the directory: lost %0d hits %0d", lost, hits.size()));
      check(lost_frames_total > 0, "lost frames counted");
    end
    $display("workload: %0d requests 1 ms old, %0d hits extracted, %0d frames", nreq, nhits, NF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NF * 256 + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
