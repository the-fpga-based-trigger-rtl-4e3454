// tb_pp_fpga: self-checking test of one PP-FPGA (merger, monitor, primitives, storage).
// Four behavioural TDC buses send 12 frames with random hits (frame-aligned times). Then
// L0 requests are issued; for each, the set of returned hits must equal the hits of all
// four TDCs whose {frame, slot} lies within T +- window, framed by a header with the
// trigger number and a trailer with the count. With threshold 1 every slot holding a
// leading hit must produce one primitive with the right multiplicity, and the monitor
// channel counters must match.
module tb_pp_fpga;
  import na62_pkg::*;
  localparam int NF = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] window = 8'd20, threshold = 8'd1;
  logic [3:0] tdc_valid = '0, tdc_ready;
  logic [3:0][31:0] tdc_data = '0;
  logic trig_valid = 0, data_valid, data_ready = 1, prim_valid, mon_clear = 0;
  trig_t trig = '0;
  logic [31:0] data, mon_data, lost_frames_total, dropped_trig_total, mismatch_total, overrun_total;
  prim_t prim;
  logic [7:0] mon_addr = '0;

  pp_fpga dut (.clk, .rst_n, .pp_id(2'd2), .window, .threshold, .tdc_valid, .tdc_ready,
    .tdc_data, .trig_valid, .trig, .data_valid, .data_ready, .data, .prim_valid, .prim,
    .mon_clear, .mon_addr, .mon_data, .lost_frames_total, .dropped_trig_total,
    .mismatch_total, .overrun_total);

  int checks = 0, failures = 0, nprim = 0;
  logic [31:0] src_q[4][$], all_hits[$], got[$];
  int all_f[$];
  int slotcnt[int], chcnt[128];
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++) if (tdc_valid[i] && tdc_ready[i]) void'(src_q[i].pop_front());
    if (data_valid && data_ready) got.push_back(data);
    if (prim_valid) begin
      nprim++;
      check(slotcnt.exists(int'(prim.ts)) && int'(prim.mult) == slotcnt[int'(prim.ts)],
            $sformatf("primitive ts %0d mult %0d", prim.ts, prim.mult));
    end
  end
  always @(negedge clk) if (rst_n) begin
    data_ready <= ($urandom_range(0, 3) != 0);
    for (int i = 0; i < 4; i++) begin
      tdc_valid[i] <= (src_q[i].size() > 0) && ($urandom_range(0, 3) != 0);
      tdc_data[i]  <= (src_q[i].size() > 0) ? src_q[i][0] : '0;
    end
  end

  function automatic int tof(logic [31:0] w, int f);
    return f * 256 + int'(w[15:8]);
  endfunction

  initial begin
    foreach (chcnt[i]) chcnt[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      repeat (300) @(negedge clk);   // one frame per 6.4 us, as the TDCC sends them
      for (int i = 0; i < 4; i++) begin
        int n;
        n = $urandom_range(0, 15);
        src_q[i].push_back({2'b10, 6'(i), 24'(f)});
        for (int k = 0; k < n; k++) begin
          logic [31:0] w;
          logic [4:0] ch;
          bit tr;
          ch = 5'($urandom); tr = 1'($urandom);
          w = {2'b00, tr, 2'(i), ch, 3'b0, 3'(f), 8'($urandom), 8'($urandom)};
          src_q[i].push_back(w);
          all_hits.push_back(w);
          all_f.push_back(f);
          if (!tr) begin
            if (slotcnt.exists(tof(w, f))) slotcnt[tof(w, f)]++; else slotcnt[tof(w, f)] = 1;
            chcnt[{i[1:0], ch}]++;
          end
        end
        src_q[i].push_back({2'b11, 12'(n), 18'd0});
      end
    end
    while (src_q[0].size() + src_q[1].size() + src_q[2].size() + src_q[3].size() > 0) @(negedge clk);
    repeat (400) @(negedge clk);
    check(nprim == slotcnt.num(), $sformatf("primitives %0d expected %0d", nprim, slotcnt.num()));
    for (int a = 0; a < 128; a++) begin
      mon_addr = 8'(a); #1;
      check(mon_data == 32'(chcnt[a]), "monitor channel count");
    end
    for (int r = 0; r < 25; r++) begin
      logic [31:0] ts, lo, hi;
      logic [31:0] exp_hits[$], got_hits[$];
      exp_hits.delete(); got_hits.delete();
      ts = 32'($urandom_range(0, NF * 256 - 1 - 40));
      window = 8'($urandom_range(0, 40));
      lo = (ts > 32'(window)) ? ts - 32'(window) : 0; hi = ts + 32'(window);
      foreach (all_hits[k]) begin
        int t;
        t = tof(all_hits[k], all_f[k]);
        if (t >= int'(lo) && t <= int'(hi)) exp_hits.push_back(all_hits[k]);
      end
      got.delete();
      @(negedge clk); trig_valid = 1; trig = '{num: 24'(r), ttype: 8'd1, ts: ts};
      @(negedge clk); trig_valid = 0;
      while (got.size() == 0 || got[got.size() - 1][31:30] != 2'b11) @(negedge clk);
      check(got[0] == {2'b10, 6'd2, 24'(r)}, "response header");
      check(got[got.size() - 1] == {2'b11, 12'(exp_hits.size()), 18'd0}, "response trailer");
      for (int k = 1; k < got.size() - 1; k++) got_hits.push_back(got[k]);
      got_hits.sort(); exp_hits.sort();
      check(got_hits == exp_hits, $sformatf("hit set of trigger %0d (%0d vs %0d)", r, got_hits.size(), exp_hits.size()));
    end
    check(lost_frames_total == 0 && mismatch_total == 0 && overrun_total == 0, $sformatf("no errors %0d %0d %0d", lost_frames_total, mismatch_total, overrun_total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
