// tb_tel62: self-checking test of one TEL62 board at its default sizes.
// Four TDC-board controllers (the tdcc module) feed the board; the testbench drives random
// HPTDC hits with times from the burst clock, applies TTC accepts with the trigger-type
// broadcast at known times, and parses the UDP output. Every fragment must carry the
// trigger number, the accept time less the latency, the type, and for each PP exactly the
// hits within +-WINDOW slots of the trigger time. Clustered hits must produce primitives
// at the cluster times; the monitor counters of one PP are checked.
module tb_tel62;
  import na62_pkg::*;
  localparam int WINDOW = 6, LAT = 700, NTRIG = 24, THR = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sob = 0, l1a = 0, brcst_valid = 0, mon_clear = 0, eth_valid, eth_ready = 0, eth_last, prim_valid;
  logic [7:0] brcst = '0, eth_byte;
  logic [3:0][3:0] hit_valid = '0, hit_edge = '0, tv, tr;
  logic [3:0][3:0][4:0] hit_channel = '0;
  logic [3:0][3:0][18:0] hit_time = '0;
  logic [3:0][3:0][31:0] td;
  logic [3:0] tdc_trigger;
  logic [1:0] mon_pp = 2'd1;
  logic [7:0] mon_addr = '0;
  logic [31:0] mon_data, packets_total, lost_frames_total, error_total;
  prim_t prim;

  for (genvar p = 0; p < 4; p++) begin : g_tdcb
    logic [31:0] ts;
    logic [3:0][31:0] dropped;
    tdcc u_tdcc (.clk, .rst_n, .sob, .hit_valid(hit_valid[p]), .hit_edge(hit_edge[p]),
      .hit_channel(hit_channel[p]), .hit_time(hit_time[p]), .tdc_trigger(tdc_trigger[p]),
      .timestamp(ts), .bus_valid(tv[p]), .bus_ready(tr[p]), .bus_data(td[p]), .dropped_total(dropped));
  end

  tel62 dut (.clk, .rst_n, .board_id(6'd5), .sob, .l1a, .brcst_valid, .brcst,
    .latency(32'(LAT)), .window(8'(WINDOW)), .threshold(8'(THR)), .mep_factor(8'd3),
    .mep_timeout(16'd2000), .src_mac(48'h020000006205), .dst_mac(48'h0200000000fe),
    .src_ip(32'h0a000005), .dst_ip(32'h0a0000fe), .src_port(16'd5000), .dst_port(16'd5001),
    .tdc_valid(tv), .tdc_ready(tr), .tdc_data(td), .eth_valid, .eth_ready, .eth_byte, .eth_last,
    .prim_valid, .prim, .mon_clear, .mon_pp, .mon_addr, .mon_data,
    .packets_total, .lost_frames_total, .error_total);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int ts = -1;
  typedef struct { int p; int t; logic [31:0] w; } rec_t;
  rec_t hits[$];
  int mon_cnt[128], trig_t0[$], clusters[$], prims[$];
  logic [7:0] pkt[$];
  logic [31:0] words[$];
  int nfrag = 0;

  always @(negedge clk) eth_ready <= 1'($urandom);
  always @(posedge clk) if (rst_n) begin
    if (prim_valid) prims.push_back(int'(prim.ts));
    if (ts >= 0) for (int p = 0; p < 4; p++) for (int i = 0; i < 4; i++) if (hit_valid[p][i]) begin
      rec_t r;
      r.p = p; r.t = ts;
      r.w = {2'b00, hit_edge[p][i], 2'(i), hit_channel[p][i], 3'b000, hit_time[p][i]};
      hits.push_back(r);
      if (p == 1 && !hit_edge[p][i]) mon_cnt[{2'(i), hit_channel[p][i]}]++;
    end
    if (eth_valid && eth_ready) begin
      pkt.push_back(eth_byte);
      if (eth_last) begin
        int n;
        n = {pkt[44], pkt[45]};
        check(pkt.size() == 46 + 4 * n, "packet length");
        for (int w = 0; w < n; w++) words.push_back({pkt[46 + 4 * w], pkt[47 + 4 * w], pkt[48 + 4 * w], pkt[49 + 4 * w]});
        nfrag += pkt[42];
        pkt.delete();
      end
    end
  end

  initial begin
    int k, f;
    foreach (mon_cnt[i]) mon_cnt[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); sob = 1; @(negedge clk); sob = 0; ts = 0;
    for (int c = 0; c < 20000; c++) begin
      for (int p = 0; p < 4; p++) for (int i = 0; i < 4; i++) begin
        hit_valid[p][i] = ($urandom_range(0, 99) == 0);
        hit_edge[p][i] = 1'($urandom);
        hit_channel[p][i] = 5'($urandom);
        hit_time[p][i] = {11'(ts), 8'($urandom)};
      end
      if (c % 997 == 500) begin   // a cluster on PP 2 above threshold
        for (int i = 0; i < THR; i++) begin hit_valid[2][i] = 1; hit_edge[2][i] = 0; end
        clusters.push_back(ts);
      end
      l1a = (c % 800 == 799) && trig_t0.size() < NTRIG;
      if (l1a) trig_t0.push_back(ts - LAT);
      brcst_valid = (c % 800 == 0) && c > 0 && trig_t0.size() <= NTRIG;
      brcst = 8'h2a;
      @(negedge clk); ts++;
    end
    l1a = 0; brcst_valid = 0; hit_valid = '0;
    repeat (12000) begin @(negedge clk); ts++; end
    // fragments
    k = 0; f = 0;
    while (k < words.size()) begin
      int t;
      logic [31:0] exp_set[4][$], got_set[4][$];
      check(words[k] == {2'b10, 6'd5, 24'(f)}, "fragment header");
      t = int'(words[k + 1]);
      check(f < trig_t0.size() && t == trig_t0[f], $sformatf("fragment %0d time %0d", f, t));
      check(words[k + 2][15:8] == 8'h2a, "trigger type");
      k += 3;
      for (int p = 0; p < 4; p++) begin
        check(words[k] == {2'b10, 6'(p), 24'(f)}, "PP header");
        k++;
        while (words[k][31:30] == 2'b00) begin got_set[p].push_back(words[k]); k++; end
        k++;
      end
      check(words[k][31:30] == 2'b11, "fragment trailer");
      k++;
      foreach (hits[i]) if (hits[i].t >= t - WINDOW && hits[i].t <= t + WINDOW) exp_set[hits[i].p].push_back(hits[i].w);
      for (int p = 0; p < 4; p++) begin
        got_set[p].sort(); exp_set[p].sort();
        check(got_set[p] == exp_set[p], $sformatf("fragment %0d PP %0d hits", f, p));
      end
      f++;
    end
    check(f == NTRIG && nfrag == NTRIG, $sformatf("fragments %0d", f));
    check(packets_total < 32'(NTRIG), "several fragments per packet");
    foreach (clusters[i]) begin
      bit found;
      found = 0;
      foreach (prims[j]) if (prims[j] == clusters[i]) found = 1;
      check(found, $sformatf("primitive for cluster at %0d", clusters[i]));
    end
    for (int a = 0; a < 128; a++) begin
      mon_addr = 8'(a); #1;
      check(mon_data == 32'(mon_cnt[a]), "monitor counter");
    end
    check(lost_frames_total == 0 && error_total == 0, "no errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
