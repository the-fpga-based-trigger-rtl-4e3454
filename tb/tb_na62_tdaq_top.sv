// tb_na62_tdaq_top: end-to-end test of the whole trigger and readout chain at the default
// size (four TEL62 boards, 16 TDC boards, 64 HPTDC inputs, full-size buffers).
//
// The testbench plays the parts outside the design: the HPTDC chips (hits with 19 bit
// times taken from the burst clock), the Local Trigger Unit and TTC system (each L0
// trigger comes back as an accept LTU_DELAY clocks later followed by the trigger-type
// broadcast) and the PC farm (the UDP byte streams are parsed). Physics events are
// injected at known times: a cluster of three leading hits on board 0 (RICH, reference)
// and three on board 1 (CHOD, positive) in the same 25 ns slot, plus noise hits on all
// boards. Some events also fire board 2 (MUV, negative) and must be vetoed; one falls in
// a choke period and one in an error period and must be inhibited. For every accepted
// event the testbench expects exactly one L0 trigger at the event time and, from every
// board, one fragment whose four PP blocks hold exactly the hits within +-WINDOW slots.
// Mechanisms counted (each must occur): L0 trigger, veto, choke inhibit, error inhibit,
// multi-event packet, timeout-flushed packet, window extraction with hits, monitor read.
module tb_na62_tdaq_top;
  import na62_pkg::*;
  localparam int NB = 4, WINDOW = 4, LTU_DELAY = 40, EVAL = 900, THR = 3;
  localparam int NEV = 16, SPACING = 1600;
  // TEL62 burst time of the accept minus the event time: the L0TP decides EVAL slots
  // after the event and the LTU model answers LTU_DELAY clocks after the decision
  localparam int LAT = EVAL + LTU_DELAY;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sob = 0, l1a = 0, brcst_valid = 0, mon_clear = 0;
  logic [7:0] brcst = '0;
  logic [NB-1:0][3:0][3:0] hit_valid, hit_edge;
  logic [NB-1:0][3:0][3:0][4:0] hit_channel;
  logic [NB-1:0][3:0][3:0][18:0] hit_time;
  logic [NB-1:0][3:0] tdc_trigger;
  logic [NB-1:0][7:0] threshold;
  logic [3:0] choke = '0, error = '0;
  logic l0_trig_valid;
  trig_t l0_trig;
  logic [NB-1:0] eth_valid, eth_ready, eth_last;
  logic [NB-1:0][7:0] eth_byte;
  logic [1:0] mon_board = '0, mon_pp = '0;
  logic [7:0] mon_addr = '0;
  logic [31:0] mon_data, l0_late_total, l0_veto_total, l0_choke_total, l0_error_total;
  logic [NB-1:0][31:0] packets_total, lost_frames_total, error_total;

  na62_tdaq_top dut (
    .clk, .rst_n, .sob, .hit_valid, .hit_edge, .hit_channel, .hit_time, .tdc_trigger,
    .l1a, .brcst_valid, .brcst, .latency(32'(LAT)), .window(8'(WINDOW)), .threshold,
    .mep_factor(8'd4), .mep_timeout(16'd3000),
    .src_mac(48'h02_00_00_00_62_00), .dst_mac(48'h02_00_00_00_00_fe),
    .src_ip(32'h0a_00_00_00), .dst_ip(32'h0a_00_00_fe), .src_port(16'd5000), .dst_port(16'd5001),
    .l0_pos_mask(4'b0011), .l0_neg_mask(4'b1100), .l0_ref_det(2'd0), .l0_window(4'd2),
    .l0_eval_delay(10'(EVAL)), .l0_trig_type(8'h11), .choke, .error,
    .l0_trig_valid, .l0_trig, .eth_valid, .eth_ready, .eth_byte, .eth_last,
    .mon_clear, .mon_board, .mon_pp, .mon_addr, .mon_data,
    .packets_total, .lost_frames_total, .error_total,
    .l0_late_total, .l0_veto_total, .l0_choke_total, .l0_error_total);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- time base and hit record ----------------
  int ts = -1;                 // burst time of the current cycle (TDCC timestamp)
  typedef struct { int b; int p; int t; logic [31:0] w; } rec_t;
  rec_t hits[$];
  int   mon_cnt[128];           // leading hits of board 0, PP 0, per channel

  // ---------------- mechanisms ----------------
  int m_trig = 0, m_multi = 0, m_timeout = 0, m_hits = 0, m_mon = 0;
  int exp_trig[$];              // event times expected to trigger
  int trig_seen[$];

  // ---------------- LTU / TTC model ----------------
  int ttc_q[$];
  always @(posedge clk) if (rst_n) begin
    if (l0_trig_valid) begin
      m_trig++;
      trig_seen.push_back(int'(l0_trig.ts));
      ttc_q.push_back(ts + LTU_DELAY);
    end
  end
  always @(negedge clk) begin
    l1a <= (ttc_q.size() > 0 && ttc_q[0] == ts + 1);
    brcst_valid <= l1a;
    brcst <= 8'h11;
    if (ttc_q.size() > 0 && ttc_q[0] == ts + 1) void'(ttc_q.pop_front());
  end

  // ---------------- PC farm: parse packets ----------------
  logic [7:0] pkt[NB][$];
  int frag_cnt[NB];
  int frag_ts[NB][$];
  logic [31:0] frag_words[NB][$];
  always @(negedge clk) eth_ready <= NB'($urandom);
  always @(posedge clk) if (rst_n) begin
    for (int b = 0; b < NB; b++) if (eth_valid[b] && eth_ready[b]) begin
      pkt[b].push_back(eth_byte[b]);
      if (eth_last[b]) begin
        int nev, words;
        nev = pkt[b][42];
        words = {pkt[b][44], pkt[b][45]};
        check({pkt[b][30], pkt[b][31], pkt[b][32], pkt[b][33]} == 32'h0a0000fe && pkt[b][29] == 8'(b),
              "packet addresses");
        check(pkt[b].size() == 46 + 4 * words, "packet length");
        if (nev > 1) m_multi++;
        if (nev < 4) m_timeout++;
        for (int w = 0; w < words; w++)
          frag_words[b].push_back({pkt[b][46 + 4 * w], pkt[b][47 + 4 * w], pkt[b][48 + 4 * w], pkt[b][49 + 4 * w]});
        frag_cnt[b] += nev;
        pkt[b].delete();
      end
    end
  end

  // check every fragment of every board against the recorded hits
  task automatic check_fragments();
    for (int b = 0; b < NB; b++) begin
      int k, f;
      k = 0; f = 0;
      while (k < frag_words[b].size()) begin
        int t;
        logic [31:0] exp_set[4][$], got_set[4][$];
        check(frag_words[b][k][31:30] == 2'b10 && frag_words[b][k][29:24] == 6'(b), "fragment header");
        check(frag_words[b][k][23:0] == 24'(f), "fragment trigger number");
        t = int'(frag_words[b][k + 1]);
        check(f < trig_seen.size() && t == trig_seen[f], $sformatf("board %0d fragment %0d time %0d L0 time %0d", b, f, t, (f < trig_seen.size()) ? trig_seen[f] : -1));
        check(frag_words[b][k + 2][15:8] == 8'h11, "trigger type");
        k += 3;
        for (int p = 0; p < 4; p++) begin
          check(frag_words[b][k] == {2'b10, 6'(p), 24'(f)}, "PP block header");
          k++;
          while (frag_words[b][k][31:30] == 2'b00) begin got_set[p].push_back(frag_words[b][k]); k++; end
          check(frag_words[b][k][17:0] == 0, "PP block without lost frames");
          k++;
        end
        check(frag_words[b][k][31:30] == 2'b11 && frag_words[b][k][7:0] == 0, "fragment trailer");
        k++;
        foreach (hits[i]) if (hits[i].b == b && hits[i].t >= t - WINDOW && hits[i].t <= t + WINDOW)
          exp_set[hits[i].p].push_back(hits[i].w);
        for (int p = 0; p < 4; p++) begin
          got_set[p].sort(); exp_set[p].sort();
          check(got_set[p] == exp_set[p], $sformatf("board %0d trigger %0d PP %0d hits %0d expected %0d",
                b, f, p, got_set[p].size(), exp_set[p].size()));
          m_hits += got_set[p].size();
        end
        f++;
      end
      check(f == trig_seen.size(), $sformatf("board %0d fragments %0d of %0d", b, f, trig_seen.size()));
    end
  endtask

  // ---------------- HPTDC model and events ----------------
  int ev_time[NEV];
  bit ev_veto[NEV];
  task automatic drive_cycle();
    hit_valid = '0;
    for (int b = 0; b < NB; b++)
      for (int p = 0; p < 4; p++)
        for (int i = 0; i < 4; i++) begin
          hit_valid[b][p][i] = (ts >= 0) && ($urandom_range(0, 299) == 0);
          hit_edge[b][p][i] = 1'($urandom);
          hit_channel[b][p][i] = 5'($urandom);
          hit_time[b][p][i] = {11'(ts), 8'($urandom)};
        end
    for (int e = 0; e < NEV; e++) if (ts == ev_time[e]) begin
      for (int i = 0; i < THR; i++) begin
        hit_valid[0][0][i] = 1; hit_edge[0][0][i] = 0;
        hit_valid[1][0][i] = 1; hit_edge[1][0][i] = 0;
        if (ev_veto[e]) begin hit_valid[2][0][i] = 1; hit_edge[2][0][i] = 0; end
      end
    end
    // inhibit windows around events 6 (choke) and 11 (error), at decision time
    choke = (ts >= ev_time[6] + EVAL - 5 && ts <= ev_time[6] + EVAL + 5) ? 4'b0001 : 4'b0000;
    error = (ts >= ev_time[11] + EVAL - 5 && ts <= ev_time[11] + EVAL + 5) ? 4'b0100 : 4'b0000;
  endtask

  always @(posedge clk) if (rst_n && !sob && ts >= 0) begin
    for (int b = 0; b < NB; b++)
      for (int p = 0; p < 4; p++)
        for (int i = 0; i < 4; i++) if (hit_valid[b][p][i]) begin
          rec_t r;
          r.b = b; r.p = p; r.t = ts;
          r.w = {2'b00, hit_edge[b][p][i], 2'(i), hit_channel[b][p][i], 3'b000, hit_time[b][p][i]};
          hits.push_back(r);
          if (b == 0 && p == 0 && !hit_edge[b][p][i]) mon_cnt[{2'(i), hit_channel[b][p][i]}]++;
        end
  end

  initial begin
    int run;
    foreach (mon_cnt[i]) mon_cnt[i] = 0;
    threshold = {NB{8'(THR)}};
    hit_valid = '0; hit_edge = '0; hit_channel = '0; hit_time = '0;
    for (int e = 0; e < NEV; e++) begin
      ev_time[e] = 700 + e * SPACING + $urandom_range(0, 200);
      ev_veto[e] = (e % 5 == 3);
      if (!ev_veto[e] && e != 6 && e != 11) exp_trig.push_back(ev_time[e]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); sob = 1;
    @(negedge clk); sob = 0; ts = 0;
    run = ev_time[NEV - 1] + EVAL + 1000;
    for (int c = 0; c < run; c++) begin
      drive_cycle();
      @(negedge clk); ts++;
    end
    hit_valid = '0; choke = '0; error = '0;
    repeat (15000) begin @(negedge clk); ts++; end
    check(dut.u_l0tp.now == 32'(ts), "L0TP and TDCC burst clocks agree");
    // L0 decisions
    check(trig_seen.size() == exp_trig.size(), $sformatf("L0 triggers %0d expected %0d", trig_seen.size(), exp_trig.size()));
    foreach (exp_trig[i]) if (i < trig_seen.size()) check(trig_seen[i] == exp_trig[i], "L0 trigger time");
    check(l0_veto_total > 0, "veto happened");
    check(l0_late_total == 0, "no primitive arrived after its slot was decided");
    check(l0_choke_total == 1, "choke inhibit happened");
    check(l0_error_total == 1, "error inhibit happened");
    // readout
    check_fragments();
    for (int b = 0; b < NB; b++) begin
      check(frag_cnt[b] == trig_seen.size(), "fragments per board");
      check(lost_frames_total[b] == 0 && error_total[b] == 0, $sformatf("no readout errors %0d %0d", lost_frames_total[b], error_total[b]));
    end
    // monitoring
    for (int a = 0; a < 128; a++) begin
      mon_board = 0; mon_pp = 0; mon_addr = 8'(a); #1;
      check(mon_data == 32'(mon_cnt[a]), "monitor counter");
      m_mon++;
    end
    $display("mechanisms: L0 triggers %0d, vetoes %0d, choke inhibits %0d, error inhibits %0d, multi-event packets %0d, timeout packets %0d, extracted hits %0d, monitor reads %0d",
             m_trig, l0_veto_total, l0_choke_total, l0_error_total, m_multi, m_timeout, m_hits, m_mon);
    check(m_trig > 0, "mechanism: L0 trigger");
    check(m_multi > 0, "mechanism: multi-event packet");
    check(m_timeout > 0, "mechanism: timeout-flushed packet");
    check(m_hits > 0, "mechanism: window extraction with hits");
    check(m_mon > 0, "mechanism: monitor read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
