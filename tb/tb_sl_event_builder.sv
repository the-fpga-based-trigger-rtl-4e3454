// tb_sl_event_builder: self-checking test of the SL event-fragment builder.
// For every queued request four behavioural PPs answer (header with trigger number, hits,
// trailer with count and lost frames) with random gaps while the buffer-full input
// toggles. The expected fragment (header, timestamp, type word, PP 0..3 blocks, trailer
// with length and error bits) and the frag_done length are checked. One PP answer carries
// a wrong trigger number and one reports lost frames.
module tb_sl_event_builder;
  import na62_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic trig_valid = 0, wr_full = 0, wr_en, frag_done;
  trig_t trig = '0;
  logic [3:0] pp_valid = '0, pp_ready;
  logic [3:0][31:0] pp_data = '0;
  logic [31:0] wr_data, dropped_trig_total;
  logic [15:0] frag_len;

  sl_event_builder dut (.clk, .rst_n, .board_id(6'd9), .trig_valid, .trig, .pp_valid,
    .pp_ready, .pp_data, .wr_en, .wr_data, .wr_full, .frag_done, .frag_len, .dropped_trig_total);

  int checks = 0, failures = 0, frags = 0;
  logic [31:0] src_q[4][$], exp_q[$];
  int len_q[$];
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++) if (pp_valid[i] && pp_ready[i]) void'(src_q[i].pop_front());
    if (wr_en) begin
      check(!wr_full, "no write while full");
      if (exp_q.size() == 0) check(0, "unexpected word");
      else begin
        logic [31:0] e;
        e = exp_q.pop_front();
        check(wr_data == e, $sformatf("word %h expected %h", wr_data, e));
      end
    end
    if (frag_done) begin
      frags++;
      check(len_q.size() > 0 && int'(frag_len) == len_q.pop_front(), "fragment length");
    end
  end
  always @(negedge clk) if (rst_n) begin
    wr_full <= ($urandom_range(0, 5) == 0);
    for (int i = 0; i < 4; i++) begin
      pp_valid[i] <= (src_q[i].size() > 0) && ($urandom_range(0, 2) != 0);
      pp_data[i]  <= (src_q[i].size() > 0) ? src_q[i][0] : '0;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      trig_t tr;
      int len;
      logic [3:0] nerr, lerr;
      tr = '{num: 24'(t + 1000), ttype: 8'($urandom), ts: $urandom};
      exp_q.push_back({2'b10, 6'd9, tr.num});
      exp_q.push_back(tr.ts);
      exp_q.push_back({2'b01, 14'b0, tr.ttype, 8'b0});
      len = 3; nerr = 0; lerr = 0;
      for (int i = 0; i < 4; i++) begin
        int n, lost;
        logic [23:0] num;
        n = $urandom_range(0, 8);
        lost = (t == 5 && i == 1) ? 2 : 0;
        num = (t == 9 && i == 3) ? tr.num + 1 : tr.num;
        if (lost != 0) lerr[i] = 1;
        if (num != tr.num) nerr[i] = 1;
        src_q[i].push_back({2'b10, 6'(i), num}); exp_q.push_back({2'b10, 6'(i), num});
        for (int k = 0; k < n; k++) begin
          logic [31:0] w;
          w = {2'b00, 30'($urandom)};
          src_q[i].push_back(w); exp_q.push_back(w);
        end
        src_q[i].push_back({2'b11, 12'(n), 18'(lost)}); exp_q.push_back({2'b11, 12'(n), 18'(lost)});
        len += n + 2;
      end
      len++;
      exp_q.push_back({2'b11, 12'(len), 10'b0, lerr, nerr});
      len_q.push_back(len);
      @(negedge clk); trig_valid = 1; trig = tr;
      @(negedge clk); trig_valid = 0;
      repeat ($urandom_range(0, 20)) @(negedge clk);
      while (t - frags > 10) @(negedge clk);   // keep the request queue from overflowing
    end
    repeat (2000) @(negedge clk);
    check(exp_q.size() == 0, "all fragment words written");
    check(frags == 30, $sformatf("fragments %0d", frags));
    check(dropped_trig_total == 0, "no request dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
