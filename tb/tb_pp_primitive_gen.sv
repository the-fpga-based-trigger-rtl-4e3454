// tb_pp_primitive_gen: self-checking test of the slot-multiplicity primitive generator.
// Frames with clustered leading and trailing hits are sent; the model histograms the
// leading hits per 25 ns slot and expects one primitive {frame, slot, count} for every
// slot at or above the threshold, in slot order, within the 256-clock scan that follows
// the trailer. One slot gets 300 hits (count saturates at 255); threshold 0 disables the
// output; two frames back to back are both scanned, a third one raises the overrun counter.
module tb_pp_primitive_gen;
  import na62_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] threshold = 8'd3;
  logic in_valid = 0, prim_valid;
  logic [31:0] in_data = '0, overrun_total;
  prim_t prim;

  pp_primitive_gen dut (.clk, .rst_n, .threshold, .in_valid, .in_data, .prim_valid, .prim, .overrun_total);

  int checks = 0, failures = 0, cyc = 0, trl_cyc = 0, sat_seen = 0;
  prim_t exp_q[$];
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n && prim_valid) begin
      if (exp_q.size() == 0) check(0, $sformatf("unexpected primitive %h", prim));
      else begin
        prim_t e;
        e = exp_q.pop_front();
        check(prim == e, $sformatf("primitive %h expected %h", prim, e));
        check(cyc - trl_cyc <= 258 + 256, "primitive within two scan periods");
        if (prim.mult == 8'hff) sat_seen++;
      end
    end
  end

  task automatic send_frame(int f, bit big, bit predict);
    int cnt[256];
    logic [31:0] words[$];
    for (int s = 0; s < 256; s++) cnt[s] = 0;
    for (int c = 0; c < 6; c++) begin
      int s, n;
      s = $urandom_range(0, 255);
      n = $urandom_range(1, 6);
      for (int k = 0; k < n; k++) begin
        bit tr;
        tr = ($urandom_range(0, 3) == 0);
        words.push_back({2'b00, tr, 7'($urandom), 3'b0, 3'(f), 8'(s), 8'($urandom)});
        if (!tr) cnt[s]++;
      end
    end
    if (big) for (int k = 0; k < 300; k++) begin
      words.push_back({2'b00, 1'b0, 7'($urandom), 3'b0, 3'(f), 8'd77, 8'($urandom)});
      cnt[77]++;
    end
    words.shuffle();
    @(negedge clk); in_valid = 1; in_data = {2'b10, 6'd0, 24'(f)};
    foreach (words[i]) begin @(negedge clk); in_data = words[i]; end
    @(negedge clk); in_data = {2'b11, 12'(words.size()), 18'd0};
    @(negedge clk); in_valid = 0;
    trl_cyc = cyc;
    if (predict && threshold != 0)
      for (int s = 0; s < 256; s++)
        if (cnt[s] >= int'(threshold)) exp_q.push_back('{ts: {24'(f), 8'(s)}, mult: 8'(cnt[s] > 255 ? 255 : cnt[s])});
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 30; f++) begin
      threshold = (f == 20) ? 8'd0 : 8'($urandom_range(1, 4));
      send_frame(f, f == 10, 1);
      repeat (300) @(negedge clk);
      check(exp_q.size() == 0, $sformatf("frame %0d primitives all seen", f));
    end
    threshold = 8'd2;
    send_frame(40, 0, 1);   // scanned at once
    send_frame(41, 0, 1);   // waits for the scanner
    send_frame(42, 0, 0);   // third frame during the same scan: overrun, not scanned
    repeat (700) @(negedge clk);
    check(exp_q.size() == 0, "back-to-back frames both scanned");
    check(overrun_total == 1, "overrun counted");
    check(sat_seen == 1, "saturated multiplicity seen");
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
