// tb_ttc_decoder: self-checking test of the SL TTC interface.
// Start of burst clears the timestamp and the trigger number. L0 accepts are followed
// after 1..6 clocks by the trigger-type broadcast, and sometimes by another accept first.
// Each request must carry the next trigger number, the broadcast type (0 when it was
// missing) and the accept time less the programmed latency, and must leave one clock
// after the broadcast.
module tb_ttc_decoder;
  import na62_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sob = 0, l1a = 0, brcst_valid = 0;
  logic [7:0] brcst = '0;
  logic [31:0] latency = 32'd37, timestamp, type_missing_total;
  logic trig_valid;
  trig_t trig;

  ttc_decoder dut (.*);

  int checks = 0, failures = 0, missing = 0, cyc = 0, sent = 0, got = 0;
  trig_t exp_q[$];
  int    exp_cyc[$];
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n && trig_valid) begin
      got++;
      if (exp_q.size() == 0) check(0, "unexpected trigger");
      else begin
        trig_t e; int c;
        e = exp_q.pop_front(); c = exp_cyc.pop_front();
        check(trig == e, $sformatf("trigger %h expected %h", trig, e));
        if (c >= 0) check(cyc == c + 2, $sformatf("one clock after the broadcast (%0d)", cyc - c));
      end
    end
  end

  initial begin
    int ts0, num;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    sob = 1; @(negedge clk); sob = 0;
    ts0 = cyc;   // timestamp is 0 at the edge after sob
    num = 0;
    for (int i = 0; i < 200; i++) begin
      int at, d;
      repeat ($urandom_range(8, 40)) @(negedge clk);
      l1a = 1; at = cyc - ts0; @(negedge clk); l1a = 0;
      d = $urandom_range(0, 5);
      repeat (d) @(negedge clk);
      if (i % 17 == 16) begin
        // type lost: the next accept arrives first
        exp_q.push_back('{num: 24'(num), ttype: 8'h0, ts: 32'(at) - latency});
        exp_cyc.push_back(-1);
        missing++; num++;
        continue;
      end
      brcst_valid = 1; brcst = 8'($urandom);
      exp_q.push_back('{num: 24'(num), ttype: brcst, ts: 32'(at) - latency});
      exp_cyc.push_back(cyc);
      num++;
      @(negedge clk); brcst_valid = 0;
    end
    repeat (10) @(negedge clk);
    check(exp_q.size() == 0, "every trigger dispatched");
    check(type_missing_total == 32'(missing), "missing-type counter");
    check(timestamp == 32'(cyc - ts0), "timestamp counts 25 ns periods");
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
