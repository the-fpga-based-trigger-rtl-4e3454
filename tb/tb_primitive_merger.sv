// tb_primitive_merger: self-checking test of the SL primitive merger.
// Four PP inputs send primitives at random; every output must be the oldest not yet seen
// primitive of the source it is tagged with (primitives lost at a full queue are skipped
// and must equal the drop counter). A burst on all four inputs overflows the queues. An
// isolated primitive must come out two clocks after it went in.
module tb_primitive_merger;
  import na62_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] in_valid = '0;
  prim_t [3:0] in_prim = '0;
  logic out_valid;
  prim_t out_prim;
  logic [1:0] out_src;
  logic [31:0] dropped_total;

  primitive_merger dut (.*);

  int checks = 0, failures = 0, cyc = 0, skipped = 0, received = 0, sent = 0, in_cyc = -1;
  prim_t q[4][$];
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (out_valid) begin
      bit found;
      found = 0;
      received++;
      while (q[out_src].size() > 0 && !found) begin
        if (q[out_src][0] == out_prim) found = 1;
        else skipped++;
        void'(q[out_src].pop_front());
      end
      check(found, "output is a queued primitive of its source");
      if (in_cyc >= 0) begin
        check(cyc == in_cyc + 2, $sformatf("latency %0d", cyc - in_cyc));
        in_cyc = -1;
      end
    end
    for (int i = 0; i < 4; i++) if (in_valid[i]) begin q[i].push_back(in_prim[i]); sent++; end
  end

  task automatic drive(int prob_pct);
    for (int i = 0; i < 4; i++) begin
      in_valid[i] = ($urandom_range(0, 99) < prob_pct);
      in_prim[i] = '{ts: $urandom, mult: 8'($urandom)};
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2000) drive(20);
    in_valid = '0; repeat (30) @(negedge clk);
    check(skipped == 0 && dropped_total == 0, "no loss at moderate rate");
    in_valid = 4'b0100; in_prim[2] = '{ts: 32'h1234, mult: 8'd9}; in_cyc = cyc + 1;
    @(negedge clk); in_valid = '0;
    repeat (10) @(negedge clk);
    repeat (100) drive(100);
    in_valid = '0; repeat (100) @(negedge clk);
    check(dropped_total > 0, "overflow exercised");
    for (int i = 0; i < 4; i++) begin skipped += q[i].size(); q[i].delete(); end
    check(32'(skipped) == dropped_total, $sformatf("skipped %0d dropped %0d", skipped, dropped_total));
    check(received + skipped == sent, "every primitive accounted for");
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
