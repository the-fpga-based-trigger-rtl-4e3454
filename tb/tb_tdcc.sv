// tb_tdcc: self-checking test of the TDC controller readout.
// Checks that the periodic TDC trigger comes every 256 clocks (6.4 us at 40 MHz) and
// not in frame 0, that each of the four buses carries, per frame, a header with the
// frame number, exactly the hits driven on that TDC during the frame (channel extended
// with the TDC index) and a trailer with their count, and that the header leaves two
// clocks after the trigger when the bus is ready. A start-of-burst clears the timestamp.
module tb_tdcc;
  import na62_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sob = 0;
  logic [3:0] hit_valid = '0, hit_edge = '0, bus_ready = '1, bus_valid;
  logic [3:0][4:0] hit_channel = '0;
  logic [3:0][18:0] hit_time = '0;
  logic tdc_trigger;
  logic [31:0] timestamp;
  logic [3:0][31:0] bus_data, dropped_total;

  tdcc dut (.*);

  int checks = 0, failures = 0, triggers = 0, last_trig = -1, cyc = 0;
  logic [31:0] exp_q[4][$], cur[4][$];
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (tdc_trigger) begin
      triggers++;
      if (last_trig >= 0) check(cyc - last_trig == 256, $sformatf("trigger period %0d", cyc - last_trig));
      last_trig = cyc;
      check(timestamp[7:0] == 0 && timestamp[31:8] != 0, "trigger at frame boundary");
      for (int i = 0; i < 4; i++) begin
        exp_q[i].push_back({2'b10, 6'(i), 24'(timestamp[31:8] - 1)});
        foreach (cur[i][k]) exp_q[i].push_back(cur[i][k]);
        exp_q[i].push_back({2'b11, 12'(cur[i].size()), 18'd0});
        cur[i].delete();
      end
    end
    for (int i = 0; i < 4; i++) begin
      if (hit_valid[i]) cur[i].push_back({2'b00, hit_edge[i], 2'(i), hit_channel[i], 3'b000, hit_time[i]});
      if (bus_valid[i] && bus_ready[i]) begin
        logic [31:0] e;
        if (exp_q[i].size() == 0) check(0, "unexpected word");
        else begin
          e = exp_q[i].pop_front();
          check(bus_data[i] == e, $sformatf("bus %0d word %h expected %h", i, bus_data[i], e));
        end
      end
    end
  end

  // latency of the header after the trigger, bus always ready at that moment
  always @(posedge clk) if (rst_n && tdc_trigger && bus_ready == '1) begin
    repeat (2) @(posedge clk);
    check(bus_valid == '1 && bus_data[0][31:30] == 2'b10, "header two clocks after trigger");
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); sob = 1; @(negedge clk); sob = 0;
    for (int t = 0; t < 256 * 10; t++) begin
      for (int i = 0; i < 4; i++) begin
        hit_valid[i] = ($urandom_range(0, 7) == 0);
        hit_edge[i] = 1'($urandom);
        hit_channel[i] = 5'($urandom);
        hit_time[i] = 19'($urandom);
      end
      bus_ready = (t % 256 < 200) ? 4'hf : 4'($urandom);
      @(negedge clk);
    end
    hit_valid = '0; bus_ready = '1;
    repeat (600) @(negedge clk);
    for (int i = 0; i < 4; i++) check(exp_q[i].size() == 0, "all words seen");
    check(triggers == 12, $sformatf("triggers %0d", triggers));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
