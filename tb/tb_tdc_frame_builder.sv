// tb_tdc_frame_builder: self-checking test of the per-TDC frame builder.
// A reference model tracks the hit FIFO occupancy (a hit is taken when fewer than 256
// words were stored before the clock edge) and predicts every output word: header with the
// frame number, the accepted hits in order, trailer with hit and drop counts. Random hits
// and random back-pressure are applied; one frame is flooded while the output is stalled
// so that the FIFO overflows. Frames are 256 clocks as in the TDCC.
module tb_tdc_frame_builder;
  import na62_pkg::*;
  localparam int DEPTH = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic frame_tick = 0, hit_valid = 0, hit_edge = 0, out_ready = 0;
  logic [FRAME_W-1:0] frame_num = '0;
  logic [TDC_CH_W-1:0] hit_channel = '0;
  logic [TDC_TIME_W-1:0] hit_time = '0;
  logic out_valid;
  logic [31:0] out_data, dropped_total;

  tdc_frame_builder dut (.clk, .rst_n, .tdc_id(2'd2), .frame_tick, .frame_num, .hit_valid,
    .hit_edge, .hit_channel, .hit_time, .out_valid, .out_ready, .out_data, .dropped_total);

  int checks = 0, failures = 0, frames_seen = 0, drops = 0;
  logic [31:0] exp_q[$], cur_hits[$];
  int level = 0, cur_drop = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference model and output checker, sampled at the clock edge
  always @(posedge clk) if (rst_n) begin
    int pop;
    pop = (out_valid && out_ready && out_data[31:30] == 2'b00) ? 1 : 0;
    if (frame_tick) begin
      exp_q.push_back({2'b10, 6'd2, frame_num});
      foreach (cur_hits[i]) exp_q.push_back(cur_hits[i]);
      exp_q.push_back({2'b11, 12'(cur_hits.size()), 18'(cur_drop)});
      cur_hits.delete();
      cur_drop = 0;
    end
    if (hit_valid) begin
      if (level < DEPTH) begin
        cur_hits.push_back({2'b00, hit_edge, 2'd2, hit_channel, 3'b000, hit_time});
        level++;
      end else begin
        cur_drop++; drops++;
      end
    end
    level -= pop;
    if (out_valid && out_ready) begin
      if (exp_q.size() == 0) check(0, "unexpected word");
      else begin
        logic [31:0] e;
        e = exp_q.pop_front();
        check(out_data == e, $sformatf("word %h expected %h", out_data, e));
        if (out_data[31:30] == 2'b11) frames_seen++;
      end
    end
  end

  int t;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (t = 0; t < 256 * 14; t++) begin
      @(negedge clk);
      frame_tick = (t % 256 == 255);
      if (frame_tick) frame_num = FRAME_W'(t / 256);
      if (t / 256 == 5 || t / 256 == 6) begin          // flood with output stalled
        hit_valid = 1; out_ready = 0;
      end else begin
        hit_valid = ($urandom_range(0, 3) == 0);
        out_ready = ($urandom_range(0, 4) != 0);
      end
      hit_edge    = 1'($urandom);
      hit_channel = TDC_CH_W'($urandom);
      hit_time    = TDC_TIME_W'($urandom);
    end
    hit_valid = 0; frame_tick = 0; out_ready = 1;
    repeat (2000) @(negedge clk);
    check(exp_q.size() == 0, "all expected words seen");
    check(frames_seen == 13, $sformatf("frames seen %0d", frames_seen));
    check(drops > 0, "overflow exercised");
    check(dropped_total == 32'(drops), "dropped_total");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
