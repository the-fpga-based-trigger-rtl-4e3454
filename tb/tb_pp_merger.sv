// tb_pp_merger: self-checking test of the PP frame merger.
// Four behavioural TDC buses send frames (header, random hits, trailer with count and a
// drop count) with random gaps; one frame carries a wrong frame number on bus 2. The
// checker predicts the merged frame: one header with the PP index, hits of bus 0..3 in
// order, trailer with the summed count and summed errors (+0x20000 on the mismatch).
module tb_pp_merger;
  import na62_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] in_valid = '0, in_ready;
  logic [3:0][31:0] in_data = '0;
  logic out_valid;
  logic [31:0] out_data, mismatch_total;

  pp_merger dut (.clk, .rst_n, .pp_id(2'd1), .in_valid, .in_ready, .in_data, .out_valid,
    .out_data, .mismatch_total);

  int checks = 0, failures = 0, frames = 0;
  logic [31:0] src_q[4][$], exp_q[$];
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // build the stimulus and the expected output
  initial begin
    for (int f = 0; f < 20; f++) begin
      int total, errs;
      total = 0; errs = 0;
      exp_q.push_back({2'b10, 6'd1, 24'(f + 100)});
      for (int i = 0; i < 4; i++) begin
        int n, d;
        logic [23:0] fn;
        n = $urandom_range(0, 12); d = $urandom_range(0, 2);
        fn = (f == 7 && i == 2) ? 24'(f + 999) : 24'(f + 100);
        src_q[i].push_back({2'b10, 6'(i), fn});
        for (int k = 0; k < n; k++) begin
          logic [31:0] w;
          w = {2'b00, 1'($urandom), 2'(i), 5'($urandom), 3'b0, 19'($urandom)};
          src_q[i].push_back(w);
          exp_q.push_back(w);
        end
        src_q[i].push_back({2'b11, 12'(n), 18'(d)});
        total += n; errs += d;
      end
      if (f == 7) errs += 18'h20000;
      exp_q.push_back({2'b11, 12'(total), 18'(errs)});
    end
  end

  // drivers: present the next word of each bus with random gaps
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++) begin
      if (in_valid[i] && in_ready[i]) void'(src_q[i].pop_front());
    end
  end
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++) begin
      in_valid[i] <= (src_q[i].size() > 0) && ($urandom_range(0, 2) != 0);
      in_data[i]  <= (src_q[i].size() > 0) ? src_q[i][0] : '0;
    end
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [31:0] e;
    if (exp_q.size() == 0) check(0, "unexpected word");
    else begin
      e = exp_q.pop_front();
      check(out_data == e, $sformatf("word %h expected %h", out_data, e));
      if (out_data[31:30] == 2'b11) frames++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3000) @(negedge clk);
    check(exp_q.size() == 0, "all merged words seen");
    check(frames == 20, $sformatf("frames %0d", frames));
    check(mismatch_total == 1, "one frame-number mismatch");
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
