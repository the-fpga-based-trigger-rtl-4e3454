// tb_pp_monitor: self-checking test of the PP monitoring counters.
// Random merged frames are fed; per-channel leading-hit counts, the frame count and the
// count of frames whose trailer reports errors are modelled and read back through the
// register port, then cleared and read again.
module tb_pp_monitor;
  import na62_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, in_valid = 0;
  logic [31:0] in_data = '0, rd_data;
  logic [7:0] rd_addr = '0;

  pp_monitor dut (.*);

  int checks = 0, failures = 0;
  int cnt[128], frames = 0, errf = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    foreach (cnt[i]) cnt[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 50; f++) begin
      int n, e;
      n = $urandom_range(0, 30);
      e = ($urandom_range(0, 4) == 0) ? $urandom_range(1, 9) : 0;
      @(negedge clk); in_valid = 1; in_data = {2'b10, 6'd0, 24'(f)};
      for (int k = 0; k < n; k++) begin
        bit tr;
        logic [6:0] ch;
        tr = 1'($urandom); ch = 7'($urandom);
        @(negedge clk); in_data = {2'b00, tr, ch, 3'b0, 19'($urandom)};
        if (!tr) cnt[ch]++;
      end
      @(negedge clk); in_data = {2'b11, 12'(n), 18'(e)};
      frames++; if (e != 0) errf++;
      @(negedge clk); in_valid = 0; in_data = $urandom;  // idle cycle, data ignored
    end
    @(negedge clk); in_valid = 0;
    for (int a = 0; a < 128; a++) begin
      rd_addr = 8'(a); #1;
      check(rd_data == 32'(cnt[a]), $sformatf("channel %0d count %0d expected %0d", a, rd_data, cnt[a]));
    end
    rd_addr = 8'd128; #1; check(rd_data == 32'(frames), "frame count");
    rd_addr = 8'd129; #1; check(rd_data == 32'(errf), "error frame count");
    check(errf > 0, "error frames exercised");
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    rd_addr = 8'd5; #1; check(rd_data == 0, "cleared channel");
    rd_addr = 8'd128; #1; check(rd_data == 0, "cleared frames");
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
