// tb_sync_fifo: self-checking test of the FIFO at its default size (32768 x 32 bit, the
// SL event-fragment buffer). Fills it completely to check full and level, drains it in
// order, then runs random simultaneous reads and writes against a queue model.
module tb_sync_fifo;
  localparam int DEPTH = 32768;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [31:0] wr_data = '0, rd_data;
  logic [15:0] level;

  sync_fifo dut (.clk, .rst_n, .wr_en, .wr_data, .full, .rd_en, .rd_data, .empty, .level);

  int checks = 0, failures = 0;
  logic [31:0] model[$];
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (rd_en && !empty) begin
      check(model.size() > 0 && rd_data == model[0], "read data");
      void'(model.pop_front());
    end
    if (wr_en && !full) model.push_back(wr_data);
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(empty && level == 0, "empty after reset");
    for (int i = 0; i < DEPTH; i++) begin
      wr_en = 1; wr_data = $urandom; @(negedge clk);
    end
    wr_en = 0;
    check(full && level == 16'(DEPTH), "full after DEPTH writes");
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      rd_en = 1; @(negedge clk);
    end
    rd_en = 0;
    check(empty && model.size() == 0, "empty after draining");
    for (int i = 0; i < 20000; i++) begin
      wr_en = ($urandom_range(0, 1) == 1) && !full;
      rd_en = ($urandom_range(0, 1) == 1) && !empty;
      wr_data = $urandom;
      @(negedge clk);
      check(int'(level) == model.size(), "level matches model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
