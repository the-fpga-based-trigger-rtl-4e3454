// tb_l0tp: self-checking test of the L0 trigger processor.
// Four detectors send primitives with random timestamps 10..100 slots in the past:
// detector 0 is the reference (RICH), 1 a positive element (CHOD), 2 and 3 negative ones
// (MUV, LAV). Choke and error lines are raised for a while. A reference model decides
// every evaluated slot: reference primitive exactly there, positive detector within
// +-window, no negative detector within +-window, no choke/error at evaluation time. The
// list of trigger timestamps, the trigger numbers, the veto/choke/error counters and the
// drop of one late primitive are checked, as is the evaluation delay of the decision.
module tb_l0tp;
  import na62_pkg::*;
  localparam int W = 3, DELAY = 200, RUN = 6000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sob = 0;
  logic [3:0] prim_valid = '0, choke = '0, error = '0;
  prim_t [3:0] prim = '0;
  logic trig_valid;
  trig_t trig;
  logic [31:0] now, late_total, veto_total, choke_total, error_total;

  l0tp dut (.clk, .rst_n, .sob, .pos_mask(4'b0011), .neg_mask(4'b1100), .ref_det(2'd0),
    .window(4'(W)), .eval_delay(10'(DELAY)), .trig_type(8'h21), .prim_valid, .prim, .choke,
    .error, .trig_valid, .trig, .now, .late_total, .veto_total, .choke_total, .error_total);

  int checks = 0, failures = 0;
  bit occ[4][int];
  bit chk[int], err[int];
  int got[$];
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && !sob) begin
    chk[int'(now)] = |choke;
    err[int'(now)] = |error;
    for (int d = 0; d < 4; d++)
      if (prim_valid[d] && !(int'(prim[d].ts) + W < int'(now) - DELAY)) occ[d][int'(prim[d].ts)] = 1;
    if (trig_valid) begin
      check(trig.num == 24'(got.size()) && trig.ttype == 8'h21, "trigger number and type");
      check(int'(now) == int'(trig.ts) + DELAY + 1, "decision one clock after evaluation");
      got.push_back(int'(trig.ts));
    end
  end

  function automatic bit near(int d, int e);
    for (int k = -W; k <= W; k++) if (occ[d].exists(e + k)) return 1;
    return 0;
  endfunction

  initial begin
    int exp_list[$], vetoes, chokes, errors, last_e;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); sob = 1; @(negedge clk); sob = 0;
    for (int t = 0; t < RUN; t++) begin
      int pct[4];
      pct = '{4, 35, 2, 2};
      for (int d = 0; d < 4; d++) begin
        int lat;
        lat = $urandom_range(10, 100);
        prim_valid[d] = ($urandom_range(0, 99) < pct[d]) && (int'(now) > lat);
        prim[d] = '{ts: now - 32'(lat), mult: 8'd1};
      end
      if (t == 3000) begin prim_valid[1] = 1; prim[1] = '{ts: now - 32'(DELAY + 50), mult: 8'd1}; end
      choke = (t >= 2000 && t < 2600) ? 4'b0010 : 4'b0000;
      error = (t >= 4000 && t < 4400) ? 4'b1000 : 4'b0000;
      @(negedge clk);
    end
    prim_valid = '0; choke = '0; error = '0;
    repeat (DELAY + 20) @(negedge clk);
    last_e = int'(now) - DELAY - 2;
    vetoes = 0; chokes = 0; errors = 0;
    for (int e = 0; e <= last_e; e++) begin
      if (occ[0].exists(e) && near(1, e)) begin
        if (near(2, e) || near(3, e)) vetoes++;
        else if (err[e + DELAY]) errors++;
        else if (chk[e + DELAY]) chokes++;
        else exp_list.push_back(e);
      end
    end
    check(got.size() == exp_list.size(), $sformatf("triggers %0d expected %0d", got.size(), exp_list.size()));
    foreach (exp_list[i]) if (i < got.size()) check(got[i] == exp_list[i], $sformatf("trigger %0d at %0d expected %0d", i, got[i], exp_list[i]));
    check(veto_total == 32'(vetoes) && vetoes > 0, $sformatf("vetoes %0d expected %0d", veto_total, vetoes));
    check(choke_total == 32'(chokes) && chokes > 0, $sformatf("chokes %0d expected %0d", choke_total, chokes));
    check(error_total == 32'(errors) && errors > 0, $sformatf("errors %0d expected %0d", error_total, errors));
    check(late_total == 1, "late primitive dropped");
    check(exp_list.size() > 20, "enough triggers");
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
