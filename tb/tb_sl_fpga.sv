// tb_sl_fpga: self-checking test of the SL-FPGA.
// TTC accepts with trigger-type broadcasts are applied after a start of burst; every
// request dispatched to the PPs must carry the next number, the type and the accept time
// less the latency. Four behavioural PPs answer each request with random hits. The UDP
// byte stream is parsed and the fragments found in the multi-event packets are compared
// word by word with the expected fragments (header, timestamp, type, PP blocks, trailer).
// Primitives sent by the PPs must all reach the L0TP output.
module tb_sl_fpga;
  import na62_pkg::*;
  localparam int NTRIG = 40, LAT = 50;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sob = 0, l1a = 0, brcst_valid = 0, eth_ready = 0, eth_valid, eth_last, prim_valid, trig_valid;
  logic [7:0] brcst = '0, eth_byte;
  logic [31:0] timestamp, packets_total, type_missing_total, dropped_trig_total, dropped_prim_total;
  trig_t trig;
  logic [3:0] pp_valid = '0, pp_ready, pp_prim_valid = '0;
  logic [3:0][31:0] pp_data = '0;
  prim_t [3:0] pp_prim = '0;
  prim_t prim;
  logic [1:0] prim_src;

  sl_fpga dut (.clk, .rst_n, .board_id(6'd3), .sob, .l1a, .brcst_valid, .brcst,
    .latency(32'(LAT)), .timestamp, .trig_valid, .trig, .pp_valid, .pp_ready, .pp_data,
    .pp_prim_valid, .pp_prim, .mep_factor(8'd4), .mep_timeout(16'd400),
    .src_mac(48'h020000006203), .dst_mac(48'h0200000000fe), .src_ip(32'h0a000003),
    .dst_ip(32'h0a0000fe), .src_port(16'd5000), .dst_port(16'd5001),
    .eth_valid, .eth_ready, .eth_byte, .eth_last, .prim_valid, .prim, .prim_src,
    .packets_total, .type_missing_total, .dropped_trig_total, .dropped_prim_total);

  int checks = 0, failures = 0, ntrig = 0, nfrag = 0, nprim_in = 0, nprim_out = 0, npk = 0;
  logic [31:0] src_q[4][$], frag_q[$];
  logic [7:0] pkt[$];
  int accept_ts[$];
  bit prim_on = 1;
  logic [7:0] types[$];
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // behavioural PPs and the expected fragment
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++) if (pp_valid[i] && pp_ready[i]) void'(src_q[i].pop_front());
    nprim_in += $countones(pp_prim_valid);
    if (prim_valid) nprim_out++;
    if (trig_valid) begin
      int len;
      check(trig.num == 24'(ntrig) && trig.ttype == types[ntrig] &&
            int'(trig.ts) == accept_ts[ntrig] - LAT, "dispatched request");
      ntrig++;
      frag_q.push_back({2'b10, 6'd3, trig.num});
      frag_q.push_back(trig.ts);
      frag_q.push_back({2'b01, 14'b0, trig.ttype, 8'b0});
      len = 4;
      for (int i = 0; i < 4; i++) begin
        int n;
        n = $urandom_range(0, 20);
        src_q[i].push_back({2'b10, 6'(i), trig.num}); frag_q.push_back({2'b10, 6'(i), trig.num});
        for (int k = 0; k < n; k++) begin
          logic [31:0] w;
          w = {2'b00, 30'($urandom)};
          src_q[i].push_back(w); frag_q.push_back(w);
        end
        src_q[i].push_back({2'b11, 12'(n), 18'd0}); frag_q.push_back({2'b11, 12'(n), 18'd0});
        len += n + 2;
      end
      frag_q.push_back({2'b11, 12'(len), 18'd0});
    end
  end
  always @(negedge clk) if (rst_n) begin
    eth_ready <= ($urandom_range(0, 3) != 0);
    for (int i = 0; i < 4; i++) begin
      pp_valid[i] <= (src_q[i].size() > 0) && ($urandom_range(0, 2) != 0);
      pp_data[i]  <= (src_q[i].size() > 0) ? src_q[i][0] : '0;
      pp_prim_valid[i] <= prim_on && ($urandom_range(0, 19) == 0);
      pp_prim[i] <= '{ts: $urandom, mult: 8'($urandom)};
    end
  end

  // packet parser
  always @(posedge clk) if (rst_n && eth_valid && eth_ready) begin
    pkt.push_back(eth_byte);
    if (eth_last) begin
      int words, nev;
      npk++;
      check({pkt[12], pkt[13]} == 16'h0800 && pkt[23] == 8'h11, "IPv4/UDP packet");
      nev = pkt[42];
      words = {pkt[44], pkt[45]};
      check(pkt.size() == 46 + 4 * words, "packet length");
      check(nev >= 1 && nev <= 4, "events per packet");
      for (int w = 0; w < words; w++) begin
        logic [31:0] got, e;
        got = {pkt[46 + 4 * w], pkt[47 + 4 * w], pkt[48 + 4 * w], pkt[49 + 4 * w]};
        e = (frag_q.size() > 0) ? frag_q.pop_front() : 32'hdeadbeef;
        check(got == e, $sformatf("payload word %h expected %h", got, e));
      end
      nfrag += nev;
      pkt.delete();
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); sob = 1; @(negedge clk); sob = 0;
    for (int t = 0; t < NTRIG; t++) begin
      repeat ($urandom_range(60, 200)) @(negedge clk);
      accept_ts.push_back(int'(timestamp));
      types.push_back(8'($urandom_range(1, 63)));
      l1a = 1; @(negedge clk); l1a = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
      brcst_valid = 1; brcst = types[t]; @(negedge clk); brcst_valid = 0;
    end
    prim_on = 0;
    repeat (20000) @(negedge clk);
    check(ntrig == NTRIG, "all requests dispatched");
    check(nfrag == NTRIG && frag_q.size() == 0, $sformatf("fragments %0d", nfrag));
    check(packets_total == 32'(npk) && npk < NTRIG, "multi-event packets");
    check(nprim_out == nprim_in && nprim_in > 0 && dropped_prim_total == 0, "primitives forwarded");
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
