// tb_udp_packer: self-checking test of the multi-event UDP packet assembler.
// Fragments of random length are loaded into a fragment FIFO and a length FIFO (the same
// FIFO module the SL uses). The packer then runs with random MAC back-pressure. Every
// packet is parsed byte by byte: Ethernet addresses and type, IPv4 fields, the header
// checksum (the one's complement sum of the header must be 0xffff), the IPv4 and UDP
// lengths, the MEP header and the payload against a model that packs mep_factor fragments
// per packet while the payload fits in 1472 bytes. The last fragment is sent alone after
// the timeout.
module tb_udp_packer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] mep_factor = 8'd0;
  logic [15:0] timeout = 16'd500;
  logic [47:0] src_mac = 48'h02_00_00_00_62_01, dst_mac = 48'h02_00_00_00_00_fe;
  logic [31:0] src_ip = 32'h0a_00_00_01, dst_ip = 32'h0a_00_00_fe;
  logic [15:0] src_port = 16'd5000, dst_port = 16'd58913;

  logic f_wr = 0, f_full, f_rd, f_empty, l_wr = 0, l_full, l_rd, l_empty;
  logic [31:0] f_wdata = '0, f_rdata;
  logic [15:0] l_wdata = '0, l_rdata;
  logic [12:0] f_level;
  logic [7:0] l_level;
  logic out_valid, out_ready = 0, out_last;
  logic [7:0] out_byte;
  logic [31:0] packets_total;

  sync_fifo #(.WIDTH(32), .DEPTH(4096)) u_f (.clk, .rst_n, .wr_en(f_wr), .wr_data(f_wdata),
    .full(f_full), .rd_en(f_rd), .rd_data(f_rdata), .empty(f_empty), .level(f_level));
  sync_fifo #(.WIDTH(16), .DEPTH(128)) u_l (.clk, .rst_n, .wr_en(l_wr), .wr_data(l_wdata),
    .full(l_full), .rd_en(l_rd), .rd_data(l_rdata), .empty(l_empty), .level(l_level));

  udp_packer dut (.clk, .rst_n, .mep_factor, .timeout, .source_id(8'd7), .src_mac, .dst_mac,
    .src_ip, .dst_ip, .src_port, .dst_port, .frag_data(f_rdata), .frag_empty(f_empty),
    .frag_rd(f_rd), .len_data(l_rdata), .len_empty(l_empty), .len_level(l_level), .len_rd(l_rd),
    .out_valid, .out_ready, .out_byte, .out_last, .packets_total);

  int checks = 0, failures = 0, npk = 0, timeout_pk = 0;
  int flen[$];
  logic [31:0] fwords[$];
  logic [7:0] pkt[$];
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] be16(int i);
    return {pkt[i], pkt[i + 1]};
  endfunction

  task automatic check_packet();
    int cnt, words, payload;
    logic [31:0] sum;
    // model: fragments taken for this packet
    cnt = 0; words = 0;
    while (cnt < 3 && flen.size() > 0 && (cnt == 0 || (words + flen[0]) * 4 + 4 <= 1472)) begin
      words += flen.pop_front(); cnt++;
    end
    payload = 4 + 4 * words;
    check(pkt.size() == 42 + payload, $sformatf("packet size %0d expected %0d", pkt.size(), 42 + payload));
    check({be16(0), be16(2), be16(4)} == dst_mac && {be16(6), be16(8), be16(10)} == src_mac, "MAC addresses");
    check(be16(12) == 16'h0800 && pkt[14] == 8'h45 && pkt[23] == 8'h11 && pkt[22] == 8'h40, "Ethernet type, IP version, protocol, TTL");
    check(be16(16) == 16'(payload + 28) && be16(38) == 16'(payload + 8), "IP and UDP lengths");
    check(be16(18) == 16'(npk), "IP identification counts packets");
    check({be16(26), be16(28)} == src_ip && {be16(30), be16(32)} == dst_ip, "IP addresses");
    check(be16(34) == src_port && be16(36) == dst_port && be16(40) == 0, "UDP ports and checksum");
    sum = 0;
    for (int i = 14; i < 34; i += 2) sum += be16(i);
    sum = (sum & 32'hffff) + (sum >> 16);
    sum = (sum & 32'hffff) + (sum >> 16);
    check(sum == 32'hffff, "IP header checksum");
    check(pkt[42] == 8'(cnt) && pkt[43] == 8'd7 && be16(44) == 16'(words), "MEP header");
    if (cnt < 3) timeout_pk++;
    for (int w = 0; w < words && 46 + 4 * w + 3 < pkt.size(); w++) begin
      logic [31:0] e;
      e = fwords.pop_front();
      check({be16(46 + 4 * w), be16(48 + 4 * w)} == e, "payload word");
    end
    npk++;
  endtask

  always @(negedge clk) out_ready <= ($urandom_range(0, 4) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    pkt.push_back(out_byte);
    if (out_last) begin
      check_packet();
      pkt.delete();
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 22; i++) begin
      int n;
      n = (i % 5 == 4) ? $urandom_range(150, 300) : $urandom_range(5, 60);
      flen.push_back(n);
      for (int k = 0; k < n; k++) begin
        logic [31:0] w;
        w = $urandom;
        fwords.push_back(w);
        @(negedge clk); f_wr = 1; f_wdata = w;
      end
      @(negedge clk); f_wr = 0; l_wr = 1; l_wdata = 16'(n);
      @(negedge clk); l_wr = 0;
    end
    mep_factor = 8'd3;
    repeat (60000) @(negedge clk);
    check(flen.size() == 0 && fwords.size() == 0, "every fragment sent");
    check(packets_total == 32'(npk), "packet counter");
    check(timeout_pk > 0, "short packets (size limit or timeout) seen");
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
