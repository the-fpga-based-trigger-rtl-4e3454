// udp_packer: SL-FPGA multi-event packet assembler.
//
// Event fragments are read back from the intermediate buffer and several of them are
// assembled into one multi-event packet in UDP format, to make better use of the GbE link
// (document). A packet is started when mep_factor fragment lengths are queued, or when at
// least one is queued and none has been added for timeout clocks. Fragments are added
// while fewer than mep_factor are taken and the UDP payload stays within MAX_PAYLOAD bytes
// (a single fragment larger than that is still sent, alone). mep_factor 0 holds the
// output: no packet is started. The packet is sent as a byte
// stream for the Ethernet MAC, most significant byte of each word first:
//   Ethernet header (14 bytes, type 0x0800)
//   IPv4 header     (20 bytes, DF set, TTL 64, protocol 17, header checksum computed here)
//   UDP header      (8 bytes, checksum 0 = not used)
//   MEP header      (4 bytes: fragment count, source id, payload length in 32 bit words)
//   the fragments   (4 bytes per word)
// out_last marks the final byte. The IPv4 identification field counts packets. The start
// rule, the MEP header and the byte-wide interface are this design's choices; the MAC and
// PHY of the GbE mezzanine are outside this design.
module udp_packer #(
  parameter int unsigned MAX_PAYLOAD = 1472,
  parameter int unsigned LEN_W       = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic [7:0]        mep_factor,
  input  logic [15:0]       timeout,
  input  logic [7:0]        source_id,
  input  logic [47:0]       src_mac,
  input  logic [47:0]       dst_mac,
  input  logic [31:0]       src_ip,
  input  logic [31:0]       dst_ip,
  input  logic [15:0]       src_port,
  input  logic [15:0]       dst_port,
  // fragment buffer (show-ahead FIFO)
  input  logic [31:0]       frag_data,
  input  logic              frag_empty,
  output logic              frag_rd,
  // fragment length queue (show-ahead FIFO)
  input  logic [LEN_W-1:0]  len_data,
  input  logic              len_empty,
  input  logic [7:0]        len_level,
  output logic              len_rd,
  // byte stream to the MAC
  output logic              out_valid,
  input  logic              out_ready,
  output logic [7:0]        out_byte,
  output logic              out_last,
  output logic [31:0]       packets_total
);
  localparam int unsigned HDR_BYTES = 46;

  typedef enum logic [1:0] {P_IDLE, P_SUM, P_HDR, P_DATA} pstate_e;

  pstate_e      st;
  logic [15:0]  timer, words, wleft, ip_id;
  logic [7:0]   cnt;
  logic [5:0]   idx;
  logic [1:0]   bidx;

  logic [15:0]          payload, ip_len, udp_len, csum;
  logic [19:0]          csum_acc;
  logic [HDR_BYTES*8-1:0] hdr;

  always_comb begin
    payload  = 16'd4 + {words[13:0], 2'b00};
    ip_len   = payload + 16'd28;
    udp_len  = payload + 16'd8;
    csum_acc = 20'h4500 + 20'(ip_len) + 20'(ip_id) + 20'h4000 + 20'h4011
             + 20'(src_ip[31:16]) + 20'(src_ip[15:0]) + 20'(dst_ip[31:16]) + 20'(dst_ip[15:0]);
    csum_acc = 20'(csum_acc[15:0]) + 20'(csum_acc[19:16]);
    csum_acc = 20'(csum_acc[15:0]) + 20'(csum_acc[19:16]);
    csum     = ~csum_acc[15:0];
    hdr = {dst_mac, src_mac, 16'h0800,
           8'h45, 8'h00, ip_len, ip_id, 16'h4000, 8'h40, 8'h11, csum, src_ip, dst_ip,
           src_port, dst_port, udp_len, 16'h0000,
           cnt, source_id, words};
  end

  wire fits = (cnt == '0) ||
              ((32'(words) + 32'(len_data)) * 4 + 4 <= 32'(MAX_PAYLOAD));

  always_comb begin
    len_rd    = (st == P_SUM) && (cnt < mep_factor) && !len_empty && fits;
    frag_rd   = (st == P_DATA) && out_ready && (bidx == 2'd3);
    out_valid = (st == P_HDR) || (st == P_DATA);
    out_last  = (st == P_DATA) && (bidx == 2'd3) && (wleft == 16'd1);
    unique case (st)
      P_HDR:   out_byte = hdr[(HDR_BYTES - 1 - 32'(idx)) * 8 +: 8];
      P_DATA:  out_byte = frag_data[(3 - 32'(bidx)) * 8 +: 8];
      default: out_byte = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st            <= P_IDLE;
      timer         <= '0;
      words         <= '0;
      wleft         <= '0;
      cnt           <= '0;
      idx           <= '0;
      bidx          <= '0;
      ip_id         <= '0;
      packets_total <= '0;
    end else begin
      unique case (st)
        P_IDLE: begin
          cnt   <= '0;
          words <= '0;
          if (len_empty) timer <= '0;
          else if (timer != '1) timer <= timer + 1'b1;
          if (mep_factor != '0 && (len_level >= mep_factor || (!len_empty && timer >= timeout))) begin
            timer <= '0;
            st    <= P_SUM;
          end
        end
        P_SUM: begin
          if (len_rd) begin
            words <= words + 16'(len_data);
            cnt   <= cnt + 1'b1;
          end else begin
            idx <= '0;
            st  <= P_HDR;
          end
        end
        P_HDR: if (out_ready) begin
          idx <= idx + 1'b1;
          if (idx == 6'(HDR_BYTES - 1)) begin
            bidx  <= '0;
            wleft <= words;
            st    <= P_DATA;
          end
        end
        P_DATA: if (out_ready) begin
          bidx <= bidx + 1'b1;
          if (bidx == 2'd3) begin
            wleft <= wleft - 1'b1;
            if (wleft == 16'd1) begin
              ip_id         <= ip_id + 1'b1;
              packets_total <= packets_total + 1;
              st            <= P_IDLE;
            end
          end
        end
        default: st <= P_IDLE;
      endcase
    end
  end

  a_data_present: assert property (@(posedge clk) disable iff (!rst_n) (st == P_DATA) |-> !frag_empty)
    else $error("udp_packer: fragment data missing");
endmodule
