// tdc_frame_builder: per-HPTDC readout engine of the TDC controller (TDCC) FPGA.
//
// The TDCC reads the TDC continuously: every 6.4 us frame (256 clock periods of 25 ns) it
// collects the TDC words of that time window and sends them to the TEL62 PP-FPGA as one
// packet carrying a coarse timestamp and monitoring counters. Here, hits that arrive during
// a frame are written into a FIFO (256 words, the size of one HPTDC group buffer) and
// counted. At frame_tick (first clock of the next frame) a descriptor {frame number, hit
// count, dropped-hit count} is queued and the packet is sent on the 32 bit bus:
//   header  (source = TDC index, 24 bit frame number)
//   hits    (channel = {TDC index, TDC channel}, edge, 19 bit time)
//   trailer (hit count, number of hits dropped because the FIFO was full)
// The frame/periodic-readout scheme, 256 words, 19 bit times and the 32 bit bus follow the
// document; the word layouts, the valid/ready handshake and the drop-on-full policy are
// this design's choices. A hit presented in the tick cycle belongs to the new frame.
// Latency: the header leaves two clocks after frame_tick, one word per clock when ready.
module tdc_frame_builder
  import na62_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [1:0]              tdc_id,
  input  logic                    frame_tick,   // first clock of a new frame
  input  logic [FRAME_W-1:0]      frame_num,    // number of the frame that ends at the tick
  input  logic                    hit_valid,
  input  logic                    hit_edge,
  input  logic [TDC_CH_W-1:0]     hit_channel,
  input  logic [TDC_TIME_W-1:0]   hit_time,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [31:0]             out_data,
  output logic [31:0]             dropped_total // monitoring counter
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  typedef struct packed {
    logic [FRAME_W-1:0] frame;
    logic [CW-1:0]      count;
    logic [CW-1:0]      dropped;
  } desc_t;

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_HITS, S_TRL} state_e;

  // Hit FIFO
  logic        hf_full, hf_empty, hf_rd;
  logic [31:0] hf_rdata, hit_word;
  logic [CW-1:0] hf_level;
  wire hf_wr = hit_valid && !hf_full;

  hit_t h_in;
  always_comb begin
    h_in.trailing    = hit_edge;
    h_in.channel = {tdc_id, hit_channel};
    h_in.time19  = hit_time;
    hit_word     = mk_hit(h_in);
  end

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_hits (
    .clk, .rst_n, .wr_en(hf_wr), .wr_data(hit_word), .full(hf_full),
    .rd_en(hf_rd), .rd_data(hf_rdata), .empty(hf_empty), .level(hf_level));

  // Per-frame counters
  logic [CW-1:0] cnt_cur, drop_cur;
  desc_t         d_in, d_out;
  logic          df_full, df_empty, df_rd;
  logic [2:0]    df_level;

  assign d_in = '{frame: frame_num, count: cnt_cur, dropped: drop_cur};

  sync_fifo #(.WIDTH($bits(desc_t)), .DEPTH(4)) u_desc (
    .clk, .rst_n, .wr_en(frame_tick && !df_full), .wr_data(d_in), .full(df_full),
    .rd_en(df_rd), .rd_data(d_out), .empty(df_empty), .level(df_level));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_cur       <= '0;
      drop_cur      <= '0;
      dropped_total <= '0;
    end else begin
      if (frame_tick) begin
        cnt_cur  <= CW'(hf_wr);
        drop_cur <= CW'(hit_valid && hf_full);
      end else begin
        if (hf_wr) cnt_cur <= cnt_cur + 1'b1;
        if (hit_valid && hf_full) drop_cur <= drop_cur + 1'b1;
      end
      if (hit_valid && hf_full) dropped_total <= dropped_total + 1;
    end
  end

  // Packet emitter
  state_e        state;
  logic [CW-1:0] left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      left  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (!df_empty) state <= S_HDR;
        S_HDR:  if (out_ready) begin
                  left  <= d_out.count;
                  state <= (d_out.count == '0) ? S_TRL : S_HITS;
                end
        S_HITS: if (out_ready) begin
                  left <= left - 1'b1;
                  if (left == CW'(1)) state <= S_TRL;
                end
        S_TRL:  if (out_ready) state <= S_IDLE;
      endcase
    end
  end

  assign hf_rd = (state == S_HITS) && out_ready;
  assign df_rd = (state == S_TRL) && out_ready;

  always_comb begin
    out_valid = state != S_IDLE;
    unique case (state)
      S_HDR:   out_data = mk_hdr({4'b0, tdc_id}, d_out.frame);
      S_HITS:  out_data = hf_rdata;
      S_TRL:   out_data = mk_trl(12'(d_out.count), 18'(d_out.dropped));
      default: out_data = '0;
    endcase
  end

  a_hits_present: assert property (@(posedge clk) disable iff (!rst_n) (state == S_HITS) |-> !hf_empty)
    else $error("tdc_frame_builder: counted hit missing from FIFO");
endmodule
