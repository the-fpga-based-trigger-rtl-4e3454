// sl_fpga: Sync-Link FPGA of the TEL62 board.
//
// The SL decodes the TTC trigger information and dispatches each L0 request to the four
// PPs (ttc_decoder); merges the PP responses of each request into an event fragment
// (sl_event_builder) kept in the 1 Mb intermediate buffer (a 32768 x 32 bit sync_fifo,
// standing for the board's QDR RAM) with a queue of fragment lengths; assembles several
// fragments into multi-event UDP packets for the GbE output (udp_packer); and merges the
// PP trigger primitives for transmission to the L0TP (primitive_merger). This partition
// follows the document. The event builder stalls when either the fragment buffer or the
// length queue is full.
module sl_fpga
  import na62_pkg::*;
#(
  parameter int unsigned QDR_DEPTH = 32768,
  parameter int unsigned LEN_DEPTH = 128
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [5:0]                board_id,
  // TTCrx
  input  logic                      sob,
  input  logic                      l1a,
  input  logic                      brcst_valid,
  input  logic [TRIG_TYPE_W-1:0]    brcst,
  input  logic [TS_W-1:0]           latency,
  output logic [TS_W-1:0]           timestamp,
  // PP side
  output logic                      trig_valid,
  output trig_t                     trig,
  input  logic [NUM_PP-1:0]         pp_valid,
  output logic [NUM_PP-1:0]         pp_ready,
  input  logic [NUM_PP-1:0][31:0]   pp_data,
  input  logic [NUM_PP-1:0]         pp_prim_valid,
  input  prim_t [NUM_PP-1:0]        pp_prim,
  // packet configuration
  input  logic [7:0]                mep_factor,
  input  logic [15:0]               mep_timeout,
  input  logic [47:0]               src_mac,
  input  logic [47:0]               dst_mac,
  input  logic [31:0]               src_ip,
  input  logic [31:0]               dst_ip,
  input  logic [15:0]               src_port,
  input  logic [15:0]               dst_port,
  // GbE data output
  output logic                      eth_valid,
  input  logic                      eth_ready,
  output logic [7:0]                eth_byte,
  output logic                      eth_last,
  // primitives to the L0TP
  output logic                      prim_valid,
  output prim_t                     prim,
  output logic [1:0]                prim_src,
  // status
  output logic [31:0]               packets_total,
  output logic [31:0]               type_missing_total,
  output logic [31:0]               dropped_trig_total,
  output logic [31:0]               dropped_prim_total
);
  // LEN_DEPTH must stay at or below 128 so that the queue level fits the 8 bit len_level.
  localparam int unsigned LW = $clog2(LEN_DEPTH) + 1;

  ttc_decoder u_ttc (
    .clk, .rst_n, .sob, .l1a, .brcst_valid, .brcst, .latency, .timestamp,
    .trig_valid, .trig, .type_missing_total);

  logic        eb_wr, eb_done;
  logic [31:0] eb_data;
  logic [15:0] eb_len;
  logic        q_full, q_empty, q_rd, l_full, l_empty, l_rd;
  logic [31:0] q_data;
  logic [15:0] l_data;
  logic [$clog2(QDR_DEPTH):0] q_level;
  logic [LW-1:0] l_level;

  sl_event_builder u_eb (
    .clk, .rst_n, .board_id, .trig_valid, .trig,
    .pp_valid, .pp_ready, .pp_data,
    .wr_en(eb_wr), .wr_data(eb_data), .wr_full(q_full || l_full),
    .frag_done(eb_done), .frag_len(eb_len), .dropped_trig_total);

  sync_fifo #(.WIDTH(32), .DEPTH(QDR_DEPTH)) u_qdr (
    .clk, .rst_n, .wr_en(eb_wr), .wr_data(eb_data), .full(q_full),
    .rd_en(q_rd), .rd_data(q_data), .empty(q_empty), .level(q_level));

  sync_fifo #(.WIDTH(16), .DEPTH(LEN_DEPTH)) u_len (
    .clk, .rst_n, .wr_en(eb_done), .wr_data(eb_len), .full(l_full),
    .rd_en(l_rd), .rd_data(l_data), .empty(l_empty), .level(l_level));

  udp_packer u_pack (
    .clk, .rst_n, .mep_factor, .timeout(mep_timeout), .source_id({2'b0, board_id}),
    .src_mac, .dst_mac, .src_ip, .dst_ip, .src_port, .dst_port,
    .frag_data(q_data), .frag_empty(q_empty), .frag_rd(q_rd),
    .len_data(l_data), .len_empty(l_empty),
    .len_level(8'(l_level)), .len_rd(l_rd),
    .out_valid(eth_valid), .out_ready(eth_ready), .out_byte(eth_byte), .out_last(eth_last),
    .packets_total);

  primitive_merger u_pm (
    .clk, .rst_n, .in_valid(pp_prim_valid), .in_prim(pp_prim),
    .out_valid(prim_valid), .out_prim(prim), .out_src(prim_src),
    .dropped_total(dropped_prim_total));
endmodule
