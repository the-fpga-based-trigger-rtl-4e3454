// tel62: the TEL62 trigger and readout motherboard (FPGA logic only).
//
// Four PP-FPGAs, each serving one TDC board through four 32 bit buses, and the central
// SL-FPGA connected to every PP by independent data and trigger paths (document). The SL
// dispatches the TTC-decoded L0 requests to all PPs, builds event fragments from their
// responses, sends multi-event UDP packets on the GbE output, and forwards the PP trigger
// primitives towards the L0TP. The per-PP monitoring counters are read through one port
// selected by mon_pp. The DDR2, QDR, TTCrx, GbE and slow-control hardware of the real
// board are outside this module (the buffers are on-chip RAM here).
module tel62
  import na62_pkg::*;
#(
  parameter int unsigned HIT_DEPTH   = 65536,
  parameter int unsigned FRAME_SLOTS = 256,
  parameter int unsigned QDR_DEPTH   = 32768
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic [5:0]                               board_id,
  // TTCrx
  input  logic                                     sob,
  input  logic                                     l1a,
  input  logic                                     brcst_valid,
  input  logic [TRIG_TYPE_W-1:0]                   brcst,
  // configuration
  input  logic [TS_W-1:0]                          latency,
  input  logic [SLOT_W-1:0]                        window,
  input  logic [MULT_W-1:0]                        threshold,
  input  logic [7:0]                               mep_factor,
  input  logic [15:0]                              mep_timeout,
  input  logic [47:0]                              src_mac,
  input  logic [47:0]                              dst_mac,
  input  logic [31:0]                              src_ip,
  input  logic [31:0]                              dst_ip,
  input  logic [15:0]                              src_port,
  input  logic [15:0]                              dst_port,
  // TDCB connectors: 4 boards x 4 buses
  input  logic [NUM_PP-1:0][NUM_TDC-1:0]           tdc_valid,
  output logic [NUM_PP-1:0][NUM_TDC-1:0]           tdc_ready,
  input  logic [NUM_PP-1:0][NUM_TDC-1:0][31:0]     tdc_data,
  // GbE data output
  output logic                                     eth_valid,
  input  logic                                     eth_ready,
  output logic [7:0]                               eth_byte,
  output logic                                     eth_last,
  // primitives to the L0TP
  output logic                                     prim_valid,
  output prim_t                                    prim,
  // monitoring
  input  logic                                     mon_clear,
  input  logic [1:0]                               mon_pp,
  input  logic [CH_W:0]                            mon_addr,
  output logic [31:0]                              mon_data,
  // status
  output logic [31:0]                              packets_total,
  output logic [31:0]                              lost_frames_total,
  output logic [31:0]                              error_total
);
  logic                     trig_valid;
  trig_t                    trig;
  logic [NUM_PP-1:0]        d_valid, d_ready, p_valid;
  logic [NUM_PP-1:0][31:0]  d_data, m_data;
  prim_t [NUM_PP-1:0]       p_prim;
  logic [NUM_PP-1:0][31:0]  lost, dtrig, mism, ovr;
  logic [31:0]              tmiss, sl_dtrig, dprim;
  logic [TS_W-1:0]          timestamp;
  logic [1:0]               prim_src;

  for (genvar p = 0; p < NUM_PP; p++) begin : g_pp
    pp_fpga #(.HIT_DEPTH(HIT_DEPTH), .FRAME_SLOTS(FRAME_SLOTS)) u_pp (
      .clk, .rst_n, .pp_id(2'(p)), .window, .threshold,
      .tdc_valid(tdc_valid[p]), .tdc_ready(tdc_ready[p]), .tdc_data(tdc_data[p]),
      .trig_valid, .trig,
      .data_valid(d_valid[p]), .data_ready(d_ready[p]), .data(d_data[p]),
      .prim_valid(p_valid[p]), .prim(p_prim[p]),
      .mon_clear, .mon_addr, .mon_data(m_data[p]),
      .lost_frames_total(lost[p]), .dropped_trig_total(dtrig[p]),
      .mismatch_total(mism[p]), .overrun_total(ovr[p]));
  end

  sl_fpga #(.QDR_DEPTH(QDR_DEPTH)) u_sl (
    .clk, .rst_n, .board_id, .sob, .l1a, .brcst_valid, .brcst, .latency, .timestamp,
    .trig_valid, .trig,
    .pp_valid(d_valid), .pp_ready(d_ready), .pp_data(d_data),
    .pp_prim_valid(p_valid), .pp_prim(p_prim),
    .mep_factor, .mep_timeout, .src_mac, .dst_mac, .src_ip, .dst_ip, .src_port, .dst_port,
    .eth_valid, .eth_ready, .eth_byte, .eth_last,
    .prim_valid, .prim, .prim_src,
    .packets_total, .type_missing_total(tmiss), .dropped_trig_total(sl_dtrig),
    .dropped_prim_total(dprim));

  assign mon_data = m_data[mon_pp];

  always_comb begin
    lost_frames_total = '0;
    error_total       = tmiss + sl_dtrig + dprim;
    for (int p = 0; p < NUM_PP; p++) begin
      lost_frames_total = lost_frames_total + lost[p];
      error_total       = error_total + dtrig[p] + mism[p] + ovr[p];
    end
  end
endmodule
