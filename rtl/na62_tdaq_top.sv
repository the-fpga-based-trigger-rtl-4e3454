// na62_tdaq_top: NA62 trigger and data acquisition chain, TDC boards to L0 decision.
//
// N_TEL62 readout boards, each a TEL62 carrying four TDC boards (TDCB) of four 32-channel
// HPTDCs, digitise and buffer the hits of one sub-detector. Every PP-FPGA produces trigger
// primitives that the SL merges and sends to the L0 trigger processor (l0tp), which
// combines the detectors in time and issues the L0 trigger. The L0 trigger goes through
// the Local Trigger Unit and the TTC system, which are outside this design: l0_trig_* leave
// as ports and the TTC inputs (l1a, brcst_*) come back in, common to all boards, as the
// TTCrx chips deliver them. Each TEL62 then extracts the hits around the trigger time from
// its buffers and sends them as multi-event UDP packets (eth_* ports, one byte stream per
// board). The HPTDC chips are outside too: their hit outputs are ports, and tdc_trigger
// is the periodic readout trigger each TDCC sends to its TDCs.
//
// The default N_TEL62 = 4 stands for the four TDCB-equipped detectors that take part in
// the L0 selection (RICH, CHOD, MUV, LAV), in that order on the L0TP inputs. Board b uses
// board id b and the addresses src_mac/src_ip with their low byte replaced by b.
module na62_tdaq_top
  import na62_pkg::*;
#(
  parameter int unsigned N_TEL62     = 4,
  parameter int unsigned HIT_DEPTH   = 65536,
  parameter int unsigned FRAME_SLOTS = 256,
  parameter int unsigned QDR_DEPTH   = 32768
) (
  input  logic                                                  clk,
  input  logic                                                  rst_n,
  input  logic                                                  sob,
  // HPTDC hit outputs
  input  logic [N_TEL62-1:0][NUM_PP-1:0][NUM_TDC-1:0]                   hit_valid,
  input  logic [N_TEL62-1:0][NUM_PP-1:0][NUM_TDC-1:0]                   hit_edge,
  input  logic [N_TEL62-1:0][NUM_PP-1:0][NUM_TDC-1:0][TDC_CH_W-1:0]     hit_channel,
  input  logic [N_TEL62-1:0][NUM_PP-1:0][NUM_TDC-1:0][TDC_TIME_W-1:0]   hit_time,
  output logic [N_TEL62-1:0][NUM_PP-1:0]                                tdc_trigger,
  // TTC (decoded by the TTCrx chips)
  input  logic                                                  l1a,
  input  logic                                                  brcst_valid,
  input  logic [TRIG_TYPE_W-1:0]                                brcst,
  // TEL62 configuration
  input  logic [TS_W-1:0]                                       latency,
  input  logic [SLOT_W-1:0]                                     window,
  input  logic [N_TEL62-1:0][MULT_W-1:0]                        threshold,
  input  logic [7:0]                                            mep_factor,
  input  logic [15:0]                                           mep_timeout,
  input  logic [47:0]                                           src_mac,
  input  logic [47:0]                                           dst_mac,
  input  logic [31:0]                                           src_ip,
  input  logic [31:0]                                           dst_ip,
  input  logic [15:0]                                           src_port,
  input  logic [15:0]                                           dst_port,
  // L0TP configuration
  input  logic [N_TEL62-1:0]                                    l0_pos_mask,
  input  logic [N_TEL62-1:0]                                    l0_neg_mask,
  input  logic [$clog2(N_TEL62)-1:0]                            l0_ref_det,
  input  logic [3:0]                                            l0_window,
  input  logic [9:0]                                            l0_eval_delay,
  input  logic [TRIG_TYPE_W-1:0]                                l0_trig_type,
  input  logic [3:0]                                            choke,
  input  logic [3:0]                                            error,
  // L0 trigger to the LTU
  output logic                                                  l0_trig_valid,
  output trig_t                                                 l0_trig,
  // GbE data outputs
  output logic [N_TEL62-1:0]                                    eth_valid,
  input  logic [N_TEL62-1:0]                                    eth_ready,
  output logic [N_TEL62-1:0][7:0]                               eth_byte,
  output logic [N_TEL62-1:0]                                    eth_last,
  // monitoring
  input  logic                                                  mon_clear,
  input  logic [$clog2(N_TEL62)-1:0]                            mon_board,
  input  logic [1:0]                                            mon_pp,
  input  logic [CH_W:0]                                         mon_addr,
  output logic [31:0]                                           mon_data,
  // status
  output logic [N_TEL62-1:0][31:0]                              packets_total,
  output logic [N_TEL62-1:0][31:0]                              lost_frames_total,
  output logic [N_TEL62-1:0][31:0]                              error_total,
  output logic [31:0]                                           l0_late_total,
  output logic [31:0]                                           l0_veto_total,
  output logic [31:0]                                           l0_choke_total,
  output logic [31:0]                                           l0_error_total
);
  logic [N_TEL62-1:0]      p_valid;
  prim_t [N_TEL62-1:0]     p_prim;
  logic [N_TEL62-1:0][31:0] m_data;
  logic [TS_W-1:0]         l0_now;

  for (genvar b = 0; b < N_TEL62; b++) begin : g_board
    logic [NUM_PP-1:0][NUM_TDC-1:0]       bv, br;
    logic [NUM_PP-1:0][NUM_TDC-1:0][31:0] bd;

    for (genvar p = 0; p < NUM_PP; p++) begin : g_tdcb
      logic [TS_W-1:0]             ts;
      logic [NUM_TDC-1:0][31:0]    dropped;
      tdcc u_tdcc (
        .clk, .rst_n, .sob,
        .hit_valid(hit_valid[b][p]), .hit_edge(hit_edge[b][p]),
        .hit_channel(hit_channel[b][p]), .hit_time(hit_time[b][p]),
        .tdc_trigger(tdc_trigger[b][p]), .timestamp(ts),
        .bus_valid(bv[p]), .bus_ready(br[p]), .bus_data(bd[p]),
        .dropped_total(dropped));
    end

    tel62 #(.HIT_DEPTH(HIT_DEPTH), .FRAME_SLOTS(FRAME_SLOTS), .QDR_DEPTH(QDR_DEPTH)) u_tel62 (
      .clk, .rst_n, .board_id(6'(b)),
      .sob, .l1a, .brcst_valid, .brcst,
      .latency, .window, .threshold(threshold[b]), .mep_factor, .mep_timeout,
      .src_mac({src_mac[47:8], 8'(b)}), .dst_mac, .src_ip({src_ip[31:8], 8'(b)}), .dst_ip,
      .src_port, .dst_port,
      .tdc_valid(bv), .tdc_ready(br), .tdc_data(bd),
      .eth_valid(eth_valid[b]), .eth_ready(eth_ready[b]), .eth_byte(eth_byte[b]),
      .eth_last(eth_last[b]),
      .prim_valid(p_valid[b]), .prim(p_prim[b]),
      .mon_clear, .mon_pp, .mon_addr, .mon_data(m_data[b]),
      .packets_total(packets_total[b]), .lost_frames_total(lost_frames_total[b]),
      .error_total(error_total[b]));
  end

  assign mon_data = m_data[mon_board];

  l0tp #(.NDET(N_TEL62)) u_l0tp (
    .clk, .rst_n, .sob,
    .pos_mask(l0_pos_mask), .neg_mask(l0_neg_mask), .ref_det(l0_ref_det),
    .window(l0_window), .eval_delay(l0_eval_delay), .trig_type(l0_trig_type),
    .prim_valid(p_valid), .prim(p_prim), .choke, .error,
    .trig_valid(l0_trig_valid), .trig(l0_trig), .now(l0_now),
    .late_total(l0_late_total), .veto_total(l0_veto_total),
    .choke_total(l0_choke_total), .error_total(l0_error_total));
endmodule
