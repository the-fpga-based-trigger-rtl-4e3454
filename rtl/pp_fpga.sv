// pp_fpga: one Pre-Processing FPGA of the TEL62 board.
//
// A PP handles one TDCB: it merges the four TDC buses frame by frame (pp_merger) and
// feeds the merged stream, triplicated, to the monitoring counters (pp_monitor), to the
// trigger primitive generator (pp_primitive_gen) and to the data store with L0-triggered
// extraction (pp_trigger_buffer). Timestamped L0 requests arrive from the SL; extracted
// data leave to the SL with valid/ready and primitives leave continuously as valid-only
// words. This structure follows the document; all blocks share one clock here, where the
// board runs the PP-SL buses at 160 MHz and the DDR2 at 640 MHz.
module pp_fpga
  import na62_pkg::*;
#(
  parameter int unsigned HIT_DEPTH   = 65536,
  parameter int unsigned FRAME_SLOTS = 256
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [1:0]                 pp_id,
  input  logic [SLOT_W-1:0]          window,
  input  logic [MULT_W-1:0]          threshold,
  // TDCB buses
  input  logic [NUM_TDC-1:0]         tdc_valid,
  output logic [NUM_TDC-1:0]         tdc_ready,
  input  logic [NUM_TDC-1:0][31:0]   tdc_data,
  // L0 requests from the SL
  input  logic                       trig_valid,
  input  trig_t                      trig,
  // data to the SL
  output logic                       data_valid,
  input  logic                       data_ready,
  output logic [31:0]                data,
  // primitives to the SL
  output logic                       prim_valid,
  output prim_t                      prim,
  // monitoring read port
  input  logic                       mon_clear,
  input  logic [CH_W:0]              mon_addr,
  output logic [31:0]                mon_data,
  // status
  output logic [31:0]                lost_frames_total,
  output logic [31:0]                dropped_trig_total,
  output logic [31:0]                mismatch_total,
  output logic [31:0]                overrun_total
);
  logic        m_valid;
  logic [31:0] m_data;

  pp_merger u_merge (
    .clk, .rst_n, .pp_id,
    .in_valid(tdc_valid), .in_ready(tdc_ready), .in_data(tdc_data),
    .out_valid(m_valid), .out_data(m_data), .mismatch_total);

  pp_monitor u_mon (
    .clk, .rst_n, .clear(mon_clear), .in_valid(m_valid), .in_data(m_data),
    .rd_addr(mon_addr), .rd_data(mon_data));

  pp_primitive_gen u_prim (
    .clk, .rst_n, .threshold, .in_valid(m_valid), .in_data(m_data),
    .prim_valid, .prim, .overrun_total);

  pp_trigger_buffer #(.HIT_DEPTH(HIT_DEPTH), .FRAME_SLOTS(FRAME_SLOTS)) u_buf (
    .clk, .rst_n, .pp_id, .window,
    .in_valid(m_valid), .in_data(m_data),
    .trig_valid, .trig,
    .out_valid(data_valid), .out_ready(data_ready), .out_data(data),
    .lost_frames_total, .dropped_trig_total);
endmodule
