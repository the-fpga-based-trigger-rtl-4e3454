// tdcc: TDC controller FPGA of one TDC board (TDCB), readout part.
//
// A TDCB carries four HPTDC chips of 32 channels each. The TDCC does not receive the L0
// trigger: it reads the TDCs continuously by sending them a periodic trigger every 6.4 us
// (256 clock periods of 25 ns) and forwards each TDC's data, framed with a coarse timestamp
// and monitoring counters, on four parallel 32 bit buses to the PP-FPGA of the TEL62.
// This module holds the burst timestamp counter (cleared by sob, start of burst, as the
// TTC broadcasts it), the frame timer that issues tdc_trigger, and four tdc_frame_builder
// engines. The four-TDC, four-bus, 6.4 us structure follows the document; I2C slave, JTAG
// master and the TDC emulator are not part of this module. tdc_trigger is high in the
// first clock of every frame except frame 0; the previous frame's packets follow.
module tdcc
  import na62_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 256
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  sob,          // start of burst: clear timestamp
  input  logic [NUM_TDC-1:0]                    hit_valid,
  input  logic [NUM_TDC-1:0]                    hit_edge,
  input  logic [NUM_TDC-1:0][TDC_CH_W-1:0]      hit_channel,
  input  logic [NUM_TDC-1:0][TDC_TIME_W-1:0]    hit_time,
  output logic                                  tdc_trigger,  // periodic readout trigger
  output logic [TS_W-1:0]                       timestamp,    // current 25 ns count
  output logic [NUM_TDC-1:0]                    bus_valid,
  input  logic [NUM_TDC-1:0]                    bus_ready,
  output logic [NUM_TDC-1:0][31:0]              bus_data,
  output logic [NUM_TDC-1:0][31:0]              dropped_total
);
  logic [FRAME_W-1:0] frame_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   timestamp <= '0;
    else if (sob) timestamp <= '0;
    else          timestamp <= timestamp + 1'b1;
  end

  assign tdc_trigger = (timestamp[SLOT_W-1:0] == '0) && (timestamp[TS_W-1:SLOT_W] != '0) && !sob;
  assign frame_done  = timestamp[TS_W-1:SLOT_W] - 1'b1;

  for (genvar i = 0; i < NUM_TDC; i++) begin : g_tdc
    tdc_frame_builder #(.FIFO_DEPTH(FIFO_DEPTH)) u_fb (
      .clk, .rst_n,
      .tdc_id        (2'(i)),
      .frame_tick    (tdc_trigger),
      .frame_num     (frame_done),
      .hit_valid     (hit_valid[i]),
      .hit_edge      (hit_edge[i]),
      .hit_channel   (hit_channel[i]),
      .hit_time      (hit_time[i]),
      .out_valid     (bus_valid[i]),
      .out_ready     (bus_ready[i]),
      .out_data      (bus_data[i]),
      .dropped_total (dropped_total[i]));
  end
endmodule
