// pp_monitor: monitoring branch of the PP-FPGA.
//
// The merged data stream is triplicated; one copy is for monitoring (document). What is
// monitored is not given; this block keeps, for each of the 128 channels of the PP, a
// 32 bit count of leading-edge hits, plus counts of frames and of frames whose trailer
// reports errors. The counters are read through a register-style port (rd_addr 0..127:
// channel counters, 128: frames, 129: frames with errors) as the board's slow-control bus
// would do; the read data are combinational. clear zeroes every counter.
module pp_monitor
  import na62_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               in_valid,
  input  logic [31:0]        in_data,
  input  logic [CH_W:0]      rd_addr,
  output logic [31:0]        rd_data
);
  localparam int unsigned NCH = 1 << CH_W;

  logic [31:0] ch_cnt [NCH];
  logic [31:0] frames, err_frames;
  hit_t        h;

  assign h = get_hit(in_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCH; i++) ch_cnt[i] <= '0;
      frames     <= '0;
      err_frames <= '0;
    end else if (clear) begin
      for (int i = 0; i < NCH; i++) ch_cnt[i] <= '0;
      frames     <= '0;
      err_frames <= '0;
    end else if (in_valid) begin
      if (kind_of(in_data) == W_HIT && !h.trailing) ch_cnt[h.channel] <= ch_cnt[h.channel] + 1;
      if (kind_of(in_data) == W_TRL) begin
        frames <= frames + 1;
        if (in_data[17:0] != '0) err_frames <= err_frames + 1;
      end
    end
  end

  always_comb begin
    if (!rd_addr[CH_W])          rd_data = ch_cnt[rd_addr[CH_W-1:0]];
    else if (rd_addr[0] == 1'b0) rd_data = frames;
    else                         rd_data = err_frames;
  end
endmodule
