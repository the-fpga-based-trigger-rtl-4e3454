// pp_primitive_gen: trigger primitive generation in the PP-FPGA.
//
// One of the three copies of the merged data stream feeds the sub-detector's L0 trigger
// primitive generation, and the PP sends the primitives continuously to the SL (document).
// The document does not give the algorithm; this block uses the simplest one that yields a
// timestamped primitive: it counts the leading-edge hits of each 25 ns slot of a frame and,
// after the frame's trailer, scans the 256 slot counts and emits a primitive
// {timestamp = {frame, slot}, multiplicity} for every slot whose count reaches the
// programmable threshold (threshold 0 disables it). Counts saturate at 255. Three count
// banks rotate: one frame is histogrammed while the previous one is scanned and, since
// frames come every 256 clocks but with jitter, one more finished frame may wait for the
// scanner. The scan takes 256 clocks and clears the bank it reads. A frame that ends
// while one scan runs and another waits is counted in overrun_total and not scanned.
// Latency: a primitive leaves 2 + slot clocks after its scan starts.
module pp_primitive_gen
  import na62_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [MULT_W-1:0]   threshold,
  input  logic                in_valid,
  input  logic [31:0]         in_data,
  output logic                prim_valid,
  output prim_t               prim,
  output logic [31:0]         overrun_total
);
  localparam int unsigned NSLOT = 1 << SLOT_W;

  logic [MULT_W-1:0]  hist [3][NSLOT];
  logic [1:0]         wbank, sbank, pbank;
  logic               scanning, pending;
  logic [SLOT_W-1:0]  sidx;
  logic [FRAME_W-1:0] cur_frame, scan_frame, pend_frame;
  hit_t               h;
  logic [SLOT_W-1:0]  hslot;
  logic [MULT_W-1:0]  scount;

  assign h      = get_hit(in_data);
  assign hslot  = slot_of(h.time19);
  assign scount = hist[sbank][sidx];

  wire is_hit = in_valid && kind_of(in_data) == W_HIT && !h.trailing;
  wire is_trl = in_valid && kind_of(in_data) == W_TRL;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 3; b++)
        for (int s = 0; s < NSLOT; s++) hist[b][s] <= '0;
      wbank         <= '0;
      sbank         <= '0;
      pbank         <= '0;
      scanning      <= 1'b0;
      pending       <= 1'b0;
      pend_frame    <= '0;
      sidx          <= '0;
      cur_frame     <= '0;
      scan_frame    <= '0;
      prim_valid    <= 1'b0;
      prim          <= '0;
      overrun_total <= '0;
    end else begin
      prim_valid <= 1'b0;
      if (in_valid && kind_of(in_data) == W_HDR) cur_frame <= in_data[FRAME_W-1:0];
      if (is_hit && hist[wbank][hslot] != '1)
        hist[wbank][hslot] <= hist[wbank][hslot] + 1'b1;
      if (scanning) begin
        if (threshold != '0 && scount >= threshold) begin
          prim_valid <= 1'b1;
          prim       <= '{ts: {scan_frame, sidx}, mult: scount};
        end
        hist[sbank][sidx] <= '0;
        sidx <= sidx + 1'b1;
        if (sidx == '1) begin
          // start the waiting frame, if any
          scanning   <= pending;
          sbank      <= pbank;
          scan_frame <= pend_frame;
          pending    <= 1'b0;
        end
      end
      if (is_trl) begin
        wbank <= (wbank == 2'd2) ? 2'd0 : wbank + 1'b1;
        if (!scanning || (sidx == '1 && !pending)) begin
          scanning   <= 1'b1;
          sbank      <= wbank;
          sidx       <= '0;
          scan_frame <= cur_frame;
        end else if (!pending || sidx == '1) begin
          pending    <= 1'b1;
          pbank      <= wbank;
          pend_frame <= cur_frame;
        end else begin
          overrun_total <= overrun_total + 1;
        end
      end
    end
  end
endmodule
