// pp_trigger_buffer: PP-FPGA data storage and L0-triggered extraction.
//
// Every merged frame is stored while the L0 trigger is being formed (up to 1 ms in NA62).
// On each timestamped L0 request from the SL the data of a programmable number of 25 ns
// slots around the trigger time are extracted and sent to the SL (document). In the board
// the store is a 2 GB DDR2 module; here it is a circular RAM of HIT_DEPTH hit words plus a
// frame directory of FRAME_SLOTS entries {frame number, start address, hit count}.
// HIT_DEPTH = 65536 holds 1.6 ms of the input bus running at its full 40 Mword/s, and
// FRAME_SLOTS = 256 frames cover 1.6 ms, both above the 1 ms maximum L0 latency.
//
// Extraction of trigger time T with half-window W (window input, in 25 ns slots): the
// frames holding slots T-W .. T+W are visited once the last of them is complete; every
// stored hit whose coarse time {frame, slot} lies in that range is sent. A frame whose
// directory entry was overwritten, or whose hits were overwritten in the RAM, is skipped
// and counted as lost. The response to the SL is
//   header  (source = PP index, low 24 bits = trigger number)
//   hits    (as stored)
//   trailer (hit count, number of frames lost)
// with valid/ready. Requests are queued in a TRIG_FIFO deep FIFO; a request arriving when
// it is full is dropped and counted. The directory, window arithmetic, queue and response
// layout are this design's choices. One stored hit is examined per clock.
module pp_trigger_buffer
  import na62_pkg::*;
#(
  parameter int unsigned HIT_DEPTH   = 65536,
  parameter int unsigned FRAME_SLOTS = 256,
  parameter int unsigned TRIG_FIFO   = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [1:0]           pp_id,
  input  logic [SLOT_W-1:0]    window,       // half-width of the readout window, 25 ns slots
  // merged frame stream (valid only)
  input  logic                 in_valid,
  input  logic [31:0]          in_data,
  // L0 requests
  input  logic                 trig_valid,
  input  trig_t                trig,
  // response to the SL
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [31:0]          out_data,
  // status
  output logic [31:0]          lost_frames_total,
  output logic [31:0]          dropped_trig_total
);
  localparam int unsigned AW = $clog2(HIT_DEPTH);
  localparam int unsigned FW = $clog2(FRAME_SLOTS);
  localparam int unsigned HW = 1 + CH_W + TDC_TIME_W;

  typedef struct packed {
    logic [FRAME_W-1:0] frame;
    logic [31:0]        start;   // absolute write index of the first hit
    logic [11:0]        count;
  } dir_t;

  // ---------------- write side ----------------
  logic [HW-1:0]      ram [HIT_DEPTH];
  dir_t               dir [FRAME_SLOTS];
  logic [31:0]        wr_abs;
  logic [FRAME_W-1:0] cur_frame, last_frame;
  logic [31:0]        cur_start;
  logic [11:0]        cur_count;
  logic               have_frame;
  hit_t               h_in;

  assign h_in = get_hit(in_data);

  always_ff @(posedge clk) begin
    if (in_valid && kind_of(in_data) == W_HIT) ram[wr_abs[AW-1:0]] <= h_in;
    if (in_valid && kind_of(in_data) == W_TRL)
      dir[cur_frame[FW-1:0]] <= '{frame: cur_frame, start: cur_start, count: cur_count};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_abs     <= '0;
      cur_frame  <= '0;
      cur_start  <= '0;
      cur_count  <= '0;
      last_frame <= '0;
      have_frame <= 1'b0;
    end else if (in_valid) begin
      unique case (kind_of(in_data))
        W_HDR: begin
          cur_frame <= in_data[FRAME_W-1:0];
          cur_start <= wr_abs;
          cur_count <= '0;
        end
        W_HIT: begin
          wr_abs    <= wr_abs + 1;
          cur_count <= cur_count + 1'b1;
        end
        W_TRL: begin
          last_frame <= cur_frame;
          have_frame <= 1'b1;
        end
        default: ;
      endcase
    end
  end

  // ---------------- trigger queue ----------------
  trig_t tq_data;
  logic  tq_full, tq_empty, tq_rd;
  logic [$clog2(TRIG_FIFO):0] tq_level;

  sync_fifo #(.WIDTH($bits(trig_t)), .DEPTH(TRIG_FIFO)) u_tq (
    .clk, .rst_n, .wr_en(trig_valid && !tq_full), .wr_data(trig), .full(tq_full),
    .rd_en(tq_rd), .rd_data(tq_data), .empty(tq_empty), .level(tq_level));

  // ---------------- read side ----------------
  typedef enum logic [2:0] {R_IDLE, R_WAIT, R_HDR, R_LOOK, R_READ, R_TRL} rstate_e;
  rstate_e            rstate;
  logic [TS_W-1:0]    lo, hi;
  logic [FRAME_W-1:0] f;
  logic [31:0]        rd_abs;
  logic [11:0]        left, sent;
  logic [17:0]        lost;
  trig_t              cur_trig;

  dir_t               dent;
  hit_t               rh;
  logic [TS_W-1:0]    rh_time;
  logic               dir_ok;
  wire                out_free = !out_valid || out_ready;

  always_comb begin
    dent    = dir[f[FW-1:0]];
    dir_ok  = (dent.frame == f) && ((wr_abs - dent.start) <= 32'(HIT_DEPTH));
    rh      = ram[rd_abs[AW-1:0]];
    rh_time = {f, slot_of(rh.time19)};
  end

  assign tq_rd = (rstate == R_IDLE) && !tq_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate             <= R_IDLE;
      lo                 <= '0;
      hi                 <= '0;
      f                  <= '0;
      rd_abs             <= '0;
      left               <= '0;
      sent               <= '0;
      lost               <= '0;
      cur_trig           <= '0;
      out_valid          <= 1'b0;
      out_data           <= '0;
      lost_frames_total  <= '0;
      dropped_trig_total <= '0;
    end else begin
      if (trig_valid && tq_full) dropped_trig_total <= dropped_trig_total + 1;
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (rstate)
        R_IDLE: if (!tq_empty) begin
          cur_trig <= tq_data;
          lo       <= (tq_data.ts > TS_W'(window)) ? tq_data.ts - TS_W'(window) : '0;
          hi       <= tq_data.ts + TS_W'(window);
          rstate   <= R_WAIT;
        end
        R_WAIT: begin
          f <= lo[TS_W-1:SLOT_W];
          if (have_frame && last_frame >= hi[TS_W-1:SLOT_W]) rstate <= R_HDR;
        end
        R_HDR: if (out_free) begin
          out_valid <= 1'b1;
          out_data  <= mk_hdr({4'b0, pp_id}, cur_trig.num);
          sent      <= '0;
          lost      <= '0;
          rstate    <= R_LOOK;
        end
        R_LOOK: begin
          if (dir_ok && dent.count != '0) begin
            rd_abs <= dent.start;
            left   <= dent.count;
            rstate <= R_READ;
          end else begin
            if (!dir_ok) begin
              lost              <= lost + 1'b1;
              lost_frames_total <= lost_frames_total + 1;
            end
            if (f == hi[TS_W-1:SLOT_W]) rstate <= R_TRL;
            else f <= f + 1'b1;
          end
        end
        R_READ: if (out_free) begin
          if (rh_time >= lo && rh_time <= hi) begin
            out_valid <= 1'b1;
            out_data  <= mk_hit(rh);
            sent      <= sent + 1'b1;
          end
          rd_abs <= rd_abs + 1;
          left   <= left - 1'b1;
          if (left == 12'd1) begin
            if (f == hi[TS_W-1:SLOT_W]) rstate <= R_TRL;
            else begin
              f      <= f + 1'b1;
              rstate <= R_LOOK;
            end
          end
        end
        R_TRL: if (out_free) begin
          out_valid <= 1'b1;
          out_data  <= mk_trl(sent, lost);
          rstate    <= R_IDLE;
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end
endmodule
