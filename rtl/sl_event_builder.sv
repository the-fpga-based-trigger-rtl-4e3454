// sl_event_builder: SL-FPGA event-fragment builder.
//
// For every L0 request the SL merges the TDC data returned by the four PPs into one event
// fragment and stores it in the intermediate buffer (document). Requests (the same ones
// the TTC interface dispatched to the PPs) are queued; for each, the builder writes
//   word 0   header  (source = board id, 24 bit trigger number)
//   word 1   32 bit trigger timestamp
//   word 2   aux     (trigger type in bits 15:8)
//   then the response of PP 0, 1, 2 and 3, each header .. trailer, unchanged
//   last     trailer (fragment length in words including this one; error bits 3:0 =
//            PP whose trigger number disagreed, bits 7:4 = PP that reported lost frames)
// and then pulses frag_done with the length, which goes into the length queue used by
// the packet assembler. Writing stalls while wr_full is high. Fragments longer than 4095
// words report a length modulo 4096 in the trailer; frag_len has 16 bits. The layout is
// this design's choice. One word is moved per clock.
module sl_event_builder
  import na62_pkg::*;
#(
  parameter int unsigned TRIG_FIFO = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [5:0]                 board_id,
  input  logic                       trig_valid,
  input  trig_t                      trig,
  input  logic [NUM_PP-1:0]          pp_valid,
  output logic [NUM_PP-1:0]          pp_ready,
  input  logic [NUM_PP-1:0][31:0]    pp_data,
  output logic                       wr_en,
  output logic [31:0]                wr_data,
  input  logic                       wr_full,
  output logic                       frag_done,
  output logic [15:0]                frag_len,
  output logic [31:0]                dropped_trig_total
);
  typedef enum logic [2:0] {E_IDLE, E_HDR, E_TS, E_AUX, E_PP, E_TRL} estate_e;

  trig_t tq_data, cur;
  logic  tq_full, tq_empty, tq_rd;
  logic [$clog2(TRIG_FIFO):0] tq_level;

  sync_fifo #(.WIDTH($bits(trig_t)), .DEPTH(TRIG_FIFO)) u_tq (
    .clk, .rst_n, .wr_en(trig_valid && !tq_full), .wr_data(trig), .full(tq_full),
    .rd_en(tq_rd), .rd_data(tq_data), .empty(tq_empty), .level(tq_level));

  estate_e     st;
  logic [1:0]  src;
  logic [15:0] len;
  logic [3:0]  num_err, lost_err;

  wire        cur_v = pp_valid[src];
  wire [31:0] cur_w = pp_data[src];

  assign tq_rd = (st == E_IDLE) && !tq_empty;

  always_comb begin
    pp_ready = '0;
    if (st == E_PP && !wr_full) pp_ready[src] = 1'b1;
    wr_en   = 1'b0;
    wr_data = '0;
    unique case (st)
      E_HDR: begin wr_en = !wr_full; wr_data = mk_hdr(board_id, cur.num); end
      E_TS:  begin wr_en = !wr_full; wr_data = cur.ts; end
      E_AUX: begin wr_en = !wr_full; wr_data = {W_AUX, 14'b0, cur.ttype, 8'b0}; end
      E_PP:  begin wr_en = !wr_full && cur_v; wr_data = cur_w; end
      E_TRL: begin wr_en = !wr_full; wr_data = mk_trl(12'(len + 1'b1), {10'b0, lost_err, num_err}); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st                 <= E_IDLE;
      cur                <= '0;
      src                <= '0;
      len                <= '0;
      num_err            <= '0;
      lost_err           <= '0;
      frag_done          <= 1'b0;
      frag_len           <= '0;
      dropped_trig_total <= '0;
    end else begin
      frag_done <= 1'b0;
      if (trig_valid && tq_full) dropped_trig_total <= dropped_trig_total + 1;
      if (wr_en) len <= len + 1'b1;
      unique case (st)
        E_IDLE: if (!tq_empty) begin
          cur      <= tq_data;
          len      <= '0;
          src      <= '0;
          num_err  <= '0;
          lost_err <= '0;
          st       <= E_HDR;
        end
        E_HDR: if (!wr_full) st <= E_TS;
        E_TS:  if (!wr_full) st <= E_AUX;
        E_AUX: if (!wr_full) st <= E_PP;
        E_PP: if (!wr_full && cur_v) begin
          if (kind_of(cur_w) == W_HDR && cur_w[TRIG_NUM_W-1:0] != cur.num) num_err[src] <= 1'b1;
          if (kind_of(cur_w) == W_TRL) begin
            if (cur_w[17:0] != '0) lost_err[src] <= 1'b1;
            src <= src + 1'b1;
            if (src == 2'(NUM_PP-1)) st <= E_TRL;
          end
        end
        E_TRL: if (!wr_full) begin
          frag_done <= 1'b1;
          frag_len  <= len + 1'b1;
          st        <= E_IDLE;
        end
        default: st <= E_IDLE;
      endcase
    end
  end
endmodule
