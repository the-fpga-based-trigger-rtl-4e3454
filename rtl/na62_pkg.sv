// na62_pkg: types and constants shared by the NA62 TDAQ readout and trigger blocks.
//
// Time scale: a 32 bit coarse timestamp counts 25 ns clock periods from the start of the
// burst; a TDC leading/trailing time has 19 bits with 100 ps LSB (8 fine bits below 11
// coarse bits). Data are read out in frames of 6.4 us, i.e. 256 clock periods, so the
// frame number is the coarse timestamp with its low 8 bits dropped. These numbers follow
// the document. The 32 bit word layouts below (hit, frame header, frame trailer) and the
// widths of trigger numbers, trigger types and primitive fields are this design's choice.
//
// Word layouts (bits 31:30 give the kind):
//   hit     : 00 | edge(1) | channel(7) | 000 | time(19)
//   header  : 10 | source(6)           | frame number or trigger number (24)
//   trailer : 11 | word count(12)      | error count (18)
//   aux     : 01 | payload(30)          (second header word, e.g. a timestamp low part)
package na62_pkg;

  localparam int unsigned TS_W        = 32;  // coarse timestamp, 25 ns LSB
  localparam int unsigned FINE_W      = 8;   // fine time, 100 ps LSB
  localparam int unsigned TDC_TIME_W  = 19;  // HPTDC measurement width
  localparam int unsigned SLOT_W      = 8;   // log2(256 slots of 25 ns per 6.4 us frame)
  localparam int unsigned FRAME_W     = TS_W - SLOT_W;  // frame number width (24)
  localparam int unsigned CH_W        = 7;   // channel within a PP (4 TDCs x 32)
  localparam int unsigned TDC_CH_W    = 5;   // channel within one HPTDC (32)
  localparam int unsigned TRIG_NUM_W  = 24;
  localparam int unsigned TRIG_TYPE_W = 8;
  localparam int unsigned MULT_W      = 8;
  localparam int unsigned NUM_TDC     = 4;   // TDCs per TDCB, 32 bit buses per connector
  localparam int unsigned NUM_PP      = 4;   // PP-FPGAs per TEL62

  typedef enum logic [1:0] {
    W_HIT = 2'b00,
    W_AUX = 2'b01,
    W_HDR = 2'b10,
    W_TRL = 2'b11
  } word_kind_e;

  typedef struct packed {
    logic                  trailing; // 0 leading edge, 1 trailing edge
    logic [CH_W-1:0]       channel;
    logic [TDC_TIME_W-1:0] time19;
  } hit_t;

  typedef struct packed {
    logic [TRIG_NUM_W-1:0]  num;
    logic [TRIG_TYPE_W-1:0] ttype;
    logic [TS_W-1:0]        ts;
  } trig_t;

  typedef struct packed {
    logic [TS_W-1:0]   ts;
    logic [MULT_W-1:0] mult;
  } prim_t;

  function automatic logic [31:0] mk_hit(hit_t h);
    return {W_HIT, h.trailing, h.channel, 3'b000, h.time19};
  endfunction

  function automatic hit_t get_hit(logic [31:0] w);
    hit_t h;
    h.trailing    = w[29];
    h.channel = w[28:22];
    h.time19  = w[18:0];
    return h;
  endfunction

  function automatic logic [31:0] mk_hdr(logic [5:0] src, logic [23:0] num);
    return {W_HDR, src, num};
  endfunction

  function automatic logic [31:0] mk_trl(logic [11:0] cnt, logic [17:0] err);
    return {W_TRL, cnt, err};
  endfunction

  function automatic word_kind_e kind_of(logic [31:0] w);
    return word_kind_e'(w[31:30]);
  endfunction

  // Slot (25 ns period inside the 6.4 us frame) of a TDC time; requires the TDC coarse
  // counter to be aligned with the frame timer, which both reset at start of burst.
  function automatic logic [SLOT_W-1:0] slot_of(logic [TDC_TIME_W-1:0] t);
    return t[FINE_W +: SLOT_W];
  endfunction

endpackage
