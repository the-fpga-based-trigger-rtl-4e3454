// l0tp: L0 trigger processor (firmware of the TALK board used as L0TP prototype).
//
// The L0TP collects the trigger primitives that the TEL62 boards of the fast detectors
// send, merges them in time and sends the L0 decision to the Local Trigger Unit; choke and
// error signals from the readout inhibit it (document). The L0 selection uses detectors
// as positive elements (CHOD, RICH) and as negative ones (MUV, photon vetoes) (document).
//
// How it works here: each input d writes a bit into a circular occupancy map of NSLOT
// 25 ns slots at the slot given by its primitive timestamp. The slot e = now - eval_delay
// is evaluated once per clock, i.e. once per 25 ns slot. A trigger is issued for slot e
// when the reference detector ref_det has a primitive exactly at e, every detector in
// pos_mask has one within e +- window, no detector in neg_mask has one within e +- window,
// and no choke or error input is active. Evaluated slots are cleared window+1 slots later.
// A primitive whose window has already been evaluated (ts + window < e) is dropped and
// counted as late. eval_delay must cover the primitive transport latency and must satisfy
// eval_delay + window + 1 < NSLOT. The occupancy map, the reference detector, the delay and
// the masks are this design's choices. Triggers leave one clock after evaluation with the
// slot as timestamp, trig_type as type, and a sequential number cleared by sob.
module l0tp
  import na62_pkg::*;
#(
  parameter int unsigned NDET   = 4,
  parameter int unsigned NSLOT  = 1024,
  parameter int unsigned WMAX   = 15,
  parameter int unsigned NCHOKE = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        sob,
  // configuration
  input  logic [NDET-1:0]             pos_mask,
  input  logic [NDET-1:0]             neg_mask,
  input  logic [$clog2(NDET)-1:0]     ref_det,
  input  logic [$clog2(WMAX+1)-1:0]   window,
  input  logic [$clog2(NSLOT)-1:0]    eval_delay,
  input  logic [TRIG_TYPE_W-1:0]      trig_type,
  // primitives, one stream per detector
  input  logic [NDET-1:0]             prim_valid,
  input  prim_t [NDET-1:0]            prim,
  // choke and error lines (RJ11)
  input  logic [NCHOKE-1:0]           choke,
  input  logic [NCHOKE-1:0]           error,
  // decision to the LTU
  output logic                        trig_valid,
  output trig_t                       trig,
  output logic [TS_W-1:0]             now,
  // counters
  output logic [31:0]                 late_total,
  output logic [31:0]                 veto_total,
  output logic [31:0]                 choke_total,
  output logic [31:0]                 error_total
);
  localparam int unsigned SW = $clog2(NSLOT);

  logic [NSLOT-1:0]      occ [NDET];
  logic [TS_W-1:0]       e;
  logic [NDET-1:0]       near;     // detector seen within e +- window
  logic                  ref_hit, pos_ok, veto, inhibit;
  logic [TRIG_NUM_W-1:0] num;
  logic                  started;

  assign e = now - TS_W'(eval_delay);

  always_comb begin
    for (int d = 0; d < NDET; d++) begin
      near[d] = 1'b0;
      for (int k = -int'(WMAX); k <= int'(WMAX); k++)
        if ((k < 0 ? -k : k) <= int'(window) && occ[d][SW'(e + TS_W'(k))]) near[d] = 1'b1;
    end
    ref_hit = occ[ref_det][SW'(e)];
    pos_ok  = ((near & pos_mask) == pos_mask);
    veto    = |(near & neg_mask);
    inhibit = |choke || |error;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < NDET; d++) occ[d] <= '0;
      now         <= '0;
      num         <= '0;
      started     <= 1'b0;
      trig_valid  <= 1'b0;
      trig        <= '0;
      late_total  <= '0;
      veto_total  <= '0;
      choke_total <= '0;
      error_total <= '0;
    end else if (sob) begin
      for (int d = 0; d < NDET; d++) occ[d] <= '0;
      now        <= '0;
      num        <= '0;
      started    <= 1'b0;
      trig_valid <= 1'b0;
    end else begin
      now        <= now + 1'b1;
      trig_valid <= 1'b0;
      if (now == TS_W'(eval_delay)) started <= 1'b1;
      // clear the slot that has left every window
      for (int d = 0; d < NDET; d++) occ[d][SW'(e - TS_W'(window) - 1)] <= 1'b0;
      // record primitives
      for (int d = 0; d < NDET; d++) begin
        if (prim_valid[d]) begin
          if (started && prim[d].ts + TS_W'(window) < e) late_total <= late_total + 1;
          else occ[d][SW'(prim[d].ts)] <= 1'b1;
        end
      end
      // decision for slot e
      if (started && ref_hit && pos_ok) begin
        if (veto)              veto_total  <= veto_total + 1;
        else if (|error)       error_total <= error_total + 1;
        else if (|choke)       choke_total <= choke_total + 1;
        else if (!inhibit) begin
          trig_valid <= 1'b1;
          trig       <= '{num: num, ttype: trig_type, ts: e};
          num        <= num + 1'b1;
        end
      end
    end
  end
endmodule
