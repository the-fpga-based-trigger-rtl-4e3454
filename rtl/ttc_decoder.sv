// ttc_decoder: TTC interface of the SL-FPGA.
//
// Clock and L0 triggers reach the TEL62 over the TTC optical link; a TTCrx chip decodes
// them. This block takes the TTCrx outputs, keeps the 32 bit burst timestamp (25 ns LSB,
// cleared by the start-of-burst broadcast sob), and turns each L0 accept into a trigger
// request {sequential trigger number, trigger type, trigger timestamp} that it dispatches
// to all PPs (document). The trigger type is taken from the first broadcast (brcst_valid,
// brcst) after the accept; the trigger timestamp is the time of the accept less the
// programmable fixed latency of the TTC path. An accept that arrives before the type of
// the previous one is dispatched with type 0 and counted in type_missing_total. The
// pairing with the broadcast, the latency subtraction and the field widths are this
// design's choices. The request leaves one clock after the broadcast is seen.
module ttc_decoder
  import na62_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sob,
  input  logic                    l1a,
  input  logic                    brcst_valid,
  input  logic [TRIG_TYPE_W-1:0]  brcst,
  input  logic [TS_W-1:0]         latency,
  output logic [TS_W-1:0]         timestamp,
  output logic                    trig_valid,
  output trig_t                   trig,
  output logic [31:0]             type_missing_total
);
  logic                  pending;
  logic [TS_W-1:0]       pend_ts;
  logic [TRIG_NUM_W-1:0] num;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timestamp          <= '0;
      pending            <= 1'b0;
      pend_ts            <= '0;
      num                <= '0;
      trig_valid         <= 1'b0;
      trig               <= '0;
      type_missing_total <= '0;
    end else begin
      timestamp  <= sob ? '0 : timestamp + 1'b1;
      trig_valid <= 1'b0;
      if (sob) begin
        pending <= 1'b0;
        num     <= '0;
      end else begin
        if (pending && (brcst_valid || l1a)) begin
          trig_valid <= 1'b1;
          trig       <= '{num: num, ttype: brcst_valid ? brcst : '0, ts: pend_ts};
          num        <= num + 1'b1;
          if (!brcst_valid) type_missing_total <= type_missing_total + 1;
        end
        if (l1a) begin
          pending <= 1'b1;
          pend_ts <= timestamp - latency;
        end else if (brcst_valid) begin
          pending <= 1'b0;
        end
      end
    end
  end
endmodule
