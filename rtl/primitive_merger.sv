// primitive_merger: SL-FPGA merging of the PP trigger primitives.
//
// The SL collects the primitives that the four PPs send continuously and transmits them
// to the L0 trigger processor (document). Each PP input is queued in a small FIFO; a
// round-robin arbiter forwards one primitive per clock, tagged with the PP index, on a
// valid-only output that stands for the GbE link to the L0TP. Primitives arriving at a
// full queue are dropped and counted. Queue depth and arbitration are this design's
// choices. Latency: two clocks from input to output when the other queues are empty.
module primitive_merger
  import na62_pkg::*;
#(
  parameter int unsigned QDEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_PP-1:0]      in_valid,
  input  prim_t [NUM_PP-1:0]     in_prim,
  output logic                   out_valid,
  output prim_t                  out_prim,
  output logic [1:0]             out_src,
  output logic [31:0]            dropped_total
);
  prim_t [NUM_PP-1:0]     q_data;
  logic  [NUM_PP-1:0]     q_full, q_empty, q_rd;
  logic  [1:0]            rr, pick;
  logic                   any;

  for (genvar i = 0; i < NUM_PP; i++) begin : g_q
    logic [$clog2(QDEPTH):0] lvl;
    sync_fifo #(.WIDTH($bits(prim_t)), .DEPTH(QDEPTH)) u_q (
      .clk, .rst_n, .wr_en(in_valid[i] && !q_full[i]), .wr_data(in_prim[i]), .full(q_full[i]),
      .rd_en(q_rd[i]), .rd_data(q_data[i]), .empty(q_empty[i]), .level(lvl));
  end

  // Round robin: first non-empty queue at or after rr.
  always_comb begin
    any  = 1'b0;
    pick = rr;
    for (int k = NUM_PP - 1; k >= 0; k--) begin
      if (!q_empty[2'(rr + 2'(k))]) begin
        any  = 1'b1;
        pick = 2'(rr + 2'(k));
      end
    end
    q_rd = '0;
    if (any) q_rd[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr            <= '0;
      out_valid     <= 1'b0;
      out_prim      <= '0;
      out_src       <= '0;
      dropped_total <= '0;
    end else begin
      out_valid <= any;
      if (any) begin
        out_prim <= q_data[pick];
        out_src  <= pick;
        rr       <= pick + 1'b1;
      end
      dropped_total <= dropped_total + 32'($countones(in_valid & q_full));
    end
  end
endmodule
