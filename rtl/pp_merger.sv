// pp_merger: merges the four TDC packets of one 6.4 us frame into one frame (PP-FPGA).
//
// Each PP receives the four 32 bit TDC buses of its TDCB and merges the four packets of the
// same frame into a single buffer, which then feeds monitoring, primitive generation and
// storage (document). Here the merger waits until all four inputs present a header, checks
// that they carry the same frame number, and emits one header (source = PP index), the hits
// of TDC 0, 1, 2 and 3 in that order, and one trailer whose count is the sum of the hit
// counts and whose error field is the sum of dropped hits plus 0x20000 per frame-number
// mismatch. The output is valid-only (one word per clock, no back-pressure) and registered:
// words leave one clock after they are accepted. The input order, the mismatch flag and the
// registered output are this design's choices.
module pp_merger
  import na62_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [1:0]                 pp_id,
  input  logic [NUM_TDC-1:0]         in_valid,
  output logic [NUM_TDC-1:0]         in_ready,
  input  logic [NUM_TDC-1:0][31:0]   in_data,
  output logic                       out_valid,
  output logic [31:0]                out_data,
  output logic [31:0]                mismatch_total
);
  typedef enum logic [1:0] {S_WAIT, S_PASS, S_TRL} state_e;

  state_e       state;
  logic [1:0]   src;
  logic [11:0]  cnt_sum;
  logic [17:0]  err_sum;

  logic all_hdr, same_frame;
  always_comb begin
    all_hdr    = 1'b1;
    same_frame = 1'b1;
    for (int i = 0; i < NUM_TDC; i++) begin
      all_hdr = all_hdr && in_valid[i] && (kind_of(in_data[i]) == W_HDR);
      if (in_data[i][FRAME_W-1:0] != in_data[0][FRAME_W-1:0]) same_frame = 1'b0;
    end
  end

  wire        cur_valid = in_valid[src];
  wire [31:0] cur_word  = in_data[src];

  always_comb begin
    in_ready = '0;
    unique case (state)
      S_WAIT:  if (all_hdr) in_ready = '1;
      S_PASS:  in_ready[src] = 1'b1;
      default: in_ready = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_WAIT;
      src            <= '0;
      cnt_sum        <= '0;
      err_sum        <= '0;
      out_valid      <= 1'b0;
      out_data       <= '0;
      mismatch_total <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_WAIT: if (all_hdr) begin
          out_valid <= 1'b1;
          out_data  <= mk_hdr({4'b0, pp_id}, in_data[0][FRAME_W-1:0]);
          src       <= '0;
          cnt_sum   <= '0;
          err_sum   <= same_frame ? 18'd0 : 18'h20000;
          if (!same_frame) mismatch_total <= mismatch_total + 1;
          state     <= S_PASS;
        end
        S_PASS: if (cur_valid) begin
          if (kind_of(cur_word) == W_TRL) begin
            cnt_sum <= cnt_sum + cur_word[29:18];
            err_sum <= err_sum + cur_word[17:0];
            src     <= src + 1'b1;
            if (src == 2'(NUM_TDC-1)) state <= S_TRL;
          end else begin
            out_valid <= 1'b1;
            out_data  <= cur_word;
          end
        end
        S_TRL: begin
          out_valid <= 1'b1;
          out_data  <= mk_trl(cnt_sum, err_sum);
          state     <= S_WAIT;
        end
        default: state <= S_WAIT;
      endcase
    end
  end
endmodule
