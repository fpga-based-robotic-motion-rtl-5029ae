// irc_quad_counter: low-level handler of one incremental encoder (IRC) input.
//
// Synchronises the encoder signals A, B, IDX and MARK with two flip-flops each, decodes A/B in
// 4x mode (every edge of A or B is one step; the count goes up when A leads B) and keeps only the
// low CNT_BITS bits of the position, which the IRC co-processor extends to 32 bits. On a rising
// edge of IDX the current count is captured in idx_count_o and idx_event_o is set until the
// co-processor acknowledges it with idx_ack_i (a new edge in the same cycle wins). When A and B
// change in the same cycle a step was lost: err_o is set until err_clr_i.
// Timing: an input edge reaches count_o three clock cycles later (two synchroniser stages and
// the counter register). rst_i is synchronous, active high, and clears count, event and error.
// Follows the document: 8-bit counter, index capture of the low 8 bits, the decode error flag and
// MARK pass-through. The synchroniser depth and the counting direction are this design's choice.
module irc_quad_counter #(
  parameter int unsigned CNT_BITS = 8
) (
  input  logic                clk_i,
  input  logic                rst_i,
  input  logic                a_i,
  input  logic                b_i,
  input  logic                idx_i,
  input  logic                mark_i,
  input  logic                idx_ack_i,
  input  logic                err_clr_i,
  output logic [CNT_BITS-1:0] count_o,
  output logic [CNT_BITS-1:0] idx_count_o,
  output logic                idx_event_o,
  output logic                err_o,
  output logic                mark_o
);

  logic [1:0] a_sy, b_sy, idx_sy, mark_sy;
  logic       a_q, b_q, idx_q;
  logic       a_ch, b_ch;

  always_ff @(posedge clk_i) begin
    a_sy    <= {a_sy[0], a_i};
    b_sy    <= {b_sy[0], b_i};
    idx_sy  <= {idx_sy[0], idx_i};
    mark_sy <= {mark_sy[0], mark_i};
  end

  assign a_ch = a_sy[1] != a_q;
  assign b_ch = b_sy[1] != b_q;

  always_ff @(posedge clk_i) begin
    a_q   <= a_sy[1];
    b_q   <= b_sy[1];
    idx_q <= idx_sy[1];
    if (rst_i) begin
      count_o     <= '0;
      idx_count_o <= '0;
      idx_event_o <= 1'b0;
      err_o       <= 1'b0;
    end else begin
      if (a_ch && b_ch) begin
        err_o <= 1'b1;
      end else if (a_ch || b_ch) begin
        // forward order 00 -> 10 -> 11 -> 01: new A differs from old B
        if (a_sy[1] ^ b_q) count_o <= count_o + 1'b1;
        else               count_o <= count_o - 1'b1;
      end
      if (err_clr_i && !(a_ch && b_ch)) err_o <= 1'b0;
      if (idx_sy[1] && !idx_q) begin
        idx_count_o <= count_o;
        idx_event_o <= 1'b1;
      end else if (idx_ack_i) begin
        idx_event_o <= 1'b0;
      end
    end
  end

  assign mark_o = mark_sy[1];

endmodule
