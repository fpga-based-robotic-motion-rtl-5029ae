// irc_coproc: IRC co-processor, 32-bit position and index counts of AXES encoder inputs.
//
// Each axis has an 8-bit quad counter (irc_quad_counter). A tiny sequencer extends the 8-bit
// counts to 32 bits in a block RAM shared by all axes: the RAM word {axis, 2'b00} holds the
// position Q and {axis, 2'b01} the index position. The instruction register ins = {axis, op}
// counts up every cycle and addresses the RAM:
//   op 0: Q is on the RAM output; write Q + s((s(C,32) + ~Q + 1)[7:0], 32) to {axis,00}
//         (C = 8-bit count of the axis, s() = sign extension).
//   op 1: if the axis saw an index edge, write the same formula with C = captured index count
//         to {axis,01} and acknowledge the event.
//   op 2: start reading Q of the next axis.
//   op 3: no operation.
// So one axis is serviced every 4 cycles and all of them every 4*AXES cycles; the counter may not
// move by more than +127/-128 steps in that time. The RAM is "no change": its output keeps the
// last read word during writes, so op 1 still sees Q.
// Bus port (master CPU or Tumbl through the external bus): word offset w selects axis w[2:1] and
// position (w[0]=0) or index (w[0]=1); reads return the RAM word one cycle after bus_en_i, writes
// set the 32-bit value (a write racing the sequencer's write of the same word may be lost).
// rst_i (system reset or the IRC reset register) clears the quad counters and restarts the
// sequencer; the RAM contents are kept. err_o/mark_o/err_clr_i are the per-axis status bits.
// Follows the document: the formula, the instruction encoding and the 4-cycle service. The bus
// word order and keeping the RAM over a reset are this design's choices.
module irc_coproc #(
  parameter int unsigned AXES = 4
) (
  input  logic                    clk_i,
  input  logic                    rst_i,
  input  logic [AXES-1:0]         irc_a_i,
  input  logic [AXES-1:0]         irc_b_i,
  input  logic [AXES-1:0]         irc_idx_i,
  input  logic [AXES-1:0]         irc_mark_i,
  input  logic [AXES-1:0]         err_clr_i,
  output logic [AXES-1:0]         err_o,
  output logic [AXES-1:0]         mark_o,
  input  logic                    bus_en_i,
  input  logic [3:0]              bus_we_i,
  input  logic [$clog2(AXES):0]   bus_addr_i,
  input  logic [31:0]             bus_data_i,
  output logic [31:0]             bus_data_o
);

  localparam int unsigned XB = $clog2(AXES);   // axis bits
  localparam int unsigned IB = XB + 2;         // instruction / RAM address bits

  if (AXES != 2 ** XB || AXES < 2) begin : g_check
    $error("irc_coproc: AXES must be a power of two of at least 2");
  end

  logic [7:0]      cnt     [AXES];
  logic [7:0]      idx_cnt [AXES];
  logic [AXES-1:0] idx_ev, idx_ack;

  for (genvar i = 0; i < AXES; i++) begin : g_axis
    irc_quad_counter #(.CNT_BITS(8)) u_qc (
      .clk_i(clk_i), .rst_i(rst_i), .a_i(irc_a_i[i]), .b_i(irc_b_i[i]), .idx_i(irc_idx_i[i]),
      .mark_i(irc_mark_i[i]), .idx_ack_i(idx_ack[i]), .err_clr_i(err_clr_i[i]),
      .count_o(cnt[i]), .idx_count_o(idx_cnt[i]), .idx_event_o(idx_ev[i]), .err_o(err_o[i]),
      .mark_o(mark_o[i])
    );
  end

  // ------------------------------------------------------------------ sequencer
  logic [IB-1:0] ins;
  logic [XB-1:0] axis;
  logic [1:0]    op;
  logic [31:0]   q, q_new;
  logic [7:0]    c;
  logic          en_a;
  logic [3:0]    we_a;
  logic [IB-1:0] addr_a;

  assign axis = ins[IB-1:2];
  assign op   = ins[1:0];

  always_ff @(posedge clk_i) begin
    if (rst_i) ins <= '0;
    else       ins <= ins + 1'b1;
  end

  function automatic logic [31:0] extend(input logic [31:0] qv, input logic [7:0] cv);
    logic [7:0] qs;
    qs = cv + ~qv[7:0] + 8'd1;            // low 8 bits of s(C,32) + ~Q + 1
    return qv + {{24{qs[7]}}, qs};
  endfunction

  assign c     = (op == 2'd0) ? cnt[axis] : idx_cnt[axis];
  assign q_new = extend(q, c);

  always_comb begin
    idx_ack = '0;
    en_a    = 1'b0;
    we_a    = 4'b0000;
    addr_a  = ins;
    if (rst_i) begin
      en_a   = 1'b1;                       // prefetch Q of axis 0
      addr_a = '0;
    end else begin
      unique case (op)
        2'd0: begin
          en_a = 1'b1;
          we_a = 4'b1111;
        end
        2'd1: if (idx_ev[axis]) begin
          en_a          = 1'b1;
          we_a          = 4'b1111;
          idx_ack[axis] = 1'b1;
        end
        2'd2: begin
          en_a   = 1'b1;
          addr_a = {XB'(axis + 1'b1), 2'b00};
        end
        default: ;
      endcase
    end
  end

  dpram #(.AW(IB), .DW(32), .NO_CHANGE(1'b1)) u_ram (
    .clk(clk_i),
    .en_a(en_a), .we_a(we_a), .addr_a(addr_a), .din_a(q_new), .dout_a(q),
    .en_b(bus_en_i), .we_b(bus_we_i), .addr_b({bus_addr_i[XB:1], 1'b0, bus_addr_i[0]}),
    .din_b(bus_data_i), .dout_b(bus_data_o)
  );

endmodule
