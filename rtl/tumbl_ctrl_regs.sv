// tumbl_ctrl_regs: the master CPU's control and status registers of the Tumbl co-processor.
//
// Word offsets (CPU 0x8000_3000 + 4*offset):
//   0  control, read/write: bit 0 reset (reset value 1, must be cleared by software),
//      bit 1 interrupt request, bit 2 external halt, bit 3 trace mode,
//      bit 4 (read only) Tumbl stopped on a HALT instruction
//   1  trace kick, write only: writing 1 in bit 0 lets Tumbl run one clock cycle in trace mode,
//      or resumes it after a HALT instruction
//   2  program counter, read only
//   3  halt code, read only
// Reads answer one cycle after ce_i; writes use byte lane 0 (bits 7:0) of bls_i, so the other
// byte enables and data bits 31:4 are not used.
// Outputs are registered; trace_kick_o is a one-cycle pulse in the cycle after the write.
// Follows the document (Table D.1). The byte lane used for writes is this design's choice.
module tumbl_ctrl_regs (
  input  logic        clk_i,
  input  logic        rst_i,
  input  logic        ce_i,
  input  logic [3:0]  bls_i,
  input  logic [1:0]  addr_i,
  input  logic [31:0] data_i,
  output logic [31:0] data_o,
  // to / from Tumbl
  output logic        t_rst_o,
  output logic        t_int_o,
  output logic        t_halt_o,
  output logic        t_trace_o,
  output logic        t_trace_kick_o,
  input  logic        t_halted_i,
  input  logic [31:0] t_pc_i,
  input  logic [4:0]  t_halt_code_i
);

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      t_rst_o        <= 1'b1;
      t_int_o        <= 1'b0;
      t_halt_o       <= 1'b0;
      t_trace_o      <= 1'b0;
      t_trace_kick_o <= 1'b0;
      data_o         <= '0;
    end else begin
      t_trace_kick_o <= 1'b0;
      if (ce_i) begin
        if (bls_i[0] && addr_i == 2'd0) begin
          t_rst_o   <= data_i[0];
          t_int_o   <= data_i[1];
          t_halt_o  <= data_i[2];
          t_trace_o <= data_i[3];
        end
        if (bls_i[0] && addr_i == 2'd1) t_trace_kick_o <= data_i[0];
        unique case (addr_i)
          2'd0:    data_o <= {27'd0, t_halted_i, t_trace_o, t_halt_o, t_int_o, t_rst_o};
          2'd2:    data_o <= t_pc_i;
          2'd3:    data_o <= {27'd0, t_halt_code_i};
          default: data_o <= '0;
        endcase
      end
    end
  end

endmodule
