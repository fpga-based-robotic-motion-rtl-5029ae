// delay_meas_regs: registers the master CPU uses to measure the bus timing it needs.
//
// Four 32-bit words selected by addr_i (word offsets 0..3 = CPU 0x8000_7FF0..0x8000_7FFC):
//   0  RD1, read only, always 0xAAAAAAAA
//   1  WR1, read/write
//   2  RD2, read only, always 0x55555555
//   3  WR2, read/write
// RD1 and RD2 have no bit in common, so reading them alternately flips every data line; the
// same is done for writes with WR1/WR2. Reads answer one cycle after ce_i; writes honour the
// byte lanes bls_i. rst_i (synchronous) clears WR1 and WR2.
// Follows the document (Table D.1); the reset value of WR1/WR2 is this design's choice.
module delay_meas_regs #(
  parameter logic [31:0] RD1_VALUE = 32'hAAAA_AAAA,
  parameter logic [31:0] RD2_VALUE = 32'h5555_5555
) (
  input  logic        clk_i,
  input  logic        rst_i,
  input  logic        ce_i,
  input  logic [3:0]  bls_i,
  input  logic [1:0]  addr_i,
  input  logic [31:0] data_i,
  output logic [31:0] data_o
);

  logic [31:0] wr1, wr2;

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      wr1    <= '0;
      wr2    <= '0;
      data_o <= '0;
    end else if (ce_i) begin
      for (int i = 0; i < 4; i++) begin
        if (bls_i[i] && addr_i == 2'd1) wr1[i*8 +: 8] <= data_i[i*8 +: 8];
        if (bls_i[i] && addr_i == 2'd3) wr2[i*8 +: 8] <= data_i[i*8 +: 8];
      end
      unique case (addr_i)
        2'd0:    data_o <= RD1_VALUE;
        2'd1:    data_o <= wr1;
        2'd2:    data_o <= RD2_VALUE;
        default: data_o <= wr2;
      endcase
    end
  end

endmodule
