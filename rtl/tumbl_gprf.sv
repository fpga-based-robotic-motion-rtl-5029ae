// tumbl_gprf: general purpose register file of the Tumbl core.
//
// 32 registers of 32 bits, kept in three banks that share one write port, so that Ra, Rb and
// Rd (store data) can be read in the same cycle. Reads are synchronous: the indices given while
// clken is high at a rising edge select the values seen in the next cycle. A register written
// at the same edge is read with its new value (write-first), which covers an instruction that
// reads a register two cycles after the instruction that writes it. While rst is high, R0 is
// written with zero in all banks; writes to R0 are otherwise never requested. The three-bank
// organisation and the write-first behaviour follow the core description; banks are inferred
// arrays rather than vendor primitives.
module tumbl_gprf
  import tumbl_pkg::*;
(
  input  logic     clk_i,
  input  logic     rst_i,
  input  logic     clken_i,
  input  id2gprf_t id2gprf_i,
  input  wrb_t     mem_wrb_i,
  output gprf2ex_t gprf2ex_o
);

  logic [31:0] bank_a [32];
  logic [31:0] bank_b [32];
  logic [31:0] bank_d [32];

  logic        we;
  logic [4:0]  waddr;
  logic [31:0] wdata;

  assign we    = rst_i || (clken_i && mem_wrb_i.wrb_Action != NO_WRB && mem_wrb_i.wrix_rD != 5'd0);
  assign waddr = rst_i ? 5'd0 : mem_wrb_i.wrix_rD;
  assign wdata = rst_i ? 32'd0 : mem_wrb_i.data_rD;

  always_ff @(posedge clk_i) begin
    if (we) begin
      bank_a[waddr] <= wdata;
      bank_b[waddr] <= wdata;
      bank_d[waddr] <= wdata;
    end
    if (clken_i) begin
      gprf2ex_o.data_rA <= (we && waddr == id2gprf_i.rdix_rA) ? wdata : bank_a[id2gprf_i.rdix_rA];
      gprf2ex_o.data_rB <= (we && waddr == id2gprf_i.rdix_rB) ? wdata : bank_b[id2gprf_i.rdix_rB];
      gprf2ex_o.data_rD <= (we && waddr == id2gprf_i.rdix_rD) ? wdata : bank_d[id2gprf_i.rdix_rD];
    end
  end

endmodule
