// dpram: true dual-port block RAM with byte write enables.
//
// Both ports run on one clock (the whole FPGA design runs on one 50 MHz clock).
// Each port reads synchronously: when en is high at a rising edge of clk, dout takes the
// word at addr one cycle later. Byte lane i of din is written where we[i] is high. By default a
// port returns the old contents on a write (read-first); with NO_CHANGE set, dout keeps its
// value during a write, the mode the IRC co-processor relies on. Both ports may write; a write
// collision on the same address leaves the result of port B. Contents start at zero, as the
// FPGA's block RAM does after configuration. This is the inferred template used for the
// instruction and data memories, the IRC count memory and the LX Master buffers.
module dpram #(
  parameter int unsigned AW        = 9,
  parameter int unsigned DW        = 32,
  parameter bit          NO_CHANGE = 1'b0
) (
  input  logic              clk,
  input  logic              en_a,
  input  logic [DW/8-1:0]   we_a,
  input  logic [AW-1:0]     addr_a,
  input  logic [DW-1:0]     din_a,
  output logic [DW-1:0]     dout_a,
  input  logic              en_b,
  input  logic [DW/8-1:0]   we_b,
  input  logic [AW-1:0]     addr_b,
  input  logic [DW-1:0]     din_b,
  output logic [DW-1:0]     dout_b
);

  localparam int unsigned NB = DW / 8;

  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (en_a) begin
      if (!(NO_CHANGE && we_a != '0)) dout_a <= mem[addr_a];
      for (int i = 0; i < NB; i++)
        if (we_a[i]) mem[addr_a][i*8 +: 8] <= din_a[i*8 +: 8];
    end
    if (en_b) begin
      if (!(NO_CHANGE && we_b != '0)) dout_b <= mem[addr_b];
      for (int i = 0; i < NB; i++)
        if (we_b[i]) mem[addr_b][i*8 +: 8] <= din_b[i*8 +: 8];
    end
  end

endmodule
