// master_bus_decoder: address decoder and read-data multiplexer of the master CPU's internal bus.
//
// Takes the single-cycle transactions of the slave memory controller (ce, bls, 16-bit word
// address, write data) and enables one peripheral:
//   word 0x0000-0x01FF  Tumbl instruction memory   (CPU 0x8000_0000-0x8000_07FF)
//   word 0x0400-0x07FF  Tumbl data memory          (CPU 0x8000_1000-0x8000_1FFF)
//   word 0x0C00-0x0C03  Tumbl control registers    (CPU 0x8000_3000-0x8000_300C)
//   word 0x1FFC-0x1FFF  delay measurement registers(CPU 0x8000_7FF0-0x8000_7FFC)
//   word 0x8000-0xFFFF  Tumbl external memory space(CPU 0x8002_0000-0x8003_FFFF)
// Address bits 1:0 take no part in the decoding (the smallest range is 4 words); the peripherals
// receive them directly. Every peripheral answers a read one cycle after its enable; the decoder registers which one
// was selected and multiplexes its data back in that cycle. Unmapped addresses read as 0.
// Follows the document's memory map (Tables D.1, D.2, D.4); the mirror-free decoding of exactly
// those ranges is this design's choice.
module master_bus_decoder (
  input  logic        clk_i,
  input  logic        rst_i,
  input  logic        i_ce_i,
  input  logic [15:0] i_address_i,
  output logic        imem_ce_o,
  output logic        dmem_ce_o,
  output logic        ctrl_ce_o,
  output logic        meas_ce_o,
  output logic        xmem_ce_o,
  input  logic [31:0] imem_data_i,
  input  logic [31:0] dmem_data_i,
  input  logic [31:0] ctrl_data_i,
  input  logic [31:0] meas_data_i,
  input  logic [31:0] xmem_data_i,
  output logic [31:0] i_data_o
);

  typedef enum logic [2:0] {SEL_NONE, SEL_IMEM, SEL_DMEM, SEL_CTRL, SEL_MEAS, SEL_XMEM} sel_e;
  sel_e sel, sel_q;

  always_comb begin
    sel = SEL_NONE;
    if      (i_address_i[15])                 sel = SEL_XMEM;
    else if (i_address_i[14:9] == 6'd0)       sel = SEL_IMEM;
    else if (i_address_i[14:10] == 5'd1)      sel = SEL_DMEM;
    else if (i_address_i[14:2] == 13'h0300)   sel = SEL_CTRL;
    else if (i_address_i[14:2] == 13'h07FF)   sel = SEL_MEAS;
  end

  assign imem_ce_o = i_ce_i && sel == SEL_IMEM;
  assign dmem_ce_o = i_ce_i && sel == SEL_DMEM;
  assign ctrl_ce_o = i_ce_i && sel == SEL_CTRL;
  assign meas_ce_o = i_ce_i && sel == SEL_MEAS;
  assign xmem_ce_o = i_ce_i && sel == SEL_XMEM;

  always_ff @(posedge clk_i) begin
    if (rst_i)       sel_q <= SEL_NONE;
    else if (i_ce_i) sel_q <= sel;
  end

  always_comb begin
    unique case (sel_q)
      SEL_IMEM: i_data_o = imem_data_i;
      SEL_DMEM: i_data_o = dmem_data_i;
      SEL_CTRL: i_data_o = ctrl_data_i;
      SEL_MEAS: i_data_o = meas_data_i;
      SEL_XMEM: i_data_o = xmem_data_i;
      default:  i_data_o = '0;
    endcase
  end

endmodule
