// xmem_decoder: address decoder, small registers and read multiplexer of Tumbl's external memory.
//
// Word addresses on the 15-bit external bus (Tumbl byte address = 4 * word; master CPU address =
// 0x8002_0000 + 4 * word):
//   0x800 + 2i      IRC axis i position        (Tumbl 0x2000 + 8i)   -> irc_coproc RAM
//   0x801 + 2i      IRC axis i index position  (Tumbl 0x2004 + 8i)   -> irc_coproc RAM
//   0x808 + 2i      IRC axis i status          (Tumbl 0x2020 + 8i): bit 1 decode error (write 1
//                   to clear), bit 0 MARK
//   0x809           IRC reset register         (Tumbl 0x2024): bit 0, reset value 1, resets the
//                   IRC co-processor while set
//   0x900 - 0xAFF   LX Master RAM, 512 16-bit words (Tumbl 0x2400 - 0x2BFF), upper 16 bits
//                   read as 0 and are ignored on writes
// Every target answers a read one cycle after en_i; the decoder registers the selection and
// multiplexes the answer in that cycle. Unmapped words read as 0. Writes use the byte lanes.
// Of the write data only bits 1:0 are used here (status and reset registers); the IRC and LX
// Master RAMs take the write data directly.
// Follows the document (Tables D.3, D.4) with one exception: the table ends the LX Master space
// at 0x25FF while its text gives 512 words; the 512 words were kept (ends at 0x2BFF).
module xmem_decoder #(
  parameter int unsigned AXES = 4
) (
  input  logic                  clk_i,
  input  logic                  rst_i,
  input  logic                  en_i,
  input  logic [3:0]            bls_i,
  input  logic [14:0]           addr_i,
  input  logic [31:0]           data_i,
  output logic [31:0]           data_o,
  // IRC co-processor
  output logic                  irc_en_o,
  output logic [3:0]            irc_we_o,
  output logic [$clog2(AXES):0] irc_addr_o,
  input  logic [31:0]           irc_data_i,
  output logic                  irc_rst_o,
  output logic [AXES-1:0]       irc_err_clr_o,
  input  logic [AXES-1:0]       irc_err_i,
  input  logic [AXES-1:0]       irc_mark_i,
  // LX Master
  output logic                  lx_en_o,
  output logic [1:0]            lx_we_o,
  output logic [8:0]            lx_addr_o,
  input  logic [15:0]           lx_data_i
);

  localparam int unsigned XB = $clog2(AXES);

  typedef enum logic [1:0] {SEL_NONE, SEL_IRC, SEL_REG, SEL_LX} sel_e;
  sel_e sel, sel_q;
  logic [31:0] reg_q;
  logic [XB:0] reg_off;

  always_comb begin
    sel = SEL_NONE;
    if      (addr_i >= 15'h800 && addr_i < 15'(32'h800 + 2 * AXES))          sel = SEL_IRC;
    else if (addr_i >= 15'(32'h800 + 2 * AXES) && addr_i < 15'(32'h800 + 4 * AXES)) sel = SEL_REG;
    else if (addr_i >= 15'h900 && addr_i < 15'hB00)                          sel = SEL_LX;
  end

  assign reg_off    = addr_i[XB:0];          // word offset inside the status block
  assign irc_en_o   = en_i && sel == SEL_IRC;
  assign irc_we_o   = bls_i;
  assign irc_addr_o = addr_i[XB:0];
  assign lx_en_o    = en_i && sel == SEL_LX;
  assign lx_we_o    = bls_i[1:0];
  assign lx_addr_o  = 9'(addr_i - 15'h900);

  always_ff @(posedge clk_i) begin
    irc_err_clr_o <= '0;
    if (rst_i) begin
      sel_q     <= SEL_NONE;
      reg_q     <= '0;
      irc_rst_o <= 1'b1;
    end else if (en_i) begin
      sel_q <= sel;
      reg_q <= '0;
      if (sel == SEL_REG) begin
        if (reg_off[0]) begin
          if (reg_off == 1) begin
            reg_q <= {31'd0, irc_rst_o};
            if (bls_i[0]) irc_rst_o <= data_i[0];
          end
        end else begin
          reg_q <= {30'd0, irc_err_i[reg_off[XB:1]], irc_mark_i[reg_off[XB:1]]};
          if (bls_i[0] && data_i[1]) irc_err_clr_o[reg_off[XB:1]] <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    unique case (sel_q)
      SEL_IRC: data_o = irc_data_i;
      SEL_REG: data_o = reg_q;
      SEL_LX:  data_o = {16'd0, lx_data_i};
      default: data_o = '0;
    endcase
  end

endmodule
