// lx_master: transmitter of the power stage bus (master to slaves direction).
//
// Every PERIOD clock cycles it sends the messages stored in a 512 x 16-bit dual-port block RAM.
// The RAM holds two buffers of 256 words (address bit 8 selects the buffer). Word 0x000 is a
// register: bit 15 selects the buffer to send, bits 7:0 the length of the first message of
// buffer 0. Word 0x100 holds bits 7:0 = length of the first message of buffer 1. A message is its
// data words followed by a link word: bits 15:8 = low 8 bits of the address of the next message
// (bit 8 is the active buffer), bits 7:0 = its length; length 0 ends the transmission.
// Bus signals: SYNC is low while a message is on the bus; MOSI carries the data, LSB of each
// word first, one bit per clock, followed directly by an 8-bit CRC (MSB first) with SYNC still
// low. SYNC is released for one cycle (ST_READY) between messages. CLK is the system clock.
// State machine (one cycle each unless stated): ST_BEGIN reads word 0x000; ST_DECIDE reads word
// 0x100 if buffer 1 is selected; ST_PREINIT takes the length and reads the first data word;
// ST_INIT ends the transmission if the length is 0; ST_READY loads the first word; ST_XFER sends
// 16n bits; ST_CRC sends 8 CRC bits while the link word, already read, is parsed and the first
// word of the next message is read; then ST_READY again or ST_END, which waits for the period.
// A period that ends during a transmission restarts as soon as the transmission ends (overrun_o).
// Bus port (for the CPUs): word address, 16-bit data, upper 16 bits read as 0, sync read.
// Outputs are registered: MOSI/SYNC change one cycle after the state that produces them.
// Follows the document: the buffer and message format, states, SYNC behaviour, LSB-first data
// and the 8-bit CRC after the data. This design's choices: CRC-8 polynomial x^8+x^2+x+1 with
// initial value 0 (the polynomial is not given), MOSI = 0 when idle, CLK = the system clock.
module lx_master #(
  parameter int unsigned PERIOD = 2500,   // 50 MHz / 20 kHz
  parameter logic [7:0]  CRC_POLY = 8'h07
) (
  input  logic        clk_i,
  input  logic        rst_i,
  // bus port
  input  logic        bus_en_i,
  input  logic [1:0]  bus_we_i,
  input  logic [8:0]  bus_addr_i,
  input  logic [15:0] bus_data_i,
  output logic [15:0] bus_data_o,
  // power stage bus
  output logic        lx_clk_o,
  output logic        lx_sync_o,
  output logic        lx_mosi_o,
  // status
  output logic        period_o,     // one-cycle pulse at the start of each period
  output logic        overrun_o     // the period ended before the transmission
);

  typedef enum logic [2:0] {
    ST_BEGIN, ST_DECIDE, ST_PREINIT, ST_INIT, ST_READY, ST_XFER, ST_CRC, ST_END
  } state_e;

  state_e      state;
  logic [$clog2(PERIOD)-1:0] pcnt;
  logic        tick, restart;
  logic        buf_sel;
  logic [7:0]  len, words_left;
  logic [3:0]  bitn;
  logic [15:0] sh;
  logic [7:0]  crc;
  logic [8:0]  ptr;            // address of the word on the RAM output
  logic        en_a;
  logic [8:0]  addr_a;
  logic [15:0] rd;

  dpram #(.AW(9), .DW(16), .NO_CHANGE(1'b1)) u_ram (
    .clk(clk_i),
    .en_a(en_a), .we_a(2'b00), .addr_a(addr_a), .din_a(16'd0), .dout_a(rd),
    .en_b(bus_en_i), .we_b(bus_we_i), .addr_b(bus_addr_i), .din_b(bus_data_i),
    .dout_b(bus_data_o)
  );

  function automatic logic [7:0] crc_step(input logic [7:0] cv, input logic bit_in);
    return {cv[6:0], 1'b0} ^ ((cv[7] ^ bit_in) ? CRC_POLY : 8'h00);
  endfunction

  assign tick = pcnt == ($clog2(PERIOD))'(PERIOD - 1);

  // RAM port A requests
  always_comb begin
    en_a   = 1'b0;
    addr_a = ptr + 9'd1;
    unique case (state)
      ST_BEGIN:   begin en_a = 1'b1; addr_a = 9'h000; end
      ST_DECIDE:  begin en_a = rd[15]; addr_a = 9'h100; end
      ST_PREINIT: en_a = 1'b1;                                   // first data word
      ST_READY:   en_a = 1'b1;                                   // second word / link word
      ST_XFER:    en_a = bitn == 4'd15 && words_left > 8'd1;     // word after the next one
      ST_CRC:     begin en_a = bitn == 4'd0; addr_a = {buf_sel, rd[15:8]}; end
      default:    ;
    endcase
  end

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      state      <= ST_BEGIN;
      pcnt       <= '0;
      restart    <= 1'b0;
      buf_sel    <= 1'b0;
      len        <= '0;
      words_left <= '0;
      bitn       <= '0;
      sh         <= '0;
      crc        <= '0;
      ptr        <= '0;
      lx_sync_o  <= 1'b1;
      lx_mosi_o  <= 1'b0;
      overrun_o  <= 1'b0;
    end else begin
      pcnt      <= tick ? '0 : pcnt + 1'b1;
      overrun_o <= 1'b0;
      if (tick) restart <= 1'b1;
      lx_sync_o <= 1'b1;
      lx_mosi_o <= 1'b0;
      unique case (state)
        ST_BEGIN: begin
          restart <= tick;
          ptr     <= 9'h000;
          state   <= ST_DECIDE;
        end
        ST_DECIDE: begin
          buf_sel <= rd[15];
          if (rd[15]) ptr <= 9'h100;
          state <= ST_PREINIT;
        end
        ST_PREINIT: begin
          len   <= rd[7:0];
          ptr   <= ptr + 9'd1;
          state <= ST_INIT;
        end
        ST_INIT: state <= (len == 8'd0) ? ST_END : ST_READY;
        ST_READY: begin
          sh         <= rd;
          words_left <= len;
          bitn       <= '0;
          crc        <= '0;
          ptr        <= ptr + 9'd1;
          state      <= ST_XFER;
        end
        ST_XFER: begin
          lx_sync_o <= 1'b0;
          lx_mosi_o <= sh[0];
          crc       <= crc_step(crc, sh[0]);
          bitn      <= bitn + 1'b1;
          sh        <= {1'b0, sh[15:1]};
          if (bitn == 4'd15) begin
            if (words_left > 8'd1) begin
              sh         <= rd;
              words_left <= words_left - 1'b1;
              ptr        <= ptr + 9'd1;
            end else begin
              state <= ST_CRC;
              bitn  <= '0;
            end
          end
        end
        ST_CRC: begin
          lx_sync_o <= 1'b0;
          lx_mosi_o <= crc[7 - bitn[2:0]];
          bitn      <= bitn + 1'b1;
          if (bitn == 4'd0) begin
            len <= rd[7:0];
            ptr <= {buf_sel, rd[15:8]};
          end
          if (bitn == 4'd7) state <= (len == 8'd0) ? ST_END : ST_READY;
        end
        default: begin  // ST_END
          if (restart || tick) begin
            state     <= ST_BEGIN;
            overrun_o <= restart && !tick;
          end
        end
      endcase
    end
  end

  assign lx_clk_o = clk_i;
  assign period_o = tick;

endmodule
