// fpga_top: the Spartan-6 design of the motion control board.
//
// Connects the FPGA peripherals of the PMSM motion controller:
//   slave_mem_ctrl      slave side of the master CPU's asynchronous external memory bus
//   master_bus_decoder  master CPU memory map and read multiplexer
//   delay_meas_regs     registers for measuring the bus timing
//   tumbl_ctrl_regs     reset / interrupt / halt / trace control of Tumbl, PC and halt code
//   tumbl               the Tumbl co-processor (runs the fast control loop from its memories)
//   xmem_arbiter        shares Tumbl's external memory bus with the master CPU (master first)
//   xmem_decoder        Tumbl's external memory map, IRC status and reset registers
//   irc_coproc          32-bit position of AXES incremental encoders
//   lx_master           periodic transmitter to the power stage modules
// Everything runs on the single clock clk_i (50 MHz); rst_i is a synchronous, active-high
// power-on reset. The pins of the parts outside the FPGA are ports: the master CPU bus (the
// DATA pads' tri-state buffer is data_o/data_oe_o/data_i), the encoder inputs and the power
// stage bus. The remaining outputs report internal events (stall, interrupt, conditional skip,
// collision, LX period) for monitoring.
// Follows the document's structure and memory maps; the module split of the glue logic is this
// design's choice.
module fpga_top
  import tumbl_pkg::*;
#(
  parameter int unsigned IMEM_ABITS    = 9,
  parameter int unsigned DMEM_ABITS    = 10,
  parameter int unsigned AXES          = 4,
  parameter int unsigned LX_PERIOD     = 2500,
  parameter int unsigned FILTER_CYCLES = 2
) (
  input  logic            clk_i,
  input  logic            rst_i,
  // master CPU external memory bus
  input  logic            cs_n_i,
  input  logic            rd_n_i,
  input  logic [3:0]      bls_n_i,
  input  logic [15:0]     address_i,
  input  logic [31:0]     data_i,
  output logic [31:0]     data_o,
  output logic            data_oe_o,
  // incremental encoders
  input  logic [AXES-1:0] irc_a_i,
  input  logic [AXES-1:0] irc_b_i,
  input  logic [AXES-1:0] irc_idx_i,
  input  logic [AXES-1:0] irc_mark_i,
  // power stage bus
  output logic            lx_clk_o,
  output logic            lx_sync_o,
  output logic            lx_mosi_o,
  // monitoring
  output logic            tumbl_halted_o,
  output logic            tumbl_stall_o,
  output logic            tumbl_int_taken_o,
  output logic            tumbl_it_killed_o,
  output logic            xmem_collision_o,
  output logic            lx_period_o,
  output logic            lx_overrun_o
);

  // ------------------------------------------------------------------ master CPU bus
  logic        i_ce;
  logic [3:0]  i_bls;
  logic [15:0] i_address;
  logic [31:0] i_wdata, i_rdata;
  logic        imem_ce, dmem_ce, ctrl_ce, meas_ce, xmem_ce;
  logic [31:0] imem_rdata, dmem_rdata, ctrl_rdata, meas_rdata, xmem_rdata;

  slave_mem_ctrl #(.FILTER_CYCLES(FILTER_CYCLES)) u_slave (
    .clk_i, .rst_i, .cs_n_i, .rd_n_i, .bls_n_i, .address_i, .data_i, .data_o, .data_oe_o,
    .i_ce_o(i_ce), .i_bls_o(i_bls), .i_address_o(i_address), .i_data_o(i_wdata),
    .i_data_i(i_rdata)
  );

  master_bus_decoder u_mdec (
    .clk_i, .rst_i, .i_ce_i(i_ce), .i_address_i(i_address),
    .imem_ce_o(imem_ce), .dmem_ce_o(dmem_ce), .ctrl_ce_o(ctrl_ce), .meas_ce_o(meas_ce),
    .xmem_ce_o(xmem_ce),
    .imem_data_i(imem_rdata), .dmem_data_i(dmem_rdata), .ctrl_data_i(ctrl_rdata),
    .meas_data_i(meas_rdata), .xmem_data_i(xmem_rdata), .i_data_o(i_rdata)
  );

  delay_meas_regs u_meas (
    .clk_i, .rst_i, .ce_i(meas_ce), .bls_i(i_bls), .addr_i(i_address[1:0]), .data_i(i_wdata),
    .data_o(meas_rdata)
  );

  // ------------------------------------------------------------------ Tumbl
  logic        t_rst, t_int, t_halt, t_trace, t_kick, t_halted;
  logic [31:0] t_pc;
  logic [4:0]  t_hcode;
  logic        t_xsel;
  core2dmemb_t t_xreq;
  dmemb2core_t t_xrsp;

  tumbl_ctrl_regs u_ctrl (
    .clk_i, .rst_i, .ce_i(ctrl_ce), .bls_i(i_bls), .addr_i(i_address[1:0]), .data_i(i_wdata),
    .data_o(ctrl_rdata), .t_rst_o(t_rst), .t_int_o(t_int), .t_halt_o(t_halt),
    .t_trace_o(t_trace), .t_trace_kick_o(t_kick), .t_halted_i(t_halted), .t_pc_i(t_pc),
    .t_halt_code_i(t_hcode)
  );

  tumbl #(.IMEM_ABITS(IMEM_ABITS), .DMEM_ABITS(DMEM_ABITS)) u_tumbl (
    .clk_i, .rst_i(rst_i || t_rst), .halt_i(t_halt), .int_i(t_int), .trace_i(t_trace),
    .trace_kick_i(t_kick),
    .imem_en_i(imem_ce), .imem_we_i(i_bls), .imem_addr_i(i_address[IMEM_ABITS-1:0]),
    .imem_data_i(i_wdata), .imem_data_o(imem_rdata),
    .dmem_en_i(dmem_ce), .dmem_we_i(i_bls), .dmem_addr_i(i_address[DMEM_ABITS-1:0]),
    .dmem_data_i(i_wdata), .dmem_data_o(dmem_rdata),
    .xmemb_i(t_xrsp), .xmemb_sel_o(t_xsel), .xmemb_o(t_xreq),
    .pc_o(t_pc), .halted_o(t_halted), .halt_code_o(t_hcode), .stall_o(tumbl_stall_o),
    .int_taken_o(tumbl_int_taken_o), .it_killed_o(tumbl_it_killed_o)
  );

  assign tumbl_halted_o = t_halted;

  // ------------------------------------------------------------------ external memory space
  logic        x_en;
  logic [3:0]  x_bls;
  logic [14:0] x_addr;
  logic [31:0] x_wdata, x_rdata;

  xmem_arbiter u_arb (
    .clk_i, .rst_i, .m_ce_i(xmem_ce), .m_bls_i(i_bls), .m_addr_i(i_address[14:0]),
    .m_data_i(i_wdata), .m_data_o(xmem_rdata), .t_sel_i(t_xsel), .t_i(t_xreq), .t_o(t_xrsp),
    .x_en_o(x_en), .x_bls_o(x_bls), .x_addr_o(x_addr), .x_data_o(x_wdata), .x_data_i(x_rdata),
    .collision_o(xmem_collision_o)
  );

  logic                  irc_en, irc_rst, lx_en;
  logic [3:0]            irc_we;
  logic [$clog2(AXES):0] irc_addr;
  logic [31:0]           irc_rdata;
  logic [AXES-1:0]       irc_err_clr, irc_err, irc_mark;
  logic [1:0]            lx_we;
  logic [8:0]            lx_addr;
  logic [15:0]           lx_rdata;

  xmem_decoder #(.AXES(AXES)) u_xdec (
    .clk_i, .rst_i, .en_i(x_en), .bls_i(x_bls), .addr_i(x_addr), .data_i(x_wdata),
    .data_o(x_rdata),
    .irc_en_o(irc_en), .irc_we_o(irc_we), .irc_addr_o(irc_addr), .irc_data_i(irc_rdata),
    .irc_rst_o(irc_rst), .irc_err_clr_o(irc_err_clr), .irc_err_i(irc_err),
    .irc_mark_i(irc_mark),
    .lx_en_o(lx_en), .lx_we_o(lx_we), .lx_addr_o(lx_addr), .lx_data_i(lx_rdata)
  );

  irc_coproc #(.AXES(AXES)) u_irc (
    .clk_i, .rst_i(rst_i || irc_rst), .irc_a_i, .irc_b_i, .irc_idx_i, .irc_mark_i,
    .err_clr_i(irc_err_clr), .err_o(irc_err), .mark_o(irc_mark),
    .bus_en_i(irc_en), .bus_we_i(irc_we), .bus_addr_i(irc_addr), .bus_data_i(x_wdata),
    .bus_data_o(irc_rdata)
  );

  lx_master #(.PERIOD(LX_PERIOD)) u_lx (
    .clk_i, .rst_i, .bus_en_i(lx_en), .bus_we_i(lx_we), .bus_addr_i(lx_addr),
    .bus_data_i(x_wdata[15:0]), .bus_data_o(lx_rdata),
    .lx_clk_o, .lx_sync_o, .lx_mosi_o, .period_o(lx_period_o), .overrun_o(lx_overrun_o)
  );

endmodule
