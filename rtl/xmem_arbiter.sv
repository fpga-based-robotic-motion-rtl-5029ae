// xmem_arbiter: shares Tumbl's external memory bus between the master CPU and Tumbl.
//
// Both sides issue single-cycle requests (enable, byte-lane write strobes, 15-bit word address,
// write data) to the peripherals of the external memory space, which answer reads one cycle
// later. The master CPU has priority: in a cycle where both request, the master's access goes
// to the bus and Tumbl's clock enable (t_o.clken) is low, so Tumbl stays frozen and repeats its
// request in the next cycle (collision stall, collision_o). Read data for Tumbl passes straight
// through in the cycle after its granted read and is held in a register afterwards, so a Tumbl
// frozen at that moment (collision, halt or trace) still loads the right word later.
// Interrupts from the external space are not used (t_o.int_req = 0).
// Follows the document: master priority and stalling Tumbl with its clock enable on a collision.
// The read-data hold register is this design's choice.
module xmem_arbiter
  import tumbl_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_i,
  // master CPU side
  input  logic        m_ce_i,
  input  logic [3:0]  m_bls_i,
  input  logic [14:0] m_addr_i,
  input  logic [31:0] m_data_i,
  output logic [31:0] m_data_o,
  // Tumbl side
  input  logic        t_sel_i,
  input  core2dmemb_t t_i,
  output dmemb2core_t t_o,
  // shared bus to the peripherals
  output logic        x_en_o,
  output logic [3:0]  x_bls_o,
  output logic [14:0] x_addr_o,
  output logic [31:0] x_data_o,
  input  logic [31:0] x_data_i,
  output logic        collision_o
);

  logic t_grant, t_rd_q;
  logic [31:0] t_hold;

  assign t_grant     = t_sel_i && !m_ce_i;
  assign collision_o = t_sel_i && m_ce_i;

  assign x_en_o   = m_ce_i || t_grant;
  assign x_bls_o  = m_ce_i ? m_bls_i  : t_i.bls;
  assign x_addr_o = m_ce_i ? m_addr_i : t_i.addr;
  assign x_data_o = m_ce_i ? m_data_i : t_i.data;

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      t_rd_q <= 1'b0;
      t_hold <= '0;
    end else begin
      t_rd_q <= t_grant && t_i.rd;
      if (t_rd_q) t_hold <= x_data_i;
    end
  end

  assign m_data_o    = x_data_i;
  assign t_o.clken   = !collision_o;
  assign t_o.data    = t_rd_q ? x_data_i : t_hold;
  assign t_o.int_req = 1'b0;

endmodule
