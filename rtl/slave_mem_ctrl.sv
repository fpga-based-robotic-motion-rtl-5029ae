// slave_mem_ctrl: slave side of the master CPU's external memory bus.
//
// The master CPU drives CS (active low), RD (active low), BLS[3:0] (byte lane strobes, active
// low), ADDRESS[15:0] (32-bit word address) and a bidirectional DATA[31:0] asynchronously to
// the FPGA clock. All of them pass a two flip-flop synchroniser and a filter: a bus state is
// accepted only after it has been seen unchanged for FILTER_CYCLES consecutive clock cycles. Each
// newly accepted state that is a write (CS and some BLS low) or a read (CS and RD low) becomes one
// single-cycle internal transaction: i_ce_o high for one cycle with i_address_o, i_bls_o (active
// high, all zero for a read) and i_data_o. Because only changes are accepted, a read with RD held
// low and a new ADDRESS starts a new read (fast sequential reads), and one long strobe makes one
// transaction. Releasing the strobes ends an access at once (one sample suffices), so two
// accesses to the same address separated by a short idle time are two transactions. Read data
// (i_data_i) is taken in the cycle after i_ce_o and driven on DATA while CS and RD are low
// (data_oe_o; the pad tri-state buffer is outside this module).
// Latency: a read returns data 2 + FILTER_CYCLES + 3 clock cycles after the bus state settles;
// the master must keep the strobes that long (measured with the delay measurement registers).
// DATA is released 2 to 3 clock cycles after RD or CS goes high; the master must leave that
// bus turnaround time before it drives DATA again.
// Follows the document: filtering of BLS, RD and ADDRESS, single-cycle internal transactions and
// the I_* interface. The filter length and the exact acceptance rule are this design's choice.
module slave_mem_ctrl #(
  parameter int unsigned FILTER_CYCLES = 2
) (
  input  logic        clk_i,
  input  logic        rst_i,
  // master CPU bus
  input  logic        cs_n_i,
  input  logic        rd_n_i,
  input  logic [3:0]  bls_n_i,
  input  logic [15:0] address_i,
  input  logic [31:0] data_i,
  output logic [31:0] data_o,
  output logic        data_oe_o,
  // internal single-cycle transactions
  output logic        i_ce_o,
  output logic [3:0]  i_bls_o,
  output logic [15:0] i_address_o,
  output logic [31:0] i_data_o,
  input  logic [31:0] i_data_i
);

  typedef struct packed {
    logic        cs;
    logic        rd;
    logic [3:0]  bls;
    logic [15:0] addr;
    logic [31:0] data;
  } bus_t;

  bus_t raw, s1, s2, acc;
  logic [$clog2(FILTER_CYCLES+1)-1:0] same;
  logic rd_pending, rd_capture;   // read issued this cycle / answer on i_data_i

  // Active-high view of the pins. DATA only matters for writes; during a read it carries the
  // FPGA's own answer and must not count as a change of the bus state.
  assign raw = '{cs: !cs_n_i, rd: !rd_n_i, bls: ~bls_n_i, addr: address_i,
                 data: rd_n_i ? data_i : 32'd0};

  always_ff @(posedge clk_i) begin
    s1 <= raw;
    s2 <= s1;
    if (rst_i) begin
      acc         <= '0;
      same        <= '0;
      i_ce_o      <= 1'b0;
      i_bls_o     <= '0;
      i_address_o <= '0;
      i_data_o    <= '0;
      rd_pending  <= 1'b0;
      rd_capture  <= 1'b0;
      data_o      <= '0;
    end else begin
      i_ce_o     <= 1'b0;
      rd_pending <= 1'b0;
      rd_capture <= rd_pending;
      if (!(s2.cs && (s2.rd || s2.bls != 4'b0000))) begin
        // strobes released: the access has ended, no filtering needed
        acc  <= '0;
        same <= '0;
      end else if (s2 != s1) begin
        same <= '0;
      end else if (same != ($clog2(FILTER_CYCLES+1))'(FILTER_CYCLES)) begin
        same <= same + 1'b1;
      end else if (s2 != acc) begin
        acc <= s2;
        if (s2.cs && (s2.rd || s2.bls != 4'b0000)) begin
          i_ce_o      <= 1'b1;
          i_bls_o     <= s2.rd ? 4'b0000 : s2.bls;
          i_address_o <= s2.addr;
          i_data_o    <= s2.data;
          rd_pending  <= s2.rd;
        end
      end
      if (rd_capture) data_o <= i_data_i;
    end
  end

  // Drive the bus as soon as the synchronised strobes ask for it, release it with them.
  assign data_oe_o = s1.cs && s1.rd && s2.cs && s2.rd;

endmodule
