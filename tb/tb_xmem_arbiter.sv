// tb_xmem_arbiter: self-checking testbench of the external memory bus arbiter.
//
// A Tumbl model issues random reads and writes and, like the core, repeats a request while its
// clock enable is low and may stay frozen for random extra cycles after a read before taking the
// data; a master model issues random single-cycle accesses that often collide. A memory model
// with one-cycle read latency stands behind the shared bus. Checks: the master always gets the
// bus in its cycle, Tumbl's clock enable is low exactly in collision cycles, no access is lost
// or duplicated (final memory contents and counts), both sides read the right data, and Tumbl's
// read data stays valid while it is frozen after the read.
module tb_xmem_arbiter;
  import tumbl_pkg::*;
  logic clk = 1'b0;
  always #10 clk = ~clk;

  logic rst, m_ce, t_sel, x_en, coll;
  logic [3:0] m_bls, x_bls;
  logic [14:0] m_addr, x_addr;
  logic [31:0] m_wdata, m_rdata, x_wdata;
  logic [31:0] x_rdata = '0;
  core2dmemb_t t_req;
  dmemb2core_t t_rsp;

  xmem_arbiter dut (
    .clk_i(clk), .rst_i(rst), .m_ce_i(m_ce), .m_bls_i(m_bls), .m_addr_i(m_addr),
    .m_data_i(m_wdata), .m_data_o(m_rdata), .t_sel_i(t_sel), .t_i(t_req), .t_o(t_rsp),
    .x_en_o(x_en), .x_bls_o(x_bls), .x_addr_o(x_addr), .x_data_o(x_wdata), .x_data_i(x_rdata),
    .collision_o(coll)
  );

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] mem [16];
  int bus_acc = 0;
  always_ff @(posedge clk) if (x_en) begin
    bus_acc++;
    for (int i = 0; i < 4; i++) if (x_bls[i]) mem[x_addr[3:0]][i*8 +: 8] <= x_wdata[i*8 +: 8];
    x_rdata <= mem[x_addr[3:0]];
  end

  // Tumbl uses words 0-7, the master words 8-15, so each side's expected data is exact.
  logic [31:0] t_model [8], m_model [8];
  int collisions = 0, t_done = 0, m_done = 0, frozen_reads = 0;

  initial begin : master
    logic m_rd_q; logic [31:0] m_exp;
    m_ce = 0; m_bls = 0; m_addr = 0; m_wdata = 0; m_rd_q = 0; m_exp = 0;
    @(negedge rst);
    repeat (2000) begin
      @(negedge clk);
      if (m_rd_q) check("master read data", m_rdata, m_exp);
      m_rd_q = 0;
      m_ce = ($urandom_range(0, 2) == 0);
      m_addr = 15'(8 + $urandom_range(0, 7));
      m_bls = ($urandom_range(0, 1) == 1) ? 4'hF : 4'h0;
      m_wdata = $urandom();
      if (m_ce) begin
        m_done++;
        if (m_bls != 0) m_model[m_addr - 8] = m_wdata;
        else begin m_rd_q = 1; m_exp = m_model[m_addr - 8]; end
      end
    end
    @(negedge clk); m_ce = 0;
  end

  initial begin : tumbl
    logic [31:0] exp_v;
    t_sel = 0; t_req = '0;
    @(negedge rst);
    repeat (800) begin
      @(negedge clk);
      t_sel = 1;
      t_req.addr = 15'($urandom_range(0, 7));
      t_req.rd = ($urandom_range(0, 1) == 1);
      t_req.bls = t_req.rd ? 4'h0 : 4'hF;
      t_req.data = $urandom();
      exp_v = t_model[t_req.addr[2:0]];
      #1;
      while (!t_rsp.clken) begin
        check("master owns the bus in a collision", {17'd0, x_addr}, {17'd0, m_addr});
        collisions++;
        @(negedge clk); #1;
      end
      check("Tumbl request on the bus", {17'd0, x_addr}, {17'd0, t_req.addr});
      t_done++;
      if (!t_req.rd) t_model[t_req.addr[2:0]] = t_req.data;
      @(negedge clk);
      t_sel = 0;
      if (t_req.rd) begin
        if ($urandom_range(0, 1) == 1) begin
          frozen_reads++;
          repeat ($urandom_range(1, 4)) @(negedge clk);
        end
        check("Tumbl read data", t_rsp.data, exp_v);
      end
      t_req = '0;
    end
  end

  initial begin
    rst = 1;
    for (int i = 0; i < 16; i++) mem[i] = '0;
    for (int i = 0; i < 8; i++) begin t_model[i] = '0; m_model[i] = '0; end
    repeat (3) @(negedge clk);
    rst = 0;
    wait (t_done == 800);
    repeat (3000) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      check($sformatf("memory word %0d", i), mem[i], t_model[i]);
      check($sformatf("memory word %0d", 8 + i), mem[8 + i], m_model[i]);
    end
    check("bus accesses = master + Tumbl", 32'(bus_acc), 32'(m_done + t_done));
    check("collisions happened", 32'(collisions > 0), 1);
    check("frozen reads happened", 32'(frozen_reads > 0), 1);
    $display("collisions=%0d", collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
