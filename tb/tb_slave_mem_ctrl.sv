// tb_slave_mem_ctrl: self-checking testbench of the master CPU bus slave.
//
// A master model drives CS/RD/BLS/ADDRESS/DATA with its own timing (steps of 13.9 ns, like a
// 72 MHz CPU, asynchronous to the 50 MHz FPGA clock) and holds every strobe for a programmable
// number of its cycles. A small memory model answers the internal single-cycle transactions.
// Checks: random byte-lane writes and reads give the right data on DATA while the slave drives
// it; fast reads with RD held low and only ADDRESS changing; exactly one internal transaction
// per master access; and the read latency, which is 2 + FILTER_CYCLES + 3 clock
// cycles from the moment the master's strobes and address are stable (exactly that many here).
module tb_slave_mem_ctrl;
  localparam int FILTER = 2;   // the block's default FILTER_CYCLES
  logic clk = 1'b0;
  always #10 clk = ~clk;

  logic rst, cs_n, rd_n, oe, ce;
  logic [3:0] bls_n, ibls;
  logic [15:0] addr, iaddr;
  logic [31:0] din, dout, iwdata;
  logic [31:0] irdata = '0;

  slave_mem_ctrl dut (
    .clk_i(clk), .rst_i(rst), .cs_n_i(cs_n), .rd_n_i(rd_n), .bls_n_i(bls_n), .address_i(addr),
    .data_i(din), .data_o(dout), .data_oe_o(oe), .i_ce_o(ce), .i_bls_o(ibls),
    .i_address_o(iaddr), .i_data_o(iwdata), .i_data_i(irdata)
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
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model: one-cycle read latency
  logic [31:0] mem [64];
  logic [31:0] model [64];
  int transactions = 0;
  always_ff @(posedge clk) begin
    if (ce && !rst) begin   // i_ce_o is undefined until the first reset edge
      transactions++;
      for (int i = 0; i < 4; i++) if (ibls[i]) mem[iaddr[5:0]][i*8 +: 8] <= iwdata[i*8 +: 8];
      irdata <= mem[iaddr[5:0]];
    end
  end

  // the pad: the master sees the FPGA's data while it drives
  logic [31:0] master_data;
  assign din = oe ? dout : master_data;

  localparam realtime TCPU = 13.9ns;
  int hold = 12;     // master strobe length in CPU cycles (about 167 ns)

  task automatic mwrite(input logic [15:0] a, input logic [3:0] lanes, input logic [31:0] d);
    #(TCPU);
    addr = a; master_data = d; cs_n = 0;
    #(TCPU);
    bls_n = ~lanes;
    #(hold * TCPU);
    bls_n = 4'hF;
    #(TCPU);
    cs_n = 1;
    for (int i = 0; i < 4; i++) if (lanes[i]) model[a[5:0]][i*8 +: 8] = d[i*8 +: 8];
  endtask

  task automatic mread_burst(input logic [15:0] a0, input int n);
    #(TCPU);
    addr = a0; cs_n = 0; rd_n = 0;
    for (int k = 0; k < n; k++) begin
      addr = a0 + 16'(k);
      #(hold * TCPU);
      checks++;
      if (!oe || din !== model[addr[5:0]]) begin
        failures++;
        $display("FAIL read %h: oe=%b got %h expected %h", addr, oe, din, model[addr[5:0]]);
      end
    end
    rd_n = 1; cs_n = 1;
    #(4 * TCPU);   // bus turnaround: the slave releases DATA up to 3 clock cycles later
  endtask

  initial begin
    int t0, expected_tr, lat;
    rst = 1; cs_n = 1; rd_n = 1; bls_n = 4'hF; addr = 0; master_data = 0; 
    for (int i = 0; i < 64; i++) begin mem[i] = '0; model[i] = '0; end
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);
    expected_tr = 0;

    for (int i = 0; i < 64; i++) begin
      mwrite(16'(i), 4'hF, $urandom());
      expected_tr++;
    end
    for (int r = 0; r < 100; r++) begin
      if ($urandom_range(0, 1) == 1) begin
        mwrite(16'($urandom_range(0, 63)), 4'($urandom_range(1, 15)), $urandom());
        expected_tr++;
      end else begin
        automatic int n = $urandom_range(1, 4);
        mread_burst(16'($urandom_range(0, 60)), n);
        expected_tr += n;
      end
    end
    // the same address read twice with a short gap must be two reads
    mread_burst(16'd5, 1);
    @(negedge clk); mem[5] = 32'h0BAD_F00D; model[5] = 32'h0BAD_F00D;
    mread_burst(16'd5, 1);
    expected_tr += 2;
    #200ns;
    check("one internal transaction per access", 32'(transactions), 32'(expected_tr));

    // read latency in FPGA cycles, from stable strobes to valid data
    @(negedge clk);
    addr = 16'd7; cs_n = 0; rd_n = 0;
    lat = 0;
    while (!(oe && din === model[7]) && lat < 20) begin @(negedge clk); lat++; end
    rd_n = 1; cs_n = 1;
    check("read latency (cycles)", 32'(lat), 32'(2 + FILTER + 3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
