// tb_delay_meas_regs: self-checking testbench of the delay measurement registers.
//
// Reads RD1/RD2 (constants 0xAAAAAAAA / 0x55555555, no common bit), writes random values with
// random byte lanes to WR1/WR2, checks that writes to RD1/RD2 are ignored and that every read
// answers in the cycle after the enable.
module tb_delay_meas_regs;
  logic clk = 1'b0;
  always #10 clk = ~clk;

  logic rst, ce;
  logic [3:0] bls;
  logic [1:0] a;
  logic [31:0] wdata, rdata;

  delay_meas_regs dut (
    .clk_i(clk), .rst_i(rst), .ce_i(ce), .bls_i(bls), .addr_i(a), .data_i(wdata), .data_o(rdata)
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input logic [1:0] addr, input logic [3:0] lanes, input logic [31:0] d,
                        output logic [31:0] q);
    @(negedge clk); ce = 1; a = addr; bls = lanes; wdata = d;
    @(negedge clk); ce = 0; bls = 0; q = rdata;
  endtask

  initial begin
    logic [31:0] q, m [4];
    rst = 1; ce = 0; bls = 0; a = 0; wdata = 0;
    m = '{32'hAAAA_AAAA, 32'h0, 32'h5555_5555, 32'h0};
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 500; i++) begin
      automatic logic [1:0] ad = 2'($urandom_range(0, 3));
      automatic logic [3:0] ln = ($urandom_range(0, 1) == 1) ? 4'($urandom()) : 4'h0;
      automatic logic [31:0] d = $urandom();
      access(ad, ln, d, q);
      check($sformatf("read %0d", ad), q, m[ad]);
      if (ad[0]) for (int b = 0; b < 4; b++) if (ln[b]) m[ad][b*8 +: 8] = d[b*8 +: 8];
    end
    check("RD1 & RD2 == 0", m[0] & m[2], 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
