// tb_tumbl_ctrl_regs: self-checking testbench of Tumbl's control registers.
//
// Checks the reset value 0x0000_0001 (Tumbl held in reset), writing and reading back the
// reset / interrupt / halt / trace bits, the read-only HALT status bit, the program counter and
// halt code read-back, and that a write of 1 to the trace kick register gives exactly one
// one-cycle pulse.
module tb_tumbl_ctrl_regs;
  logic clk = 1'b0;
  always #10 clk = ~clk;

  logic rst, ce;
  logic [3:0] bls;
  logic [1:0] a;
  logic [31:0] wdata, rdata, pc;
  logic t_rst, t_int, t_halt, t_trace, t_kick, halted;
  logic [4:0] hcode;

  tumbl_ctrl_regs dut (
    .clk_i(clk), .rst_i(rst), .ce_i(ce), .bls_i(bls), .addr_i(a), .data_i(wdata), .data_o(rdata),
    .t_rst_o(t_rst), .t_int_o(t_int), .t_halt_o(t_halt), .t_trace_o(t_trace),
    .t_trace_kick_o(t_kick), .t_halted_i(halted), .t_pc_i(pc), .t_halt_code_i(hcode)
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

  int kicks = 0;
  always @(posedge clk) if (t_kick) kicks++;

  task automatic access(input logic [1:0] addr, input logic [3:0] lanes, input logic [31:0] d,
                        output logic [31:0] q);
    @(negedge clk); ce = 1; a = addr; bls = lanes; wdata = d;
    @(negedge clk); ce = 0; bls = 0; q = rdata;
  endtask

  initial begin
    logic [31:0] q;
    rst = 1; ce = 0; bls = 0; a = 0; wdata = 0; pc = 0; halted = 0; hcode = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    access(0, 0, 0, q);
    check("reset value", q, 32'h1);
    check("Tumbl held in reset", {31'd0, t_rst}, 1);
    for (int i = 0; i < 50; i++) begin
      automatic logic [3:0] v = 4'($urandom());
      access(0, 4'b0001, {28'd0, v}, q);
      check("control outputs", {28'd0, t_trace, t_halt, t_int, t_rst}, {28'd0, v});
      access(0, 0, 0, q);
      check("control read-back", q, {28'd0, v});
    end
    halted = 1;
    access(0, 0, 0, q);
    check("halted status bit", 32'(q[4]), 32'd1);
    pc = $urandom(); hcode = 5'h15;
    access(2, 0, 0, q); check("program counter", q, pc);
    access(3, 0, 0, q); check("halt code", q, 32'h15);
    kicks = 0;
    access(1, 4'b0001, 32'h1, q);
    repeat (3) @(negedge clk);
    check("one trace kick pulse", 32'(kicks), 1);
    access(1, 4'b0001, 32'h0, q);
    repeat (3) @(negedge clk);
    check("no pulse for 0", 32'(kicks), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
