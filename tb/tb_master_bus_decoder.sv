// tb_master_bus_decoder: self-checking testbench of the master CPU address decoder.
//
// Sends random single-cycle transactions over the whole 16-bit word address space and checks
// that exactly the right peripheral enable rises (instruction memory, data memory, Tumbl control,
// delay measurement, external space, or none) and that the read data of the cycle after is the
// selected peripheral's (each peripheral model returns its own tag), 0 for unmapped addresses.
module tb_master_bus_decoder;
  logic clk = 1'b0;
  always #10 clk = ~clk;

  logic rst, ce;
  logic [15:0] a;
  logic imem, dmem, ctrl, meas, xmem;
  logic [31:0] rdata;

  master_bus_decoder dut (
    .clk_i(clk), .rst_i(rst), .i_ce_i(ce), .i_address_i(a), .imem_ce_o(imem), .dmem_ce_o(dmem),
    .ctrl_ce_o(ctrl), .meas_ce_o(meas), .xmem_ce_o(xmem),
    .imem_data_i(32'h1111_0001), .dmem_data_i(32'h2222_0002), .ctrl_data_i(32'h3333_0003),
    .meas_data_i(32'h4444_0004), .xmem_data_i(32'h5555_0005), .i_data_o(rdata)
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

  function automatic logic [4:0] expected_sel(input logic [15:0] w);
    if (w >= 16'h8000) return 5'b10000;
    if (w <= 16'h01FF) return 5'b00001;
    if (w >= 16'h0400 && w <= 16'h07FF) return 5'b00010;
    if (w >= 16'h0C00 && w <= 16'h0C03) return 5'b00100;
    if (w >= 16'h1FFC && w <= 16'h1FFF) return 5'b01000;
    return 5'b00000;
  endfunction

  function automatic logic [31:0] tag(input logic [4:0] s);
    case (s)
      5'b00001: return 32'h1111_0001;
      5'b00010: return 32'h2222_0002;
      5'b00100: return 32'h3333_0003;
      5'b01000: return 32'h4444_0004;
      5'b10000: return 32'h5555_0005;
      default:  return 32'h0;
    endcase
  endfunction

  initial begin
    static logic [15:0] edges [$] = '{16'h0000, 16'h01FF, 16'h0200, 16'h03FF, 16'h0400, 16'h07FF,
                               16'h0800, 16'h0BFF, 16'h0C00, 16'h0C03, 16'h0C04, 16'h1FFB,
                               16'h1FFC, 16'h1FFF, 16'h2000, 16'h7FFF, 16'h8000, 16'hFFFF};
    rst = 1; ce = 0; a = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      logic [4:0] s;
      @(negedge clk);
      a = (i < edges.size()) ? edges[i] : 16'($urandom());
      ce = 1;
      s = expected_sel(a);
      #1;
      check($sformatf("enables @%h", a), {27'd0, xmem, meas, ctrl, dmem, imem}, {27'd0, s});
      @(negedge clk);
      ce = 0;
      a = 16'($urandom());
      #1;
      check("no enable without ce", {27'd0, xmem, meas, ctrl, dmem, imem}, 32'd0);
      check($sformatf("read data @%h", a), rdata, tag(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
