// tb_xmem_decoder: self-checking testbench of Tumbl's external memory decoder.
//
// Walks over the whole 15-bit external word space with random reads and writes and checks which
// target is enabled (IRC RAM, status/reset registers, LX Master RAM, nothing) with which local
// address and byte lanes, the read multiplexing one cycle later, the IRC reset register (reset
// value 1, read/write bit 0), the per-axis status bits (decode error and MARK) and that writing
// 1 to a status bit 1 gives a one-cycle error-clear pulse to exactly that axis.
module tb_xmem_decoder;
  localparam int AXES = 4;     // the block's default AXES
  logic clk = 1'b0;
  always #10 clk = ~clk;

  logic rst, en, irc_en, irc_rst, lx_en;
  logic [3:0] bls, irc_we;
  logic [14:0] a;
  logic [31:0] wdata, rdata;
  logic [2:0] irc_addr;
  logic [AXES-1:0] clr, err, mark;
  logic [1:0] lx_we;
  logic [8:0] lx_addr;

  xmem_decoder dut (
    .clk_i(clk), .rst_i(rst), .en_i(en), .bls_i(bls), .addr_i(a), .data_i(wdata), .data_o(rdata),
    .irc_en_o(irc_en), .irc_we_o(irc_we), .irc_addr_o(irc_addr), .irc_data_i(32'hC0DE_0000),
    .irc_rst_o(irc_rst), .irc_err_clr_o(clr), .irc_err_i(err), .irc_mark_i(mark),
    .lx_en_o(lx_en), .lx_we_o(lx_we), .lx_addr_o(lx_addr), .lx_data_i(16'hBEEF)
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

  task automatic access(input logic [14:0] addr, input logic [3:0] lanes, input logic [31:0] d,
                        output logic [31:0] q);
    @(negedge clk); en = 1; a = addr; bls = lanes; wdata = d;
    #1;
    if (addr >= 15'h800 && addr < 15'h808) begin
      check("IRC enable", {30'd0, lx_en, irc_en}, 32'b01);
      check("IRC address", {29'd0, irc_addr}, {29'd0, addr[2:0]});
      check("IRC lanes", {28'd0, irc_we}, {28'd0, lanes});
    end else if (addr >= 15'h900 && addr < 15'hB00) begin
      check("LX enable", {30'd0, lx_en, irc_en}, 32'b10);
      check("LX address", {23'd0, lx_addr}, 32'(addr - 15'h900));
      check("LX lanes", {30'd0, lx_we}, {30'd0, lanes[1:0]});
    end else begin
      check("no RAM enable", {30'd0, lx_en, irc_en}, 32'b00);
    end
    @(negedge clk); en = 0; bls = 0; q = rdata;
  endtask

  initial begin
    logic [31:0] q;
    logic rst_model;
    rst = 1; en = 0; bls = 0; a = 0; wdata = 0; err = 0; mark = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    rst_model = 1;
    access(15'h809, 0, 0, q);
    check("IRC reset value", q, 32'h1);
    check("IRC reset output", {31'd0, irc_rst}, 32'h1);
    for (int i = 0; i < 3000; i++) begin
      automatic logic [14:0] ad = (i % 3 == 0) ? 15'($urandom()) :
                                  (i % 3 == 1) ? 15'($urandom_range(32'h800, 32'h80F))
                                               : 15'($urandom_range(32'h8F0, 32'hB10));
      automatic logic [3:0] ln = ($urandom_range(0, 1) == 1) ? 4'hF : 4'h0;
      automatic logic [31:0] d = $urandom() & ~32'h2;   // status clears tested separately
      err = 4'($urandom()); mark = 4'($urandom());
      access(ad, ln, d, q);
      if (ad >= 15'h800 && ad < 15'h808)      check("IRC read", q, 32'hC0DE_0000);
      else if (ad >= 15'h900 && ad < 15'hB00) check("LX read", q, 32'h0000_BEEF);
      else if (ad == 15'h809)                 check("IRC reset read", q, {31'd0, rst_model});
      else if (ad >= 15'h808 && ad < 15'h810 && !ad[0])
        check("status read", q, {30'd0, err[ad[2:1]], mark[ad[2:1]]});
      else                                    check("unmapped read", q, 32'h0);
      if (ad == 15'h809 && ln[0]) rst_model = d[0];
      check("IRC reset register", {31'd0, irc_rst}, {31'd0, rst_model});
    end
    for (int ax = 0; ax < AXES; ax++) begin
      automatic int pulses = 0;
      @(negedge clk); en = 1; a = 15'(32'h808 + 2 * ax); bls = 4'h1; wdata = 32'h2;
      @(negedge clk); en = 0; bls = 0;
      for (int c = 0; c < 3; c++) begin
        #1;
        if (clr != 0) begin
          pulses++;
          check("error clear axis", {28'd0, clr}, 32'(1 << ax));
        end
        @(negedge clk);
      end
      check("one clear pulse", 32'(pulses), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
