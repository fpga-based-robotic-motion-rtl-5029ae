// tb_fpga_top: end-to-end testbench of the whole FPGA design at its default parameters.
//
// Plays the master CPU on the asynchronous external memory bus (72 MHz-like timing against the
// 50 MHz FPGA clock), the encoders of the four axes and a receiver on the power stage bus:
//  - checks the delay measurement registers and the Tumbl control register reset value;
//  - loads a program into Tumbl's instruction memory, releases Tumbl from reset and lets it run a
//    200-iteration loop that reads the IRC position of axis 0 over its external bus, uses the
//    loaded value at once (load-use stall), executes an ITE block (one instruction skipped per
//    pass), writes a two-word message into the LX Master RAM, and finally stores a sum and halts;
//  - meanwhile moves encoder 0 and polls its position over the master bus, which collides with
//    Tumbl's external accesses, and raises Tumbl's interrupt once (the service routine counts
//    it in data memory);
//  - at the end checks the halt status and code, the sum, the interrupt count, the IRC position
//    and index position, and the content and CRC of every power stage bus message.
// Each mechanism is counted (bus reads, bus writes, load-use stalls, IT skips, interrupts,
// collisions, LX messages, IRC steps) and the test fails if one of them never happened.
module tb_fpga_top;
  import tumbl_pkg::*;
  import tumbl_asm::*;

  logic clk = 1'b0;
  always #10 clk = ~clk;

  logic rst, cs_n, rd_n, oe;
  logic [3:0] bls_n;
  logic [15:0] addr;
  logic [31:0] din, dout, master_data;
  logic [3:0] irc_a, irc_b, irc_idx, irc_mark;
  logic lx_clk, lx_sync, lx_mosi;
  logic halted, stall, int_taken, it_killed, coll, lx_period, lx_overrun;

  fpga_top dut (
    .clk_i(clk), .rst_i(rst), .cs_n_i(cs_n), .rd_n_i(rd_n), .bls_n_i(bls_n), .address_i(addr),
    .data_i(din), .data_o(dout), .data_oe_o(oe),
    .irc_a_i(irc_a), .irc_b_i(irc_b), .irc_idx_i(irc_idx), .irc_mark_i(irc_mark),
    .lx_clk_o(lx_clk), .lx_sync_o(lx_sync), .lx_mosi_o(lx_mosi),
    .tumbl_halted_o(halted), .tumbl_stall_o(stall), .tumbl_int_taken_o(int_taken),
    .tumbl_it_killed_o(it_killed), .xmem_collision_o(coll), .lx_period_o(lx_period),
    .lx_overrun_o(lx_overrun)
  );

  assign din = oe ? dout : master_data;

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #4ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_stall = 0, n_int = 0, n_kill = 0, n_coll = 0, n_rd = 0, n_wr = 0, n_lx = 0, n_steps = 0;
  always @(posedge clk) if (!rst) begin
    if (stall)     n_stall++;
    if (int_taken) n_int++;
    if (it_killed) n_kill++;
    if (coll)      n_coll++;
  end

  // ------------------------------------------------------------ master CPU model
  localparam realtime TCPU = 13.9ns;
  localparam int HOLD = 12;
  semaphore bus = new(1);

  task automatic mwrite(input logic [15:0] a, input logic [31:0] d);
    bus.get(1);
    #(TCPU);
    addr = a; master_data = d; cs_n = 0;
    #(TCPU);
    bls_n = 4'h0;
    #(HOLD * TCPU);
    bls_n = 4'hF;
    #(TCPU);
    cs_n = 1;
    n_wr++;
    bus.put(1);
  endtask

  task automatic mread(input logic [15:0] a, output logic [31:0] d);
    bus.get(1);
    #(TCPU);
    addr = a; cs_n = 0; rd_n = 0;
    #(HOLD * TCPU);
    d = din;
    rd_n = 1; cs_n = 1;
    #(4 * TCPU);   // bus turnaround: the slave releases DATA up to 3 clock cycles later
    n_rd++;
    bus.put(1);
  endtask

  localparam logic [15:0] W_IMEM = 16'h0000, W_DMEM = 16'h0400, W_CTRL = 16'h0C00,
                          W_MEAS = 16'h1FFC, W_XMEM = 16'h8000;

  // ------------------------------------------------------------ Tumbl program
  logic [31:0] prog [64];
  int plen;
  task automatic build();
    int n, loop_at;
    for (int i = 0; i < 64; i++) prog[i] = NOP_INSTR;
    prog[0] = enc_b(OP_BRI, 0, 0, 16'h0040);                       // to main
    prog[4] = enc_b(OP_LWI, 20, 0, 16'h0100);                      // ISR: count in dmem
    prog[5] = enc_b(6'b001000, 20, 20, 16'd1);
    prog[6] = enc_b(OP_SWI, 20, 0, 16'h0100);
    prog[7] = enc_b(OP_RTS, 5'b00001, 14, 16'd0);                  // RTI r14, 0
    n = 16;
    prog[n++] = enc_b(6'b001000, 1, 0, 16'd0);
    prog[n++] = enc_b(6'b001000, 2, 0, 16'd0);
    prog[n++] = enc_b(OP_SWI, 0, 0, 16'h0100);
    loop_at = n;
    prog[n++] = enc_b(OP_LWI, 3, 0, 16'h2000);                     // IRC axis 0 position
    prog[n++] = enc_a(6'b000000, 4, 3, 3);                         // load-use
    prog[n++] = enc_b(OP_SWI, 4, 0, 16'h0104);
    prog[n++] = enc_b(OP_ITI, {2'b10, 3'(COND_LT)}, 3, 16'd0);     // ITEI LT r3, 0
    prog[n++] = enc_b(6'b001000, 5, 0, 16'd1);
    prog[n++] = enc_b(6'b001000, 5, 0, 16'd2);
    prog[n++] = enc_b(OP_SWI, 5, 0, 16'h0108);
    prog[n++] = enc_b(6'b001000, 6, 0, 16'd2);
    prog[n++] = enc_b(OP_SWI, 6, 0, 16'h2400);                     // LX word 0: 1 message of 2
    prog[n++] = enc_b(OP_SWI, 3, 0, 16'h2404);                     // LX word 1: position
    prog[n++] = enc_b(6'b001000, 6, 0, 16'h5A5A);
    prog[n++] = enc_b(OP_SWI, 6, 0, 16'h2408);                     // LX word 2: 0x5A5A
    prog[n++] = enc_b(OP_SWI, 0, 0, 16'h240C);                     // LX word 3: end
    prog[n++] = enc_a(6'b000000, 2, 2, 1);
    prog[n++] = enc_b(6'b001000, 1, 1, 16'd1);
    prog[n++] = enc_b(6'b001000, 7, 1, 16'hFF38);                  // r7 = r1 - 200
    prog[n] = enc_b(OP_BRCI, {2'b00, 3'(COND_LT)}, 7, 16'(4 * (loop_at - n))); n++;
    prog[n++] = enc_b(OP_SWI, 2, 0, 16'h010C);
    prog[n++] = enc_b(OP_HALT, 0, 0, 16'd7);
    plen = n;
  endtask

  // ------------------------------------------------------------ encoder model
  int phase = 0, pos = 0;
  task automatic step(input bit dir);
    phase = dir ? (phase + 1) % 4 : (phase + 3) % 4;
    {irc_a[0], irc_b[0]} = (phase == 0) ? 2'b00 : (phase == 1) ? 2'b10 :
                           (phase == 2) ? 2'b11 : 2'b01;
    pos += dir ? 1 : -1;
    n_steps++;
  endtask

  // ------------------------------------------------------------ power stage bus receiver
  logic        rx_bits [$];
  logic [15:0] last_w0;
  int          lx_bad = 0;
  function automatic logic [7:0] crc8(logic bits [$], int n);
    logic [7:0] c = 8'h00;
    for (int i = 0; i < n; i++) begin
      logic fb = c[7] ^ bits[i];
      c = {c[6:0], 1'b0};
      if (fb) c ^= 8'h07;
    end
    return c;
  endfunction
  always @(posedge clk) if (!rst) begin
    if (!lx_sync) rx_bits.push_back(lx_mosi);
    else if (rx_bits.size() != 0) begin
      logic [15:0] w0, w1; logic [7:0] c;
      for (int i = 0; i < 16; i++) begin w0[i] = rx_bits[i]; w1[i] = rx_bits[16 + i]; end
      for (int i = 0; i < 8; i++) c[7 - i] = rx_bits[32 + i];
      if (rx_bits.size() != 40 || w1 != 16'h5A5A || c != crc8(rx_bits, 32)) lx_bad++;
      last_w0 = w0;
      n_lx++;
      rx_bits.delete();
    end
  end

  // ------------------------------------------------------------ test
  initial begin
    logic [31:0] v;
    int tries;
    rst = 1; cs_n = 1; rd_n = 1; bls_n = 4'hF; addr = 0; master_data = 0;
    irc_a = 0; irc_b = 0; irc_idx = 0; irc_mark = 0;
    build();
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);

    mread(W_MEAS + 0, v); check("measurement RD1", v, 32'hAAAA_AAAA);
    mread(W_MEAS + 2, v); check("measurement RD2", v, 32'h5555_5555);
    mwrite(W_MEAS + 1, 32'h5555_5555); mwrite(W_MEAS + 3, 32'hAAAA_AAAA);
    mread(W_MEAS + 1, v); check("measurement WR1", v, 32'h5555_5555);
    mread(W_MEAS + 3, v); check("measurement WR2", v, 32'hAAAA_AAAA);
    mread(W_CTRL, v);     check("Tumbl control reset value", v, 32'h1);

    for (int i = 0; i < plen; i++) mwrite(W_IMEM + 16'(i), prog[i]);
    mread(W_IMEM + 16, v); check("instruction memory read-back", v, prog[16]);
    mwrite(W_XMEM + 16'h809, 32'h0);                 // release the IRC co-processor
    mwrite(W_CTRL, 32'h0);                           // release Tumbl

    fork
      begin : motion
        for (int i = 0; i < 300; i++) begin
          @(negedge clk); step((i % 5) != 4);
          repeat (7) @(negedge clk);
        end
      end
      begin : poll
        for (int i = 0; i < 40; i++) mread(W_XMEM + 16'h800, v);
      end
      begin : interrupt
        repeat (300) @(negedge clk);
        mwrite(W_CTRL, 32'h2);
        tries = 0;
        do begin mread(W_DMEM + 16'h40, v); tries++; end while (v == 0 && tries < 100);
        mwrite(W_CTRL, 32'h0);
      end
    join

    tries = 0;
    do begin mread(W_CTRL, v); tries++; end while (!v[4] && tries < 2000);
    check("Tumbl halted by HALT", {31'd0, v[4]}, 32'd1);
    mread(W_CTRL + 3, v); check("halt code", v, 32'd7);
    mread(W_DMEM + 16'h43, v); check("loop sum", v, 32'd19900);
    mread(W_DMEM + 16'h40, v);
    check("interrupt service count", v, 32'(n_int));

    repeat (40) @(negedge clk);
    mread(W_XMEM + 16'h800, v); check("IRC position", v, 32'(pos));
    mread(W_DMEM + 16'h41, v);  check("Tumbl saw the position", v, 32'(2 * pos));
    @(negedge clk); irc_idx[0] = 1;
    repeat (10) @(negedge clk); irc_idx[0] = 0;
    repeat (40) @(negedge clk);
    mread(W_XMEM + 16'h801, v); check("IRC index position", v, 32'(pos));

    // wait for a full LX period after Tumbl stopped changing the message
    @(posedge lx_period); @(posedge lx_period);
    repeat (200) @(negedge clk);
    check("LX messages well formed", 32'(lx_bad), 0);
    check("LX message carries the position", {16'd0, last_w0}, {16'd0, 16'(pos)});
    check("no LX overrun", {31'd0, lx_overrun}, 0);

    $display("mechanisms: reads=%0d writes=%0d stalls=%0d it_skips=%0d interrupts=%0d collisions=%0d lx_messages=%0d irc_steps=%0d",
             n_rd, n_wr, n_stall, n_kill, n_int, n_coll, n_lx, n_steps);
    check("mechanism: master bus reads",  32'(n_rd > 0), 1);
    check("mechanism: master bus writes", 32'(n_wr > 0), 1);
    check("mechanism: load-use stalls",   32'(n_stall > 0), 1);
    check("mechanism: IT skips",          32'(n_kill), 200);
    check("mechanism: interrupts",        32'(n_int > 0), 1);
    check("mechanism: collisions",        32'(n_coll > 0), 1);
    check("mechanism: LX messages",       32'(n_lx > 0), 1);
    check("mechanism: IRC steps",         32'(n_steps > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
