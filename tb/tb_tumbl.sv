// tb_tumbl: self-checking testbench of the Tumbl co-processor.
//
// Loads a hand-assembled program through the master-side instruction memory port, releases
// reset and checks, through the master-side data memory port, the values the program stores:
// arithmetic with carry, IMM prefix, multiply, barrel shift, CLZ, one-bit shifts, sign
// extension, compare, IT/ITE conditional execution, loads and stores of all sizes with a
// load-use stall, branches with and without delay slot, branch with link and return, an
// interrupt taken inside a loop, external memory accesses with random collisions with the
// master CPU, MSR access and HALT with resume by trace kick. It also checks cycle counts: an
// ITEI block takes 3 cycles, the if-then-else built from branches takes 6 cycles on both paths,
// and a counter increment in memory (load, add with load-use stall, store) takes 4 cycles.
module tb_tumbl;
  import tumbl_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst, halt, intr, trace, kick;
  logic        imem_en, dmem_en;
  logic [3:0]  imem_we, dmem_we;
  logic [8:0]  imem_addr;
  logic [9:0]  dmem_addr;
  logic [31:0] imem_wdata, dmem_wdata, imem_rdata, dmem_rdata;
  dmemb2core_t xin;
  core2dmemb_t xout;
  logic        xsel, halted, stall, int_taken, it_killed;
  logic [31:0] pc;
  logic [4:0]  hcode;

  tumbl dut (
    .clk_i(clk), .rst_i(rst), .halt_i(halt), .int_i(intr), .trace_i(trace), .trace_kick_i(kick),
    .imem_en_i(imem_en), .imem_we_i(imem_we), .imem_addr_i(imem_addr), .imem_data_i(imem_wdata),
    .imem_data_o(imem_rdata),
    .dmem_en_i(dmem_en), .dmem_we_i(dmem_we), .dmem_addr_i(dmem_addr), .dmem_data_i(dmem_wdata),
    .dmem_data_o(dmem_rdata),
    .xmemb_i(xin), .xmemb_sel_o(xsel), .xmemb_o(xout), .pc_o(pc), .halted_o(halted),
    .halt_code_o(hcode), .stall_o(stall), .int_taken_o(int_taken), .it_killed_o(it_killed)
  );

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ tiny assembler
  function automatic logic [31:0] ta(logic [5:0] op, logic [4:0] rd, logic [4:0] ra, logic [4:0] rb,
                                     logic [10:0] fn = 11'd0);
    return {op, rd, ra, rb, fn};
  endfunction
  function automatic logic [31:0] tb(logic [5:0] op, logic [4:0] rd, logic [4:0] ra, logic [15:0] imm);
    return {op, rd, ra, imm};
  endfunction

  logic [31:0] prog [512];
  int n;
  task automatic emit(input logic [31:0] w); prog[n] = w; n++; endtask

  localparam int MAIN = 16;
  int a_ite, a_brt, a_brn, a_loop, a_halt1, a_inc;

  task automatic build();
    for (int i = 0; i < 512; i++) prog[i] = NOP_INSTR;
    n = 0;  emit(tb(OP_BRI, 0, 5'b00000, 16'h0040));                  // to main
    n = 4;  emit(tb(6'b001000, 23, 23, 16'd1));                         // ISR: r23++
            emit(tb(OP_RTS, 5'b00001, 14, 16'd0));                      // RTI r14, 0
    n = 6;  emit(tb(6'b001000, 27, 0, 16'h33));                         // sub: r27 = 0x33
            emit(tb(OP_RTS, 5'b00000, 15, 16'd4));                      // RTS r15, 4
    n = 8;  emit(tb(OP_RTS, 5'b10000, 15, 16'd4));                      // sub2: RTSD r15, 4
            emit(tb(6'b001000, 28, 28, 16'd2));                         //   delay: r28 += 2
    n = MAIN;
    emit(tb(6'b001000, 23, 0, 16'd0));
    emit(tb(6'b001000, 1, 0, 16'd5));
    emit(tb(6'b001000, 2, 0, 16'hFFFD));
    emit(ta(6'b000000, 3, 1, 2));                                       // ADD  -> 2, C=1
    emit(ta(6'b000010, 4, 0, 0));                                       // ADDC -> 1
    emit(ta(6'b000001, 5, 1, 2));                                       // RSUB -> -8
    emit(tb(OP_IMM, 0, 0, 16'h1234));
    emit(tb(OP_ORI, 6, 0, 16'h5678));                                   // 0x12345678
    emit(ta(OP_MUL, 7, 6, 1));
    emit(tb(OP_BSI, 8, 6, 16'h0404));                                   // BSLLI 4
    emit(tb(OP_BSI, 9, 5, 16'h0201));                                   // BSRAI 1
    emit(ta(OP_SHIFT, 10, 1, 0, 11'h000));                              // CLZ
    emit(ta(OP_SHIFT, 11, 5, 0, 11'h001));                              // SRA
    emit(ta(OP_SHIFT, 12, 6, 0, 11'h060));                              // SEXT8
    emit(tb(6'b001000, 14, 0, 16'd9));
    a_ite = n;
    emit(tb(OP_ITI, {2'b10, 3'(COND_LT)}, 1, 16'd10));                  // ITEI LT r1,10
    emit(tb(6'b001000, 13, 0, 16'd1));
    emit(tb(6'b001000, 13, 0, 16'd2));
    emit(tb(OP_ITI, {2'b00, 3'(COND_EQ)}, 1, 16'd4));                   // ITI EQ r1,4
    emit(tb(6'b001000, 14, 0, 16'd7));
    emit(ta(OP_CMP, 15, 1, 2));
    emit(ta(OP_CMPU, 16, 1, 2));
    for (int r = 3; r <= 16; r++) emit(tb(OP_SWI, 5'(r), 0, 16'(16'h100 + 4 * (r - 3))));
    emit(tb(6'b001000, 17, 0, 16'h200));
    emit(tb(OP_SWI, 6, 17, 16'd0));
    emit(tb(OP_LBUI, 18, 17, 16'd1));
    emit(ta(6'b000000, 19, 18, 18));                                    // load-use
    emit(tb(OP_LHUI, 20, 17, 16'd2));
    emit(tb(OP_SBI, 1, 17, 16'd3));
    emit(tb(OP_SHI, 1, 17, 16'd0));
    emit(tb(OP_LWI, 21, 17, 16'd0));
    emit(tb(OP_SWI, 19, 0, 16'h140));
    emit(tb(OP_SWI, 20, 0, 16'h144));
    emit(tb(OP_SWI, 21, 0, 16'h148));
    // counter increment through memory: load, add (load-use stall), store = 4 cycles
    emit(tb(6'b001000, 30, 0, 16'd41));
    emit(tb(OP_SWI, 30, 0, 16'd44));
    a_inc = n;
    emit(tb(OP_LWI, 30, 0, 16'd44));
    emit(tb(6'b001100, 30, 30, 16'd1));                                 // ADDIK
    emit(tb(OP_SWI, 30, 0, 16'd44));
    // if-then-else with branches, branch taken
    a_brt = n;
    emit(tb(6'b001000, 19, 0, 16'h128));
    emit(ta(OP_CMP, 12, 19, 10));
    emit(tb(OP_BRCI, {2'b00, 3'(COND_LT)}, 12, 16'd12));
    emit(tb(OP_BRI, 0, 5'b10000, 16'd12));
    emit(tb(6'b001000, 22, 0, 16'h20));
    emit(tb(6'b001000, 22, 0, 16'h10));
    // same, branch not taken
    a_brn = n;
    emit(tb(6'b001000, 19, 0, 16'h128));
    emit(ta(OP_CMP, 12, 19, 20));
    emit(tb(OP_BRCI, {2'b00, 3'(COND_LT)}, 12, 16'd12));
    emit(tb(OP_BRI, 0, 5'b10000, 16'd12));
    emit(tb(6'b001000, 24, 0, 16'h20));
    emit(tb(6'b001000, 24, 0, 16'h10));
    emit(tb(OP_SWI, 22, 0, 16'h14C));
    emit(tb(OP_SWI, 24, 0, 16'h150));
    // branch and link, without and with delay slot
    emit(tb(OP_BRI, 15, 5'b01100, 16'h0018));                           // BRALI r15, sub
    emit(tb(OP_SWI, 27, 0, 16'h154));
    emit(tb(6'b001000, 28, 0, 16'd0));
    emit(tb(OP_BRI, 15, 5'b11100, 16'h0020));                           // BRALID r15, sub2
    emit(tb(6'b001000, 28, 28, 16'd1));
    emit(tb(OP_SWI, 28, 0, 16'h158));
    // loop, interrupted once
    emit(tb(6'b001000, 24, 0, 16'd10));
    emit(tb(6'b001000, 25, 0, 16'd0));
    a_loop = n;
    emit(ta(6'b000000, 25, 25, 24));
    emit(tb(6'b001000, 24, 24, 16'hFFFF));
    emit(tb(OP_BRCI, {2'b00, 3'(COND_NE)}, 24, 16'hFFF8));
    emit(tb(OP_SWI, 25, 0, 16'h15C));
    emit(tb(OP_SWI, 23, 0, 16'h160));
    // external memory
    emit(tb(OP_SWI, 25, 0, 16'h2000));
    emit(tb(OP_LWI, 26, 0, 16'h2000));
    emit(tb(6'b001000, 26, 26, 16'd1));
    emit(tb(OP_SWI, 26, 0, 16'h2004));
    emit(tb(OP_LBUI, 29, 0, 16'h2007));
    emit(tb(OP_SWI, 29, 0, 16'h164));
    // MSR
    emit(tb(6'b001000, 29, 0, 16'd4));
    emit(tb(OP_MSR, 0, 29, 16'hC001));                                  // MTS
    emit(tb(OP_MSR, 30, 0, 16'h8001));                                  // MFS
    emit(tb(OP_SWI, 30, 0, 16'h168));
    a_halt1 = n;
    emit(tb(OP_HALT, 0, 0, 16'h0015));
    emit(tb(6'b001000, 31, 0, 16'h77));
    emit(tb(OP_SWI, 31, 0, 16'h16C));
    emit(tb(OP_HALT, 0, 0, 16'h0003));
  endtask

  // ------------------------------------------------------------ external memory model
  logic [31:0] xmem [16];
  logic [31:0] xdata = '0;
  logic        master_busy;
  int          collisions = 0;
  assign xin.clken   = !(master_busy && xsel);
  assign xin.data    = xdata;
  assign xin.int_req = 1'b0;
  always_ff @(posedge clk) begin
    master_busy <= ($urandom_range(0, 2) == 0);
    if (xsel && master_busy) collisions++;
    if (xsel && xin.clken) begin
      for (int i = 0; i < 4; i++)
        if (xout.bls[i]) xmem[xout.addr[3:0]][i*8 +: 8] <= xout.data[i*8 +: 8];
      if (xout.rd) xdata <= xmem[xout.addr[3:0]];
    end
  end

  // ------------------------------------------------------------ cycle bookkeeping
  int cyc = 0;
  int first_seen [int];
  int stalls = 0, ints = 0, kills = 0;
  logic int_req_done = 1'b0;
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (!first_seen.exists(int'(pc))) first_seen[int'(pc)] = cyc;
      if (stall) stalls++;
      if (int_taken) begin ints++; intr <= 1'b0; end
      if (it_killed) kills++;
      if (!int_req_done && pc == 32'(4 * (a_loop + 1))) begin
        intr <= 1'b1;
        int_req_done <= 1'b1;
      end
    end
  end

  function automatic int span(int from_word, int to_word);
    return first_seen[4 * to_word] - first_seen[4 * from_word];
  endfunction

  task automatic dread(input int byte_addr, output logic [31:0] v);
    @(negedge clk);
    dmem_en = 1'b1; dmem_addr = 10'(byte_addr / 4);
    @(negedge clk);
    v = dmem_rdata;
    dmem_en = 1'b0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    logic [31:0] exp_regs [14];
    rst = 1; halt = 0; intr = 0; trace = 0; kick = 0;
    imem_en = 0; imem_we = 0; imem_addr = 0; imem_wdata = 0;
    dmem_en = 0; dmem_we = 0; dmem_addr = 0; dmem_wdata = 0;
    for (int i = 0; i < 16; i++) xmem[i] = '0;
    build();
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      imem_en = 1; imem_we = 4'hF; imem_addr = 9'(i); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_en = 0; imem_we = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    wait (halted);
    @(negedge clk);
    check("halt code", 32'(hcode), 32'h15);
    check("pc after HALT", pc, 32'(4 * (a_halt1 + 1)));

    exp_regs = '{32'h2, 32'h1, 32'hFFFFFFF8, 32'h12345678, 32'h5B05B058, 32'h23456780,
                 32'hFFFFFFFC, 32'd29, 32'hFFFFFFFC, 32'h78, 32'h1, 32'h9, 32'hFFFFFFF8,
                 32'h7FFFFFF8};
    for (int r = 3; r <= 16; r++) begin
      dread('h100 + 4 * (r - 3), v);
      check($sformatf("r%0d", r), v, exp_regs[r - 3]);
    end
    dread('h140, v); check("LBU + load-use ADD", v, 32'h68);
    dread('h144, v); check("LHU", v, 32'h5678);
    dread('h148, v); check("SB/SH/LW", v, 32'h00055605);
    dread('h14C, v); check("branch taken path", v, 32'h10);
    dread('h150, v); check("branch not taken path", v, 32'h20);
    dread('h154, v); check("BRALI/RTS", v, 32'h33);
    dread('h158, v); check("BRALID/RTSD delay slots", v, 32'h3);
    dread('h15C, v); check("loop sum", v, 32'd55);
    dread('h160, v); check("interrupt service count", v, 32'd1);
    dread('h164, v); check("external LBU", v, 32'h38);
    dread('h168, v); check("MTS/MFS", v, 32'h4);
    check("external word 0", xmem[0], 32'd55);
    check("external word 1", xmem[1], 32'd56);

    check("ITEI block cycles", 32'(span(a_ite, a_ite + 3)), 32'd3);
    check("LWI/ADDIK/SWI increment cycles", 32'(span(a_inc, a_inc + 3)), 32'd4);
    dread('h2C, v); check("incremented counter", v, 32'd42);
    check("branch if-else taken cycles", 32'(span(a_brt, a_brt + 6)), 32'd6);
    check("branch if-else not-taken cycles", 32'(span(a_brn, a_brn + 6)), 32'd6);

    // resume from HALT with a trace kick
    @(negedge clk); kick = 1;
    @(negedge clk); kick = 0;
    wait (halted);
    @(negedge clk);
    check("second halt code", 32'(hcode), 32'h3);
    dread('h16C, v); check("resumed after kick", v, 32'h77);

    check("load-use stalls seen", 32'(stalls > 0), 1);
    check("interrupts taken", 32'(ints), 1);
    check("IT-skipped instructions", 32'(kills), 2);
    check("collisions seen", 32'(collisions > 0), 1);
    $display("cycles=%0d stalls=%0d collisions=%0d", cyc, stalls, collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
