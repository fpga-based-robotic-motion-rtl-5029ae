// tb_irc_coproc: self-checking testbench of the IRC co-processor.
//
// Moves the four encoder inputs concurrently by random numbers of quadrature steps (many
// thousands, far beyond the 8-bit hardware counters) and reads the 32-bit positions back over
// the bus port; checks the index position captured on an IDX edge, that a position written by
// the bus is kept (moved only to the nearest value matching the hardware counter), the decode
// error and MARK status outputs, and the service time: a step must appear in the 32-bit
// position no later than 3 + 4*AXES + 1 cycles after the input edge (4 cycles per axis).
module tb_irc_coproc;
  localparam int AXES = 4;     // the block's default AXES
  logic clk = 1'b0;
  always #10 clk = ~clk;

  logic rst;
  logic [AXES-1:0] a, b, idx, mark, clr, err, mark_o;
  logic bus_en;
  logic [3:0] bus_we;
  logic [2:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;

  irc_coproc dut (
    .clk_i(clk), .rst_i(rst), .irc_a_i(a), .irc_b_i(b), .irc_idx_i(idx), .irc_mark_i(mark),
    .err_clr_i(clr), .err_o(err), .mark_o(mark_o), .bus_en_i(bus_en), .bus_we_i(bus_we),
    .bus_addr_i(bus_addr), .bus_data_i(bus_wdata), .bus_data_o(bus_rdata)
  );

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int phase [AXES];
  int pos [AXES];
  task automatic step(input int ax, input bit dir);
    phase[ax] = dir ? (phase[ax] + 1) % 4 : (phase[ax] + 3) % 4;
    {a[ax], b[ax]} = (phase[ax] == 0) ? 2'b00 : (phase[ax] == 1) ? 2'b10 :
                     (phase[ax] == 2) ? 2'b11 : 2'b01;
    pos[ax] += dir ? 1 : -1;
  endtask

  task automatic bus_read(input int w, output logic [31:0] v);
    @(negedge clk); bus_en = 1; bus_we = 0; bus_addr = 3'(w);
    @(negedge clk); bus_en = 0; v = bus_rdata;
  endtask
  task automatic bus_write(input int w, input logic [31:0] v);
    @(negedge clk); bus_en = 1; bus_we = 4'hF; bus_addr = 3'(w); bus_wdata = v;
    @(negedge clk); bus_en = 0; bus_we = 0;
  endtask

  initial begin
    logic [31:0] v;
    int lat, maxlat;
    rst = 1; a = 0; b = 0; idx = 0; mark = 0; clr = 0;
    bus_en = 0; bus_we = 0; bus_addr = 0; bus_wdata = 0;
    for (int i = 0; i < AXES; i++) begin phase[i] = 0; pos[i] = 0; end
    repeat (4) @(negedge clk);
    rst = 0;

    // concurrent random motion: one step per axis at most every 4 cycles, each axis mostly in
    // one direction that changes from round to round
    for (int round = 0; round < 10; round++) begin
      automatic bit [AXES-1:0] up = AXES'($urandom());
      for (int t = 0; t < 1600; t++) begin
        @(negedge clk);
        if (t % 4 == 0)
          for (int ax = 0; ax < AXES; ax++)
            if ($urandom_range(0, 3) != 0) step(ax, up[ax] ? ($urandom_range(0, 7) != 0)
                                                           : ($urandom_range(0, 7) == 0));
      end
      repeat (30) @(negedge clk);
      for (int ax = 0; ax < AXES; ax++) begin
        bus_read(2 * ax, v);
        check($sformatf("round %0d axis %0d position", round, ax), int'(v), pos[ax]);
      end
    end

    // service latency
    maxlat = 0;
    for (int r = 0; r < 8; r++) begin
      automatic int ax = r % AXES;
      logic [31:0] prev_v;
      bus_read(2 * ax, prev_v);
      repeat ($urandom_range(0, 15)) @(negedge clk);
      step(ax, 1);
      lat = 0;
      do begin bus_read(2 * ax, v); lat += 2; end while (v == prev_v && lat < 60);
      if (lat > maxlat) maxlat = lat;
    end
    checks++;
    if (maxlat > 3 + 4 * AXES + 2 + 2) begin
      failures++;
      $display("FAIL service latency %0d", maxlat);
    end

    // index capture on axis 2
    @(negedge clk); idx[2] = 1;
    repeat (40) @(negedge clk);
    idx[2] = 0;
    bus_read(5, v);
    check("axis 2 index position", int'(v), pos[2]);
    for (int i = 0; i < 10; i++) begin @(negedge clk); step(2, 1); repeat (3) @(negedge clk); end
    repeat (30) @(negedge clk);
    bus_read(5, v);
    check("index position kept", int'(v), pos[2] - 10);
    bus_read(4, v);
    check("axis 2 position after index", int'(v), pos[2]);

    // bus write of a position (low byte equal to the counter's)
    bus_write(6, 32'h1234_5600 | (pos[3] & 'hFF));
    repeat (30) @(negedge clk);
    bus_read(6, v);
    check("written position kept", int'(v), int'(32'h1234_5600 | (pos[3] & 'hFF)));
    for (int i = 0; i < 5; i++) begin @(negedge clk); step(3, 0); repeat (3) @(negedge clk); end
    repeat (30) @(negedge clk);
    bus_read(6, v);
    check("written position counts", int'(v), int'(32'h1234_5600 | ((pos[3] + 5) & 'hFF)) - 5);

    // status
    @(negedge clk); a[1] = ~a[1]; b[1] = ~b[1]; mark[0] = 1;
    repeat (5) @(negedge clk);
    check("decode error axis 1", int'(err), 2);
    check("mark axis 0", int'(mark_o), 1);
    @(negedge clk); clr = 4'b0010; @(negedge clk); clr = 0;
    check("error cleared", int'(err), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
