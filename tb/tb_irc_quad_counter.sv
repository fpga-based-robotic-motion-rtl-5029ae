// tb_irc_quad_counter: self-checking testbench of the per-axis quad counter.
//
// Drives A/B quadrature sequences forward and backward with random step counts and checks the
// 8-bit count (including wrap-around), the 3-cycle latency from an input edge to the count, the
// index capture and its acknowledge, the decode error on a simultaneous A/B change and its
// clearing, and MARK pass-through.
module tb_irc_quad_counter;
  logic clk = 1'b0;
  always #10 clk = ~clk;

  logic rst, a, b, idx, mark, ack, clr;
  logic [7:0] count, idx_count;
  logic idx_ev, err, mark_o;

  irc_quad_counter dut (
    .clk_i(clk), .rst_i(rst), .a_i(a), .b_i(b), .idx_i(idx), .mark_i(mark), .idx_ack_i(ack),
    .err_clr_i(clr), .count_o(count), .idx_count_o(idx_count), .idx_event_o(idx_ev),
    .err_o(err), .mark_o(mark_o)
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

  // one quadrature step forward (dir=1) or backward, 4 cycles apart
  int phase = 0;
  task automatic step(input bit dir);
    phase = dir ? (phase + 1) % 4 : (phase + 3) % 4;
    @(negedge clk);
    {a, b} = (phase == 0) ? 2'b00 : (phase == 1) ? 2'b10 : (phase == 2) ? 2'b11 : 2'b01;
    repeat (3) @(negedge clk);
  endtask

  int pos = 0;
  initial begin
    int lat;
    rst = 1; a = 0; b = 0; idx = 0; mark = 0; ack = 0; clr = 0;
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);
    check("count after reset", int'(count), 0);

    // latency of one step
    @(negedge clk); a = 1; phase = 1; lat = 0;
    while (count != 8'd1 && lat < 10) begin @(posedge clk); #1; lat++; end
    check("edge-to-count latency", lat, 3);
    pos = 1;

    for (int r = 0; r < 20; r++) begin
      automatic bit dir = 1'($urandom_range(0, 1));
      automatic int n = $urandom_range(1, 200);
      for (int i = 0; i < n; i++) begin step(dir); pos += dir ? 1 : -1; end
      check("count", int'(count), pos & 255);
      check("no error", int'(err), 0);
    end

    // index capture
    @(negedge clk); idx = 1;
    repeat (4) @(negedge clk);
    check("index event", int'(idx_ev), 1);
    check("index count", int'(idx_count), pos & 255);
    step(1); pos++;
    idx = 0;
    check("index count holds", int'(idx_count), (pos - 1) & 255);
    @(negedge clk); ack = 1; @(negedge clk); ack = 0;
    check("index acknowledged", int'(idx_ev), 0);

    // decode error
    @(negedge clk); a = ~a; b = ~b;
    repeat (4) @(negedge clk);
    check("decode error", int'(err), 1);
    check("count unchanged by error", int'(count), pos & 255);
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    check("error cleared", int'(err), 0);

    mark = 1; repeat (3) @(negedge clk);
    check("mark", int'(mark_o), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
