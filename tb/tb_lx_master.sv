// tb_lx_master: self-checking testbench of the power stage bus transmitter.
//
// Loads the message streams used in the document's own test (one message of 8 words; two
// messages of 8 and 2 words linked by a link word; the second buffer with no message; the second
// buffer with two messages) through the bus port. A receiver model collects MOSI while SYNC is
// low and checks every message word (LSB first), the CRC-8 that follows (computed here
// independently), that SYNC is low for exactly 16n + 8 cycles per message, that SYNC is high for
// at least one cycle between messages, the number of messages per period and that consecutive
// periods start exactly PERIOD cycles apart.
module tb_lx_master;
  localparam int PERIOD = 2500;
  logic clk = 1'b0;
  always #10 clk = ~clk;

  logic rst, bus_en;
  logic [1:0] bus_we;
  logic [8:0] bus_addr;
  logic [15:0] bus_wdata, bus_rdata;
  logic lx_clk, lx_sync, lx_mosi, period, overrun;

  lx_master dut (
    .clk_i(clk), .rst_i(rst), .bus_en_i(bus_en), .bus_we_i(bus_we), .bus_addr_i(bus_addr),
    .bus_data_i(bus_wdata), .bus_data_o(bus_rdata), .lx_clk_o(lx_clk), .lx_sync_o(lx_sync),
    .lx_mosi_o(lx_mosi), .period_o(period), .overrun_o(overrun)
  );

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ receiver model
  logic [15:0] rx_words [$];
  logic        rx_bits [$];
  int          rx_msgs = 0, rx_high = 100, low_len = 0, min_gap = 1000;
  int          msg_start [$];
  logic [15:0] exp_msgs [$][$];

  function automatic logic [7:0] crc8(logic bits [$]);
    logic [7:0] c = 8'h00;
    foreach (bits[i]) begin
      logic fb = c[7] ^ bits[i];
      c = {c[6:0], 1'b0};
      if (fb) c ^= 8'h07;
    end
    return c;
  endfunction

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (!lx_sync) begin
        if (low_len == 0) begin
          msg_start.push_back(cyc);
          if (rx_high < min_gap) min_gap = rx_high;
        end
        rx_bits.push_back(lx_mosi);
        low_len++;
        rx_high = 0;
      end else begin
        if (low_len != 0) finish_msg();
        low_len = 0;
        rx_high++;
      end
    end
  end

  task automatic finish_msg();
    logic [15:0] w;
    logic data_bits [$];
    logic [7:0] crc_rx;
    int n = (low_len - 8) / 16;
    checks++;
    if (low_len != 16 * n + 8 || exp_msgs.size() == 0) begin
      failures++;
      $display("FAIL message of %0d bits (expected messages left %0d)", low_len, exp_msgs.size());
      rx_bits.delete();
      return;
    end
    for (int i = 0; i < 16 * n; i++) data_bits.push_back(rx_bits[i]);
    for (int i = 0; i < 8; i++) crc_rx[7 - i] = rx_bits[16 * n + i];
    check("message length (words)", n, exp_msgs[0].size());
    for (int k = 0; k < n && k < exp_msgs[0].size(); k++) begin
      for (int i = 0; i < 16; i++) w[i] = rx_bits[16 * k + i];
      check($sformatf("message %0d word %0d", rx_msgs, k), int'(w), int'(exp_msgs[0][k]));
    end
    check("CRC", int'(crc_rx), int'(crc8(data_bits)));
    void'(exp_msgs.pop_front());
    rx_msgs++;
    rx_bits.delete();
  endtask

  // ------------------------------------------------------------ stimulus
  task automatic wr(input int addr, input logic [15:0] v);
    @(negedge clk);
    bus_en = 1; bus_we = 2'b11; bus_addr = 9'(addr); bus_wdata = v;
    @(negedge clk);
    bus_en = 0; bus_we = 0;
  endtask

  task automatic wait_period();
    @(posedge period);
    @(negedge clk);
  endtask

  // The messages of a period are sent right after its start; new contents are written in the
  // idle part of the period and are sent from the next period on.
  int rx_at_period = 0;
  task automatic end_of_period(input int nmsg);
    wait_period();
    check("messages in period", rx_msgs - rx_at_period, nmsg);
    check("all expected messages seen", exp_msgs.size(), 0);
    rx_at_period = rx_msgs;
  endtask
  task automatic idle_part();
    repeat (1000) @(negedge clk);
  endtask

  logic [15:0] m1 [$] = '{16'hc0cc, 16'hc199, 16'hc266, 16'h0333, 16'h83f0, 16'h0000,
                          16'h0000, 16'h0000};
  logic [15:0] m2 [$] = '{16'h1111, 16'h3525};

  initial begin
    rst = 1; bus_en = 0; bus_we = 0; bus_addr = 0; bus_wdata = 0;
    // first test stream, loaded during reset
    @(negedge clk); rst = 1;
    wr(0, 16'h0008);
    for (int i = 0; i < 8; i++) wr(1 + i, m1[i]);
    wr(9, 16'h0000);
    exp_msgs.push_back(m1);
    @(negedge clk); rst = 0;
    idle_part();
    // two messages
    wr(9, 16'h0a02); wr(10, m2[0]); wr(11, m2[1]); wr(12, 16'h0000);
    end_of_period(1);
    exp_msgs.push_back(m1); exp_msgs.push_back(m2);
    idle_part();
    // second buffer, empty
    wr(256, 16'h0000); wr(0, 16'h8000);
    end_of_period(2);
    check("SYNC high between messages", int'(min_gap >= 1), 1);
    idle_part();
    // second buffer with two messages
    wr(256, 16'h0008);
    for (int i = 0; i < 8; i++) wr(257 + i, m1[i]);
    wr(265, 16'h0a02); wr(266, m2[0]); wr(267, m2[1]); wr(268, 16'h0000);
    end_of_period(0);
    exp_msgs.push_back(m1); exp_msgs.push_back(m2);
    idle_part();
    end_of_period(2);
    // the first messages of the last period and of the period two before it
    check("periods start PERIOD apart", msg_start[$ - 1] - msg_start[$ - 3], 2 * PERIOD);
    check("no overrun", int'(overrun), 0);

    // bus read-back of a word
    @(negedge clk); bus_en = 1; bus_addr = 9'd266;
    @(negedge clk); bus_en = 0;
    check("bus read", int'(bus_rdata), int'(m2[0]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
