// tb_alamouti_pair_buffer: self-checking test of the Alamouti block gathering.
// For random receiver masks, each enabled receiver delivers r(t) and r(t+T) at
// its own random cycles; the test checks one pair_valid per block, two edges
// after the last sample, with every receiver's r0/r1 as sent. It also checks
// that block_sync discards a partial block and that a receiver sending a third
// sample before the block is handed over raises overrun without corrupting it.
module tb_alamouti_pair_buffer;
  import sasrats_pkg::*;
  localparam int NUM_RX = 4;

  logic clk = 0, rst_n = 1;
  logic [NUM_RX-1:0] rx_enable = '0, rx_valid = '0;
  logic block_sync = 0;
  iq_t rx_iq [NUM_RX];
  logic pair_valid, overrun;
  iq_t r0 [NUM_RX];
  iq_t r1 [NUM_RX];
  int checks = 0, failures = 0;
  int pairs = 0, overruns = 0;

  alamouti_pair_buffer #(.NUM_RX(NUM_RX)) dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) begin
    if (pair_valid) pairs++;
    if (overrun) overruns++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  iq_t exp0 [NUM_RX];
  iq_t exp1 [NUM_RX];

  // Sends one block: receiver n sends its samples at cycles ta[n] < tb[n].
  // extra: receiver 0 sends a third sample right after its second.
  task automatic send_block(input bit extra);
    int ta [NUM_RX];
    int tb2 [NUM_RX];
    int last = 0;
    for (int n = 0; n < NUM_RX; n++) begin
      exp0[n] = '{i: 16'($urandom), q: 16'($urandom)};
      exp1[n] = '{i: 16'($urandom), q: 16'($urandom)};
      ta[n]  = $urandom_range(0, 6);
      tb2[n] = ta[n] + $urandom_range(1, 6);
      if (rx_enable[n] && tb2[n] > last) last = tb2[n];
    end
    if (extra) begin
      ta[0] = 0; tb2[0] = 1;
      for (int n = 1; n < NUM_RX; n++) begin
        if (tb2[n] < 4) tb2[n] = 4;
        if (tb2[n] > last) last = tb2[n];
      end
    end
    for (int c = 0; c <= last; c++) begin
      for (int n = 0; n < NUM_RX; n++) begin
        rx_valid[n] <= (c == ta[n]) || (c == tb2[n]) || (extra && n == 0 && c == 2);
        rx_iq[n]    <= (c == ta[n]) ? exp0[n] : (c == tb2[n]) ? exp1[n] : '{i: 16'sd777, q: -16'sd777};
      end
      @(posedge clk);
    end
    rx_valid <= '0;
  endtask

  task automatic expect_pair(input int p0);
    @(posedge clk); #1;
    check(pair_valid && pairs == p0, "pair_valid two edges after the last sample");
    for (int n = 0; n < NUM_RX; n++)
      if (rx_enable[n])
        check(r0[n] == exp0[n] && r1[n] == exp1[n], $sformatf("rx %0d samples of the block", n));
    @(posedge clk); #1;
    check(!pair_valid, "pair_valid is one pulse");
  endtask

  initial begin
    int p0;
    for (int n = 0; n < NUM_RX; n++) rx_iq[n] = '0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      rx_enable <= (t < 10) ? 4'b0011 : (t < 20) ? 4'b0001 : (t < 30) ? 4'b1111 : 4'($urandom_range(1, 15));
      @(posedge clk);
      p0 = pairs;
      send_block(0);
      expect_pair(p0);
      check(pairs == p0 + 1, "exactly one block handed over");
    end
    // A partial block is discarded by block_sync.
    rx_enable <= 4'b1111;
    rx_valid <= 4'b0110; rx_iq[1] <= '{i: 16'sd5, q: 16'sd5}; rx_iq[2] <= '{i: 16'sd6, q: 16'sd6};
    @(posedge clk);
    rx_valid <= '0;
    @(posedge clk);
    block_sync <= 1; @(posedge clk); block_sync <= 0;
    p0 = pairs;
    send_block(0);
    expect_pair(p0);
    // Overrun: receiver 0 sends three samples while the others lag.
    p0 = overruns;
    send_block(1);
    repeat (2) @(posedge clk); #1;
    check(overruns == p0 + 1, "third sample raises overrun");
    for (int n = 0; n < NUM_RX; n++)
      check(r0[n] == exp0[n] && r1[n] == exp1[n], "block intact after overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
