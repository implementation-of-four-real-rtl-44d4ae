// tb_st_decoder: self-checking test of the space-time decoder with the two
// receivers of the 2x2 configuration (NUM_RX = 2).
// Alamouti blocks of random PSK symbols pass through random channels with a
// little noise; receiver samples arrive at independent random cycles. Checks:
// the soft outputs against a 64-bit reference combiner, the decided symbols
// against the transmitted ones, one result per block at the expected pipeline
// depth, estimates updated only on commit (a commit between blocks changes
// the channel), and the one-receiver (2x1) and 2-, 4-, 8-PSK modes.
module tb_st_decoder;
  import sasrats_pkg::*;
  localparam int NUM_RX = 2;
  localparam int S_W = 36;

  logic clk = 0, rst_n = 1;
  logic [NUM_RX-1:0] rx_enable = '0, rx_valid = '0;
  psk_mode_e psk_mode = PSK_4;
  logic block_sync = 0;
  iq_t rx_iq [NUM_RX];
  logic csi_wr_en = 0, csi_commit = 0;
  logic [1:0] csi_wr_addr = '0;
  h_t csi_wr_data = '0;
  logic csi_updated, pair_overrun, soft_valid, sym_valid;
  logic signed [S_W-1:0] s0_soft_i, s0_soft_q, s1_soft_i, s1_soft_q;
  logic [2:0] s0_hat, s1_hat;
  int checks = 0, failures = 0;

  st_decoder #(.NUM_RX(NUM_RX)) dut (.*);

  always #5 clk = ~clk;

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

  int hi [2*NUM_RX], hq [2*NUM_RX];
  iq_t smp0 [NUM_RX], smp1 [NUM_RX];
  longint e0i, e0q, e1i, e1q;
  int k0_q [$], k1_q [$];
  longint soft_q [$];
  int results = 0, soft_seen = 0;

  always @(negedge clk) begin
    if (soft_valid) begin
      soft_seen++;
      check(longint'(s0_soft_i) == soft_q[0] && longint'(s0_soft_q) == soft_q[1] &&
            longint'(s1_soft_i) == soft_q[2] && longint'(s1_soft_q) == soft_q[3], "soft outputs");
      repeat (4) void'(soft_q.pop_front());
    end
    if (sym_valid) begin
      results++;
      check(s0_hat == 3'(k0_q[0]), $sformatf("s0_hat %0d sent %0d", s0_hat, k0_q[0]));
      check(s1_hat == 3'(k1_q[0]), $sformatf("s1_hat %0d sent %0d", s1_hat, k1_q[0]));
      void'(k0_q.pop_front()); void'(k1_q.pop_front());
    end
  end

  task automatic write_channels();
    for (int n = 0; n < 2 * NUM_RX; n++) begin
      real mag, ph;
      mag = 3000 + $urandom_range(0, 5000);
      ph  = $urandom_range(0, 6283) / 1000.0;
      hi[n] = $rtoi(mag * $cos(ph)); hq[n] = $rtoi(mag * $sin(ph));
      csi_wr_en <= 1; csi_wr_addr <= 2'(n); csi_wr_data <= '{i: 16'(hi[n]), q: 16'(hq[n])};
      @(posedge clk);
    end
    csi_wr_en <= 0;
    csi_commit <= 1; @(posedge clk); #1 check(csi_updated, "commit acknowledged");
    csi_commit <= 0; @(posedge clk);
  endtask

  // Sends one Alamouti block of symbols k0, k1 (M-PSK) through the channels.
  task automatic send_block(input int m);
    int k0, k1, ta [NUM_RX], tb2 [NUM_RX], last;
    real c0, q0, c1, q1;
    k0 = $urandom_range(0, m - 1); k1 = $urandom_range(0, m - 1);
    c0 = $cos(2.0 * 3.14159265358979 * k0 / m); q0 = $sin(2.0 * 3.14159265358979 * k0 / m);
    c1 = $cos(2.0 * 3.14159265358979 * k1 / m); q1 = $sin(2.0 * 3.14159265358979 * k1 / m);
    e0i = 0; e0q = 0; e1i = 0; e1q = 0;
    last = 0;
    for (int n = 0; n < NUM_RX; n++) begin
      real ai, aq, bi, bq;
      longint a0i, a0q, a1i, a1q, hai, haq, hbi, hbq;
      ai = hi[2*n]; aq = hq[2*n]; bi = hi[2*n+1]; bq = hq[2*n+1];
      // r(t) = ha s0 + hb s1 ; r(t+T) = -ha conj(s1) + hb conj(s0)
      a0i = $rtoi(ai*c0 - aq*q0 + bi*c1 - bq*q1) + $urandom_range(0, 40) - 20;
      a0q = $rtoi(ai*q0 + aq*c0 + bi*q1 + bq*c1) + $urandom_range(0, 40) - 20;
      a1i = $rtoi(-(ai*c1 + aq*q1) + bi*c0 + bq*q0) + $urandom_range(0, 40) - 20;
      a1q = $rtoi(-(aq*c1 - ai*q1) + bq*c0 - bi*q0) + $urandom_range(0, 40) - 20;
      smp0[n] = '{i: 16'(a0i), q: 16'(a0q)};
      smp1[n] = '{i: 16'(a1i), q: 16'(a1q)};
      a0i = smp0[n].i; a0q = smp0[n].q; a1i = smp1[n].i; a1q = smp1[n].q;
      hai = hi[2*n]; haq = hq[2*n]; hbi = hi[2*n+1]; hbq = hq[2*n+1];
      if (rx_enable[n]) begin
        e0i += hai*a0i + haq*a0q + hbi*a1i + hbq*a1q;
        e0q += hai*a0q - haq*a0i + hbq*a1i - hbi*a1q;
        e1i += hbi*a0i + hbq*a0q - hai*a1i - haq*a1q;
        e1q += hbi*a0q - hbq*a0i - haq*a1i + hai*a1q;
      end
      ta[n] = $urandom_range(0, 5); tb2[n] = ta[n] + $urandom_range(1, 8);
      if (tb2[n] > last) last = tb2[n];
    end
    k0_q.push_back(k0); k1_q.push_back(k1);
    soft_q.push_back(e0i); soft_q.push_back(e0q); soft_q.push_back(e1i); soft_q.push_back(e1q);
    for (int c = 0; c <= last; c++) begin
      for (int n = 0; n < NUM_RX; n++) begin
        rx_valid[n] <= (c == ta[n]) || (c == tb2[n]);
        rx_iq[n]    <= (c == tb2[n]) ? smp1[n] : smp0[n];
      end
      @(posedge clk);
    end
    rx_valid <= '0;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    int lat;
    for (int n = 0; n < NUM_RX; n++) rx_iq[n] = '0;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    write_channels();
    rx_enable <= 2'b11;
    block_sync <= 1; @(posedge clk); block_sync <= 0;
    // Pipeline depth: last sample edge -> pair_valid (2) -> soft (1) -> symbols (2).
    psk_mode <= PSK_4;
    k0_q.push_back(0); k1_q.push_back(0);
    hi[0] = hi[0]; // channels unchanged
    begin
      // Directly timed block: both receivers deliver both samples on cycles 0 and 1.
      iq_t z;
      z = '{i: 16'(hi[0] + hi[1]), q: 16'(hq[0] + hq[1])};
      for (int n = 0; n < NUM_RX; n++) begin
        longint a0i, a0q, a1i, a1q, hai, haq, hbi, hbq;
        smp0[n] = '{i: 16'(hi[2*n] + hi[2*n+1]), q: 16'(hq[2*n] + hq[2*n+1])};
        smp1[n] = '{i: 16'(-hi[2*n] + hi[2*n+1]), q: 16'(-hq[2*n] + hq[2*n+1])};
      end
      e0i = 0; e0q = 0; e1i = 0; e1q = 0;
      for (int n = 0; n < NUM_RX; n++) begin
        longint a0i, a0q, a1i, a1q, hai, haq, hbi, hbq;
        a0i = smp0[n].i; a0q = smp0[n].q; a1i = smp1[n].i; a1q = smp1[n].q;
        hai = hi[2*n]; haq = hq[2*n]; hbi = hi[2*n+1]; hbq = hq[2*n+1];
        e0i += hai*a0i + haq*a0q + hbi*a1i + hbq*a1q;
        e0q += hai*a0q - haq*a0i + hbq*a1i - hbi*a1q;
        e1i += hbi*a0i + hbq*a0q - hai*a1i - haq*a1q;
        e1q += hbi*a0q - hbq*a0i - haq*a1i + hai*a1q;
      end
      soft_q.push_back(e0i); soft_q.push_back(e0q); soft_q.push_back(e1i); soft_q.push_back(e1q);
      for (int n = 0; n < NUM_RX; n++) rx_iq[n] <= smp0[n];
      rx_valid <= '1; @(posedge clk);
      for (int n = 0; n < NUM_RX; n++) rx_iq[n] <= smp1[n];
      @(posedge clk);
      rx_valid <= '0;
      lat = 0;
      do begin @(posedge clk); #1; lat++; end while (!sym_valid && lat < 20);
      check(lat == 4, $sformatf("symbols %0d edges after the last sample's edge, expected 4", lat));
      @(posedge clk);
    end
    for (int t = 0; t < 300; t++) begin
      int m;
      if (t % 50 == 0) write_channels();
      psk_mode <= psk_mode_e'(t % 3);
      m = (t % 3 == 0) ? 2 : (t % 3 == 1) ? 4 : 8;
      rx_enable <= (t < 150) ? 2'b11 : 2'b01;
      @(posedge clk);
      send_block(m);
    end
    repeat (10) @(posedge clk);
    check(results == 301 && soft_seen == 301, $sformatf("%0d results for 301 blocks", results));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
