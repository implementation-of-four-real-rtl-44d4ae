// tb_sasrats_top: end-to-end test of the four-receiver baseband with its
// space-time decoder, at the default parameters (four receivers).
//
// Every receiver gets its samples as the down converter delivers them: an I
// word, then a Q word, one complex sample per symbol period of 16 clocks
// (a 65 MHz clock at 4 Mbaud), each receiver at its own offset in the period.
//  1. Carrier sync preamble: each receiver sees a phasor rotating at its own
//     rate; its NCO word must move once per sample in the direction of the
//     rotation, and no sample may be dropped.
//  2. The DSPs write channel estimates and commit them.
//  3. Alamouti data blocks through random channels with a little noise, in the
//     2x1 (one receiver), 2x2 and 2x4 configurations and 2-, 4- and 8-PSK;
//     every decided symbol must equal the transmitted one.
//  4. A receiver that delivers an extra sample raises the pair overrun, and a
//     block sync realigns the blocks.
//  5. Steps 1 and 3 again at 5 Mbaud (13 clocks per symbol) with four receivers.
// The DSP read port is checked against each receiver's last sample. Every
// mechanism is counted and a failure is counted for one that never occurred.
module tb_sasrats_top;
  import sasrats_pkg::*;
  localparam int NUM_RX = 4;
  localparam int S_W = 37;
  // Clocks per symbol: 16 at 4 Mbaud, 13 at 5 Mbaud (65 MHz clock).
  int period = 16;

  logic clk = 0, rst_n = 1;
  logic [NUM_RX-1:0] ddc_strobe = '0, ddc_is_i = '0;
  logic signed [15:0] ddc_data [NUM_RX];
  logic [NUM_RX-1:0] data_valid;
  logic [1:0] dsp_rd_addr [NUM_RX];
  logic [31:0] dsp_rd_data [NUM_RX];
  iq_t iq_out [NUM_RX];
  logic [NUM_RX-1:0] cs_enable = '0, nco_load = '0, nco_update;
  logic [15:0] cs_loop_gain = 16'd16;
  logic [31:0] nco_init = 32'h2000_0000;
  logic [31:0] nco_freq [NUM_RX];
  logic [15:0] cs_dropped [NUM_RX];
  logic signed [15:0] cs_theta_f [NUM_RX];
  logic [NUM_RX-1:0] rx_enable = '0;
  psk_mode_e psk_mode = PSK_4;
  logic block_sync = 0, csi_wr_en = 0, csi_commit = 0;
  logic [2:0] csi_wr_addr = '0;
  h_t csi_wr_data = '0;
  logic csi_updated, pair_overrun, soft_valid, sym_valid;
  logic signed [S_W-1:0] s0_soft_i, s0_soft_q, s1_soft_i, s1_soft_q;
  logic [2:0] s0_hat, s1_hat;

  sasrats_top dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_nco_updates [NUM_RX];
  int n_data_valid = 0, n_commits = 0, n_overruns = 0, n_syncs = 0, n_blocks = 0;
  int n_mode [3];
  int n_rxcfg [3];

  int k0_q [$], k1_q [$];
  int mode_q [$], cfg_q [$];
  int delta_cur [NUM_RX];
  logic [31:0] nco_last [NUM_RX];
  iq_t last_sent [NUM_RX];

  always @(negedge clk) begin
    for (int n = 0; n < NUM_RX; n++) begin
      if (data_valid[n]) begin
        n_data_valid++;
        check(dsp_rd_data[n] == last_sent[n], $sformatf("DSP reads receiver %0d sample", n));
        check(iq_out[n] == last_sent[n], $sformatf("parallel output of receiver %0d", n));
      end
      if (nco_update[n]) begin
        n_nco_updates[n]++;
        check(cs_theta_f[n] - delta_cur[n] <= 16 && delta_cur[n] - cs_theta_f[n] <= 16,
              $sformatf("rx %0d rotation estimate %0d, applied %0d", n, cs_theta_f[n], delta_cur[n]));
        check((delta_cur[n] > 0) == (nco_freq[n] > nco_last[n]), "NCO moves towards the carrier");
      end
      nco_last[n] = nco_freq[n];
    end
    if (csi_updated) n_commits++;
    if (pair_overrun) n_overruns++;
    if (sym_valid) begin
      n_blocks++;
      // A block damaged on purpose (k = -1) is not compared.
      if (k0_q[0] >= 0)
        check(s0_hat == 3'(k0_q[0]) && s1_hat == 3'(k1_q[0]),
            $sformatf("decided (%0d,%0d) sent (%0d,%0d)", s0_hat, s1_hat, k0_q[0], k1_q[0]));
      n_mode[mode_q[0]]++;
      n_rxcfg[cfg_q[0]]++;
      void'(k0_q.pop_front()); void'(k1_q.pop_front());
      void'(mode_q.pop_front()); void'(cfg_q.pop_front());
    end
  end

  // One symbol period: receiver n (if in mask) gets sample smp[n], I word at
  // cycle offs[n] and Q word two cycles later. extra[n] sends it twice.
  task automatic symbol_period(input iq_t smp [NUM_RX], input logic [NUM_RX-1:0] mask,
                               input int offs [NUM_RX], input logic [NUM_RX-1:0] extra);
    for (int c = 0; c < period; c++) begin
      for (int n = 0; n < NUM_RX; n++) begin
        logic hit_i, hit_q;
        hit_i = mask[n] && (c == offs[n] || (extra[n] && c == offs[n] + 4));
        hit_q = mask[n] && (c == offs[n] + 2 || (extra[n] && c == offs[n] + 6));
        ddc_strobe[n] <= hit_i || hit_q;
        ddc_is_i[n]   <= hit_i;
        ddc_data[n]   <= hit_i ? smp[n].i : smp[n].q;
        if (hit_q) last_sent[n] = smp[n];
      end
      @(posedge clk);
    end
    // No word falls in the last cycle, so the strobes are already low here.
  endtask

  int hi [2*NUM_RX], hq [2*NUM_RX];

  task automatic write_channels();
    for (int n = 0; n < 2 * NUM_RX; n++) begin
      real mag, ph;
      mag = 2000 + $urandom_range(0, 5000);
      ph  = $urandom_range(0, 6283) / 1000.0;
      hi[n] = $rtoi(mag * $cos(ph)); hq[n] = $rtoi(mag * $sin(ph));
      csi_wr_en <= 1; csi_wr_addr <= 3'(n); csi_wr_data <= '{i: 16'(hi[n]), q: 16'(hq[n])};
      @(posedge clk);
    end
    csi_wr_en <= 0;
    csi_commit <= 1; @(posedge clk); csi_commit <= 0;
  endtask

  function automatic int noise();
    int v;
    v = $urandom_range(0, 60);
    return v - 30;
  endfunction

  // One Alamouti block of M-PSK symbols: two symbol periods.
  task automatic data_block(input int m, input int cfg, input logic [NUM_RX-1:0] extra);
    int k0, k1;
    real c0, q0, c1, q1;
    iq_t a0 [NUM_RX], a1 [NUM_RX];
    int offs [NUM_RX];
    k0 = $urandom_range(0, m - 1); k1 = $urandom_range(0, m - 1);
    c0 = $cos(2.0 * 3.14159265358979 * k0 / m); q0 = $sin(2.0 * 3.14159265358979 * k0 / m);
    c1 = $cos(2.0 * 3.14159265358979 * k1 / m); q1 = $sin(2.0 * 3.14159265358979 * k1 / m);
    for (int n = 0; n < NUM_RX; n++) begin
      real ai, aq, bi, bq;
      ai = hi[2*n]; aq = hq[2*n]; bi = hi[2*n+1]; bq = hq[2*n+1];
      a0[n] = '{i: 16'($rtoi(ai*c0 - aq*q0 + bi*c1 - bq*q1) + noise()),
                q: 16'($rtoi(ai*q0 + aq*c0 + bi*q1 + bq*c1) + noise())};
      a1[n] = '{i: 16'($rtoi(-(ai*c1 + aq*q1) + bi*c0 + bq*q0) + noise()),
                q: 16'($rtoi(-(aq*c1 - ai*q1) + bq*c0 - bi*q0) + noise())};
      offs[n] = $urandom_range(0, period - 8);
    end
    // With an extra sample, receiver 0 pairs r(t) with a repeat of itself.
    k0_q.push_back(extra != 0 ? -1 : k0); k1_q.push_back(k1);
    mode_q.push_back((m == 2) ? 0 : (m == 4) ? 1 : 2);
    cfg_q.push_back(cfg);
    symbol_period(a0, '1, offs, extra);
    symbol_period(a1, '1, offs, '0);
  endtask

  initial begin
    logic [31:0] nco_start [NUM_RX];
    int deltas [NUM_RX];
    for (int n = 0; n < NUM_RX; n++) begin
      ddc_data[n] = '0; dsp_rd_addr[n] = 2'd2; n_nco_updates[n] = 0;
      last_sent[n] = '0; delta_cur[n] = 0;
    end
    for (int i = 0; i < 3; i++) begin n_mode[i] = 0; n_rxcfg[i] = 0; end
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // 1. Carrier sync preamble, decoder idle (no receiver enabled).
    nco_load <= '1; @(posedge clk); nco_load <= '0; @(posedge clk);
    deltas = '{600, -450, 150, -2000};
    for (int n = 0; n < NUM_RX; n++) begin
      delta_cur[n] = deltas[n];
      nco_start[n] = nco_freq[n];
    end
    cs_enable <= '1;
    for (int s = 0; s < 24; s++) begin
      iq_t smp [NUM_RX];
      int offs [NUM_RX];
      for (int n = 0; n < NUM_RX; n++) begin
        real ph;
        ph = 2.0 * 3.14159265358979 * (real'(deltas[n]) * s / 65536.0 + 0.1 * n);
        smp[n] = '{i: 16'($rtoi(15000.0 * $cos(ph))), q: 16'($rtoi(15000.0 * $sin(ph)))};
        offs[n] = n;
      end
      symbol_period(smp, '1, offs, '0);
    end
    repeat (period + 4) @(posedge clk);
    cs_enable <= '0;
    for (int n = 0; n < NUM_RX; n++) begin
      check(n_nco_updates[n] == 23, $sformatf("rx %0d: %0d NCO updates for 24 samples", n, n_nco_updates[n]));
      check(cs_dropped[n] == 0, "no preamble sample dropped at the symbol rate");
      check((deltas[n] > 0) ? (nco_freq[n] > nco_start[n]) : (nco_freq[n] < nco_start[n]),
            $sformatf("rx %0d NCO corrected in the right direction", n));
    end

    // 2. Channel estimates from the DSPs.
    write_channels();

    // 3. Data blocks in three receiver configurations and three PSK orders.
    for (int t = 0; t < 90; t++) begin
      int m, cfg;
      cfg = t / 30;
      m = (t % 3 == 0) ? 2 : (t % 3 == 1) ? 4 : 8;
      if (t % 30 == 0) begin
        rx_enable <= (cfg == 0) ? 4'b0001 : (cfg == 1) ? 4'b0011 : 4'b1111;
        if (t > 0) write_channels();
        block_sync <= 1; @(posedge clk); block_sync <= 0;
        n_syncs++;
      end
      psk_mode <= psk_mode_e'(t % 3);
      data_block(m, cfg, '0);
    end

    // 4. Receiver 0 delivers an extra sample: overrun, then block sync.
    data_block(4, 2, 4'b0001);
    repeat (2 * period) @(posedge clk);
    block_sync <= 1; @(posedge clk); block_sync <= 0;
    n_syncs++;
    for (int t = 0; t < 6; t++) begin
      psk_mode <= PSK_8;
      data_block(8, 2, '0);
    end
    repeat (4 * period) @(posedge clk);

    // 5. The same at 5 Mbaud: 13 clocks per symbol. A new preamble with other
    //    offsets, then 2x4 blocks in all PSK orders.
    period = 13;
    rx_enable <= '0;                 // decoder idle during the preamble
    deltas = '{-900, 300, 1200, -100};
    for (int n = 0; n < NUM_RX; n++) begin
      delta_cur[n] = deltas[n];
      nco_start[n] = nco_freq[n];
      n_nco_updates[n] = 0;
    end
    cs_enable <= '1;
    for (int s = 0; s < 24; s++) begin
      iq_t smp [NUM_RX];
      int offs [NUM_RX];
      for (int n = 0; n < NUM_RX; n++) begin
        real ph;
        ph = 2.0 * 3.14159265358979 * (real'(deltas[n]) * s / 65536.0 + 0.2 * n);
        smp[n] = '{i: 16'($rtoi(15000.0 * $cos(ph))), q: 16'($rtoi(15000.0 * $sin(ph)))};
        offs[n] = 2 * n;
      end
      symbol_period(smp, '1, offs, '0);
    end
    repeat (period + 4) @(posedge clk);
    cs_enable <= '0;
    for (int n = 0; n < NUM_RX; n++) begin
      check(n_nco_updates[n] == 23, $sformatf("5 Mbaud rx %0d: %0d NCO updates for 24 samples", n, n_nco_updates[n]));
      check(cs_dropped[n] == 0, "no preamble sample dropped at 5 Mbaud");
      check((deltas[n] > 0) ? (nco_freq[n] > nco_start[n]) : (nco_freq[n] < nco_start[n]),
            $sformatf("5 Mbaud rx %0d NCO corrected in the right direction", n));
    end
    rx_enable <= '1;
    block_sync <= 1; @(posedge clk); block_sync <= 0;
    n_syncs++;
    for (int t = 0; t < 30; t++) begin
      psk_mode <= psk_mode_e'(t % 3);
      data_block((t % 3 == 0) ? 2 : (t % 3 == 1) ? 4 : 8, 2, '0);
    end
    repeat (4 * period) @(posedge clk);

    // Every mechanism must have occurred.
    check(n_data_valid > 0, "Data_Valid pulses");
    check(n_commits >= 3, "channel estimate commits");
    check(n_overruns >= 1, "pair overrun");
    check(n_syncs >= 4, "block sync");
    for (int i = 0; i < 3; i++) begin
      check(n_mode[i] > 0, $sformatf("PSK mode %0d used", i));
      check(n_rxcfg[i] > 0, $sformatf("receiver configuration %0d used", i));
    end
    check(n_blocks == 127, $sformatf("%0d blocks decided, 127 sent", n_blocks));
    check(k0_q.size() == 0, "no block lost");
    $display("mechanisms: data_valid=%0d nco_updates=%0d/%0d/%0d/%0d commits=%0d overruns=%0d syncs=%0d blocks=%0d",
             n_data_valid, n_nco_updates[0], n_nco_updates[1], n_nco_updates[2], n_nco_updates[3],
             n_commits, n_overruns, n_syncs, n_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
