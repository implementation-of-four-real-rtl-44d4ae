// tb_ml_detector: self-checking test of the maximum-likelihood PSK detector.
// For each PSK order and random receiver masks and channels, the combined
// signals are set to E * exp(j*2*pi*k/M) plus noise smaller than half the
// distance between points, and the detector must return k; fully random inputs
// are compared with a 128-bit reference search for the least squared distance.
// out_valid must follow in_valid by two cycles, with back-to-back inputs.
module tb_ml_detector;
  import sasrats_pkg::*;
  localparam int NUM_RX = 4;
  localparam int S_W = 37;

  logic clk = 0, rst_n = 1, in_valid = 0;
  logic [NUM_RX-1:0] rx_enable = '0;
  psk_mode_e psk_mode = PSK_4;
  h_t h [2*NUM_RX];
  logic signed [S_W-1:0] s0_i = '0, s0_q = '0, s1_i = '0, s1_q = '0;
  logic out_valid;
  logic [2:0] s0_hat, s1_hat;
  int checks = 0, failures = 0;

  ml_detector #(.NUM_RX(NUM_RX)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint energy_ref();
    longint e = 0;
    for (int n = 0; n < 2 * NUM_RX; n++)
      if (rx_enable[n/2]) e += longint'(h[n].i) * h[n].i + longint'(h[n].q) * h[n].q;
    return e;
  endfunction

  // Index of the nearest of the M points E*exp(j*2*pi*k/M), Q1.14 rounded.
  function automatic int nearest(input longint e, input int m, input longint si, input longint sq);
    logic signed [127:0] best, d, di, dq;
    int bk = 0;
    for (int k = 0; k < m; k++) begin
      real a;
      longint ci, cq, pi, pq;
      a  = 2.0 * 3.14159265358979 * k / m;
      ci = longint'($floor(16384.0 * $cos(a) + 0.5));
      cq = longint'($floor(16384.0 * $sin(a) + 0.5));
      pi = (e * ci) >>> 14;
      pq = (e * cq) >>> 14;
      di = 128'(si - pi); dq = 128'(sq - pq);
      d  = di * di + dq * dq;
      if (k == 0 || d < best) begin best = d; bk = k; end
    end
    return bk;
  endfunction

  int exp0 [$];
  int exp1 [$];
  int issued = 0, got = 0;

  // Results arrive two cycles after their inputs; compared in order.
  always @(negedge clk) if (out_valid) begin
    int a, b;
    a = exp0.pop_front(); b = exp1.pop_front();
    got++;
    check(s0_hat == 3'(a), $sformatf("s0_hat %0d expected %0d", s0_hat, a));
    check(s1_hat == 3'(b), $sformatf("s1_hat %0d expected %0d", s1_hat, b));
  end

  initial begin
    int m, k0, k1, lat, n0, n1, last0, last1;
    longint e;
    real amp, a0, a1;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 3000; t++) begin
      psk_mode <= psk_mode_e'(t % 3);
      m = (t % 3 == 0) ? 2 : (t % 3 == 1) ? 4 : 8;
      rx_enable <= 4'($urandom_range(1, 15));
      for (int n = 0; n < 2 * NUM_RX; n++)
        h[n] <= '{i: 16'($urandom_range(0, 40000) - 20000), q: 16'($urandom_range(0, 40000) - 20000)};
      #1;
      e = energy_ref();
      if (t % 2 == 0) begin
        // Point plus noise below half the minimum distance.
        k0 = $urandom_range(0, m - 1); k1 = $urandom_range(0, m - 1);
        amp = real'(e);
        n0 = $urandom_range(0, 200); n0 -= 100;
        n1 = $urandom_range(0, 200); n1 -= 100;
        a0 = 2.0 * 3.14159265358979 * k0 / m + n0 / 100.0 * 0.3 * 3.14159265 / m;
        a1 = 2.0 * 3.14159265358979 * k1 / m + n1 / 100.0 * 0.3 * 3.14159265 / m;
        s0_i <= S_W'(longint'(amp * $cos(a0))); s0_q <= S_W'(longint'(amp * $sin(a0)));
        s1_i <= S_W'(longint'(amp * 0.7 * $cos(a1))); s1_q <= S_W'(longint'(amp * 0.7 * $sin(a1)));
        exp0.push_back(k0); exp1.push_back(k1);
      end else begin
        longint a, b, c, d;
        a = longint'($urandom) % 34359738368; b = longint'($urandom) % 34359738368;
        c = longint'($urandom) << 3; d = -(longint'($urandom) << 2);
        s0_i <= S_W'(a); s0_q <= S_W'(b); s1_i <= S_W'(c); s1_q <= S_W'(d);
        #0;
        exp0.push_back(nearest(e, m, longint'(S_W'(a)) , longint'(S_W'(b))));
        exp1.push_back(nearest(e, m, c, d));
      end
      last0 = exp0[$]; last1 = exp1[$];
      in_valid <= 1;
      issued++;
      @(posedge clk);
      in_valid <= 0;
      // Latency check on some inputs: wait for the result.
      if (t % 7 == 0) begin
        // Let the previous result leave first.
        repeat (3) @(posedge clk);
        in_valid <= 1;
        issued++;
        exp0.push_back(last0); exp1.push_back(last1);
        @(posedge clk);
        in_valid <= 0;
        lat = 0;
        do begin @(posedge clk); #1; lat++; end while (!out_valid && lat < 10);
        check(lat == 1, $sformatf("out_valid %0d edges after the input edge, expected 1 (two cycles after in_valid)", lat));
        @(negedge clk);
        @(posedge clk);
      end else if (t % 3 == 2) @(posedge clk);
    end
    repeat (5) @(posedge clk);
    check(got == issued, "one result per input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
