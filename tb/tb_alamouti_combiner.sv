// tb_alamouti_combiner: self-checking test of the Alamouti combiner.
// Random full-scale samples and channels with random receiver masks are
// compared with a reference computed here in 64-bit integers from the
// combining equations; out_valid must follow in_valid by one cycle. A second
// part encodes known symbols through known channels without noise and checks
// that s~ equals (sum |h|^2) * s exactly.
module tb_alamouti_combiner;
  import sasrats_pkg::*;
  localparam int NUM_RX = 4;
  localparam int S_W = 37;

  logic clk = 0, rst_n = 1, in_valid = 0;
  logic [NUM_RX-1:0] rx_enable = '0;
  iq_t r0 [NUM_RX];
  iq_t r1 [NUM_RX];
  h_t  h  [2*NUM_RX];
  logic out_valid;
  logic signed [S_W-1:0] s0_i, s0_q, s1_i, s1_q;
  int checks = 0, failures = 0;

  alamouti_combiner #(.NUM_RX(NUM_RX)) dut (.*);

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

  longint e0i, e0q, e1i, e1q;

  task automatic reference();
    longint hai, haq, hbi, hbq, a0i, a0q, a1i, a1q;
    e0i = 0; e0q = 0; e1i = 0; e1q = 0;
    for (int n = 0; n < NUM_RX; n++) if (rx_enable[n]) begin
      hai = h[2*n].i; haq = h[2*n].q; hbi = h[2*n+1].i; hbq = h[2*n+1].q;
      a0i = r0[n].i; a0q = r0[n].q; a1i = r1[n].i; a1q = r1[n].q;
      // conj(ha) r0 + hb conj(r1)
      e0i += hai * a0i + haq * a0q + hbi * a1i + hbq * a1q;
      e0q += hai * a0q - haq * a0i + hbq * a1i - hbi * a1q;
      // conj(hb) r0 - ha conj(r1)
      e1i += hbi * a0i + hbq * a0q - (hai * a1i + haq * a1q);
      e1q += hbi * a0q - hbq * a0i - (haq * a1i - hai * a1q);
    end
  endtask

  function automatic logic signed [15:0] rnd16(input bit extreme);
    if (extreme) return ($urandom_range(0, 1) != 0) ? 16'sh8000 : 16'sh7fff;
    return 16'($urandom);
  endfunction

  initial begin
    longint en;
    int s0i, s0q, s1i, s1q;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 3000; t++) begin
      bit ext;
      ext = (t < 50);
      rx_enable = (t < 50) ? 4'b1111 : 4'($urandom_range(1, 15));
      for (int n = 0; n < NUM_RX; n++) begin
        r0[n] = '{i: rnd16(ext), q: rnd16(ext)};
        r1[n] = '{i: rnd16(ext), q: rnd16(ext)};
        h[2*n]   = '{i: rnd16(ext), q: rnd16(ext)};
        h[2*n+1] = '{i: rnd16(ext), q: rnd16(ext)};
      end
      in_valid = 1;
      reference();
      @(posedge clk); #1;
      in_valid = 0;
      check(out_valid, "out_valid one cycle after in_valid");
      check(longint'(s0_i) == e0i && longint'(s0_q) == e0q, "s0~");
      check(longint'(s1_i) == e1i && longint'(s1_q) == e1q, "s1~");
      @(posedge clk); #1;
      check(!out_valid, "out_valid is one pulse");
    end
    // Noise-free Alamouti transmission: r(t) = ha s0 + hb s1,
    // r(t+T) = -ha conj(s1) + hb conj(s0).
    for (int t = 0; t < 500; t++) begin
      rx_enable = 4'($urandom_range(1, 15));
      s0i = $urandom_range(0, 200) - 100; s0q = $urandom_range(0, 200) - 100;
      s1i = $urandom_range(0, 200) - 100; s1q = $urandom_range(0, 200) - 100;
      en = 0;
      for (int n = 0; n < 2 * NUM_RX; n++) begin
        h[n] = '{i: 16'($urandom_range(0, 200) - 100), q: 16'($urandom_range(0, 200) - 100)};
        if (rx_enable[n/2]) en += longint'(h[n].i) * h[n].i + longint'(h[n].q) * h[n].q;
      end
      for (int n = 0; n < NUM_RX; n++) begin
        int ai, aq, bi, bq;
        ai = h[2*n].i; aq = h[2*n].q; bi = h[2*n+1].i; bq = h[2*n+1].q;
        r0[n] = '{i: 16'(ai*s0i - aq*s0q + bi*s1i - bq*s1q), q: 16'(ai*s0q + aq*s0i + bi*s1q + bq*s1i)};
        // -ha conj(s1) + hb conj(s0)
        r1[n] = '{i: 16'(-(ai*s1i + aq*s1q) + bi*s0i + bq*s0q), q: 16'(-(aq*s1i - ai*s1q) + bq*s0i - bi*s0q)};
      end
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      check(longint'(s0_i) == en * s0i && longint'(s0_q) == en * s0q, "noise-free s0~ = E s0");
      check(longint'(s1_i) == en * s1i && longint'(s1_q) == en * s1q, "noise-free s1~ = E s1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
