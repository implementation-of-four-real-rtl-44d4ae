// tb_carrier_sync: self-checking test of the carrier frequency offset loop.
// A phasor of amplitude 20000 rotating by a fixed binary angle per sample is
// fed one sample every 16 or 17 cycles (a 65 MHz clock at 4 Mbaud) or every
// 13 cycles (5 Mbaud). Checks: no NCO update for the first sample, then one
// update per sample with theta_f within 16 LSB of the rotation (two CORDIC
// angles of 8 LSB accuracy each), the NCO word moving by theta_f * loop_gain in
// the direction of the rotation; rotations of both signs, small and near pi;
// no sample dropped at the symbol rate; samples arriving too fast are counted
// as dropped; dropping enable restarts the loop; nco_load presets the word.
module tb_carrier_sync;
  import sasrats_pkg::*;

  logic clk = 0, rst_n = 1;
  logic enable = 0, iq_valid = 0, nco_load = 0;
  iq_t iq = '0;
  logic [15:0] loop_gain = 16'd3;
  logic [31:0] nco_init = 32'h1000_0000;
  logic [31:0] nco_freq;
  logic nco_update;
  logic signed [15:0] theta_f;
  logic [15:0] dropped;
  int checks = 0, failures = 0;
  int updates = 0;

  carrier_sync dut (.*);

  always #5 clk = ~clk;
  int cur_delta = 0;
  bit check_steps = 1;
  logic [31:0] nco_last = '0;

  // Checks every NCO update, half a cycle after it, against the rotation of
  // the preamble being sent.
  always @(negedge clk) begin
    if (nco_update && check_steps) begin
      updates++;
      check(theta_f - cur_delta <= 16 && cur_delta - theta_f <= 16,
            $sformatf("theta_f %0d for rotation %0d", theta_f, cur_delta));
      check(nco_freq == nco_last + 32'(int'(theta_f) * int'(loop_gain)), "NCO step = theta_f * gain");
      check((cur_delta > 0) ? (nco_freq > nco_last) : (nco_freq < nco_last), "NCO moves towards the carrier");
    end
    nco_last = nco_freq;
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

  task automatic sample(input real ph);
    iq <= '{i: 16'($rtoi(20000.0 * $cos(ph))), q: 16'($rtoi(20000.0 * $sin(ph)))};
    iq_valid <= 1;
    @(posedge clk);
    iq_valid <= 0;
  endtask

  // Runs one preamble of n samples rotating by delta (binary angle) per sample.
  task automatic preamble(input int delta, input int n, input int gap);
    real ph;
    ph = $urandom_range(0, 1000) / 1000.0 * 6.283;
    enable <= 1;
    cur_delta = delta;
    updates = 0;
    for (int s = 0; s < n; s++) begin
      sample(ph);
      ph += real'(delta) / 65536.0 * 2.0 * 3.14159265358979;
      repeat (gap - 1) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    check(updates == n - 1, $sformatf("%0d NCO updates for %0d samples", updates, n));
    @(posedge clk);
    enable <= 0;
    @(posedge clk);
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    nco_load <= 1; @(posedge clk); nco_load <= 0; @(posedge clk); #1;
    check(nco_freq == 32'h1000_0000, "nco_load presets the word");
    preamble(300, 20, 16);
    preamble(-1200, 20, 17);
    preamble(29000, 12, 16);     // close to +pi per sample, crosses pi
    preamble(-29000, 12, 17);
    preamble(40, 30, 16);
    check(dropped == 0, "no sample dropped at 16-17 cycles per sample");
    preamble(-700, 30, 13);      // 5 Mbaud at 65 MHz: 13 cycles per sample
    check(dropped == 0, "no sample dropped at 13 cycles per sample");
    // Too fast: one sample every 5 cycles.
    check_steps = 0;
    enable <= 1;
    for (int s = 0; s < 12; s++) begin sample(0.1 * s); repeat (4) @(posedge clk); end
    enable <= 0;
    repeat (20) @(posedge clk); #1;
    check(dropped > 0, "samples during a CORDIC run are counted as dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
