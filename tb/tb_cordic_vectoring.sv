// tb_cordic_vectoring: self-checking test of the vectoring CORDIC.
// Random vectors in all four quadrants (and the axes) are converted; the angle
// is compared with atan2 as a binary angle (tolerance 8 LSB of 2^16 per turn:
// the last micro-rotation of 12 is about 5 LSB, plus table rounding),
// the magnitude with 1.64676 * |v| (tolerance 0.2 % + 4), and done must come
// exactly ITER+1 cycles after start. Runs back to back, one start per result.
module tb_cordic_vectoring;
  import sasrats_pkg::*;
  localparam int ITER = 12;

  logic clk = 0, rst_n = 1, start = 0;
  logic signed [15:0] x_in = '0, y_in = '0;
  logic busy, done;
  logic [15:0] angle;
  logic [17:0] magnitude;
  int checks = 0, failures = 0;

  cordic_vectoring #(.IN_W(16), .ITER(ITER)) dut (.*);

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

  initial begin
    real ra, rm, err;
    int cyc;
    int xv, yv;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 500; t++) begin
      if (t < 4) begin
        xv = (t == 0) ? 20000 : (t == 2) ? -20000 : 0;
        yv = (t == 1) ? 20000 : (t == 3) ? -20000 : 0;
      end else begin
        do begin
          xv = $urandom_range(0, 65535) - 32768;
          yv = $urandom_range(0, 65535) - 32768;
        end while (xv * xv + yv * yv < 1000 * 1000);
      end
      x_in <= 16'(xv); y_in <= 16'(yv); start <= 1;
      @(posedge clk);
      start <= 0;
      cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (!done && cyc < 100);
      check(cyc == ITER, $sformatf("done %0d edges after the start edge, expected %0d", cyc, ITER));
      ra = $atan2(real'(yv), real'(xv)) / (2.0 * 3.14159265358979) * 65536.0;
      if (ra < 0) ra += 65536.0;
      err = real'(angle) - ra;
      if (err > 32768.0) err -= 65536.0;
      if (err < -32768.0) err += 65536.0;
      check(err < 8.0 && err > -8.0, $sformatf("angle of (%0d,%0d): got %0d want %f", xv, yv, angle, ra));
      rm = 1.6467602 * $sqrt(real'(xv) * real'(xv) + real'(yv) * real'(yv));
      err = real'(magnitude) - rm;
      check(err < rm * 0.002 + 4.0 && err > -(rm * 0.002 + 4.0),
            $sformatf("magnitude of (%0d,%0d): got %0d want %f", xv, yv, magnitude, rm));
      // The next start is applied while done is high (back to back).
      check(!busy, "idle when done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
