// cordic_vectoring: iterative shift-add CORDIC in vectoring mode, converting a
// complex sample (x + jy) to its phase angle modulo 2*pi and its magnitude.
//
// How it works: the vector is first brought into the right half plane (a
// rotation by pi when x < 0), then ITER micro-rotations by +-atan(2^-k) drive y
// towards zero, one per clock, while the angle register accumulates the
// rotations applied. The angle is a binary angle (2^ANGLE_W = one turn) so the
// result is already reduced modulo 2*pi. The magnitude carries the usual CORDIC
// gain of about 1.6468 and is two bits wider than the input. The datapath
// carries four fraction bits so that short vectors keep their angle accuracy.
//
// Interface and timing: start is accepted when busy is low. done pulses for one
// cycle ITER+1 clocks after the start cycle's edge, with angle and magnitude
// valid from then until the next start. A start in the cycle done is high is
// accepted (back-to-back operation, one result per ITER+1 cycles).
// The document names the CORDIC algorithm for the rectangular-to-polar step;
// the iteration count, widths and the pre-rotation are choices of this design.
// The arctangent table is round(atan(2^-k) / (2*pi) * 2^16).
module cordic_vectoring
  import sasrats_pkg::*;
#(
  parameter int unsigned IN_W = IQ_W,
  parameter int unsigned ITER = 12
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic signed [IN_W-1:0] x_in,
  input  logic signed [IN_W-1:0] y_in,
  output logic                   busy,
  output logic                   done,
  output logic [ANGLE_W-1:0]     angle,
  output logic [IN_W+1:0]        magnitude
);

  // Two integer bits for the CORDIC gain, GUARD fraction bits against the
  // rounding of the shifted terms.
  localparam int unsigned GUARD = 4;
  localparam int unsigned W = IN_W + 2 + GUARD;

  function automatic logic [ANGLE_W-1:0] atan_tab(input logic [4:0] k);
    unique case (k)
      5'd0:  atan_tab = 16'd8192;
      5'd1:  atan_tab = 16'd4836;
      5'd2:  atan_tab = 16'd2555;
      5'd3:  atan_tab = 16'd1297;
      5'd4:  atan_tab = 16'd651;
      5'd5:  atan_tab = 16'd326;
      5'd6:  atan_tab = 16'd163;
      5'd7:  atan_tab = 16'd81;
      5'd8:  atan_tab = 16'd41;
      5'd9:  atan_tab = 16'd20;
      5'd10: atan_tab = 16'd10;
      5'd11: atan_tab = 16'd5;
      5'd12: atan_tab = 16'd3;
      5'd13: atan_tab = 16'd1;
      5'd14: atan_tab = 16'd1;
      default: atan_tab = 16'd0;
    endcase
  endfunction

  logic signed [W-1:0]  xr, yr;
  logic [ANGLE_W-1:0]   zr;
  logic [4:0]           k;

  logic signed [W-1:0]  x_ext, y_ext;
  assign x_ext = W'(x_in) <<< GUARD;
  assign y_ext = W'(y_in) <<< GUARD;

  logic signed [W-1:0]  x_sh, y_sh;
  assign x_sh = xr >>> k;
  assign y_sh = yr >>> k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr   <= '0;
      yr   <= '0;
      zr   <= '0;
      k    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        // Pre-rotation into the right half plane.
        if (x_in < 0) begin
          xr <= -x_ext;
          yr <= -y_ext;
          zr <= ANGLE_W'(1) << (ANGLE_W - 1);
        end else begin
          xr <= x_ext;
          yr <= y_ext;
          zr <= '0;
        end
        k    <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (yr >= 0) begin
          xr <= xr + y_sh;
          yr <= yr - x_sh;
          zr <= zr + atan_tab(k);
        end else begin
          xr <= xr - y_sh;
          yr <= yr + x_sh;
          zr <= zr - atan_tab(k);
        end
        k <= k + 5'd1;
        if (k == 5'(ITER - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign angle     = zr;
  assign magnitude = (IN_W+2)'(xr >>> GUARD);

  initial assert (ITER >= 1 && ITER <= 16) else $error("ITER must be 1..16");

  // A result is announced only once the iterations have stopped.
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);

endmodule
