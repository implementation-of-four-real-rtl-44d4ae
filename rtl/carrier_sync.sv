// carrier_sync: carrier frequency offset compensation loop for one receiver.
//
// During the carrier sync preamble (enable high) every new baseband sample
// (iq_valid, the buffer's Data_Valid pulse) is converted to a phase angle by a
// CORDIC. The first sample only stores its phase. For each later sample the
// phase difference to the previous sample is taken modulo 2*pi and read as a
// signed angle in [-pi, pi): that is the carrier rotation per sample period.
// A positive difference means the NCO runs below the transmitter carrier, so the
// NCO tuning word is raised by the difference times loop_gain; a negative one
// lowers it by the same scaled amount. The new phase then becomes the previous
// phase and the loop waits for the next sample.
//
// Interface and timing: nco_freq is the NCO tuning word; nco_update pulses for
// one cycle when it has changed (the write to the down converter's NCO).
// theta_f holds the last signed phase difference. A sample arriving while the
// CORDIC is busy is dropped and counted in dropped. nco_load copies nco_init into
// nco_freq. Each sample takes ITER+1 cycles in the CORDIC, plus one cycle to
// update the NCO word, which overlaps the next sample's CORDIC run.
// The sequence of steps follows the document's flow chart. Taking the
// difference as a wrap-around binary-angle subtraction is this design's reading
// of "modulo 2*pi"; it gives the chart's results when the phase crosses zero and
// also handles a crossing at pi. The loop gain scaling is this design's choice.
module carrier_sync
  import sasrats_pkg::*;
#(
  parameter int unsigned ITER = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,     // carrier sync preamble window
  input  logic                     iq_valid,   // Data_Valid / interrupt request
  input  iq_t                      iq,
  input  logic [15:0]              loop_gain,  // NCO word steps per angle LSB
  input  logic                     nco_load,
  input  logic [NCO_W-1:0]         nco_init,
  output logic [NCO_W-1:0]         nco_freq,
  output logic                     nco_update,
  output logic signed [ANGLE_W-1:0] theta_f,
  output logic [15:0]              dropped
);

  logic                 c_busy, c_done;
  logic [ANGLE_W-1:0]   c_angle;
  logic [IQ_W+1:0]      c_mag;
  logic                 start;
  logic                 have_prev;
  logic [ANGLE_W-1:0]   theta_prev;
  logic signed [ANGLE_W-1:0] diff;
  logic signed [NCO_W-1:0]   step;

  assign start = enable && iq_valid && !c_busy;

  cordic_vectoring #(.IN_W(IQ_W), .ITER(ITER)) u_cordic (
    .clk, .rst_n, .start,
    .x_in(iq.i), .y_in(iq.q),
    .busy(c_busy), .done(c_done), .angle(c_angle), .magnitude(c_mag)
  );

  // Modulo-2*pi difference of binary angles, read as a signed rotation.
  assign diff = signed'(c_angle - theta_prev);
  assign step = NCO_W'(diff) * signed'({1'b0, loop_gain});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_prev  <= 1'b0;
      theta_prev <= '0;
      theta_f    <= '0;
      nco_freq   <= '0;
      nco_update <= 1'b0;
      dropped    <= '0;
    end else begin
      nco_update <= 1'b0;
      if (enable && iq_valid && c_busy)
        dropped <= dropped + 16'd1;
      if (nco_load) begin
        nco_freq <= nco_init;
      end else if (c_done && enable) begin
        theta_prev <= c_angle;
        have_prev  <= 1'b1;
        if (have_prev) begin
          theta_f    <= diff;
          nco_freq   <= nco_freq + step;
          nco_update <= 1'b1;
        end
      end
      if (!enable)
        have_prev <= 1'b0;
    end
  end

  // The NCO word changes only through an update or a preset.
  a_nco_stable: assert property (@(posedge clk) disable iff (!rst_n)
    !nco_update && !$past(nco_load) |-> $stable(nco_freq));

endmodule
