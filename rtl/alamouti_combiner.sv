// alamouti_combiner: Alamouti space-time combiner for two transmit antennas and
// NUM_RX receivers.
//
// For receiver n with channels ha = h[2n] (transmitter 0) and hb = h[2n+1]
// (transmitter 1) and received samples r0 = r(t), r1 = r(t+T):
//   s0~ += conj(ha)*r0 + hb*conj(r1)
//   s1~ += conj(hb)*r0 - ha*conj(r1)
// which leaves s0~ = (sum |h|^2) * s0 + noise and s1~ = (sum |h|^2) * s1 + noise,
// the receive-diversity form of the Alamouti combiner. Receivers not set in
// rx_enable add nothing. All products are kept at full precision: the outputs
// are S_W bits wide, enough for the worst-case sum.
//
// Interface and timing: one block per in_valid cycle, result registered,
// out_valid one cycle later. The combining equations follow the document; the
// full-precision widths and the single pipeline stage are choices of this design.
module alamouti_combiner
  import sasrats_pkg::*;
#(
  parameter int unsigned NUM_RX = 4,
  localparam int unsigned S_W = IQ_W + H_W + 1 + $clog2(2 * NUM_RX) + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_RX-1:0]     rx_enable,
  input  logic                  in_valid,
  input  iq_t                   r0        [NUM_RX],
  input  iq_t                   r1        [NUM_RX],
  input  h_t                    h         [2*NUM_RX],
  output logic                  out_valid,
  output logic signed [S_W-1:0] s0_i,
  output logic signed [S_W-1:0] s0_q,
  output logic signed [S_W-1:0] s1_i,
  output logic signed [S_W-1:0] s1_q
);

  logic signed [S_W-1:0] a0_i, a0_q, a1_i, a1_q;

  // Products widened to S_W before the multiply so no term overflows.
  function automatic logic signed [S_W-1:0] mul(input logic signed [15:0] a,
                                                input logic signed [15:0] b);
    mul = S_W'(a) * S_W'(b);
  endfunction

  always_comb begin
    a0_i = '0; a0_q = '0; a1_i = '0; a1_q = '0;
    for (int n = 0; n < NUM_RX; n++) begin
      if (rx_enable[n]) begin
        // conj(ha)*r0 + hb*conj(r1)
        a0_i += mul(h[2*n].i, r0[n].i) + mul(h[2*n].q, r0[n].q)
              + mul(h[2*n+1].i, r1[n].i) + mul(h[2*n+1].q, r1[n].q);
        a0_q += mul(h[2*n].i, r0[n].q) - mul(h[2*n].q, r0[n].i)
              + mul(h[2*n+1].q, r1[n].i) - mul(h[2*n+1].i, r1[n].q);
        // conj(hb)*r0 - ha*conj(r1)
        a1_i += mul(h[2*n+1].i, r0[n].i) + mul(h[2*n+1].q, r0[n].q)
              - mul(h[2*n].i, r1[n].i) - mul(h[2*n].q, r1[n].q);
        a1_q += mul(h[2*n+1].i, r0[n].q) - mul(h[2*n+1].q, r0[n].i)
              - mul(h[2*n].q, r1[n].i) + mul(h[2*n].i, r1[n].q);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      s0_i <= '0; s0_q <= '0; s1_i <= '0; s1_q <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        s0_i <= a0_i; s0_q <= a0_q; s1_i <= a1_i; s1_q <= a1_q;
      end
    end
  end

endmodule
