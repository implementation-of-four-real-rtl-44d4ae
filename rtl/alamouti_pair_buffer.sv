// alamouti_pair_buffer: gathers one Alamouti block, r(t) and r(t+T), from every
// enabled receiver.
//
// The two-transmitter Alamouti code spreads each symbol pair over two symbol
// periods, so the combiner needs the samples r0 = r(t) and r1 = r(t+T) of each
// receiver together. Each receiver has a phase bit: its first sample after a
// block boundary is stored as r0, its second as r1. When every receiver in
// rx_enable holds both samples, pair_valid pulses for one cycle with all of them
// and the buffer starts the next block. block_sync (the receivers' symbol sync)
// marks a block boundary: it clears all partial blocks, and a sample arriving in
// the same cycle is taken as r(t) of the new block. A receiver whose block is
// complete while others still lag drops any further sample and raises overrun
// for one cycle.
//
// Timing: the last missing sample is stored at one clock edge, and at the next
// edge the block is copied to the r0/r1 outputs and pair_valid rises; the
// outputs then hold until the following block is handed over.
// The r0/r1 pairing follows the document's Alamouti equations; the sync input,
// the enable mask and the overrun rule are choices of this design.
module alamouti_pair_buffer
  import sasrats_pkg::*;
#(
  parameter int unsigned NUM_RX = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_RX-1:0] rx_enable,
  input  logic              block_sync,
  input  logic [NUM_RX-1:0] rx_valid,
  input  iq_t               rx_iq    [NUM_RX],
  output logic              pair_valid,
  output iq_t               r0       [NUM_RX],
  output iq_t               r1       [NUM_RX],
  output logic              overrun
);

  iq_t               s0 [NUM_RX];
  iq_t               s1 [NUM_RX];
  logic [NUM_RX-1:0] have0, have1;
  logic [NUM_RX-1:0] complete;
  logic              all_done;

  assign complete = have1 | ~rx_enable;
  assign all_done = (&complete) && (|rx_enable);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have0      <= '0;
      have1      <= '0;
      pair_valid <= 1'b0;
      overrun    <= 1'b0;
      for (int n = 0; n < NUM_RX; n++) begin
        s0[n] <= '0;
        s1[n] <= '0;
        r0[n] <= '0;
        r1[n] <= '0;
      end
    end else begin
      pair_valid <= 1'b0;
      overrun    <= 1'b0;
      if (block_sync) begin
        have0 <= '0;
        have1 <= '0;
        for (int n = 0; n < NUM_RX; n++) begin
          if (rx_valid[n] && rx_enable[n]) begin
            s0[n]    <= rx_iq[n];
            have0[n] <= 1'b1;
          end
        end
      end else if (all_done) begin
        // Hand the block over; a sample arriving now opens the next block.
        pair_valid <= 1'b1;
        have1      <= '0;
        have0      <= '0;
        for (int n = 0; n < NUM_RX; n++) begin
          r0[n] <= s0[n];
          r1[n] <= s1[n];
          if (rx_valid[n] && rx_enable[n]) begin
            s0[n]    <= rx_iq[n];
            have0[n] <= 1'b1;
          end
        end
      end else begin
        for (int n = 0; n < NUM_RX; n++) begin
          if (rx_valid[n] && rx_enable[n]) begin
            if (have1[n]) begin
              overrun <= 1'b1;
            end else if (have0[n]) begin
              s1[n]    <= rx_iq[n];
              have1[n] <= 1'b1;
            end else begin
              s0[n]    <= rx_iq[n];
              have0[n] <= 1'b1;
            end
          end
        end
      end
    end
  end

  // A block is only handed over when some receiver takes part.
  a_pair_enabled: assert property (@(posedge clk) disable iff (!rst_n)
    pair_valid |-> $past(|rx_enable));

endmodule
