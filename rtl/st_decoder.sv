// st_decoder: the space-time decoder placed in the FPGA.
//
// Baseband samples of up to NUM_RX receivers (each with its Data_Valid strobe)
// are grouped into Alamouti blocks r(t), r(t+T) per receiver, combined with the
// channel estimates written by the receivers' DSPs, and passed to the
// maximum-likelihood detector, which outputs the two decided symbols of each
// block. rx_enable selects the receivers taking part (one receiver for a
// two-transmitter, one-receiver decoder, two for 2x2, up to four); psk_mode
// selects 2-, 4- or 8-PSK.
//
// Pipeline: pair buffer (block complete -> pair_valid), combiner (1 cycle),
// detector (2 cycles). The channel estimates, the enable mask and the PSK mode
// in force when a block is handed to the combiner are held for the detector, so
// a commit of new estimates or a mode change right after a block cannot mix old
// and new settings within that block.
// sym_valid pulses once per block with s0_hat, s1_hat; the combiner outputs are
// brought out as soft values. Structure (combiner feeding the ML detector, both
// using the channel state) follows the document; the block boundary input, the
// estimate write bus and the modes are this design's choices.
module st_decoder
  import sasrats_pkg::*;
#(
  parameter int unsigned NUM_RX = 4,
  localparam int unsigned NUM_CH = 2 * NUM_RX,
  localparam int unsigned AW = $clog2(NUM_CH),
  localparam int unsigned S_W = IQ_W + H_W + 1 + $clog2(2 * NUM_RX) + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_RX-1:0]     rx_enable,
  input  psk_mode_e             psk_mode,
  input  logic                  block_sync,
  input  logic [NUM_RX-1:0]     rx_valid,
  input  iq_t                   rx_iq      [NUM_RX],
  input  logic                  csi_wr_en,
  input  logic [AW-1:0]         csi_wr_addr,
  input  h_t                    csi_wr_data,
  input  logic                  csi_commit,
  output logic                  csi_updated,
  output logic                  pair_overrun,
  output logic                  soft_valid,
  output logic signed [S_W-1:0] s0_soft_i,
  output logic signed [S_W-1:0] s0_soft_q,
  output logic signed [S_W-1:0] s1_soft_i,
  output logic signed [S_W-1:0] s1_soft_q,
  output logic                  sym_valid,
  output logic [2:0]            s0_hat,
  output logic [2:0]            s1_hat
);

  logic      pair_valid;
  iq_t       r0 [NUM_RX];
  iq_t       r1 [NUM_RX];
  h_t        h    [NUM_CH];
  h_t        h_d  [NUM_CH];
  logic [NUM_RX-1:0] en_d;
  psk_mode_e         mode_d;

  alamouti_pair_buffer #(.NUM_RX(NUM_RX)) u_pair (
    .clk, .rst_n, .rx_enable, .block_sync, .rx_valid, .rx_iq,
    .pair_valid, .r0, .r1, .overrun(pair_overrun)
  );

  csi_regs #(.NUM_CH(NUM_CH)) u_csi (
    .clk, .rst_n,
    .wr_en(csi_wr_en), .wr_addr(csi_wr_addr), .wr_data(csi_wr_data),
    .commit(csi_commit), .h, .updated(csi_updated)
  );

  alamouti_combiner #(.NUM_RX(NUM_RX)) u_comb (
    .clk, .rst_n, .rx_enable,
    .in_valid(pair_valid), .r0, .r1, .h,
    .out_valid(soft_valid),
    .s0_i(s0_soft_i), .s0_q(s0_soft_q), .s1_i(s1_soft_i), .s1_q(s1_soft_q)
  );

  // Channel state and mask that went with the block now leaving the combiner.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_d   <= '0;
      mode_d <= PSK_2;
      for (int n = 0; n < NUM_CH; n++) h_d[n] <= '0;
    end else if (pair_valid) begin
      en_d   <= rx_enable;
      mode_d <= psk_mode;
      for (int n = 0; n < NUM_CH; n++) h_d[n] <= h[n];
    end
  end

  ml_detector #(.NUM_RX(NUM_RX)) u_ml (
    .clk, .rst_n, .rx_enable(en_d), .psk_mode(mode_d), .h(h_d),
    .in_valid(soft_valid),
    .s0_i(s0_soft_i), .s0_q(s0_soft_q), .s1_i(s1_soft_i), .s1_q(s1_soft_q),
    .out_valid(sym_valid), .s0_hat, .s1_hat
  );

endmodule
