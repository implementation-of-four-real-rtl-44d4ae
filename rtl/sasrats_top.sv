// sasrats_top: digital baseband of the four-receiver software defined radio
// with its space-time decoder.
//
// Each of the NUM_RX receivers has a digital down converter (outside this
// design) whose sequential 16-bit I and Q words enter here. Per receiver an
// iq_buffer assembles them into a complex sample, pulses Data_Valid and offers
// the sample to the receiver's DSP on a small read port; a carrier_sync loop
// tracks the carrier rotation of the sync preamble and produces the NCO tuning
// word for the down converter. The second copy of every buffered sample goes to
// the space-time decoder (st_decoder), which groups, combines and detects the
// Alamouti-coded symbols and outputs the decided symbol pairs.
//
// Parts outside: analog down converters, ADCs, down converters with their
// NCOs, the sample-clock synthesizers and the DSPs (symbol timing recovery and
// channel estimation run there). Their connections are this module's ports:
// DSP read port, NCO word outputs, channel estimate write bus and block sync.
// Everything runs on one clock (the sample clock); inputs from other clock
// domains are assumed synchronised before they arrive.
module sasrats_top
  import sasrats_pkg::*;
#(
  parameter int unsigned NUM_RX = 4,
  parameter int unsigned CORDIC_ITER = 12,
  localparam int unsigned NUM_CH = 2 * NUM_RX,
  localparam int unsigned AW = $clog2(NUM_CH),
  localparam int unsigned S_W = IQ_W + H_W + 1 + $clog2(2 * NUM_RX) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // Down converter outputs, one bus per receiver
  input  logic [NUM_RX-1:0]      ddc_strobe,
  input  logic [NUM_RX-1:0]      ddc_is_i,
  input  logic signed [IQ_W-1:0] ddc_data     [NUM_RX],
  // Per receiver DSP side: interrupt, sample read port
  output logic [NUM_RX-1:0]      data_valid,
  input  logic [1:0]             dsp_rd_addr  [NUM_RX],
  output logic [2*IQ_W-1:0]      dsp_rd_data  [NUM_RX],
  // Parallel 32-bit sample outputs (acquisition card)
  output iq_t                    iq_out       [NUM_RX],
  // Carrier synchronisation, per receiver
  input  logic [NUM_RX-1:0]      cs_enable,
  input  logic [15:0]            cs_loop_gain,
  input  logic [NUM_RX-1:0]      nco_load,
  input  logic [NCO_W-1:0]       nco_init,
  output logic [NCO_W-1:0]       nco_freq     [NUM_RX],
  output logic [NUM_RX-1:0]      nco_update,
  output logic [15:0]            cs_dropped   [NUM_RX],
  output logic signed [ANGLE_W-1:0] cs_theta_f [NUM_RX],
  // Space-time decoder control
  input  logic [NUM_RX-1:0]      rx_enable,
  input  psk_mode_e              psk_mode,
  input  logic                   block_sync,
  input  logic                   csi_wr_en,
  input  logic [AW-1:0]          csi_wr_addr,
  input  h_t                     csi_wr_data,
  input  logic                   csi_commit,
  output logic                   csi_updated,
  output logic                   pair_overrun,
  // Decoder data output
  output logic                   soft_valid,
  output logic signed [S_W-1:0]  s0_soft_i,
  output logic signed [S_W-1:0]  s0_soft_q,
  output logic signed [S_W-1:0]  s1_soft_i,
  output logic signed [S_W-1:0]  s1_soft_q,
  output logic                   sym_valid,
  output logic [2:0]             s0_hat,
  output logic [2:0]             s1_hat
);

  iq_t buf_iq [NUM_RX];

  for (genvar n = 0; n < NUM_RX; n++) begin : g_rx
    iq_buffer u_buf (
      .clk, .rst_n,
      .ddc_strobe(ddc_strobe[n]), .ddc_is_i(ddc_is_i[n]), .ddc_data(ddc_data[n]),
      .data_valid(data_valid[n]), .iq_out(buf_iq[n]),
      .rd_addr(dsp_rd_addr[n]), .rd_data(dsp_rd_data[n])
    );

    carrier_sync #(.ITER(CORDIC_ITER)) u_cs (
      .clk, .rst_n,
      .enable(cs_enable[n]), .iq_valid(data_valid[n]), .iq(buf_iq[n]),
      .loop_gain(cs_loop_gain), .nco_load(nco_load[n]), .nco_init,
      .nco_freq(nco_freq[n]), .nco_update(nco_update[n]),
      .theta_f(cs_theta_f[n]), .dropped(cs_dropped[n])
    );
  end

  assign iq_out = buf_iq;

  st_decoder #(.NUM_RX(NUM_RX)) u_dec (
    .clk, .rst_n, .rx_enable, .psk_mode, .block_sync,
    .rx_valid(data_valid), .rx_iq(buf_iq),
    .csi_wr_en, .csi_wr_addr, .csi_wr_data, .csi_commit, .csi_updated,
    .pair_overrun,
    .soft_valid, .s0_soft_i, .s0_soft_q, .s1_soft_i, .s1_soft_q,
    .sym_valid, .s0_hat, .s1_hat
  );

endmodule
