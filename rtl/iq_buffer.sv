// iq_buffer: receiver-side capture of the down converter's baseband output.
//
// The digital down converter delivers one complex sample as two consecutive
// 16-bit words on one parallel bus, in-phase first and quadrature second. This
// block holds the I word, and when the Q word arrives it latches the pair into
// two 32-bit buffers at once: buffer A is read by the synchronisation DSP over a
// small memory-mapped port, buffer B drives a parallel 32-bit output for the
// decoder FPGA or a data acquisition card. One clock after the latch it pulses
// data_valid, which is the DSP's interrupt request.
//
// Interface and timing:
//   ddc_strobe/ddc_is_i/ddc_data : one word per strobe cycle; ddc_is_i marks I.
//   A Q word that does not follow an I word is ignored (the pair is incomplete).
//   data_valid is high for one cycle, in the first cycle the buffers show the
//   new sample. rd_addr selects what rd_data returns from buffer A
//   (combinational): RD_I = I sign-extended, RD_Q = Q sign-extended,
//   RD_IQ = {I, Q} as one 32-bit word.
// The two 32-bit buffers, the Data_Valid pulse and the I/Q/pair addressing follow
// the document; the word-order flag, the address map and the sign extension of
// single words are choices of this design.
module iq_buffer
  import sasrats_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ddc_strobe,
  input  logic                  ddc_is_i,
  input  logic signed [IQ_W-1:0] ddc_data,
  output logic                  data_valid,
  output iq_t                   iq_out,     // buffer B, parallel output
  input  logic [1:0]            rd_addr,
  output logic [2*IQ_W-1:0]     rd_data     // buffer A, memory-mapped read
);

  localparam logic [1:0] RD_I  = 2'd0;
  localparam logic [1:0] RD_Q  = 2'd1;
  localparam logic [1:0] RD_IQ = 2'd2;

  logic signed [IQ_W-1:0] i_hold;
  logic                   i_seen;
  iq_t                    buf_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_hold     <= '0;
      i_seen     <= 1'b0;
      buf_a      <= '0;
      iq_out     <= '0;
      data_valid <= 1'b0;
    end else begin
      data_valid <= 1'b0;
      if (ddc_strobe) begin
        if (ddc_is_i) begin
          i_hold <= ddc_data;
          i_seen <= 1'b1;
        end else if (i_seen) begin
          buf_a      <= '{i: i_hold, q: ddc_data};
          iq_out     <= '{i: i_hold, q: ddc_data};
          i_seen     <= 1'b0;
          data_valid <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    unique case (rd_addr)
      RD_I:    rd_data = {{IQ_W{buf_a.i[IQ_W-1]}}, buf_a.i};
      RD_Q:    rd_data = {{IQ_W{buf_a.q[IQ_W-1]}}, buf_a.q};
      RD_IQ:   rd_data = buf_a;
      default: rd_data = '0;
    endcase
  end

  // Data_Valid is a single-cycle pulse: a new sample needs at least two words.
  a_valid_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    data_valid |=> !data_valid);

endmodule
