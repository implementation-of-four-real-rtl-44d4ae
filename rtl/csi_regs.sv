// csi_regs: channel state information registers of the space-time decoder.
//
// Each receiver's DSP estimates two channels, one from each transmit antenna:
// receiver n sees h[2n] from transmitter 0 and h[2n+1] from transmitter 1
// (h0, h1 at the first receiver, h2, h3 at the second, and so on). The DSPs
// write their estimates one complex word at a time into a shadow bank; a commit
// strobe copies the whole shadow bank into the active bank that feeds the
// combiner and the detector, so a decode never mixes old and new estimates.
//
// Interface and timing: a write (wr_en, wr_addr = channel index, wr_data) lands
// in the shadow bank at the clock edge. commit moves the shadow bank to h at the
// next edge; a write and a commit in the same cycle commit the new value too.
// Reset clears both banks. The h numbering follows the document's figure of the
// two-receiver Alamouti decoder; the bus and the double buffering are choices
// of this design.
module csi_regs
  import sasrats_pkg::*;
#(
  parameter int unsigned NUM_CH = 8,
  localparam int unsigned AW = (NUM_CH > 1) ? $clog2(NUM_CH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  h_t            wr_data,
  input  logic          commit,
  output h_t            h      [NUM_CH],
  output logic          updated          // pulses when h has been reloaded
);

  h_t shadow [NUM_CH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NUM_CH; n++) begin
        shadow[n] <= '0;
        h[n]      <= '0;
      end
      updated <= 1'b0;
    end else begin
      updated <= commit;
      for (int n = 0; n < NUM_CH; n++) begin
        if (wr_en && wr_addr == AW'(n))
          shadow[n] <= wr_data;
        if (commit)
          h[n] <= (wr_en && wr_addr == AW'(n)) ? wr_data : shadow[n];
      end
    end
  end

endmodule
