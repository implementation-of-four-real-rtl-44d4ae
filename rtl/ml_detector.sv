// ml_detector: maximum-likelihood PSK decision for the two combined Alamouti
// signals.
//
// After combining, s~ = E * s + noise, with E = sum of |h|^2 over the channels
// in use. The detector forms the M constellation points E * exp(j*2*pi*k/M),
// computes the squared Euclidean distance d^2(s~, point k) for each, and picks
// the point with the least distance, separately for s0~ and s1~. On equal
// distances the lower index wins. M is 2, 4 or 8 (psk_mode) and can change from
// one block to the next. Points are taken from a Q1.14 unit-circle table and
// scaled by E, so they are in the same units as s~ (see sasrats_pkg).
//
// Interface and timing: in_valid with s0~/s1~, channels and mode; two pipeline
// stages (distances, then minimum); out_valid two cycles after in_valid with
// the symbol indices s0_hat, s1_hat in 0..M-1.
// The distance rule and the use of the channel state follow the document;
// the PSK orders offered, point placement (point 0 at phase 0), tie rule,
// widths and pipelining are choices of this design.
module ml_detector
  import sasrats_pkg::*;
#(
  parameter int unsigned NUM_RX = 4,
  localparam int unsigned S_W = IQ_W + H_W + 1 + $clog2(2 * NUM_RX) + 1,
  localparam int unsigned E_W = 2 * H_W + $clog2(2 * NUM_RX) + 1,
  localparam int unsigned D_W = ((S_W > E_W + 2) ? S_W : E_W + 2) + 1,
  localparam int unsigned Q_W = 2 * D_W + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_RX-1:0]     rx_enable,
  input  psk_mode_e             psk_mode,
  input  h_t                    h        [2*NUM_RX],
  input  logic                  in_valid,
  input  logic signed [S_W-1:0] s0_i,
  input  logic signed [S_W-1:0] s0_q,
  input  logic signed [S_W-1:0] s1_i,
  input  logic signed [S_W-1:0] s1_q,
  output logic                  out_valid,
  output logic [2:0]            s0_hat,
  output logic [2:0]            s1_hat
);

  logic signed [E_W-1:0] energy;

  always_comb begin
    energy = '0;
    for (int n = 0; n < 2 * NUM_RX; n++)
      if (rx_enable[n/2])
        energy += E_W'(h[n].i) * E_W'(h[n].i) + E_W'(h[n].q) * E_W'(h[n].q);
  end

  // Constellation point k (k < M), scaled by the channel energy.
  function automatic logic signed [D_W-1:0] point_c(input logic signed [E_W-1:0] e,
                                                    input logic signed [15:0] c);
    logic signed [E_W+15:0] p;
    p = (E_W+16)'(e) * (E_W+16)'(c);
    point_c = D_W'(p >>> 14);
  endfunction

  function automatic logic [Q_W-1:0] dist2(input logic signed [S_W-1:0] si,
                                           input logic signed [S_W-1:0] sq,
                                           input logic signed [D_W-1:0] p_i,
                                           input logic signed [D_W-1:0] p_q);
    logic signed [D_W-1:0] di, dq;
    di = D_W'(si) - p_i;
    dq = D_W'(sq) - p_q;
    dist2 = Q_W'(Q_W'(di) * Q_W'(di)) + Q_W'(Q_W'(dq) * Q_W'(dq));
  endfunction

  logic [2:0] stride;
  logic [3:0] npts;
  always_comb begin
    unique case (psk_mode)
      PSK_2:   begin stride = 3'd4; npts = 4'd2; end
      PSK_4:   begin stride = 3'd2; npts = 4'd4; end
      default: begin stride = 3'd1; npts = 4'd8; end
    endcase
  end

  logic [Q_W-1:0] d0 [8];
  logic [Q_W-1:0] d1 [8];
  logic [3:0]     npts_q;
  logic           v1;

  // Stage 1: squared distances to every point of the selected constellation.
  logic [Q_W-1:0] d0_c [8];
  logic [Q_W-1:0] d1_c [8];
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      logic [2:0] t;
      logic signed [D_W-1:0] p_i, p_q;
      t   = 3'(k) * stride;
      p_i = point_c(energy, psk_cos(t));
      p_q = point_c(energy, psk_sin(t));
      d0_c[k] = dist2(s0_i, s0_q, p_i, p_q);
      d1_c[k] = dist2(s1_i, s1_q, p_i, p_q);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1     <= 1'b0;
      npts_q <= '0;
      for (int k = 0; k < 8; k++) begin
        d0[k] <= '0;
        d1[k] <= '0;
      end
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        npts_q <= npts;
        for (int k = 0; k < 8; k++) begin
          d0[k] <= d0_c[k];
          d1[k] <= d1_c[k];
        end
      end
    end
  end

  // Stage 2: index of the least distance among the first npts points.
  logic [2:0]     best0, best1;
  logic [Q_W-1:0] min0, min1;
  always_comb begin
    best0 = '0; best1 = '0;
    min0 = d0[0]; min1 = d1[0];
    for (int k = 1; k < 8; k++) begin
      if (4'(k) < npts_q) begin
        if (d0[k] < min0) begin min0 = d0[k]; best0 = 3'(k); end
        if (d1[k] < min1) begin min1 = d1[k]; best1 = 3'(k); end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      s0_hat    <= '0;
      s1_hat    <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        s0_hat <= best0;
        s1_hat <= best1;
      end
    end
  end

endmodule
