// sasrats_pkg: types and constants shared by the receiver and space-time decoder RTL.
//
// Baseband samples are complex pairs of 16-bit two's-complement words, the
// resolution of the digital down converter's output. Channel estimates use the
// same format and the same scale as the samples (an estimate is a received
// training sample divided by a unit-magnitude training symbol), which lets the
// maximum-likelihood detector compare combined signals against constellation
// points scaled by the channel energy without any further normalisation.
// Phase angles are binary angles: an ANGLE_W-bit unsigned word where 2^ANGLE_W
// is one full turn, so modulo-2*pi arithmetic is plain wrap-around arithmetic.
package sasrats_pkg;

  localparam int unsigned IQ_W    = 16;  // DDC output word width
  localparam int unsigned H_W     = 16;  // channel estimate component width
  localparam int unsigned ANGLE_W = 16;  // binary angle width (2^16 = 2*pi)
  localparam int unsigned NCO_W   = 32;  // NCO frequency tuning word width

  typedef struct packed {
    logic signed [IQ_W-1:0] i;
    logic signed [IQ_W-1:0] q;
  } iq_t;

  typedef struct packed {
    logic signed [H_W-1:0] i;
    logic signed [H_W-1:0] q;
  } h_t;

  // PSK order selection for the ML detector.
  typedef enum logic [1:0] {
    PSK_2 = 2'd0,
    PSK_4 = 2'd1,
    PSK_8 = 2'd2
  } psk_mode_e;

  // Unit-circle points exp(j*2*pi*k/8) in Q1.14: round(16384*cos), round(16384*sin).
  // A 4-PSK point k is 8-PSK point 2k, a 2-PSK point k is 8-PSK point 4k.
  localparam int signed UNIT_Q14 = 16384;
  localparam int signed DIAG_Q14 = 11585;

  function automatic logic signed [15:0] psk_cos(input logic [2:0] k);
    unique case (k)
      3'd0: psk_cos = 16'(UNIT_Q14);
      3'd1: psk_cos = 16'(DIAG_Q14);
      3'd2: psk_cos = 16'sd0;
      3'd3: psk_cos = -16'(DIAG_Q14);
      3'd4: psk_cos = -16'(UNIT_Q14);
      3'd5: psk_cos = -16'(DIAG_Q14);
      3'd6: psk_cos = 16'sd0;
      default: psk_cos = 16'(DIAG_Q14);
    endcase
  endfunction

  function automatic logic signed [15:0] psk_sin(input logic [2:0] k);
    psk_sin = psk_cos(k - 3'd2);
  endfunction

  // Number of constellation points for a mode and the stride into the 8-point table.
  function automatic int unsigned psk_points(input psk_mode_e m);
    unique case (m)
      PSK_2:   psk_points = 2;
      PSK_4:   psk_points = 4;
      default: psk_points = 8;
    endcase
  endfunction

endpackage
