// dwt97m_pkg: widths and stream types shared by every unit of the 3-level
// 9/7M integer DWT.
//
// Pixels enter 16 bits wide and every coefficient stream inside the design is
// 20 bits wide, the width the row FIFOs are given to hold the dynamic-range
// growth of the integer transform. A stream beat carries its data plus two
// side-band flags: eol marks the last beat of a row, eos the last beat of a
// frame (or of a push-broom strip). The 5-tuple handed from a feeder to an
// arithmetic pipeline carries the five taps of one lifting step and the
// left_mirror flag that selects D_0 in place of D_{-1} when C_0 is computed.
// The sub-band enumeration fixes the order of the ten output streams of the
// top level. Signed coefficients and the sub-band order are choices of this
// design; the 16/20-bit widths follow the original design.
package dwt97m_pkg;

  localparam int PIX_W  = 16;  // input pixel width
  localparam int COEF_W = 20;  // coefficient width in all internal streams
  localparam int NUM_SB = 10;  // sub-band output streams of the 3-level DWT

  typedef logic signed [COEF_W-1:0] coef_t;

  // One beat of a one-sample-per-cycle coefficient stream.
  typedef struct packed {
    coef_t data;
    logic  eol;
    logic  eos;
  } sample_t;

  // One beat of a two-samples-per-cycle stream (x_even, x_odd).
  typedef struct packed {
    coef_t x_even;
    coef_t x_odd;
    logic  eol;
    logic  eos;
  } pair_t;

  // Taps x_{2j-2}, x_{2j}, x_{2j+1}, x_{2j+2}, x_{2j+4} of lifting step j.
  typedef struct packed {
    coef_t xm2;
    coef_t x0;
    coef_t x1;
    coef_t x2;
    coef_t x4;
    logic  left_mirror;
    logic  eol;
    logic  eos;
  } tuple_t;

  // Output stream order of the top level.
  typedef enum logic [3:0] {
    SB_LL3 = 4'd0, SB_HL3 = 4'd1, SB_LH3 = 4'd2, SB_HH3 = 4'd3,
    SB_HL2 = 4'd4, SB_LH2 = 4'd5, SB_HH2 = 4'd6,
    SB_HL1 = 4'd7, SB_LH1 = 4'd8, SB_HH1 = 4'd9
  } subband_e;

endpackage
