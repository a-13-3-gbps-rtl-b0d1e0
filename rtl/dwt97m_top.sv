// dwt97m_top: the complete DWT front end of a CCSDS 122.0-B-1 image
// compressor: the three-level 2D 9/7M DWT core (dwt97m_3level) behind an
// input stage that can generate the end-of-line/end-of-stream flags itself.
//
// With cfg_gen_flags low the pixel source supplies s_eol/s_eos, as a sensor
// read-out would. With it high, an eol_eos_wrapper derives both flags from
// cfg_width x cfg_height, and the source's own flags are ignored. Either
// way the core sees a raster-order pair stream with flags, and emits the ten
// sub-band streams described in dwt97m_3level. The run-time choice between
// the two flag sources is this design's; the wrapper itself is the external
// helper the original design mentions.
//
// Interface: AXI4-Stream-style valid/ready on the input and on each of the
// ten outputs (m_* indexed by dwt97m_pkg::subband_e). cfg_* must stay
// constant while a frame is in flight. The input stage adds no latency.
module dwt97m_top
  import dwt97m_pkg::*;
#(
  parameter int MAX_WIDTH  = 4096,
  parameter bit PIX_SIGNED = 1'b0
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // configuration
  input  logic                           cfg_gen_flags,
  input  logic [15:0]                    cfg_width,
  input  logic [15:0]                    cfg_height,
  // pixel input
  input  logic                           s_valid,
  output logic                           s_ready,
  input  logic [PIX_W-1:0]               s_x_even,
  input  logic [PIX_W-1:0]               s_x_odd,
  input  logic                           s_eol,
  input  logic                           s_eos,
  // sub-band outputs
  output logic [NUM_SB-1:0]              m_valid,
  input  logic [NUM_SB-1:0]              m_ready,
  output logic [NUM_SB-1:0][COEF_W-1:0]  m_data,
  output logic [NUM_SB-1:0]              m_eol,
  output logic [NUM_SB-1:0]              m_eos
);

  logic             w_valid, w_ready, w_eol, w_eos;
  logic [PIX_W-1:0] w_x_even, w_x_odd;
  logic             c_valid, c_ready;

  eol_eos_wrapper #(.DIM_W(16)) u_flags (
    .clk, .rst_n,
    .cfg_width, .cfg_height,
    .in_valid  (s_valid && cfg_gen_flags),
    .in_ready  (w_ready),
    .in_x_even (s_x_even),
    .in_x_odd  (s_x_odd),
    .out_valid (w_valid),
    .out_ready (c_ready),
    .out_x_even(w_x_even),
    .out_x_odd (w_x_odd),
    .out_eol   (w_eol),
    .out_eos   (w_eos)
  );

  assign c_valid = cfg_gen_flags ? w_valid : s_valid;
  assign s_ready = cfg_gen_flags ? w_ready : c_ready;

  dwt97m_3level #(.MAX_WIDTH(MAX_WIDTH), .PIX_SIGNED(PIX_SIGNED)) u_core (
    .clk, .rst_n,
    .s_valid (c_valid),
    .s_ready (c_ready),
    .s_x_even(cfg_gen_flags ? w_x_even : s_x_even),
    .s_x_odd (cfg_gen_flags ? w_x_odd  : s_x_odd),
    .s_eol   (cfg_gen_flags ? w_eol    : s_eol),
    .s_eos   (cfg_gen_flags ? w_eos    : s_eos),
    .m_valid, .m_ready, .m_data, .m_eol, .m_eos
  );

endmodule
