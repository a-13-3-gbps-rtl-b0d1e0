// vdwt_unit: Vertical DWT unit. One 9/7M lifting step down the columns.
//
// Input: rows of one stream (the low- or high-pass output of a horizontal
// unit), one coefficient per cycle in raster order. Output: the vertical
// low-pass stream C and high-pass stream D, each in raster order of the
// output rows (N rows of w coefficients for 2N input rows). Inside, an
// elastic buffer, the Vertical Feeder with its seven row FIFOs, a second
// elastic buffer and the arithmetic pipeline, whose D delay is here a row
// FIFO so that D_{j-1} is the high-pass value of the same column one output
// row earlier. This is the original unit's structure: eight row FIFOs of
// DEPTH words in all.
//
// Timing: a frame of 2N rows of w samples takes (2N+4)*w cycles; outputs are
// produced during every second input row and during the bottom mirroring.
module vdwt_unit
  import dwt97m_pkg::*;
#(
  parameter int DEPTH = 2048
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t in_data,
  output logic    c_valid,
  input  logic    c_ready,
  output sample_t c_data,
  output logic    d_valid,
  input  logic    d_ready,
  output sample_t d_data
);

  logic    s_valid, s_ready;
  sample_t s_data;
  logic    f_valid, f_ready;
  tuple_t  f_data;
  logic    t_valid, t_ready;
  tuple_t  t_data;

  elb #(.T(sample_t)) u_elb_in (
    .clk, .rst_n,
    .in_valid (in_valid), .in_ready (in_ready), .in_data (in_data),
    .out_valid(s_valid),  .out_ready(s_ready),  .out_data(s_data)
  );

  v_feeder #(.DEPTH(DEPTH)) u_feeder (
    .clk, .rst_n,
    .in_valid (s_valid), .in_ready (s_ready), .in_data (s_data),
    .out_valid(f_valid), .out_ready(f_ready), .out_data(f_data)
  );

  elb #(.T(tuple_t)) u_elb_mid (
    .clk, .rst_n,
    .in_valid (f_valid), .in_ready (f_ready), .in_data (f_data),
    .out_valid(t_valid), .out_ready(t_ready), .out_data(t_data)
  );

  dwt_pipeline #(.DEPTH(DEPTH)) u_pipe (
    .clk, .rst_n,
    .in_valid (t_valid), .in_ready (t_ready), .in_data (t_data),
    .c_valid, .c_ready, .c_data,
    .d_valid, .d_ready, .d_data
  );

endmodule
