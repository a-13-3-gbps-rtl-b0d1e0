// hdwt_unit: Horizontal DWT unit. One 9/7M lifting step along the rows.
//
// Input: rows as (x_even, x_odd) pairs, two samples per cycle. Output: the
// low-pass stream C (C_0..C_{N-1} of each row) and the high-pass stream D,
// one coefficient per cycle each, produced side by side. Inside, an elastic
// buffer, the Horizontal Feeder, a second elastic buffer and the arithmetic
// pipeline with a one-register D delay, as in the original unit.
//
// Timing: a row of N pairs is taken in N+2 cycles (two extra cycles for the
// right-edge mirroring); the first C/D pair appears 12 cycles after the third
// pair of a row is accepted when nothing stalls. eol/eos travel with the
// coefficients of the last step of a row/frame.
module hdwt_unit
  import dwt97m_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  pair_t   in_data,
  output logic    c_valid,
  input  logic    c_ready,
  output sample_t c_data,
  output logic    d_valid,
  input  logic    d_ready,
  output sample_t d_data
);

  logic   p_valid, p_ready;
  pair_t  p_data;
  logic   f_valid, f_ready;
  tuple_t f_data;
  logic   t_valid, t_ready;
  tuple_t t_data;

  elb #(.T(pair_t)) u_elb_in (
    .clk, .rst_n,
    .in_valid (in_valid), .in_ready (in_ready), .in_data (in_data),
    .out_valid(p_valid),  .out_ready(p_ready),  .out_data(p_data)
  );

  h_feeder u_feeder (
    .clk, .rst_n,
    .in_valid (p_valid), .in_ready (p_ready), .in_data (p_data),
    .out_valid(f_valid), .out_ready(f_ready), .out_data(f_data)
  );

  elb #(.T(tuple_t)) u_elb_mid (
    .clk, .rst_n,
    .in_valid (f_valid), .in_ready (f_ready), .in_data (f_data),
    .out_valid(t_valid), .out_ready(t_ready), .out_data(t_data)
  );

  dwt_pipeline #(.DEPTH(1)) u_pipe (
    .clk, .rst_n,
    .in_valid (t_valid), .in_ready (t_ready), .in_data (t_data),
    .c_valid, .c_ready, .c_data,
    .d_valid, .d_ready, .d_data
  );

endmodule
